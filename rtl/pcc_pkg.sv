// pcc_pkg: constants shared by the packet-connected-circuit (PCC) switch test chip.
//
// The switch forwards 4-bit nibbles plus a req wire on each of three ports.
// The two least significant bits of the first nibble of a packet name the
// output port a switch is asked to use; the nibble is consumed by that switch.
// Because only three ports exist, the route value 3 names no port: the
// state register of an input control block uses it as "no connection".
//
// The port count, nibble width, route-field width and the test sequence are
// the test chip's; the idle encoding is this design's choice.
package pcc_pkg;

  // Number of bidirectional ports of one switch (north/east/south/west/down
  // in the full network, reduced to three on the test chip).
  localparam int unsigned NPORTS = 3;

  // Width of the data path of one port (a nibble).
  localparam int unsigned DATA_W = 4;

  // Bits of a nibble that carry the output-port number.
  localparam int unsigned ADDR_W = 2;

  // Test sequence generator: route nibble, then the payload nibbles.
  localparam logic [DATA_W-1:0] TSG_ROUTE = 4'h1;
  localparam int unsigned       TSG_LEN   = 6;
  localparam logic [DATA_W-1:0] TSG_SEQ [TSG_LEN] = '{4'h1, 4'hD, 4'hA, 4'h8, 4'h4, 4'h2};

endpackage

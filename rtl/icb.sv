// icb: input control block, one per input port of the switch.
//
// The edge detector watches req. On a rising edge the low ADDR_W bits of the
// nibble arriving in the same cycle are the route: they are decoded one-hot
// and sent to the output control block as a build-up request. The decision
// logic picks the output control block's reply for that output; if it is
// granted, the state register is loaded with the route at the clock edge,
// otherwise a one-cycle nack is produced. On a falling edge of req the state
// register is decoded into a tear-down order for the output it holds and is
// then cleared. The decoded state register drives the crossbar control of
// this input, one line per output port.
//
// The state register is ADDR_W bits; a value that names no existing port
// (all ones, i.e. 3 on a 3-port switch) means "no connection". A route
// nibble naming a port that does not exist therefore gets no grant and is
// nacked. Both are this design's choices.
//
// Timing: request and reply are combinational in the cycle of the rising
// edge; crossbar control is active from the next cycle; nack is registered
// and high during the cycle after the refused rising edge.
module icb #(
  parameter int unsigned NPORTS = pcc_pkg::NPORTS,
  parameter int unsigned ADDR_W = pcc_pkg::ADDR_W
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              req,
  input  logic [ADDR_W-1:0] addr,
  output logic [NPORTS-1:0] build_req,
  input  logic [NPORTS-1:0] reply,
  output logic [NPORTS-1:0] tear_down,
  output logic              nack,
  output logic [NPORTS-1:0] xbar_ctrl
);

  localparam logic [ADDR_W-1:0] IDLE = '1;

  logic              build_up, tear_dn;
  logic [ADDR_W-1:0] state_q;
  logic [NPORTS-1:0] addr_oh;
  logic              granted;

  // The idle code must name no port.
  if (NPORTS >= (1 << ADDR_W)) begin : g_bad_param
    $error("icb: NPORTS must be below 2**ADDR_W");
  end

  edge_detector u_edge (
    .clk       (clk),
    .rst_n     (rst_n),
    .req       (req),
    .build_up  (build_up),
    .tear_down (tear_dn)
  );

  // one-hot decoder: out-of-range codes decode to zero
  function automatic logic [NPORTS-1:0] decode(input logic [ADDR_W-1:0] a);
    logic [NPORTS-1:0] oh;
    oh = '0;
    for (int unsigned j = 0; j < NPORTS; j++)
      if (a == ADDR_W'(j)) oh[j] = 1'b1;
    return oh;
  endfunction

  always_comb begin
    addr_oh   = decode(addr);
    build_req = build_up ? addr_oh : '0;
    granted   = build_up & |(reply & addr_oh);
    tear_down = tear_dn ? decode(state_q) : '0;
    xbar_ctrl = decode(state_q);
  end

  // state register and decision logic
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state_q <= IDLE;
      nack    <= 1'b0;
    end else begin
      nack <= build_up & ~granted;
      if (tear_dn)      state_q <= IDLE;
      else if (granted) state_q <= addr;
    end
  end

endmodule

// pcc_chip: the two-switch PCC test chip.
//
// Two three-port switches, A and B, share one clock. Their port 0 links them:
// output 0 of A drives input 0 of B and output 0 of B drives input 0 of A,
// each link with its nack wire running back the other way. Port 1 of each
// switch goes to the chip pins in both directions. Input 2 of each switch is
// fed by its own test sequence generator, whose packet is routed to output 1
// and so reaches the pins. Output 2 of both switches is left unconnected.
//
// A packet entering at B's pins with the route nibbles 0, 1 crosses B to its
// output 0, A to its output 1 and leaves at A's pins: one route nibble is
// consumed and one cycle of latency is added per switch.
//
// Ports: the pin-side signals of port 1 of each switch (a_*, b_*), the start
// inputs of the generators and, for observation, the nack that each switch
// returns to its generator (on the original chip this wire stays inside).
// Port assignment follows the chip's block diagram; the observable
// generator nacks are this design's addition.
module pcc_chip #(
  parameter int unsigned DATA_W = pcc_pkg::DATA_W
) (
  input  logic              clk,
  input  logic              rst_n,
  // switch A, port 1 (pins)
  input  logic              a_in1_req,
  input  logic [DATA_W-1:0] a_in1_data,
  output logic              a_in1_nack,
  output logic              a_out1_req,
  output logic [DATA_W-1:0] a_out1_data,
  input  logic              a_out1_nack,
  // switch B, port 1 (pins)
  input  logic              b_in1_req,
  input  logic [DATA_W-1:0] b_in1_data,
  output logic              b_in1_nack,
  output logic              b_out1_req,
  output logic [DATA_W-1:0] b_out1_data,
  input  logic              b_out1_nack,
  // test sequence generators
  input  logic              start_a,
  input  logic              start_b,
  output logic              tsg_a_nack,
  output logic              tsg_b_nack
);

  localparam int unsigned NP = 3;

  logic [NP-1:0]             a_in_req, a_in_nack, a_out_req, a_out_nack;
  logic [NP-1:0][DATA_W-1:0] a_in_data, a_out_data;
  logic [NP-1:0]             b_in_req, b_in_nack, b_out_req, b_out_nack;
  logic [NP-1:0][DATA_W-1:0] b_in_data, b_out_data;
  logic                      tsg_a_req, tsg_b_req;
  logic [DATA_W-1:0]         tsg_a_data, tsg_b_data;

  pcc_switch #(.NPORTS(NP), .DATA_W(DATA_W)) u_sw_a (
    .clk (clk), .rst_n (rst_n),
    .in_req  (a_in_req),  .in_data  (a_in_data),  .in_nack  (a_in_nack),
    .out_req (a_out_req), .out_data (a_out_data), .out_nack (a_out_nack)
  );

  pcc_switch #(.NPORTS(NP), .DATA_W(DATA_W)) u_sw_b (
    .clk (clk), .rst_n (rst_n),
    .in_req  (b_in_req),  .in_data  (b_in_data),  .in_nack  (b_in_nack),
    .out_req (b_out_req), .out_data (b_out_data), .out_nack (b_out_nack)
  );

  tsg #(.DATA_W(DATA_W)) u_tsg_a (
    .clk (clk), .rst_n (rst_n), .start (start_a), .req (tsg_a_req), .data (tsg_a_data)
  );

  tsg #(.DATA_W(DATA_W)) u_tsg_b (
    .clk (clk), .rst_n (rst_n), .start (start_b), .req (tsg_b_req), .data (tsg_b_data)
  );

  always_comb begin
    // port 0: link between the switches
    a_in_req[0]   = b_out_req[0];
    a_in_data[0]  = b_out_data[0];
    b_out_nack[0] = a_in_nack[0];
    b_in_req[0]   = a_out_req[0];
    b_in_data[0]  = a_out_data[0];
    a_out_nack[0] = b_in_nack[0];
    // port 1: pins
    a_in_req[1]   = a_in1_req;
    a_in_data[1]  = a_in1_data;
    a_in1_nack    = a_in_nack[1];
    a_out1_req    = a_out_req[1];
    a_out1_data   = a_out_data[1];
    a_out_nack[1] = a_out1_nack;
    b_in_req[1]   = b_in1_req;
    b_in_data[1]  = b_in1_data;
    b_in1_nack    = b_in_nack[1];
    b_out1_req    = b_out_req[1];
    b_out1_data   = b_out_data[1];
    b_out_nack[1] = b_out1_nack;
    // port 2: generator in, output unused (nothing downstream to nack)
    a_in_req[2]   = tsg_a_req;
    a_in_data[2]  = tsg_a_data;
    tsg_a_nack    = a_in_nack[2];
    a_out_nack[2] = 1'b0;
    b_in_req[2]   = tsg_b_req;
    b_in_data[2]  = tsg_b_data;
    tsg_b_nack    = b_in_nack[2];
    b_out_nack[2] = 1'b0;
  end

endmodule

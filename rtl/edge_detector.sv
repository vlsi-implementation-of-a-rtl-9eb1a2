// edge_detector: finds the rising and falling edges of an input control
// block's req wire.
//
// req is sampled into one flip-flop every clock. A rising edge (req high now,
// low in the previous cycle) is a connection build-up; a falling edge is a
// connection tear-down. Both outputs are combinational and valid in the same
// cycle in which req changes, so the rest of the input control block can act
// on the route nibble that arrives together with the rising edge.
//
// Interface: clk, active-low asynchronous rst_n, req in; build_up and
// tear_down out, each high for exactly one cycle per edge.
// The register clears to 0 on reset, so a req already high when reset is
// released counts as a build-up (reset behaviour is this design's choice).
module edge_detector (
  input  logic clk,
  input  logic rst_n,
  input  logic req,
  output logic build_up,
  output logic tear_down
);

  logic req_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) req_q <= 1'b0;
    else        req_q <= req;
  end

  assign build_up  =  req & ~req_q;
  assign tear_down = ~req &  req_q;

endmodule

// xbar_cell: one crossing of the crossbar, joining one input port to one
// output port.
//
// A single control line closes the switches of the cell: req and the data
// nibble then pass from the input port to the output port, and nack passes
// the other way, from the output port back to the input port. With the
// control line low the cell contributes nothing (all zeros), so the crossbar
// can OR the cells of one row or column together; the output control block
// guarantees that at most one cell per output is closed.
//
// Purely combinational. The switches of the original cell are modelled as
// AND gates (this design's choice for a synthesizable equivalent).
module xbar_cell #(
  parameter int unsigned DATA_W = pcc_pkg::DATA_W
) (
  input  logic              ctrl,
  input  logic              in_req,
  input  logic [DATA_W-1:0] in_data,
  output logic              in_nack,
  output logic              out_req,
  output logic [DATA_W-1:0] out_data,
  input  logic              out_nack
);

  always_comb begin
    out_req  = ctrl & in_req;
    out_data = ctrl ? in_data : '0;
    in_nack  = ctrl & out_nack;
  end

endmodule

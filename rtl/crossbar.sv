// crossbar: NPORTS x NPORTS crossbar of identical xbar_cell instances.
//
// Cell (i, j) joins input port i to output port j and is closed by control
// line ctrl[i][j], which comes from the state register decoder of input
// control block i. Output port j receives the OR of the req and data of the
// cells in its column; input port i receives the OR of the nacks returned by
// the cells in its row. The output control block keeps at most one cell per
// column closed, so the OR selects a single source.
//
// Purely combinational; the retiming register is outside, in the switch.
module crossbar #(
  parameter int unsigned NPORTS = pcc_pkg::NPORTS,
  parameter int unsigned DATA_W = pcc_pkg::DATA_W
) (
  input  logic [NPORTS-1:0][NPORTS-1:0] ctrl,
  input  logic [NPORTS-1:0]             in_req,
  input  logic [NPORTS-1:0][DATA_W-1:0] in_data,
  output logic [NPORTS-1:0]             in_nack,
  output logic [NPORTS-1:0]             out_req,
  output logic [NPORTS-1:0][DATA_W-1:0] out_data,
  input  logic [NPORTS-1:0]             out_nack
);

  logic [NPORTS-1:0][NPORTS-1:0]             c_req;   // [i][j]
  logic [NPORTS-1:0][NPORTS-1:0][DATA_W-1:0] c_data;  // [i][j]
  logic [NPORTS-1:0][NPORTS-1:0]             c_nack;  // [i][j]

  for (genvar i = 0; i < NPORTS; i++) begin : g_row
    for (genvar j = 0; j < NPORTS; j++) begin : g_col
      xbar_cell #(.DATA_W(DATA_W)) u_cell (
        .ctrl     (ctrl[i][j]),
        .in_req   (in_req[i]),
        .in_data  (in_data[i]),
        .in_nack  (c_nack[i][j]),
        .out_req  (c_req[i][j]),
        .out_data (c_data[i][j]),
        .out_nack (out_nack[j])
      );
    end
  end

  always_comb begin
    out_req  = '0;
    out_data = '0;
    in_nack  = '0;
    for (int unsigned i = 0; i < NPORTS; i++) begin
      in_nack[i] = |c_nack[i];
      for (int unsigned j = 0; j < NPORTS; j++) begin
        out_req[j]  = out_req[j] | c_req[i][j];
        out_data[j] = out_data[j] | c_data[i][j];
      end
    end
  end

endmodule

// pcc_switch: packet-connected-circuit (PCC) switch with NPORTS bidirectional
// ports.
//
// A sender raises req and puts a route nibble on the data wires; the low
// ADDR_W bits name the output port to use. The input control block (icb) of
// that port asks the output control block (ocb) for the output. If the
// output is free the circuit is set up and stays up until the sender lowers
// req, whatever other requests arrive later (no pre-emption). If the output
// is taken, or two inputs ask for the same output in the same cycle and this
// input does not have the lowest id, the input gets a nack. The route nibble
// itself is consumed: it never appears on the output.
//
// The crossbar forwards req and data from an input to the output it is
// connected to, through one retiming register per output, and carries nack
// from the output back to the input, so a nack produced further along the
// route reaches the sender. The nack entering at an output is retimed too,
// by one flip-flop, so nack also costs one cycle per switch; this keeps two
// switches linked in both directions free of a combinational path through
// both crossbars. An input's nack wire is the OR of its own icb's nack and
// the nack returned through the crossbar.
//
// Timing, for a req rising in cycle t with the route nibble:
//   t      build-up request and reply (combinational), state loaded at the edge
//   t+1    crossbar closed; the nibble of cycle t+1 enters the retiming register
//   t+2    output req high with that nibble (the first one after the route)
// Each later nibble leaves one cycle after it entered. When req falls in
// cycle e, the output req falls in cycle e+1 right after the last nibble and
// the output is free for a new build-up from cycle e+1. A refused build-up
// gives nack in cycle t+1. A nack arriving at a connected output in cycle n
// leaves at the input in cycle n+1.
//
// Follows the test chip: three ports, 4-bit data, a one-bit req and one-bit
// nack per port, fixed priority, source routing. Where the retiming
// registers sit and the nack timing are this design's choices.
module pcc_switch #(
  parameter int unsigned NPORTS = pcc_pkg::NPORTS,
  parameter int unsigned DATA_W = pcc_pkg::DATA_W,
  parameter int unsigned ADDR_W = pcc_pkg::ADDR_W
) (
  input  logic                          clk,
  input  logic                          rst_n,
  // input side of each port
  input  logic [NPORTS-1:0]             in_req,
  input  logic [NPORTS-1:0][DATA_W-1:0] in_data,
  output logic [NPORTS-1:0]             in_nack,
  // output side of each port
  output logic [NPORTS-1:0]             out_req,
  output logic [NPORTS-1:0][DATA_W-1:0] out_data,
  input  logic [NPORTS-1:0]             out_nack
);

  logic [NPORTS-1:0][NPORTS-1:0]        build_req, tear_down, reply, xbar_ctrl;
  logic [NPORTS-1:0]                    icb_nack, xb_nack, busy, out_nack_q;
  logic [NPORTS-1:0]                    xb_req;
  logic [NPORTS-1:0][DATA_W-1:0]        xb_data;

  for (genvar i = 0; i < NPORTS; i++) begin : g_icb
    icb #(.NPORTS(NPORTS), .ADDR_W(ADDR_W)) u_icb (
      .clk       (clk),
      .rst_n     (rst_n),
      .req       (in_req[i]),
      .addr      (in_data[i][ADDR_W-1:0]),
      .build_req (build_req[i]),
      .reply     (reply[i]),
      .tear_down (tear_down[i]),
      .nack      (icb_nack[i]),
      .xbar_ctrl (xbar_ctrl[i])
    );
  end

  ocb #(.NPORTS(NPORTS)) u_ocb (
    .clk       (clk),
    .rst_n     (rst_n),
    .build_req (build_req),
    .tear_down (tear_down),
    .reply     (reply),
    .busy      (busy)
  );

  crossbar #(.NPORTS(NPORTS), .DATA_W(DATA_W)) u_xbar (
    .ctrl     (xbar_ctrl),
    .in_req   (in_req),
    .in_data  (in_data),
    .in_nack  (xb_nack),
    .out_req  (xb_req),
    .out_data (xb_data),
    .out_nack (out_nack_q)
  );

  // retiming register on every output
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_req    <= '0;
      out_data   <= '0;
      out_nack_q <= '0;
    end else begin
      out_req    <= xb_req;
      out_data   <= xb_data;
      out_nack_q <= out_nack;
    end
  end

  assign in_nack = icb_nack | xb_nack;

  // Crossbar control must match the output status register: every closed
  // cell belongs to a busy output and no output is driven by two inputs.
  for (genvar j = 0; j < NPORTS; j++) begin : g_chk
    logic [NPORTS-1:0] col;
    for (genvar i = 0; i < NPORTS; i++) begin : g_col
      assign col[i] = xbar_ctrl[i][j];
    end
    a_one_driver: assert property (@(posedge clk) disable iff (!rst_n)
      $onehot0(col) && (busy[j] == |col))
      else $error("pcc_switch: output %0d control inconsistent", j);
  end

endmodule

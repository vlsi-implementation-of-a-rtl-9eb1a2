// tsg: test sequence generator of the test chip.
//
// A rising edge on start, while no packet is being sent, makes the generator
// send one packet on its req/data wires: req goes high with the route nibble
// TSG_ROUTE (output port 1) and stays high for the TSG_LEN payload nibbles
// 0x1, 0xD, 0xA, 0x8, 0x4, 0x2 that follow, then falls. Further edges on
// start during a packet are ignored, and because a new packet needs a new
// edge, req is always low for at least one cycle between packets.
//
// Timing: start rising in cycle s puts the route nibble out in cycle s+1 and
// the last payload nibble in cycle s+1+TSG_LEN. data is zero while req is
// low. The route and the payload are the test chip's; the edge-triggered
// start and the idle data value are this design's choices. The generator
// does not react to nack, so it takes no nack input.
module tsg #(
  parameter int unsigned DATA_W = pcc_pkg::DATA_W
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              start,
  output logic              req,
  output logic [DATA_W-1:0] data
);

  import pcc_pkg::*;

  localparam int unsigned CNT_W = $clog2(TSG_LEN + 1);

  logic             start_q;
  logic             active_q;
  logic [CNT_W-1:0] cnt_q;   // 0: route nibble, k: payload nibble k-1

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      start_q  <= 1'b0;
      active_q <= 1'b0;
      cnt_q    <= '0;
    end else begin
      start_q <= start;
      if (!active_q) begin
        if (start && !start_q) begin
          active_q <= 1'b1;
          cnt_q    <= '0;
        end
      end else if (cnt_q == CNT_W'(TSG_LEN)) begin
        active_q <= 1'b0;
        cnt_q    <= '0;
      end else begin
        cnt_q <= cnt_q + 1'b1;
      end
    end
  end

  always_comb begin
    req  = active_q;
    data = '0;
    if (active_q) begin
      if (cnt_q == '0) data = DATA_W'(TSG_ROUTE);
      else             data = DATA_W'(TSG_SEQ[cnt_q - 1'b1]);
    end
  end

endmodule

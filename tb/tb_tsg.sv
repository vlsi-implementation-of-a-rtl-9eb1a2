// tb_tsg: pulses start and checks the generator's packet cycle by cycle: req
// high for seven cycles starting one cycle after the start edge, the route
// nibble 1 followed by 1, D, A, 8, 4, 2, then req low. A start edge during a
// packet and a start held high must not begin another packet.
module tb_tsg;
  logic clk = 1'b0, rst_n = 1'b0, start = 1'b0, req;
  logic [3:0] data;
  logic [3:0] exp_nib [7] = '{4'h1, 4'h1, 4'hD, 4'hA, 4'h8, 4'h4, 4'h2};
  int checks = 0, failures = 0;

  tsg #(.DATA_W(4)) dut (.clk, .rst_n, .start, .req, .data);

  always #5 clk = ~clk;

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input logic e_req, input logic [3:0] e_data, input string what);
    checks++;
    if (req !== e_req || (e_req && data !== e_data)) begin
      failures++;
      $display("%s: req=%b data=%h expected req=%b data=%h", what, req, data, e_req, e_data);
    end
  endtask

  // start rises before the edge of cycle s; the packet occupies cycles s+1..s+7
  task automatic run_packet(input bit pulse_mid, input bit hold_start);
    @(negedge clk) start = 1'b1;
    #1 check(1'b0, 4'h0, "before start edge");
    @(negedge clk) if (!hold_start) start = 1'b0;
    for (int k = 0; k < 7; k++) begin
      #1 check(1'b1, exp_nib[k], $sformatf("nibble %0d", k));
      @(negedge clk);
      if (pulse_mid && k == 2) start = 1'b1;
      if (pulse_mid && k == 3) start = 1'b0;
    end
    #1 check(1'b0, 4'h0, "after packet");
    start = 1'b0;
    repeat (4) begin
      @(negedge clk);
      #1 check(1'b0, 4'h0, "idle");
    end
  endtask

  initial begin
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;
    repeat (3) begin @(negedge clk); #1 check(1'b0, 4'h0, "reset idle"); end
    run_packet(1'b0, 1'b0);
    run_packet(1'b1, 1'b0);
    run_packet(1'b0, 1'b1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

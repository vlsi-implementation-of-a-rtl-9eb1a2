// tb_edge_detector: drives a random req sequence and checks, every cycle,
// build_up and tear_down against a reference made from the previous req
// value held in the testbench.
module tb_edge_detector;
  logic clk = 1'b0, rst_n = 1'b0, req = 1'b0;
  logic build_up, tear_down;
  logic prev;
  int   checks = 0, failures = 0, rises = 0, falls = 0;

  edge_detector dut (.clk, .rst_n, .req, .build_up, .tear_down);

  always #5 clk = ~clk;

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;
    prev = 1'b0;
    for (int n = 0; n < 400; n++) begin
      @(negedge clk);
      req = 1'($urandom_range(0, 1));
      #2;
      checks++;
      if (build_up !== (req && !prev) || tear_down !== (!req && prev)) begin
        failures++;
        $display("cycle %0d: req=%b prev=%b build_up=%b tear_down=%b", n, req, prev, build_up, tear_down);
      end
      rises += int'(req && !prev);
      falls += int'(!req && prev);
      @(posedge clk);
      prev = req;
    end
    checks++;
    if (rises == 0 || falls == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_xbar_cell: exhaustive check of one crossbar cell: req and data pass
// forward and nack passes back only while the control line is high.
module tb_xbar_cell;
  logic       ctrl, in_req, in_nack, out_req, out_nack;
  logic [3:0] in_data, out_data;
  int checks = 0, failures = 0;

  xbar_cell #(.DATA_W(4)) dut (.ctrl, .in_req, .in_data, .in_nack, .out_req, .out_data, .out_nack);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 128; v++) begin
      {ctrl, in_req, out_nack, in_data} = 7'(v);
      #1;
      checks++;
      if (out_req !== (ctrl & in_req) || in_nack !== (ctrl & out_nack) ||
          out_data !== (ctrl ? in_data : 4'h0)) begin
        failures++;
        $display("v=%0h out_req=%b in_nack=%b out_data=%h", v, out_req, in_nack, out_data);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

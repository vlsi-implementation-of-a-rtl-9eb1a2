// tb_crossbar: random legal control settings (each output driven by at most
// one input) with random req, data and nack; every output and returned nack
// is compared with a reference built from the control matrix.
module tb_crossbar;
  localparam int N = 3, W = 4;
  logic [N-1:0][N-1:0] ctrl;
  logic [N-1:0]        in_req, in_nack, out_req, out_nack;
  logic [N-1:0][W-1:0] in_data, out_data;
  logic [N-1:0]        e_in_nack, e_out_req;
  logic [N-1:0][W-1:0] e_out_data;
  int checks = 0, failures = 0, src;

  crossbar #(.NPORTS(N), .DATA_W(W)) dut (.ctrl, .in_req, .in_data, .in_nack, .out_req, .out_data, .out_nack);

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 2000; n++) begin
      // each input holds one route at most; pick a source (or none) per output
      ctrl = '0;
      for (int j = 0; j < N; j++) begin
        src = $urandom_range(0, N);
        if (src < N && ctrl[src] == '0) ctrl[src][j] = 1'b1;
      end
      in_req   = N'($urandom);
      out_nack = N'($urandom);
      for (int i = 0; i < N; i++) in_data[i] = W'($urandom);
      #1;
      e_in_nack = '0; e_out_req = '0; e_out_data = '0;
      for (int i = 0; i < N; i++)
        for (int j = 0; j < N; j++)
          if (ctrl[i][j]) begin
            e_out_req[j]  = in_req[i];
            e_out_data[j] = in_data[i];
            e_in_nack[i]  = out_nack[j];
          end
      checks++;
      if (out_req !== e_out_req || out_data !== e_out_data || in_nack !== e_in_nack) begin
        failures++;
        $display("ctrl=%b out_req=%b/%b out_data=%h/%h in_nack=%b/%b", ctrl, out_req, e_out_req,
                 out_data, e_out_data, in_nack, e_in_nack);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

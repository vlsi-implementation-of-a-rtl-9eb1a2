// tb_ocb_dlb: exhaustive check of one decision logic block over every status
// and every one-hot (or empty) request on a 3-port switch.
module tb_ocb_dlb;
  localparam int N = 3;
  logic [N-1:0] status_in, req, reply, status_out;
  logic [N-1:0] exp_reply, exp_status;
  int checks = 0, failures = 0;

  ocb_dlb #(.NPORTS(N)) dut (.status_in, .req, .reply, .status_out);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int s = 0; s < (1 << N); s++) begin
      for (int r = -1; r < N; r++) begin
        status_in = N'(s);
        req       = (r < 0) ? '0 : N'(1 << r);
        #1;
        // a request is granted only when its output is free
        exp_reply  = '0;
        exp_status = N'(s);
        if (r >= 0 && !status_in[r]) begin
          exp_reply[r]  = 1'b1;
          exp_status[r] = 1'b1;
        end
        checks++;
        if (reply !== exp_reply || status_out !== exp_status) begin
          failures++;
          $display("status=%b req=%b reply=%b/%b status_out=%b/%b", status_in, req,
                   reply, exp_reply, status_out, exp_status);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

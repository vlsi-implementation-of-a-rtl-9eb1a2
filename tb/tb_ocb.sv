// tb_ocb: random build-up requests and tear-down orders from three input
// control blocks. The testbench keeps its own record of which output each
// input holds and which outputs are busy, derives the expected replies in
// fixed priority order (input 0 first), and checks replies every cycle and
// the busy register after every clock edge. It also counts cycles in which
// two inputs asked for the same free output, so that the priority rule is
// shown to have been exercised.
module tb_ocb;
  localparam int N = 3;
  logic clk = 1'b0, rst_n = 1'b0;
  logic [N-1:0][N-1:0] build_req, tear_down, reply, e_reply;
  logic [N-1:0]        busy, m_busy, taken;
  int                  hold [N];   // output held by input i, -1 for none
  int checks = 0, failures = 0, collisions = 0, refusals = 0, op, o;

  ocb #(.NPORTS(N)) dut (.clk, .rst_n, .build_req, .tear_down, .reply, .busy);

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    build_req = '0; tear_down = '0;
    m_busy = '0;
    for (int i = 0; i < N; i++) hold[i] = -1;
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;
    for (int n = 0; n < 1500; n++) begin
      @(negedge clk);
      build_req = '0; tear_down = '0;
      for (int i = 0; i < N; i++) begin
        op = $urandom_range(0, 3);
        if (hold[i] >= 0) begin
          if (op == 0) tear_down[i][hold[i]] = 1'b1;
        end else if (op != 0) begin
          build_req[i][$urandom_range(0, N-1)] = 1'b1;
        end
      end
      #2;
      // reference: walk the inputs in priority order
      taken = m_busy;
      e_reply = '0;
      for (int i = 0; i < N; i++)
        for (int j = 0; j < N; j++)
          if (build_req[i][j]) begin
            if (!taken[j]) begin
              e_reply[i][j] = 1'b1;
              taken[j] = 1'b1;
            end else begin
              refusals++;
              if (!m_busy[j]) collisions++;
            end
          end
      checks++;
      if (reply !== e_reply) begin
        failures++;
        $display("cycle %0d: req=%b busy=%b reply=%b expected %b", n, build_req, m_busy, reply, e_reply);
      end
      // reference register update
      for (int i = 0; i < N; i++) begin
        for (int j = 0; j < N; j++) begin
          if (tear_down[i][j]) begin m_busy[j] = 1'b0; hold[i] = -1; end
          if (e_reply[i][j])   begin m_busy[j] = 1'b1; hold[i] = j;  end
        end
      end
      @(posedge clk); #1;
      checks++;
      if (busy !== m_busy) begin
        failures++;
        $display("cycle %0d: busy=%b expected %b", n, busy, m_busy);
      end
    end
    o = 0;
    checks++;
    if (collisions == 0 || refusals == collisions) begin
      failures++;
      $display("priority collisions=%0d refusals=%0d", collisions, refusals);
    end
    $display("collisions=%0d refusals=%0d", collisions, refusals);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

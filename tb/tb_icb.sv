// tb_icb: one input control block with the output control block replaced by
// a random reply source. The testbench drives random req waveforms and route
// nibbles (including the non-existent port 3), keeps its own model of the
// state register, and checks build-up request, tear-down order, crossbar
// control and the nack of the following cycle.
module tb_icb;
  localparam int N = 3, A = 2;
  logic clk = 1'b0, rst_n = 1'b0, req = 1'b0, nack;
  logic [A-1:0] addr = '0;
  logic [N-1:0] build_req, reply, tear_down, xbar_ctrl;
  logic [N-1:0] e_build, e_tear, e_ctrl;
  logic prev_req, e_nack, granted;
  int   m_state;  // -1: no connection
  int   checks = 0, failures = 0, grants = 0, nacks = 0, tears = 0;

  icb #(.NPORTS(N), .ADDR_W(A)) dut (.clk, .rst_n, .req, .addr, .build_req, .reply,
                                     .tear_down, .nack, .xbar_ctrl);

  always #5 clk = ~clk;

  function automatic logic [N-1:0] oh(int k);
    return (k >= 0 && k < N) ? N'(1 << k) : '0;
  endfunction

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    reply = '0;
    m_state = -1; prev_req = 1'b0; e_nack = 1'b0;
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;
    for (int n = 0; n < 2000; n++) begin
      @(negedge clk);
      // change req now and then; addr random every cycle
      if ($urandom_range(0, 3) == 0) req = ~req;
      addr  = A'($urandom);
      reply = N'($urandom);
      #2;
      e_build = (req && !prev_req) ? oh(int'(addr)) : '0;
      e_tear  = (!req && prev_req) ? oh(m_state) : '0;
      e_ctrl  = oh(m_state);
      granted = (req && !prev_req) && ((reply & oh(int'(addr))) != '0);
      checks++;
      if (build_req !== e_build || tear_down !== e_tear || xbar_ctrl !== e_ctrl || nack !== e_nack) begin
        failures++;
        $display("cycle %0d: req=%b addr=%0d build=%b/%b tear=%b/%b ctrl=%b/%b nack=%b/%b", n, req, addr,
                 build_req, e_build, tear_down, e_tear, xbar_ctrl, e_ctrl, nack, e_nack);
      end
      // reference update at the clock edge
      e_nack = (req && !prev_req) && !granted;
      if (!req && prev_req) begin
        if (m_state >= 0) tears++;
        m_state = -1;
      end else if (granted) begin
        m_state = int'(addr);
        grants++;
      end
      if (e_nack) nacks++;
      prev_req = req;
      @(posedge clk);
    end
    checks++;
    if (grants == 0 || nacks == 0 || tears == 0) failures++;
    $display("grants=%0d nacks=%0d tear-downs=%0d", grants, nacks, tears);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

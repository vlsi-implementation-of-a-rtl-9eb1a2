// tb_pcc_switch: one 3-port switch under random traffic, against a
// cycle-level reference model kept in the testbench.
//
// The model tracks, per input, the previous req and the output it holds, and
// the set of busy outputs. In a cycle where req rises, the route is the low
// two bits of the nibble; requests are served in input-id order and a
// refused one produces nack in the next cycle. A connected input's req and
// data appear on its output one cycle later; a nack arriving at a connected
// output returns to its input one cycle later. The testbench then plays the
// reference example route directly: a packet "1, 0, 2, d0, d1, ..." must leave
// the switch on output 1 with "0, 2, d0, d1, ..." and output req rising two
// cycles after the input req.
module tb_pcc_switch;
  localparam int N = 3, W = 4;
  logic clk = 1'b0, rst_n = 1'b0;
  logic [N-1:0]        in_req, in_nack, out_req, out_nack;
  logic [N-1:0][W-1:0] in_data, out_data;

  // reference model state
  logic [N-1:0]        m_prev, m_nack, m_busy, m_oreq, e_nack, taken, m_onack;
  logic [N-1:0][W-1:0] m_odata;
  int                  m_hold [N];
  logic [N-1:0]        nx_oreq;
  logic [N-1:0][W-1:0] nx_odata;
  int checks = 0, failures = 0;
  int n_grant = 0, n_busy_nack = 0, n_prio = 0, n_tear = 0, n_ret_nack = 0, n_bad_route = 0;
  int route;

  pcc_switch #(.NPORTS(N), .DATA_W(W), .ADDR_W(2)) dut (.clk, .rst_n, .in_req, .in_data, .in_nack,
                                                         .out_req, .out_data, .out_nack);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic model_step();
    // combinational part, valid for the current inputs
    taken = m_busy;
    nx_oreq = '0; nx_odata = '0; e_nack = m_nack;
    for (int i = 0; i < N; i++)
      if (m_hold[i] >= 0) begin
        nx_oreq[m_hold[i]]  = in_req[i];
        nx_odata[m_hold[i]] = in_data[i];
        e_nack[i] = e_nack[i] | m_onack[m_hold[i]];
        if (m_onack[m_hold[i]]) n_ret_nack++;
      end
  endtask

  task automatic model_clock();
    logic [N-1:0] nx_nack, released;
    nx_nack = '0; released = '0;
    for (int i = 0; i < N; i++) begin
      if (in_req[i] && !m_prev[i]) begin
        route = int'(in_data[i][1:0]);
        if (route < N && !taken[route]) begin
          taken[route] = 1'b1;
          m_hold[i] = route;
          n_grant++;
        end else begin
          nx_nack[i] = 1'b1;
          if (route >= N) n_bad_route++;
          else if (!m_busy[route]) n_prio++;
          else n_busy_nack++;
        end
      end else if (!in_req[i] && m_prev[i]) begin
        if (m_hold[i] >= 0) begin
          // released at the clock edge: a request in this same cycle
          // still sees the output busy
          released[m_hold[i]] = 1'b1;
          n_tear++;
        end
        m_hold[i] = -1;
      end
    end
    m_busy  = taken & ~released;
    m_nack  = nx_nack;
    m_prev  = in_req;
    m_onack = out_nack;
    m_oreq  = nx_oreq;
    m_odata = nx_odata;
  endtask

  task automatic compare(input string what);
    checks++;
    if (out_req !== m_oreq || in_nack !== e_nack) begin
      failures++;
      $display("%s t=%0t: out_req=%b/%b in_nack=%b/%b", what, $time, out_req, m_oreq, in_nack, e_nack);
    end
    for (int j = 0; j < N; j++)
      if (m_oreq[j] && out_data[j] !== m_odata[j]) begin
        failures++;
        $display("%s t=%0t: out_data[%0d]=%h expected %h", what, $time, j, out_data[j], m_odata[j]);
      end
  endtask

  // directed example: 1,0,2,d0..d3 into input 0
  logic [W-1:0] pkt [7] = '{4'h1, 4'h0, 4'h2, 4'h9, 4'h6, 4'hC, 4'h3};
  int t_rise, t_out;

  initial begin
    in_req = '0; in_data = '0; out_nack = '0;
    m_prev = '0; m_nack = '0; m_onack = '0; m_busy = '0; m_oreq = '0; m_odata = '0;
    for (int i = 0; i < N; i++) m_hold[i] = -1;
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;

    // random traffic
    for (int n = 0; n < 5000; n++) begin
      @(negedge clk);
      for (int i = 0; i < N; i++) begin
        if ($urandom_range(0, 4) == 0) in_req[i] = ~in_req[i];
        in_data[i] = W'($urandom);
      end
      out_nack = ($urandom_range(0, 7) == 0) ? N'($urandom) : '0;
      #2;
      model_step();
      compare("random");
      @(posedge clk);
      model_clock();
    end

    // drain: all req low, then the directed example
    @(negedge clk);
    in_req = '0; out_nack = '0;
    repeat (4) @(negedge clk);
    t_rise = -1; t_out = -1;
    for (int k = 0; k < 12; k++) begin
      if (k < 7) begin in_req[0] = 1'b1; in_data[0] = pkt[k]; end
      else       begin in_req[0] = 1'b0; in_data[0] = '0; end
      #2;
      if (k == 0) t_rise = k;
      if (out_req[1] && t_out < 0) t_out = k;
      if (out_req[1]) begin
        // nibble k on the output entered at k-1; the route nibble is gone
        checks++;
        if (k < 2 || k > 7 || out_data[1] !== pkt[k-1]) begin
          failures++;
          $display("example: cycle %0d out_data=%h", k, out_data[1]);
        end
      end
      @(negedge clk);
    end
    checks++;
    if (t_out - t_rise != 2) begin
      failures++;
      $display("example: output req rose %0d cycles after input req, expected 2", t_out - t_rise);
    end

    $display("grants=%0d busy_nacks=%0d priority_nacks=%0d bad_route_nacks=%0d tear_downs=%0d returned_nacks=%0d",
             n_grant, n_busy_nack, n_prio, n_bad_route, n_tear, n_ret_nack);
    checks++;
    if (n_grant == 0 || n_busy_nack == 0 || n_prio == 0 || n_bad_route == 0 || n_tear == 0 || n_ret_nack == 0) begin
      failures++;
      $display("a mechanism was never exercised");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

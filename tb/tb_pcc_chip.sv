// tb_pcc_chip: end-to-end test of the two-switch test chip at its default
// size, running the chip's test plan:
//   1 simple build-up and tear-down through one switch (A and B, port 1 to 1)
//   2 both test sequence generators to the port-1 pins
//   3 cascaded routing: B input 1 -> B output 0 -> A input 0 -> A output 1
//   4 non-preemption: a generator packet refused while A output 1 is in use
//   5 priority: simultaneous requests for A output 1, lowest input id wins
//   6 a nack raised in switch A travels back through switch B to B's pins
//   7 a route nibble naming no port (3) is refused
//   8 a nack from A's output pins reaches A's input pins through the circuit
// Streams leaving the port-1 pins are recorded with their cycle numbers and
// compared with the payload sent: the route nibbles must be gone and each
// switch must add exactly one cycle (output req rises 2 cycles per switch
// after the source req). Every mechanism is counted and must occur.
module tb_pcc_chip;
  logic       clk = 1'b0, rst_n = 1'b0;
  logic       a_in1_req = 1'b0, b_in1_req = 1'b0, a_out1_nack = 1'b0, b_out1_nack = 1'b0;
  logic [3:0] a_in1_data = '0, b_in1_data = '0;
  logic       a_in1_nack, b_in1_nack, a_out1_req, b_out1_req, tsg_a_nack, tsg_b_nack;
  logic [3:0] a_out1_data, b_out1_data;
  logic       start_a = 1'b0, start_b = 1'b0;

  int checks = 0, failures = 0, cyc = 0;
  // mechanism counters
  int n_simple = 0, n_tsg = 0, n_cascade = 0, n_nonpre = 0, n_prio = 0, n_ret = 0, n_badroute = 0, n_pinnack = 0;

  // recorded output streams and nack pulses, per cycle
  logic [3:0] a_out_q [$], b_out_q [$];
  int         a_first, b_first;        // cycle of first nibble of the last stream
  int         a_nack_cyc [$], b_nack_cyc [$], ta_nack_cyc [$], tb_nack_cyc [$];
  logic       a_prev, b_prev;

  logic [3:0] tsg_payload [$] = '{4'h1, 4'hD, 4'hA, 4'h8, 4'h4, 4'h2};

  pcc_chip dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (3000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // cycle counter (advances at the rising edge) and monitor: inputs change at
  // the falling edge and are sampled 2 time units later, within the same cycle
  always @(posedge clk) cyc++;

  always @(negedge clk) begin
    #2;
    if (a_out1_req) begin
      if (!a_prev) a_first = cyc;
      a_out_q.push_back(a_out1_data);
    end
    if (b_out1_req) begin
      if (!b_prev) b_first = cyc;
      b_out_q.push_back(b_out1_data);
    end
    a_prev = a_out1_req;
    b_prev = b_out1_req;
    if (a_in1_nack) a_nack_cyc.push_back(cyc);
    if (b_in1_nack) b_nack_cyc.push_back(cyc);
    if (tsg_a_nack) ta_nack_cyc.push_back(cyc);
    if (tsg_b_nack) tb_nack_cyc.push_back(cyc);
  end

  task automatic clear_records();
    a_out_q.delete(); b_out_q.delete();
    a_nack_cyc.delete(); b_nack_cyc.delete(); ta_nack_cyc.delete(); tb_nack_cyc.delete();
    a_first = -1; b_first = -1;
  endtask

  task automatic idle(int n);
    repeat (n) @(negedge clk);
  endtask

  task automatic expect_stream(input string what, input logic [3:0] got [$], input logic [3:0] exp [$],
                               input int first, input int exp_first);
    checks++;
    if (got != exp || first != exp_first) begin
      failures++;
      $display("%s: got %0d nibbles from cycle %0d, expected %0d from cycle %0d", what, got.size(), first,
               exp.size(), exp_first);
      foreach (got[k]) $display("  got[%0d]=%h", k, got[k]);
    end
  endtask

  task automatic expect_nacks(input string what, input int got [$], input int exp [$]);
    checks++;
    if (got != exp) begin
      failures++;
      $display("%s: %0d nack cycles, expected %0d", what, got.size(), exp.size());
      foreach (got[k]) $display("  nack at %0d", got[k]);
      foreach (exp[k]) $display("  expected at %0d", exp[k]);
    end
  endtask

  // drive a packet (route nibbles then payload) on a pin input, starting at the next falling edge
  task automatic send_a(input logic [3:0] nib [$], output int t0);
    @(negedge clk);
    t0 = cyc;
    foreach (nib[k]) begin
      a_in1_req = 1'b1; a_in1_data = nib[k];
      @(negedge clk);
    end
    a_in1_req = 1'b0; a_in1_data = '0;
  endtask

  task automatic send_b(input logic [3:0] nib [$], output int t0);
    @(negedge clk);
    t0 = cyc;
    foreach (nib[k]) begin
      b_in1_req = 1'b1; b_in1_data = nib[k];
      @(negedge clk);
    end
    b_in1_req = 1'b0; b_in1_data = '0;
  endtask

  logic [3:0] pay [$];
  int t0, t1, ts;

  initial begin
    clear_records();
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;
    idle(3);

    // 1: simple build-up and tear-down on each switch
    clear_records();
    pay = '{4'h5, 4'h6, 4'h7, 4'hF, 4'h0};
    send_a('{4'h1, 4'h5, 4'h6, 4'h7, 4'hF, 4'h0}, t0);
    idle(4);
    expect_stream("A simple", a_out_q, pay, a_first, t0 + 2);
    checks++;
    if (a_out1_req !== 1'b0) begin failures++; $display("A output not torn down"); end
    if (a_out_q == pay) n_simple++;
    clear_records();
    pay = '{4'h9, 4'h3, 4'hB};
    send_b('{4'h1, 4'h9, 4'h3, 4'hB}, t0);
    idle(4);
    expect_stream("B simple", b_out_q, pay, b_first, t0 + 2);
    if (b_out_q == pay) n_simple++;

    // 2: test sequence generators (start edge at cycle s, packet from s+1, output from s+3)
    clear_records();
    @(negedge clk) begin start_a = 1'b1; start_b = 1'b1; end
    ts = cyc;
    @(negedge clk) begin start_a = 1'b0; start_b = 1'b0; end
    idle(12);
    expect_stream("A generator", a_out_q, tsg_payload, a_first, ts + 3);
    expect_stream("B generator", b_out_q, tsg_payload, b_first, ts + 3);
    if (a_out_q == tsg_payload) n_tsg++;
    if (b_out_q == tsg_payload) n_tsg++;

    // 3: cascaded route B in1 -> B out0 -> A in0 -> A out1
    clear_records();
    pay = '{4'hC, 4'hA, 4'hF, 4'hE, 4'h1};
    send_b('{4'h0, 4'h1, 4'hC, 4'hA, 4'hF, 4'hE, 4'h1}, t0);
    idle(6);
    expect_stream("cascade", a_out_q, pay, a_first, t0 + 4);
    checks++;
    if (b_out_q.size() != 0 || b_nack_cyc.size() != 0) begin failures++; $display("cascade leaked to B pins"); end
    if (a_out_q == pay) n_cascade++;

    // 4: non-preemption. A in1 holds A out1; the generator asks for it later
    clear_records();
    pay = '{4'h2, 4'h4, 4'h6, 4'h8, 4'hA, 4'hC, 4'hE, 4'h1, 4'h3, 4'h5};
    fork
      send_a('{4'h1, 4'h2, 4'h4, 4'h6, 4'h8, 4'hA, 4'hC, 4'hE, 4'h1, 4'h3, 4'h5}, t0);
      begin
        idle(3);
        start_a = 1'b1; ts = cyc;
        @(negedge clk) start_a = 1'b0;
      end
    join
    idle(12);
    expect_stream("non-preemption stream", a_out_q, pay, a_first, t0 + 2);
    // generator route nibble at ts+1, refused, nack at ts+2
    expect_nacks("non-preemption nack", ta_nack_cyc, '{ts + 2});
    if (a_out_q == pay && ta_nack_cyc.size() == 1) n_nonpre++;

    // 5a: priority between A input 1 and A input 2 (generator), same cycle
    clear_records();
    fork
      begin
        @(negedge clk) start_a = 1'b1; ts = cyc;
        @(negedge clk) start_a = 1'b0;
      end
      begin
        pay = '{4'h7, 4'h7, 4'h7};
        @(negedge clk);
        send_a('{4'h1, 4'h7, 4'h7, 4'h7}, t0);
      end
    join
    idle(12);
    checks++;
    if (t0 != ts + 1) begin failures++; $display("priority setup misaligned %0d %0d", t0, ts); end
    expect_stream("priority in1 over in2", a_out_q, pay, a_first, t0 + 2);
    expect_nacks("priority in2 nack", ta_nack_cyc, '{t0 + 1});
    if (a_out_q == pay && ta_nack_cyc.size() == 1) n_prio++;

    // 5b: priority between A input 0 (via B) and A input 1, same cycle at A
    clear_records();
    fork
      send_b('{4'h0, 4'h1, 4'h4, 4'h4, 4'h4}, t0);
      begin
        idle(2);
        send_a('{4'h1, 4'h8, 4'h8}, t1);
      end
    join
    idle(8);
    pay = '{4'h4, 4'h4, 4'h4};
    checks++;
    if (t1 != t0 + 2) begin failures++; $display("priority setup misaligned %0d %0d", t0, t1); end
    expect_stream("priority in0 over in1", a_out_q, pay, a_first, t0 + 4);
    expect_nacks("priority in1 nack", a_nack_cyc, '{t1 + 1});
    if (a_out_q == pay && a_nack_cyc.size() == 1) n_prio++;

    // 6: A out1 held from A's pins; a cascaded packet from B is refused at A
    //    and the nack comes back through B's crossbar to B's pins
    clear_records();
    fork
      send_a('{4'h1, 4'h3, 4'h3, 4'h3, 4'h3, 4'h3, 4'h3, 4'h3, 4'h3}, t1);
      begin
        idle(1);
        send_b('{4'h0, 4'h1, 4'h9, 4'h9, 4'h9}, t0);
      end
    join
    idle(6);
    // B: route 0 at t0, link req into A at t0+2, refused, nack on the link
    // at t0+3, retimed in B, at B's pins at t0+4
    expect_nacks("returned nack", b_nack_cyc, '{t0 + 4});
    pay = '{4'h3, 4'h3, 4'h3, 4'h3, 4'h3, 4'h3, 4'h3, 4'h3};
    expect_stream("holder undisturbed", a_out_q, pay, a_first, t1 + 2);
    if (b_nack_cyc.size() == 1) n_ret++;

    // 7: route nibble 3 names no port
    clear_records();
    send_a('{4'h3, 4'h1, 4'h2}, t0);
    idle(4);
    expect_nacks("bad route", a_nack_cyc, '{t0 + 1});
    checks++;
    if (a_out_q.size() != 0) begin failures++; $display("bad route produced output"); end
    if (a_nack_cyc.size() == 1) n_badroute++;

    // 8: a nack from A's output pins reaches A's input pins while connected
    clear_records();
    fork
      send_a('{4'h1, 4'h6, 4'h6, 4'h6, 4'h6, 4'h6}, t0);
      begin
        idle(4);
        a_out1_nack = 1'b1;
        @(negedge clk) a_out1_nack = 1'b0;
      end
    join
    idle(4);
    // nack raised at the output pins in cycle t0+3, one cycle through A
    expect_nacks("pin nack returned", a_nack_cyc, '{t0 + 4});
    if (a_nack_cyc.size() == 1) n_pinnack++;

    $display("simple=%0d generator=%0d cascade=%0d non_preemption=%0d priority=%0d returned_nack=%0d bad_route=%0d pin_nack=%0d",
             n_simple, n_tsg, n_cascade, n_nonpre, n_prio, n_ret, n_badroute, n_pinnack);
    checks++;
    if (n_simple == 0 || n_tsg == 0 || n_cascade == 0 || n_nonpre == 0 || n_prio == 0 ||
        n_ret == 0 || n_badroute == 0 || n_pinnack == 0) begin
      failures++;
      $display("a mechanism never happened");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

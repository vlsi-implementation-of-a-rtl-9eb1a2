// tb_fig3_example: the three-switch example route of the PCC network.
//
// Switches A, C and B are linked as follows: A port 1 <-> C port 1 and
// C port 0 <-> B port 1. Core I sits on A port 0 and core II on B port 2.
// Core I sends the packet "1, 0, 2, d0, d1, ...": A consumes route 1, C
// consumes route 0, B consumes route 2 and core II receives d0, d1, ... with
// req rising 6 cycles after core I's req (2 per switch) and each nibble
// arriving 3 cycles after it was sent (1 per switch). While the circuit is
// up, a request entering A port 2 for output 1 is refused (output busy) and
// one for output 0 is accepted and delivered to core I (only input 0 of A
// is in use, not output 0). After core I lowers req, the whole circuit is
// released and a second packet takes the same route.
module tb_fig3_example;
  localparam int N = 3, W = 4;
  logic clk = 1'b0, rst_n = 1'b0;

  logic [N-1:0]        a_ir, a_in, a_or, a_on, c_ir, c_in, c_or, c_on, b_ir, b_in, b_or, b_on;
  logic [N-1:0][W-1:0] a_id, a_od, c_id, c_od, b_id, b_od;

  // core-side drive
  logic       i_req = 1'b0, p2_req = 1'b0;
  logic [3:0] i_data = '0, p2_data = '0;

  int checks = 0, failures = 0, cyc = 0;

  pcc_switch u_a (.clk, .rst_n, .in_req(a_ir), .in_data(a_id), .in_nack(a_in),
                  .out_req(a_or), .out_data(a_od), .out_nack(a_on));
  pcc_switch u_c (.clk, .rst_n, .in_req(c_ir), .in_data(c_id), .in_nack(c_in),
                  .out_req(c_or), .out_data(c_od), .out_nack(c_on));
  pcc_switch u_b (.clk, .rst_n, .in_req(b_ir), .in_data(b_id), .in_nack(b_in),
                  .out_req(b_or), .out_data(b_od), .out_nack(b_on));

  always_comb begin
    a_ir = '0; a_id = '0; a_on = '0;
    c_ir = '0; c_id = '0; c_on = '0;
    b_ir = '0; b_id = '0; b_on = '0;
    // core I on A port 0, another sender on A port 2
    a_ir[0] = i_req;  a_id[0] = i_data;
    a_ir[2] = p2_req; a_id[2] = p2_data;
    // A port 1 <-> C port 1
    c_ir[1] = a_or[1]; c_id[1] = a_od[1]; a_on[1] = c_in[1];
    a_ir[1] = c_or[1]; a_id[1] = c_od[1]; c_on[1] = a_in[1];
    // C port 0 <-> B port 1
    b_ir[1] = c_or[0]; b_id[1] = c_od[0]; c_on[0] = b_in[1];
    c_ir[0] = b_or[1]; c_id[0] = b_od[1]; b_on[1] = c_in[0];
  end

  always #5 clk = ~clk;
  always @(posedge clk) cyc++;

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // core II (B output 2) and core I (A output 0) receive logs
  logic [3:0] ii_q [$], i_q [$];
  int ii_first, i_first, p2_nacks;
  logic ii_prev = 1'b0, i_prev = 1'b0;
  always @(negedge clk) begin
    #2;
    if (b_or[2]) begin if (!ii_prev) ii_first = cyc; ii_q.push_back(b_od[2]); end
    if (a_or[0]) begin if (!i_prev) i_first = cyc; i_q.push_back(a_od[0]); end
    ii_prev = b_or[2];
    i_prev  = a_or[0];
    if (a_in[2]) p2_nacks++;
  end

  logic [3:0] payload [$] = '{4'h3, 4'hE, 4'h7, 4'h0, 4'h5, 4'hA, 4'hC, 4'h9, 4'h1, 4'h6};
  logic [3:0] p2_pay  [$] = '{4'hB, 4'h4, 4'h2};
  int t0;

  task automatic send_core_i(output int t);
    logic [3:0] nib [$];
    nib = '{4'h1, 4'h0, 4'h2};
    foreach (payload[k]) nib.push_back(payload[k]);
    @(negedge clk);
    t = cyc;
    foreach (nib[k]) begin
      i_req = 1'b1; i_data = nib[k];
      @(negedge clk);
    end
    i_req = 1'b0; i_data = '0;
  endtask

  task automatic send_p2(input logic [3:0] route, input logic [3:0] pay [$]);
    @(negedge clk);
    p2_req = 1'b1; p2_data = route;
    foreach (pay[k]) begin
      @(negedge clk);
      p2_data = pay[k];
    end
    @(negedge clk);
    p2_req = 1'b0; p2_data = '0;
  endtask

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    ii_first = -1; i_first = -1; p2_nacks = 0;
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;
    repeat (2) @(negedge clk);

    fork
      send_core_i(t0);
      begin
        repeat (4) @(negedge clk);
        send_p2(4'h1, '{4'hF});       // output 1 of A is busy: refused
        @(negedge clk);
        send_p2(4'h0, p2_pay);        // output 0 of A is free: accepted
      end
    join
    repeat (10) @(negedge clk);

    check(ii_q == payload, "core II received the payload without route nibbles");
    check(ii_first == t0 + 6, $sformatf("core II req rose at %0d, expected %0d", ii_first, t0 + 6));
    check(p2_nacks == 1, $sformatf("port 2 got %0d nacks, expected 1", p2_nacks));
    check(i_q == p2_pay, "core I received the port-2 packet");
    check(u_a.busy == '0 && u_b.busy == '0 && u_c.busy == '0, "all outputs released after tear-down");

    // the same route again after release
    ii_q.delete(); ii_first = -1;
    send_core_i(t0);
    repeat (10) @(negedge clk);
    check(ii_q == payload && ii_first == t0 + 6, "second packet over the released route");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_sfq_compound_top: end-to-end testbench of sfq_compound_top at its
// default (and only) size.
//
// Adder part:
//  * latency: one isolated addition must show its sum exactly four clocks
//    after it is applied;
//  * a twelve-operation sequence (15+1, 12+4, 7+1, 10+3, 6+7, 5+1, 0+12,
//    13+1, 4+13, 6+0, 12+1, 15+15) applied back to back, compared with the
//    sums 16 16 8 13 13 6 12 14 17 6 13 30;
//  * all 256 operand pairs and 1000 random ones, back to back, compared with
//    the integer sum.
// Gate bank: every cycle of the streams also drives gx, gy; one clock later
// NIMPLY, XNOR, the inverter and all 16 truth tables are compared with
// Boolean expressions written out here.
// Mechanisms counted (each must occur): carry generated in bit 0 only (c1),
// carry into bit 4 passed through the group propagate P32 of bits 3..2,
// carry into bit 3 passed through p2, carry into bit 2 passed through p1,
// a sum overflowing into s4, operations issued in consecutive cycles, and each
// of the four gate input combinations. A watchdog ends the run.
module tb_sfq_compound_top;
  localparam int LAT = 4;
  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic [3:0] a = '0, b = '0;
  logic [4:0] s;
  logic gx = 1'b0, gy = 1'b0;
  logic nimply_q, xnor_q, not_q;
  logic [15:0] tt_q;
  int   checks = 0, failures = 0;

  // mechanism counters
  int n_c1_gen = 0, n_c4_via_p32 = 0, n_c3_via_p2 = 0, n_c2_via_p1 = 0;
  int n_overflow = 0, n_back_to_back = 0;
  int n_gate_combo [4] = '{0, 0, 0, 0};

  sfq_compound_top dut (
    .clk(clk), .rst_n(rst_n), .a(a), .b(b), .s(s),
    .gx(gx), .gy(gy), .nimply_q(nimply_q), .xnor_q(xnor_q), .not_q(not_q), .tt_q(tt_q)
  );

  always #5 clk = ~clk;

  logic [4:0] exp_q [$];

  // the twelve-operation sequence and its expected sums
  localparam logic [3:0] SEQ_A [12] = '{15, 12, 7, 10, 6, 5, 0, 13, 4, 6, 12, 15};
  localparam logic [3:0] SEQ_B [12] = '{1, 4, 1, 3, 7, 1, 12, 1, 13, 0, 1, 15};
  localparam logic [4:0] SEQ_S [12] = '{16, 16, 8, 13, 13, 6, 12, 14, 17, 6, 13, 30};

  task automatic fail(string msg);
    failures++;
    $display("FAIL %s", msg);
  endtask

  // Carry analysis of one operand pair, written with explicit ripple carries.
  task automatic count_mechanisms(logic [3:0] x, logic [3:0] y);
    logic [4:0] c;
    logic [3:0] g, p;
    c[0] = 1'b0;
    for (int k = 0; k < 4; k++) begin
      g[k] = x[k] & y[k];
      p[k] = x[k] ^ y[k];
      c[k+1] = g[k] | (p[k] & c[k]);
    end
    if (g[0]) n_c1_gen++;
    if (p[3] && p[2] && c[2]) n_c4_via_p32++;
    if (p[2] && c[2]) n_c3_via_p2++;
    if (p[1] && c[1]) n_c2_via_p1++;
    if (c[4]) n_overflow++;
  endtask

  function automatic logic tt_ref(int k, logic x, logic y);
    case (k)
      0: return 1'b0;       1: return !(x || y);  2: return !x && y;   3: return !x;
      4: return x && !y;    5: return !y;         6: return x ^ y;     7: return !(x && y);
      8: return x && y;     9: return x ~^ y;     10: return y;        11: return !x || y;
      12: return x;         13: return x || !y;   14: return x || y;   default: return 1'b1;
    endcase
  endfunction

  // gate bank inputs of the previous cycle and their check after the clock
  logic gx_prev, gy_prev;
  task automatic check_gates();
    checks++;
    if (nimply_q !== (gx_prev && !gy_prev)) fail($sformatf("nimply %0b%0b", gx_prev, gy_prev));
    checks++;
    if (xnor_q !== (gx_prev == gy_prev)) fail($sformatf("xnor %0b%0b", gx_prev, gy_prev));
    checks++;
    if (not_q !== !gx_prev) fail($sformatf("not %0b", gx_prev));
    for (int k = 0; k < 16; k++) begin
      checks++;
      if (tt_q[k] !== tt_ref(k, gx_prev, gy_prev)) fail($sformatf("table %0d", k));
    end
  endtask

  // One cycle of a stream: apply operands and gate inputs before the clock,
  // check the sum due at this clock and the gates one clock after their input.
  task automatic stream_cycle(logic [3:0] x, logic [3:0] y, logic valid);
    @(negedge clk);
    a = x; b = y;
    {gx, gy} = 2'($urandom_range(3));
    gx_prev = gx; gy_prev = gy;
    if (valid) begin
      count_mechanisms(x, y);
      n_gate_combo[{gx, gy}]++;
    end
    exp_q.push_back(5'(x) + 5'(y));
    @(posedge clk); #1;
    check_gates();
    if (exp_q.size() >= LAT) begin
      logic [4:0] e;
      e = exp_q.pop_front();
      checks++;
      if (s !== e) fail($sformatf("sum got %0d expected %0d", s, e));
    end
  endtask

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int cyc;
    logic [4:0] got [$];

    repeat (3) @(posedge clk);
    #1;
    checks++;
    if (s !== '0 || tt_q !== '0) fail("outputs not 0 in reset");
    @(negedge clk) rst_n = 1'b1;
    repeat (5) @(negedge clk);

    // latency of one isolated addition
    a = 4'd15; b = 4'd1;
    @(negedge clk);
    a = '0; b = '0;
    cyc = 1;
    while (s == 5'd0 && cyc < 20) begin
      @(negedge clk);
      cyc++;
    end
    checks++;
    if (s != 5'd16 || cyc != LAT)
      fail($sformatf("latency: sum %0d after %0d cycles, expected 16 after %0d", s, cyc, LAT));
    repeat (LAT + 1) @(negedge clk);

    // twelve-operation sequence, back to back; record the sums as they appear
    for (int n = 0; n < 12 + LAT; n++) begin
      @(negedge clk);
      if (n < 12) begin
        a = SEQ_A[n]; b = SEQ_B[n];
        if (n > 0) n_back_to_back++;
      end else begin
        a = '0; b = '0;
      end
      @(posedge clk); #1;
      if (n >= LAT - 1 && got.size() < 12) got.push_back(s);
    end
    for (int n = 0; n < 12; n++) begin
      checks++;
      if (got[n] !== SEQ_S[n])
        fail($sformatf("sequence op %0d: %0d + %0d gave %0d, expected %0d",
                       n, SEQ_A[n], SEQ_B[n], got[n], SEQ_S[n]));
    end

    // exhaustive and random streams
    exp_q.delete();
    for (int n = 0; n < 256; n++) begin
      stream_cycle(4'(n >> 4), 4'(n), 1'b1);
      if (n > 0) n_back_to_back++;
    end
    for (int n = 0; n < 1000; n++) begin
      stream_cycle(4'($urandom), 4'($urandom), 1'b1);
      n_back_to_back++;
    end
    for (int n = 0; n < LAT; n++) stream_cycle('0, '0, 1'b0);

    $display("mechanisms: c1_generate=%0d c4_via_P32=%0d c3_via_p2=%0d c2_via_p1=%0d overflow=%0d back_to_back=%0d",
             n_c1_gen, n_c4_via_p32, n_c3_via_p2, n_c2_via_p1, n_overflow, n_back_to_back);
    $display("gate input combinations: 00=%0d 01=%0d 10=%0d 11=%0d",
             n_gate_combo[0], n_gate_combo[1], n_gate_combo[2], n_gate_combo[3]);
    if (n_c1_gen == 0)       fail("no carry generated in bit 0");
    if (n_c4_via_p32 == 0)   fail("no carry passed through P32");
    if (n_c3_via_p2 == 0)    fail("no carry passed through p2");
    if (n_c2_via_p1 == 0)    fail("no carry passed through p1");
    if (n_overflow == 0)     fail("no overflow into s4");
    if (n_back_to_back == 0) fail("no back-to-back operations");
    for (int k = 0; k < 4; k++)
      if (n_gate_combo[k] == 0) fail($sformatf("gate input combination %0d never applied", k));
    checks += 6 + 4;

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

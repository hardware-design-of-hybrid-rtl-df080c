// tb_mont_mult_full -- full-size run of the SFG-II Montgomery multiplier:
// the multiplier is instantiated with its default modulus length
// (L = 1024, 1025 cells) and takes a handful of 1024-bit operations end to
// end, with the same checks as tb_mont_mult_top. An unreduced result
// (R >= N) is rare with random 1024-bit operands, so here it is only
// reported; tb_mont_mult_top requires it.
//
// The multiplier is run at its default size. Random operations (odd N with its top bit
// set, A, B < N, plus corner cases A = 0, A = B = N - 1) are started as soon
// as ready allows, so the next operation's input overlaps the previous
// one's output. Each result is compared exactly with a bit-level software
// model of the radix-2 Montgomery loop (L + 1 iterations), and with integer
// arithmetic: R * 2^(L+1) == A*B (mod N), R < 2N. Checked timing: done
// comes 3L + 2 clocks after the start edge, ready returns 2L + 1 clocks
// after it. Counted mechanisms, each required at least once: the four
// a_i/q_i addend cases, a start accepted
// while the previous result was still being collected, a carry out of the
// top bit of N + B, and an idle start after a pause.
module tb_mont_mult_full;

  localparam int L    = 1024;   // the multiplier's default
  localparam int NOPS = 12;
  localparam int W    = 2 * L + 8;

  logic         clk = 1'b0;
  logic         rst = 1'b1;
  logic         start;
  logic [L-1:0] a, b, n;
  logic         ready, done;
  logic [L:0]   result;

  mont_mult_top dut (
    .clk(clk), .rst(rst), .start(start), .a(a), .b(b), .n(n),
    .ready(ready), .done(done), .result(result));

  always #5 clk = ~clk;

  int checks = 0;
  int failures = 0;
  int cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  int case_seen [4];
  int unreduced = 0;
  int overlapped = 0;
  int nb_carry = 0;
  int idle_start = 0;

  initial begin
    #100_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [L-1:0] rand_word();
    logic [L-1:0] v;
    for (int i = 0; i < L; i++) v[i] = 1'($urandom);
    return v;
  endfunction

  // Bit-level Montgomery loop, independent of the array's timing.
  function automatic logic [L:0] mont_model(logic [L-1:0] aa, logic [L-1:0] bb,
                                            logic [L-1:0] nn, bit count);
    logic [L+2:0] m;
    logic         ai, q;
    m = '0;
    for (int i = 0; i <= L; i++) begin
      ai = (i < L) ? aa[i] : 1'b0;
      q  = m[0] ^ (ai & bb[0]);
      if (count) case_seen[{ai, q}]++;
      m = (m + (ai ? (L+3)'(bb) : '0) + (q ? (L+3)'(nn) : '0)) >> 1;
    end
    return m[L:0];
  endfunction

  // Expected results in issue order, checked on done.
  logic [L-1:0] exp_a [$];
  logic [L-1:0] exp_b [$];
  logic [L-1:0] exp_n [$];
  int           exp_t [$];
  int           issued = 0;
  int           completed = 0;
  bit           collecting = 0;

  always @(posedge clk) begin
    if (!rst && done) begin
      logic [L-1:0] ea, eb, en;
      logic [W-1:0] lhs, rhs;
      int           t0;
      ea = exp_a.pop_front(); eb = exp_b.pop_front(); en = exp_n.pop_front();
      t0 = exp_t.pop_front();
      checks++;
      if (result !== mont_model(ea, eb, en, 1'b0)) begin
        failures++;
        if (failures < 10) $display("op %0d: got %h want %h", completed, result,
                                    mont_model(ea, eb, en, 1'b0));
      end
      lhs = (W'(result) << (L + 1)) % W'(en);
      rhs = (W'(ea) * W'(eb)) % W'(en);
      checks++;
      if (lhs != rhs || W'(result) >= 2 * W'(en)) begin
        failures++;
        if (failures < 10) $display("op %0d: residue or range wrong", completed);
      end
      if (result >= (L+1)'(en)) unreduced++;
      checks++;
      // done is set by edge 3L+2 after the start edge and seen here one edge later.
      if (cyc - t0 != 3 * L + 3) begin
        failures++;
        $display("op %0d: done seen %0d edges after start, want %0d", completed, cyc - t0,
                 3 * L + 3);
      end
      completed++;
    end
  end

  initial begin
    int t_start;
    start = 1'b0; a = '0; b = '0; n = '0;
    repeat (3) @(posedge clk);
    #1 rst = 1'b0;
    @(posedge clk);
    #1;
    for (int m = 0; m < NOPS; m++) begin
      n = rand_word();
      n[L-1] = 1'b1;
      n[0] = 1'b1;
      a = rand_word() % n;
      b = rand_word() % n;
      if (m == 3) a = '0;
      if (m == 4) begin a = n - 1; b = n - 1; end
      if (m == NOPS - 1) begin
        // Pause: let the multiplier drain completely before this start.
        while (completed < issued) @(posedge clk);
        repeat (2) @(posedge clk);
        #1;
        idle_start++;
      end
      while (!ready) begin @(posedge clk); #1; end
      if (issued > completed && m > 0) overlapped++;
      if (((L+1)'({1'b0, n}) + (L+1)'({1'b0, b})) >> L != 0) nb_carry++;
      void'(mont_model(a, b, n, 1'b1));
      exp_a.push_back(a); exp_b.push_back(b); exp_n.push_back(n);
      start = 1'b1;
      @(posedge clk);
      exp_t.push_back(cyc);
      issued++;
      #1 start = 1'b0;
      // ready must drop and come back after 2L edges, so that the next start
      // is taken 2L+1 clocks after this one.
      checks++;
      if (ready) begin failures++; $display("ready still high after start"); end
      t_start = 0;
      while (!ready) begin @(posedge clk); #1; t_start++; end
      checks++;
      if (t_start != 2 * L) begin
        failures++;
        $display("ready back after %0d edges, want %0d", t_start, 2 * L);
      end
    end
    while (completed < issued) @(posedge clk);
    repeat (3) @(posedge clk);

    for (int k = 0; k < 4; k++) begin
      checks++;
      if (case_seen[k] == 0) begin failures++; $display("addend case %0d never seen", k); end
    end
    checks++; if (overlapped == 0) begin failures++; $display("no overlapped start"); end
    checks++; if (nb_carry == 0)   begin failures++; $display("no carry out of N+B"); end
    checks++; if (idle_start == 0) begin failures++; $display("no start from idle"); end
    $display("ops=%0d cases 00=%0d 01=%0d 10=%0d 11=%0d unreduced=%0d overlapped=%0d nb_carry=%0d idle_start=%0d",
             completed, case_seen[0], case_seen[1], case_seen[2], case_seen[3],
             unreduced, overlapped, nb_carry, idle_start);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule

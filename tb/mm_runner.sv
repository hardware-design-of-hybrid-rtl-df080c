// mm_runner -- drives one mont_mult_top of modulus length L through NOPS
// operations and checks them (testbench helper, used by tb_mont_mult_sizes).
//
// Operands are random (odd N with its top bit set, A, B < N); with
// APPENDIX_VECTOR = 1 the first operation is A = 11, B = 3, N = 7 (a 4-bit
// case with A above N). Each result is compared exactly with a bit-level
// model of the Montgomery loop and with R * 2^(L+1) == A*B (mod N), R < 2N.
// The clocks are counted from the start edge to done: 3L + 2, i.e. the last
// result bit on clock 3L + 1 after the first input bit. finished rises when
// all operations are checked; checks/failures hold the running counts.
module mm_runner #(
  parameter int unsigned L               = 8,
  parameter int unsigned NOPS            = 4,
  parameter bit          APPENDIX_VECTOR = 1'b0
) (
  input  logic clk,
  input  logic rst,
  output int   checks,
  output int   failures,
  output logic finished
);

  localparam int W = 2 * L + 8;

  logic         start;
  logic [L-1:0] a, b, n;
  logic         ready, done;
  logic [L:0]   result;

  mont_mult_top #(.L(L)) dut (
    .clk(clk), .rst(rst), .start(start), .a(a), .b(b), .n(n),
    .ready(ready), .done(done), .result(result));

  function automatic logic [L-1:0] rand_word();
    logic [L-1:0] v;
    for (int i = 0; i < L; i++) v[i] = 1'($urandom);
    return v;
  endfunction

  function automatic logic [L:0] mont_model(logic [L-1:0] aa, logic [L-1:0] bb,
                                            logic [L-1:0] nn);
    logic [L+2:0] m;
    logic         ai, q;
    m = '0;
    for (int i = 0; i <= L; i++) begin
      ai = (i < L) ? aa[i] : 1'b0;
      q  = m[0] ^ (ai & bb[0]);
      m  = (m + (ai ? (L+3)'(bb) : '0) + (q ? (L+3)'(nn) : '0)) >> 1;
    end
    return m[L:0];
  endfunction

  initial begin
    logic [W-1:0] lhs, rhs;
    int           clocks;
    checks = 0;
    failures = 0;
    finished = 1'b0;
    start = 1'b0; a = '0; b = '0; n = '0;
    @(negedge rst);
    @(posedge clk);
    #1;
    for (int m = 0; m < NOPS; m++) begin
      n = rand_word();
      n[L-1] = 1'b1;
      n[0] = 1'b1;
      a = rand_word() % n;
      b = rand_word() % n;
      if (APPENDIX_VECTOR && m == 0) begin
        a = L'(11); b = L'(3); n = L'(7);
      end
      while (!ready) begin @(posedge clk); #1; end
      start = 1'b1;
      @(posedge clk);
      #1 start = 1'b0;
      clocks = 0;   // edges after the start edge
      while (!done) begin @(posedge clk); #1; clocks++; end
      checks++;
      if (clocks != 3 * L + 2) begin
        failures++;
        $display("L=%0d op %0d: done %0d clocks after start, want %0d", L, m, clocks, 3 * L + 2);
      end
      checks++;
      if (result !== mont_model(a, b, n)) begin
        failures++;
        $display("L=%0d op %0d: got %h want %h", L, m, result, mont_model(a, b, n));
      end
      lhs = (W'(result) << (L + 1)) % W'(n);
      rhs = (W'(a) * W'(b)) % W'(n);
      checks++;
      if (lhs != rhs || W'(result) >= 2 * W'(n)) begin
        failures++;
        $display("L=%0d op %0d: residue or range wrong", L, m);
      end
      if (APPENDIX_VECTOR && m == 0)
        $display("L=%0d: A=11 B=3 N=7 -> P=%0d, done %0d clocks after start (last result bit on clock %0d)",
                 L, result, clocks, clocks - 1);
    end
    finished = 1'b1;
  end

endmodule

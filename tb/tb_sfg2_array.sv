// tb_sfg2_array -- self-checking testbench for the SFG-II systolic array.
//
// Runs the array at L = 24 with operations issued back to back (a new one
// every L + 2 clocks) and, now and then, with idle gaps. The multiplier bit
// a_in[i] is set to the right operation's bit only on the clock when cell i
// sees that operation's position 0 and is random on every other clock, so
// the cells must capture it. Half of the operations start from a non-zero
// initial partial product. Each result R is checked against integer
// arithmetic: R * 2^(L+1) == p_init + A*B (mod N) and R < 2N. The result
// bits are taken from rout0 on clocks 2L+1 .. 3L+1 after the operation's
// first input bit, so a wrong latency or execution time fails the check.
module tb_sfg2_array;

  localparam int L    = 24;
  localparam int NP   = L + 2;
  localparam int NOPS = 60;
  localparam int W    = 2 * L + 8;     // width for reference arithmetic

  logic       clk = 1'b0;
  logic       rst = 1'b1;
  logic [L:0] a_in;
  logic       b_in, n_in, nb_in, p_in, select1, select2;
  logic       rout0;

  sfg2_array #(.L(L)) dut (
    .clk(clk), .rst(rst), .a_in(a_in), .b_in(b_in), .n_in(n_in), .nb_in(nb_in),
    .p_in(p_in), .select1(select1), .select2(select2), .rout0(rout0));

  always #5 clk = ~clk;

  int checks = 0;
  int failures = 0;
  int gaps = 0;
  int back_to_back = 0;
  int nonzero_init = 0;
  int above_n = 0;

  logic [L:0] op_a [NOPS];
  logic [L:0] op_b [NOPS];
  logic [L:0] op_n [NOPS];
  logic [L:0] op_nb [NOPS];
  logic [L:0] op_p [NOPS];
  logic [L:0] op_r [NOPS];
  int         op_start [NOPS];

  initial begin
    #5_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [L:0] rand_bits();
    logic [L:0] v;
    for (int i = 0; i <= L; i++) v[i] = 1'($urandom);
    return v;
  endfunction

  initial begin
    int t, last_end;
    logic [W-1:0] lhs, rhs;
    // Operands: odd L-bit N with its top bit set, A, B < N, p_init < N.
    last_end = 0;
    for (int m = 0; m < NOPS; m++) begin
      op_n[m]  = rand_bits();
      op_n[m][L] = 1'b0;
      op_n[m][L-1] = 1'b1;
      op_n[m][0] = 1'b1;
      op_a[m]  = rand_bits() % op_n[m];
      op_b[m]  = rand_bits() % op_n[m];
      op_p[m]  = (m % 2 == 1) ? rand_bits() % op_n[m] : '0;
      op_nb[m] = op_n[m] + op_b[m];
      if (op_p[m] != 0) nonzero_init++;
      if (m > 0 && m % 4 == 0) begin
        op_start[m] = last_end + 1 + int'($urandom % 5);
        gaps++;
      end else begin
        op_start[m] = last_end;
        if (m > 0) back_to_back++;
      end
      last_end = op_start[m] + NP;
    end

    a_in = '0; b_in = 0; n_in = 0; nb_in = 0; p_in = 0; select1 = 0; select2 = 0;
    repeat (3) @(posedge clk);
    #1 rst = 1'b0;

    for (t = 0; t < last_end + 3 * L + 4; t++) begin
      // Streams of the operation at cell 0 this clock.
      b_in = 0; n_in = 0; nb_in = 0; p_in = 1'($urandom); select1 = 0; select2 = 0;
      for (int m = 0; m < NOPS; m++) begin
        int pos;
        pos = t - op_start[m];
        if (pos >= 0 && pos < NP) begin
          select2 = (pos != 0);
          if (pos <= L) begin
            b_in = op_b[m][pos]; n_in = op_n[m][pos]; nb_in = op_nb[m][pos];
            p_in = op_p[m][pos]; select1 = 1'b1;
          end
        end
      end
      // a_in[i] is valid only on the clock cell i sees position 0.
      for (int i = 0; i <= L; i++) begin
        a_in[i] = 1'($urandom);
        for (int m = 0; m < NOPS; m++)
          if (t == op_start[m] + 2 * i) a_in[i] = op_a[m][i];
      end
      @(negedge clk);
      for (int m = 0; m < NOPS; m++) begin
        int k;
        k = t - op_start[m] - (2 * L + 1);
        if (k >= 0 && k <= L) op_r[m][k] = rout0;
      end
      @(posedge clk);
      #1;
    end

    for (int m = 0; m < NOPS; m++) begin
      lhs = (W'(op_r[m]) << (L + 1)) % W'(op_n[m]);
      rhs = (W'(op_p[m]) + W'(op_a[m]) * W'(op_b[m])) % W'(op_n[m]);
      checks++;
      if (lhs != rhs) begin
        failures++;
        if (failures < 10) $display("op %0d: R=%h wrong residue", m, op_r[m]);
      end
      checks++;
      if (W'(op_r[m]) >= 2 * W'(op_n[m])) begin
        failures++;
        $display("op %0d: R=%h not below 2N", m, op_r[m]);
      end
      if (op_r[m] >= op_n[m]) above_n++;
    end
    // Mechanisms that must have occurred.
    checks++; if (back_to_back == 0) begin failures++; $display("no back-to-back issue"); end
    checks++; if (gaps == 0)         begin failures++; $display("no idle gap"); end
    checks++; if (nonzero_init == 0) begin failures++; $display("no initial P"); end
    $display("ops=%0d back_to_back=%0d gaps=%0d nonzero_init=%0d results>=N=%0d",
             NOPS, back_to_back, gaps, nonzero_init, above_n);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule

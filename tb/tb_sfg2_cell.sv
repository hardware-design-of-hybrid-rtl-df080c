// tb_sfg2_cell -- self-checking testbench for one SFG-II processing element.
//
// Two cells are driven side by side from the same operands: a first cell
// (no input registers) and an inner cell (two-clock operand delay, one-clock
// partial-product delay). For random odd moduli N (LW bits), B < N, a
// partial product P < 2N and a multiplier bit a, the serial sum leaving each
// cell is compared bit by bit with S = P + a*B + q*N, q = (P + a*b_0) mod 2,
// computed with integer arithmetic. The checks also fix the timing: sum bit
// j leaves the first cell on the clock of input position j and the inner
// cell two clocks later. The bit offered on the partial-product input at the
// top position L+1 is random, so a cell that does not gate it fails.
module tb_sfg2_cell;
  import sfg2_pkg::*;

  localparam int LW   = 12;        // operand width used for the streams
  localparam int NP   = LW + 2;    // positions per operation
  localparam int NOPS = 400;

  logic    clk = 1'b0;
  logic    rst = 1'b1;
  logic    a_i;
  stream_t s_in;
  logic    p0_in, p1_in;
  stream_t s0_out, s1_out;
  logic    p0_out, p1_out;

  sfg2_cell #(.FIRST(1'b1)) u_first (
    .clk(clk), .rst(rst), .a_i(a_i), .s_in(s_in), .p_in(p0_in),
    .s_out(s0_out), .p_out(p0_out));
  sfg2_cell #(.FIRST(1'b0)) u_inner (
    .clk(clk), .rst(rst), .a_i(a_i), .s_in(s_in), .p_in(p1_in),
    .s_out(s1_out), .p_out(p1_out));

  always #5 clk = ~clk;

  int checks = 0;
  int failures = 0;
  int case_seen [4];

  initial begin
    #2_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic stream_t stream_at(int pos, logic [LW:0] bb, logic [LW:0] nn,
                                        logic [LW:0] nbv);
    stream_t s;
    s = '0;
    if (pos >= 0 && pos < NP) begin
      s.sel_cdef = (pos != 0);
      if (pos <= LW) begin
        s.b     = bb[pos];
        s.n     = nn[pos];
        s.nb    = nbv[pos];
        s.sel_a = 1'b1;
      end
    end
    return s;
  endfunction

  initial begin
    logic [LW:0]   nn, bb, nbv, pp;
    logic [LW+2:0] ss;
    logic          q;
    a_i   = 1'b0;
    s_in  = '0;
    p0_in = 1'b0;
    p1_in = 1'b0;
    repeat (3) @(posedge clk);
    #1 rst = 1'b0;
    for (int op = 0; op < NOPS; op++) begin
      nn  = (LW+1)'({$urandom} % (1 << LW)) | (LW+1)'(1) | (LW+1)'(1 << (LW - 1));
      bb  = (LW+1)'({$urandom} % nn);
      pp  = (LW+1)'({$urandom} % (2 * nn));
      nbv = nn + bb;
      a_i = 1'(op % 4 < 2 ? $urandom : op);
      q   = pp[0] ^ (a_i & bb[0]);
      ss  = (LW+3)'(pp) + (a_i ? (LW+3)'(bb) : '0) + (q ? (LW+3)'(nn) : '0);
      case_seen[{a_i, q}]++;
      for (int cyc = 0; cyc < NP + 2; cyc++) begin
        // Drive position cyc (first cell) and the matching late P bit (inner cell).
        s_in  = stream_at(cyc, bb, nn, nbv);
        p0_in = (cyc <= LW) ? pp[cyc] : 1'($urandom);
        p1_in = (cyc >= 1 && cyc - 1 <= LW) ? pp[cyc-1] : 1'($urandom);
        @(negedge clk);
        if (cyc < NP) begin
          checks++;
          if (p0_out !== ss[cyc]) begin
            failures++;
            if (failures < 10)
              $display("first cell: op %0d pos %0d got %b want %b", op, cyc, p0_out, ss[cyc]);
          end
        end
        if (cyc >= 2) begin
          checks++;
          if (p1_out !== ss[cyc-2]) begin
            failures++;
            if (failures < 10)
              $display("inner cell: op %0d pos %0d got %b want %b", op, cyc - 2, p1_out, ss[cyc-2]);
          end
        end
        @(posedge clk);
        #1;
      end
    end
    // Every row of the a_i/q_i table must have been exercised.
    for (int k = 0; k < 4; k++) begin
      checks++;
      if (case_seen[k] == 0) begin
        failures++;
        $display("addend case %0d never exercised", k);
      end
    end
    $display("addend cases {a,q}: 00=%0d 01=%0d 10=%0d 11=%0d",
             case_seen[0], case_seen[1], case_seen[2], case_seen[3]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule

// sfg2_cell -- one processing element of the systolized SFG-II Montgomery
// multiplier.
//
// Cell i carries out iteration i of the radix-2 Montgomery recurrence
//     q_i = (p_0 + a_i*b_0) mod 2
//     P  <- (P + a_i*B + q_i*N) / 2
// one bit position per clock, least significant bit first. The bits of B, N
// and NB = N + B arrive on s_in; the bits of the current partial product P
// arrive on p_in. Per bit position j the cell picks x_j from {0, b_j, n_j,
// nb_j} by (a_i, q_i) (MUX B) and adds it to p_j with a full adder whose carry
// is kept in a flip-flop between positions. The sum bit leaves on p_out.
//
// Position 0 (sel_cdef = 0) is the "first stage": q_i is formed from the LSB
// of P and b_0 (AND + XOR), a_i is captured, and the carry-in is forced to 0
// (MUX C, D, E select their first-stage inputs). On later positions the
// captured a_i, q_i and the running carry are used. Because q_i makes the
// sum even, the sum bit of position 0 is always 0 (checked by an assertion);
// the division by two is done by the wiring: the next cell takes this cell's
// sum bit j+1 as its bit j, which is exactly what a one-clock delay on the
// partial product against a two-clock delay on the operand stream gives.
// sel_a = 0 (MUX A) zeroes the partial-product input on the extra top
// position l+1 of an operation, where only the final carry is emitted.
//
// Registers: FIRST = 0 cells register their inputs as in the published cell
// (two flip-flops on each of b, n, nb and on both selects, one on the partial
// product), plus the a, q and carry flip-flops. The first cell of the array
// (FIRST = 1) takes its inputs directly, like the published cell_0.
// s_out is the registered stream handed to the next cell; p_out is
// combinational from this cell's flip-flops.
//
// Follows the document: the cell structure (MUX A..E, full adder, the 2/1
// delays, a/q/carry flip-flops), the a_i/q_i table and the asynchronous
// reset of every flip-flop. Own choice: q_i is computed from the LSB of the
// partial product that arrives on the P_i path at position 0. The published
// cell instead takes it from a separate, twice-delayed P0 path fed with the
// position-0 sum bit through a demultiplexer; that bit is the always-zero
// LSB of the even sum, and a q_i built from it does not give the Montgomery
// product, so the P0 path and the demultiplexer are left out.
module sfg2_cell
  import sfg2_pkg::*;
#(
  parameter bit FIRST = 1'b0
) (
  input  logic    clk,
  input  logic    rst,
  input  logic    a_i,
  input  stream_t s_in,
  input  logic    p_in,
  output stream_t s_out,
  output logic    p_out
);

  stream_t s;        // operand stream as seen by this cell's adder
  logic    p;        // partial-product bit as seen by this cell's adder

  if (FIRST) begin : g_direct
    assign s = s_in;
    assign p = p_in;
  end else begin : g_delay
    stream_t s_d1, s_d2;   // FF0..FF5 and the select delays
    logic    p_d1;         // FF8
    always_ff @(posedge clk or posedge rst) begin
      if (rst) begin
        s_d1 <= '0;
        s_d2 <= '0;
        p_d1 <= 1'b0;
      end else begin
        s_d1 <= s_in;
        s_d2 <= s_d1;
        p_d1 <= p_in;
      end
    end
    assign s = s_d2;
    assign p = p_d1;
  end

  logic    a_q, q_q, c_q;       // FF9 (a), FF10 (q), FF11 (carry)
  logic    u;                   // MUX A
  logic    a_sel, q_sel;        // MUX E, MUX D
  logic    cin;                 // MUX C
  addend_e addend;
  logic    x;                   // MUX B
  logic    sum, cout;

  always_comb begin
    u      = s.sel_a ? p : 1'b0;
    a_sel  = s.sel_cdef ? a_q : a_i;
    q_sel  = s.sel_cdef ? q_q : (u ^ (a_i & s.b));
    cin    = s.sel_cdef ? c_q : 1'b0;
    addend = addend_e'({a_sel, q_sel});
    unique case (addend)
      ADD_ZERO: x = 1'b0;
      ADD_N:    x = s.n;
      ADD_B:    x = s.b;
      ADD_NB:   x = s.nb;
    endcase
    {cout, sum} = {1'b0, u} + {1'b0, x} + {1'b0, cin};
  end

  always_ff @(posedge clk or posedge rst) begin
    if (rst) begin
      a_q <= 1'b0;
      q_q <= 1'b0;
      c_q <= 1'b0;
    end else begin
      a_q <= a_sel;
      q_q <= q_sel;
      c_q <= cout;
    end
  end

  assign s_out = s;
  assign p_out = sum;

  // The choice of q_i makes bit 0 of P + a_i*B + q_i*N zero. (Only the
  // first-stage rule matters here: b_0, n_0 and nb_0 are consistent, with n_0 = 1.)
  property p_even_sum;
    @(posedge clk) disable iff (rst)
      (!s.sel_cdef && s.sel_a && s.n) |-> (sum == 1'b0);
  endproperty
  a_even_sum: assert property (p_even_sum)
    else $error("sfg2_cell: position-0 sum bit is not zero");

endmodule

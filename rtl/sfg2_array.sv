// sfg2_array -- linear systolic array for radix-2 Montgomery multiplication
// (the systolized SFG-II multiplier).
//
// L + 1 cells, cell_0 .. cell_L, are cascaded; cell i performs Montgomery
// iteration i with multiplier bit a_in[i] (a_in[L] is 0 for operands below
// 2^L). The modulus N, the multiplicand B and the precomputed NB = N + B
// enter cell_0 bit-serially, LSB first, one bit per clock, together with the
// framing controls select1/select2; every later cell sees them two clocks
// after its predecessor. The partial product moves one clock per cell, so
// each cell receives its predecessor's sum shifted down by one bit, which is
// the division by two of the algorithm.
//
// Framing of one operation (position j = clocks since its first bit):
//   j = 0 .. L     b_in, n_in, nb_in carry bit j (bit L of B and N is 0,
//                  bit L of NB is the carry of N + B), select1 = 1
//   j = L + 1      b_in = n_in = nb_in = 0, select1 = 0
//   select2 = 0 at j = 0 and 1 at j = 1 .. L + 1
// p_in is the initial partial product, LSB first (0 for a plain product).
//
// Result: P = (p_init + A*B) * 2^-(L+1) mod N, not fully reduced (P < 2N,
// L + 1 bits), appears on rout0 LSB first: bit k at position 2L + 1 + k, so
// the first bit comes 2L + 1 clocks after the first input bit and the last
// at 3L + 1. A new operation may enter every L + 2 clocks, provided each
// a_in[i] already holds the new operation's bit when cell i sees position 0
// of it (clock 2i of that operation) and keeps it until then; cell i
// captures a_in[i] at that position.
//
// Follows the document: the cell chain, the 2-clock operand delay and
// 1-clock partial-product delay per cell, the L + 1 cells with a_L = 0, and
// the 2L + 1 latency / 3L + 1 execution time. Own choice: the framing above
// (the extra position L + 1 that releases the top carry) and the omission of
// the separate P0 input, explained in sfg2_cell.
module sfg2_array
  import sfg2_pkg::*;
#(
  parameter int unsigned L = 1024
) (
  input  logic       clk,
  input  logic       rst,
  input  logic [L:0] a_in,
  input  logic       b_in,
  input  logic       n_in,
  input  logic       nb_in,
  input  logic       p_in,
  input  logic       select1,
  input  logic       select2,
  output logic       rout0
);

  stream_t s_chain [L+2];
  logic    p_chain [L+2];

  assign s_chain[0] = '{b: b_in, n: n_in, nb: nb_in, sel_a: select1, sel_cdef: select2};
  assign p_chain[0] = p_in;

  for (genvar i = 0; i <= L; i++) begin : g_cell
    sfg2_cell #(.FIRST(i == 0)) u_cell (
      .clk   (clk),
      .rst   (rst),
      .a_i   (a_in[i]),
      .s_in  (s_chain[i]),
      .p_in  (p_chain[i]),
      .s_out (s_chain[i+1]),
      .p_out (p_chain[i+1])
    );
  end

  assign rout0 = p_chain[L+1];

endmodule

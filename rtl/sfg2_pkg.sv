// sfg2_pkg -- types shared by the SFG-II systolic Montgomery multiplier.
//
// stream_t is the bundle that travels down the array beside the partial
// product: one bit each of the multiplicand B, the modulus N and the
// precomputed sum NB = N + B, plus the two framing controls. All of it moves
// LSB first, one bit position per clock, and is delayed two clocks per cell.
//
//   sel_a    (select1) : 1 while the incoming partial-product bit is part of
//                        the current operation; 0 gates it to zero (MUX A).
//   sel_cdef (select2) : 0 marks bit position 0 of an operation (first stage:
//                        q is formed, a is captured, carry-in is 0);
//                        1 on every later position.
//
// addend_e names the four rows of the a_i/q_i table: which operand word the
// cell adds to the partial product in this iteration.
package sfg2_pkg;

  typedef struct packed {
    logic b;
    logic n;
    logic nb;
    logic sel_a;
    logic sel_cdef;
  } stream_t;

  // Encoding is {a_i, q_i}.
  typedef enum logic [1:0] {
    ADD_ZERO = 2'b00,  // a_i = 0, q_i = 0 : P
    ADD_N    = 2'b01,  // a_i = 0, q_i = 1 : P + N
    ADD_B    = 2'b10,  // a_i = 1, q_i = 0 : P + B
    ADD_NB   = 2'b11   // a_i = 1, q_i = 1 : P + NB
  } addend_e;

endpackage

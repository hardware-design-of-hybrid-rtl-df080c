// mont_mult_top -- SFG-II systolic Montgomery multiplier with a parallel
// operand interface.
//
// Computes P = A * B * 2^-(L+1) mod N for an odd L-bit modulus N and
// operands A, B < N. P is the unreduced Montgomery product: P < 2N, so it is
// returned on L + 1 bits and may need one subtraction of N.
//
// Operation: when ready is high, a start pulse loads A, B and N. The
// multiplier forms NB = N + B (the "precomputed" sum of the algorithm) with
// one adder, holds {0, A} on the cells' a inputs, and from the next clock on
// shifts B, N and NB into sfg2_array LSB first, L + 2 positions framed by
// select1/select2 (see sfg2_array). The serial result is shifted into a
// register as it leaves the last cell.
//
// Timing, counting the clock after the start pulse as clock 0 (first bit
// into the array): result bit 0 leaves the array on clock 2L + 1 (latency),
// bit L on clock 3L + 1 (execution time); done pulses and result is valid
// one clock later, 3L + 2 clocks after the start edge. ready rises again on
// clock 2L, when the last cell has captured its bit of A, so the next
// operation's input can overlap the current one's output (a product can be
// fed back as soon as its first bit leaves the array, as the document
// suggests for exponentiation). result holds until the next done.
//
// The array and its timing follow the document. The load/shift/collect
// logic, the NB adder and this handshake are this design's own choices: the
// document feeds the serial streams and a_in from a testbench.
module mont_mult_top
  import sfg2_pkg::*;
#(
  parameter int unsigned L = 1024
) (
  input  logic         clk,
  input  logic         rst,
  input  logic         start,
  input  logic [L-1:0] a,
  input  logic [L-1:0] b,
  input  logic [L-1:0] n,
  output logic         ready,
  output logic         done,
  output logic [L:0]   result
);

  localparam int unsigned CW = $clog2(3 * L + 4);

  // Input side: operands and position counter of the operation being fed.
  logic [L:0]    a_reg, b_sh, n_sh, nb_sh;
  logic          in_busy;
  logic [CW-1:0] in_cnt;       // position of the current operation
  // Output side: collection of the serial result.
  logic          out_busy;
  logic [CW-1:0] out_cnt;
  logic [L-1:0]  res_sh;       // result bits collected so far

  logic accept;
  logic b_bit, n_bit, nb_bit, sel1, sel2, rout0;

  assign ready  = !in_busy || (in_cnt == CW'(2 * L));
  assign accept = start && ready;

  always_ff @(posedge clk or posedge rst) begin
    if (rst) begin
      a_reg   <= '0;
      b_sh    <= '0;
      n_sh    <= '0;
      nb_sh   <= '0;
      in_busy <= 1'b0;
      in_cnt  <= '0;
    end else if (accept) begin
      a_reg   <= {1'b0, a};
      b_sh    <= {1'b0, b};
      n_sh    <= {1'b0, n};
      nb_sh   <= {1'b0, n} + {1'b0, b};
      in_busy <= 1'b1;
      in_cnt  <= '0;
    end else if (in_busy) begin
      b_sh    <= b_sh >> 1;
      n_sh    <= n_sh >> 1;
      nb_sh   <= nb_sh >> 1;
      in_cnt  <= in_cnt + 1'b1;
      if (in_cnt == CW'(2 * L)) in_busy <= 1'b0;
    end
  end

  // Serial framing: positions 0..L carry operand bits, L+1 releases the carry.
  always_comb begin
    b_bit  = 1'b0;
    n_bit  = 1'b0;
    nb_bit = 1'b0;
    sel1   = 1'b0;
    sel2   = 1'b0;
    if (in_busy && in_cnt <= CW'(L + 1)) begin
      sel2 = (in_cnt != '0);
      if (in_cnt <= CW'(L)) begin
        b_bit  = b_sh[0];
        n_bit  = n_sh[0];
        nb_bit = nb_sh[0];
        sel1   = 1'b1;
      end
    end
  end

  sfg2_array #(.L(L)) u_array (
    .clk     (clk),
    .rst     (rst),
    .a_in    (a_reg),
    .b_in    (b_bit),
    .n_in    (n_bit),
    .nb_in   (nb_bit),
    .p_in    (1'b0),
    .select1 (sel1),
    .select2 (sel2),
    .rout0   (rout0)
  );

  // Result bit 0 appears on position 2L+1 of the operation being fed.
  always_ff @(posedge clk or posedge rst) begin
    if (rst) begin
      out_busy <= 1'b0;
      out_cnt  <= '0;
      res_sh   <= '0;
      result   <= '0;
      done     <= 1'b0;
    end else begin
      done <= 1'b0;
      if (out_busy) begin
        res_sh  <= {rout0, res_sh[L-1:1]};
        out_cnt <= out_cnt + 1'b1;
        if (out_cnt == CW'(L)) begin
          out_busy <= 1'b0;
          result   <= {rout0, res_sh};
          done     <= 1'b1;
        end
      end
      if (in_busy && in_cnt == CW'(2 * L)) begin
        out_busy <= 1'b1;
        out_cnt  <= '0;
      end
    end
  end

endmodule

// tsa_adder: N-digit BMSD adder built from the three-step algorithm.
//
// A row of N+1 BANNU cells, one per digit position, adds two N-digit
// signed-digit operands. Step one of every cell works on its own operand
// digits only; step two needs the step-one carry of the cell to its right;
// step three needs the step-two carry of the cell to its right. No carry
// ever travels further than one position, so the delay is three neuron
// delays whatever N is.
//
// The sum has N+1 digits. Cell N has zero operand digits and only absorbs
// the carry T_N coming out of the top operand digit; its own step-two carry
// T'_{N+1} is always zero (W_N = 0 and |T_N| <= 1), and so is its step-one
// carry T_{N+1}; an assertion checks both. The carry inputs of cell 0 are
// tied to zero.
// The cell arrangement follows the algorithm; the N+1 digit result width is
// this design's reading of the worked examples, which give 16-digit sums
// for 15-digit operands.
//
// Interface (packed arrays of BMSD digits, index = digit weight 2^i):
//   x, y          : N-digit operands
//   t, w, tp, wp  : step-one and step-two digit vectors (N+1 digits each,
//                   t[0] and tp[0] are always 0, w[N] is always 0)
//   s             : N+1 digit sum
// Purely combinational.
module tsa_adder
  import bmsd_pkg::*;
#(
  parameter int unsigned N = 15     // operand length in digits
) (
  input  sd_digit_t [N-1:0] x,
  input  sd_digit_t [N-1:0] y,
  output sd_digit_t [N:0]   t,
  output sd_digit_t [N:0]   w,
  output sd_digit_t [N:0]   tp,
  output sd_digit_t [N:0]   wp,
  output sd_digit_t [N:0]   s
);

  // Carry chains between neighbouring cells: element i enters cell i.
  sd_digit_t [N+1:0] t_chain;
  sd_digit_t [N+1:0] tp_chain;
  sd_digit_t [N:0]   x_ext;
  sd_digit_t [N:0]   y_ext;

  assign x_ext       = {SD_ZERO, x};
  assign y_ext       = {SD_ZERO, y};
  assign t_chain[0]  = SD_ZERO;
  assign tp_chain[0] = SD_ZERO;

  for (genvar i = 0; i <= N; i++) begin : g_cell
    bannu u_cell (
      .x      (x_ext[i]),
      .y      (y_ext[i]),
      .t_in   (t_chain[i]),
      .tp_in  (tp_chain[i]),
      .t_out  (t_chain[i+1]),
      .w      (w[i]),
      .tp_out (tp_chain[i+1]),
      .wp     (wp[i]),
      .s      (s[i])
    );
  end

  assign t  = t_chain[N:0];
  assign tp = tp_chain[N:0];

  // The sum never needs an (N+2)-th digit: both carries out of the top
  // cell are zero.
  always_comb
    assert (t_chain[N+1] == SD_ZERO && tp_chain[N+1] == SD_ZERO)
      else $error("tsa_adder: carry out of the top cell is not zero");

endmodule

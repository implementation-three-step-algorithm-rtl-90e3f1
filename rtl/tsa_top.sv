// tsa_top: parallel array of three-step BMSD adders.
//
// OPS independent additions of N-digit binary modified signed-digit
// numbers are evaluated at the same time, one tsa_adder per operation.
// Because no carry travels more than one digit, every lane finishes after
// the same three neuron delays whatever N is, and the lanes share nothing.
// The default size, six operations of 15-digit operands, is the worked
// example the design is demonstrated with. The array is combinational and
// has no clock or handshake; registering the ports, if needed, is left to
// the surrounding system (this design's choice).
//
// Interface (lane k, digit i; digits encoded as in bmsd_pkg):
//   x[k], y[k]            : N-digit operands of operation k
//   t[k], w[k]            : step-one carry and sum vectors, N+1 digits
//   tp[k], wp[k]          : step-two carry and sum vectors, N+1 digits
//   s[k]                  : N+1 digit result of operation k
module tsa_top
  import bmsd_pkg::*;
#(
  parameter int unsigned OPS = 6,   // additions performed in parallel
  parameter int unsigned N   = 15   // operand length in digits
) (
  input  sd_digit_t [OPS-1:0][N-1:0] x,
  input  sd_digit_t [OPS-1:0][N-1:0] y,
  output sd_digit_t [OPS-1:0][N:0]   t,
  output sd_digit_t [OPS-1:0][N:0]   w,
  output sd_digit_t [OPS-1:0][N:0]   tp,
  output sd_digit_t [OPS-1:0][N:0]   wp,
  output sd_digit_t [OPS-1:0][N:0]   s
);

  for (genvar k = 0; k < OPS; k++) begin : g_op
    tsa_adder #(.N(N)) u_add (
      .x  (x[k]),
      .y  (y[k]),
      .t  (t[k]),
      .w  (w[k]),
      .tp (tp[k]),
      .wp (wp[k]),
      .s  (s[k])
    );
  end

endmodule

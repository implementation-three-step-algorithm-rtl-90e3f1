// w_neuron: W-transformation neuron (step-one interim sum).
//
// Adds its two input digits with unit weights and applies the activation
// -delta(S-1) + delta(S+1): the output is -1 when S = +1, +1 when S = -1 and
// 0 for S in {-2, 0, +2}. Together with the T-transformation this rewrites
// X_i + Y_i as 2*T_{i+1} + W_i. The activation is the algorithm's; the
// digit encoding (see bmsd_pkg) is this design's own.
//
// Interface: a, b input digits; w output digit. Purely combinational.
module w_neuron
  import bmsd_pkg::*;
(
  input  sd_digit_t a,
  input  sd_digit_t b,
  output sd_digit_t w
);

  sd_sum_t s;

  always_comb begin
    s = neuron_sum(a, b);
    w = SD_ZERO;
    if (s == 3'sd1)  w = SD_NEG;
    if (s == -3'sd1) w = SD_POS;
  end

endmodule

// wp_neuron: W'-transformation neuron (step-two interim sum).
//
// Adds its two input digits with unit weights and applies the activation
// delta(S-1) - delta(S+1): the output is +1 when S = +1, -1 when S = -1 and
// 0 for S in {-2, 0, +2}. With the T'-transformation it rewrites T_i + W_i
// as 2*T'_{i+1} + W'_i. The activation is the algorithm's; the digit
// encoding (see bmsd_pkg) is this design's own.
//
// Interface: a, b input digits; wp output digit. Purely combinational.
module wp_neuron
  import bmsd_pkg::*;
(
  input  sd_digit_t a,
  input  sd_digit_t b,
  output sd_digit_t wp
);

  sd_sum_t s;

  always_comb begin
    s  = neuron_sum(a, b);
    wp = SD_ZERO;
    if (s == 3'sd1)  wp = SD_POS;
    if (s == -3'sd1) wp = SD_NEG;
  end

endmodule

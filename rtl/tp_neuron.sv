// tp_neuron: T'-transformation neuron (step-two carry).
//
// Adds its two input digits with unit weights and applies the activation
// delta(S-2) - delta(S+2): the output is +1 when S = +2, -1 when S = -2 and
// 0 otherwise. It produces the second transfer digit T'_{i+1} from T_i and
// W_i. The activation is the algorithm's; the digit encoding (see
// bmsd_pkg) is this design's own.
//
// Interface: a, b input digits; tp output digit. Purely combinational.
module tp_neuron
  import bmsd_pkg::*;
(
  input  sd_digit_t a,
  input  sd_digit_t b,
  output sd_digit_t tp
);

  sd_sum_t s;

  always_comb begin
    s  = neuron_sum(a, b);
    tp = SD_ZERO;
    if (s == 3'sd2)  tp = SD_POS;
    if (s == -3'sd2) tp = SD_NEG;
  end

endmodule

// t_neuron: T-transformation neuron (step-one carry and step-three sum).
//
// Adds its two input digits with unit weights and passes the sum S through
// a sign activation: +1 when S > 0, -1 when S < 0 and 0 when S = 0. In step
// one it produces the transfer digit T_{i+1} from X_i and Y_i; in step three
// the same neuron, fed with T'_i and W'_i, produces the final sum digit S_i.
// The activation and its use in both steps follow the three-step algorithm;
// the zero output for S = 0 is taken from the algorithm's rule table, and
// the two-bit digit encoding (see bmsd_pkg) is this design's own.
//
// Interface: a, b input digits; t output digit. Purely combinational.
module t_neuron
  import bmsd_pkg::*;
(
  input  sd_digit_t a,
  input  sd_digit_t b,
  output sd_digit_t t
);

  sd_sum_t s;

  always_comb begin
    s = neuron_sum(a, b);
    if (s > 0)      t = SD_POS;
    else if (s < 0) t = SD_NEG;
    else            t = SD_ZERO;
  end

endmodule

// bannu: basic arithmetic neural network unit, one digit position of the
// three-step BMSD adder.
//
// Five fixed-weight neurons evaluate the three steps of the algorithm for
// digit position i:
//   step one   : X_i + Y_i   = 2*T_{i+1}  + W_i    (t_neuron, w_neuron)
//   step two   : T_i + W_i   = 2*T'_{i+1} + W'_i   (tp_neuron, wp_neuron)
//   step three : S_i         = T'_i + W'_i          (t_neuron)
// The carries T and T' leave the unit towards position i+1 (t_out, tp_out)
// and enter it from position i-1 (t_in, tp_in). Step two guarantees that
// T'_i and W'_i are never both +1 or both -1, so step three produces no
// further carry and the sign neuron yields the sum digit exactly.
// The unit's content and the reuse of the T-transformation in step three
// follow the algorithm; splitting the neighbour connections into these
// ports is this design's choice.
//
// Interface: all ports are BMSD digits (see bmsd_pkg). The unit is purely
// combinational; the result settles after three neuron delays in series.
module bannu
  import bmsd_pkg::*;
(
  input  sd_digit_t x,       // augend digit X_i
  input  sd_digit_t y,       // addend digit Y_i
  input  sd_digit_t t_in,    // T_i from position i-1
  input  sd_digit_t tp_in,   // T'_i from position i-1
  output sd_digit_t t_out,   // T_{i+1} to position i+1
  output sd_digit_t w,       // W_i
  output sd_digit_t tp_out,  // T'_{i+1} to position i+1
  output sd_digit_t wp,      // W'_i
  output sd_digit_t s        // S_i
);

  // Step one.
  t_neuron  u_step1_t (.a(x),     .b(y),  .t(t_out));
  w_neuron  u_step1_w (.a(x),     .b(y),  .w(w));
  // Step two.
  tp_neuron u_step2_t (.a(t_in),  .b(w),  .tp(tp_out));
  wp_neuron u_step2_w (.a(t_in),  .b(w),  .wp(wp));
  // Step three.
  t_neuron  u_step3   (.a(tp_in), .b(wp), .t(s));

endmodule

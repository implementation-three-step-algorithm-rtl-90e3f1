// bmsd_pkg: shared types and helpers for the binary modified signed-digit
// (BMSD) three-step adder.
//
// A BMSD digit takes one of the three values -1, 0, +1 and is carried on two
// wires as a two's complement number: 2'b11 = -1, 2'b00 = 0, 2'b01 = +1.
// The code 2'b10 (-2) is not a digit and is never produced by any module.
// The encoding is this design's choice; the arithmetic follows the usual
// radix-2 signed-digit rule value = sum(d_i * 2^i).
//
// Every neuron of the adder first forms the weighted sum of its two input
// digits (both weights +1), which ranges over -2..+2 and is held in a
// 3-bit signed number, and then applies its activation to that sum.
package bmsd_pkg;

  typedef logic signed [1:0] sd_digit_t;   // one BMSD digit
  typedef logic signed [2:0] sd_sum_t;     // neuron net input, -2..+2

  localparam sd_digit_t SD_NEG  = 2'sb11;
  localparam sd_digit_t SD_ZERO = 2'sb00;
  localparam sd_digit_t SD_POS  = 2'sb01;

  // Summation part of a neuron: both synaptic weights are +1.
  function automatic sd_sum_t neuron_sum(sd_digit_t a, sd_digit_t b);
    return sd_sum_t'(a) + sd_sum_t'(b);
  endfunction

  // True when a two-bit code is one of the three legal digits.
  function automatic logic is_digit(sd_digit_t d);
    return d != 2'sb10;
  endfunction

endpackage

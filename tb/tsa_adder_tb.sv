// tsa_adder_tb: self-checking testbench for tsa_adder.
//
// Two instances are tested side by side:
//   * N = 4 : every one of the 3^8 = 6561 operand pairs is applied;
//   * N = 15 (the default): 3000 random operand pairs plus runs of
//     all-(+1) / all-(-1) operands that drive every carry position.
// For each pair the testbench checks, independently of the cell logic,
// that the sum's value equals value(x) + value(y), that every output is a
// legal digit, that the step-one and step-two identities
// x_i + y_i = 2*t_{i+1} + w_i and t_i + w_i = 2*tp_{i+1} + wp_i hold at
// every position, and that t[0], tp[0] and w[N] are zero.
// It also counts how often a step-two carry occurred, and fails if it never
// did. A watchdog ends a hung run.
module tsa_adder_tb;
  import bmsd_pkg::*;

  localparam int NS = 4;
  localparam int NL = 15;

  sd_digit_t [NS-1:0] xs, ys;
  sd_digit_t [NS:0]   ts, ws, tps, wps, ss;
  sd_digit_t [NL-1:0] xl, yl;
  sd_digit_t [NL:0]   tl, wl, tpl, wpl, sl;

  int checks = 0;
  int failures = 0;
  int tp_carries = 0;

  tsa_adder #(.N(NS)) dut_s (.x(xs), .y(ys), .t(ts), .w(ws), .tp(tps), .wp(wps), .s(ss));
  tsa_adder            dut_l (.x(xl), .y(yl), .t(tl), .w(wl), .tp(tpl), .wp(wpl), .s(sl));

  // Digit i of a packed digit vector held in the low bits of raw.
  function automatic int dig(logic [63:0] raw, int i);
    return int'($signed(raw[2*i +: 2]));
  endfunction

  function automatic longint value(logic [63:0] raw, int nd);
    longint v = 0;
    for (int i = nd - 1; i >= 0; i--) v = 2 * v + longint'(dig(raw, i));
    return v;
  endfunction

  task automatic check(string what, longint got, longint exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL tsa_adder %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  // Full check of one result; n = operand digits.
  task automatic check_result(int n, logic [63:0] x, logic [63:0] y, logic [63:0] t,
                              logic [63:0] w, logic [63:0] tp, logic [63:0] wp,
                              logic [63:0] s);
    int bad = 0;
    check($sformatf("N=%0d sum value x=%0d y=%0d", n, value(x, n), value(y, n)),
          value(s, n + 1), value(x, n) + value(y, n));
    for (int i = 0; i <= n; i++) begin
      int xi = (i < n) ? dig(x, i) : 0;
      int yi = (i < n) ? dig(y, i) : 0;
      int tn = (i < n) ? dig(t, i + 1) : 0;
      int pn = (i < n) ? dig(tp, i + 1) : 0;
      if (dig(s, i) == -2 || dig(t, i) == -2 || dig(w, i) == -2 ||
          dig(tp, i) == -2 || dig(wp, i) == -2) bad++;
      if (xi + yi != 2 * tn + dig(w, i)) bad++;
      if (dig(t, i) + dig(w, i) != 2 * pn + dig(wp, i)) bad++;
      if (dig(tp, i) != 0) tp_carries++;
    end
    if (dig(t, 0) != 0 || dig(tp, 0) != 0 || dig(w, n) != 0) bad++;
    check($sformatf("N=%0d digit identities", n), longint'(bad), 0);
  endtask

  function automatic sd_digit_t rnd_digit();
    int r = int'($urandom_range(2)) - 1;
    return sd_digit_t'(r);
  endfunction

  initial begin
    xs = '0; ys = '0; xl = '0; yl = '0;
    #1;
    // Exhaustive at N = 4.
    for (int code = 0; code < 6561; code++) begin
      automatic int c = code;
      for (int i = 0; i < NS; i++) begin xs[i] = sd_digit_t'(c % 3 - 1); c /= 3; end
      for (int i = 0; i < NS; i++) begin ys[i] = sd_digit_t'(c % 3 - 1); c /= 3; end
      #1;
      check_result(NS, 64'(xs), 64'(ys), 64'(ts), 64'(ws), 64'(tps), 64'(wps), 64'(ss));
    end
    // Corner patterns at N = 15: all +1, all -1, and mixtures.
    for (int p = 0; p < 9; p++) begin
      for (int i = 0; i < NL; i++) begin
        xl[i] = sd_digit_t'(p / 3 - 1);
        yl[i] = sd_digit_t'(p % 3 - 1);
      end
      #1;
      check_result(NL, 64'(xl), 64'(yl), 64'(tl), 64'(wl), 64'(tpl), 64'(wpl), 64'(sl));
    end
    // Random at N = 15.
    for (int k = 0; k < 3000; k++) begin
      for (int i = 0; i < NL; i++) begin xl[i] = rnd_digit(); yl[i] = rnd_digit(); end
      #1;
      check_result(NL, 64'(xl), 64'(yl), 64'(tl), 64'(wl), 64'(tpl), 64'(wpl), 64'(sl));
    end
    checks++;
    if (tp_carries == 0) begin
      failures++;
      $display("FAIL tsa_adder: no step-two carry was ever produced");
    end
    $display("tsa_adder_tb: step-two carries seen = %0d", tp_carries);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("FAIL tsa_adder: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

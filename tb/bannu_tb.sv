// bannu_tb: self-checking testbench for bannu, one digit position of the
// three-step adder.
//
// Walks through all 81 combinations of the four input digits (x, y, t_in,
// tp_in). The expected outputs come from the algorithm's rule table, held
// below as integer columns indexed by the input pair, applied step by step:
// step one on (x, y), step two on (t_in, W), step three on (tp_in, W'). It
// also checks the two digit identities x + y = 2*t_out + w and
// t_in + w = 2*tp_out + wp. A watchdog ends a hung run.
module bannu_tb;
  import bmsd_pkg::*;

  // Rule table, row index = 3*(a+1) + (b+1).
  localparam int RULE_T  [9] = '{-1, -1, 0, -1, 0, 1, 0, 1, 1};
  localparam int RULE_W  [9] = '{ 0,  1, 0,  1, 0, -1, 0, -1, 0};
  localparam int RULE_TP [9] = '{-1,  0, 0,  0, 0, 0, 0, 0, 1};
  localparam int RULE_WP [9] = '{ 0, -1, 0, -1, 0, 1, 0, 1, 0};

  function automatic int row(int a, int b);
    return 3 * (a + 1) + (b + 1);
  endfunction

  sd_digit_t x, y, t_in, tp_in;
  sd_digit_t t_out, w, tp_out, wp, s;
  int checks = 0;
  int failures = 0;

  bannu dut (.x(x), .y(y), .t_in(t_in), .tp_in(tp_in),
             .t_out(t_out), .w(w), .tp_out(tp_out), .wp(wp), .s(s));

  task automatic check(string what, int got, int exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL bannu %s: x=%0d y=%0d t_in=%0d tp_in=%0d got %0d expected %0d",
               what, int'(x), int'(y), int'(t_in), int'(tp_in), got, exp);
    end
  endtask

  initial begin
    int e_t, e_w, e_tp, e_wp, e_s;
    {x, y, t_in, tp_in} = '0;
    #1;
    for (int xi = -1; xi <= 1; xi++)
      for (int yi = -1; yi <= 1; yi++)
        for (int ti = -1; ti <= 1; ti++)
          for (int pi = -1; pi <= 1; pi++) begin
            x = sd_digit_t'(xi);  y = sd_digit_t'(yi);
            t_in = sd_digit_t'(ti);  tp_in = sd_digit_t'(pi);
            #1;
            e_t  = RULE_T[row(xi, yi)];
            e_w  = RULE_W[row(xi, yi)];
            e_tp = RULE_TP[row(ti, e_w)];
            e_wp = RULE_WP[row(ti, e_w)];
            e_s  = RULE_T[row(pi, e_wp)];
            check("t_out",  int'(t_out),  e_t);
            check("w",      int'(w),      e_w);
            check("tp_out", int'(tp_out), e_tp);
            check("wp",     int'(wp),     e_wp);
            check("s",      int'(s),      e_s);
            check("step1 identity", xi + yi, 2 * int'(t_out) + int'(w));
            check("step2 identity", ti + int'(w), 2 * int'(tp_out) + int'(wp));
          end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #10000;
    failures++;
    $display("FAIL bannu: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

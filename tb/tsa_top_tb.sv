// tsa_top_tb: end-to-end testbench for tsa_top at its default size
// (six parallel additions of 15-digit operands).
//
// Phase 1 applies the six worked operations of the design's demonstration
// to the six lanes at once and compares, digit by digit, the step-one
// vectors T and W, the step-two vectors T' and W' and the 16-digit sums
// with the expected digits listed below (digit 15 first), and each sum's
// value with the expected decimal result.
// Phase 2 applies 2000 rounds of random operands to all lanes and checks
// every sum's value against value(x) + value(y).
// The testbench counts how often each mechanism of the algorithm occurred
// over the whole run: a positive and a negative step-one carry, a positive
// and a negative step-two carry, a sum that grew into digit N, and a lane
// whose result is negative. A mechanism that never occurred is a failure.
// A watchdog ends a hung run.
module tsa_top_tb;
  import bmsd_pkg::*;

  localparam int OPS = 6;
  localparam int N   = 15;

  // Worked operations, digit N-1 (or N) first.
  localparam int EX_X [6][15] = '{
    '{ 1,  0,  0, -1, -1,  1,  0,  1,  0, -1,  0,  1, -1,  0, -1},
    '{ 1,  1,  1,  1,  1,  1,  1,  1,  1,  1,  1,  1,  1,  1,  1},
    '{-1, -1, -1, -1, -1, -1, -1, -1, -1, -1, -1, -1, -1, -1, -1},
    '{ 1,  1,  1,  1,  1,  0,  0, -1, -1, -1,  0,  0,  1,  1,  1},
    '{ 1,  1,  1,  1,  1,  1,  1,  1,  1,  1,  1,  1,  1,  1,  1},
    '{-1, -1, -1, -1, -1, -1, -1, -1, -1, -1, -1, -1, -1, -1, -1}};
  localparam int EX_Y [6][15] = '{
    '{-1,  1,  0,  1,  0, -1,  1,  1,  1,  0, -1, -1, -1,  0,  0},
    '{ 1,  1,  1,  1,  1,  1,  1,  1,  1,  1,  1,  1,  1,  1,  1},
    '{-1, -1, -1, -1, -1, -1, -1, -1, -1, -1, -1, -1, -1, -1, -1},
    '{ 1,  1,  1,  1,  1,  1,  1,  0,  0,  0, -1, -1, -1, -1, -1},
    '{ 0,  0,  0,  0,  0,  0,  0,  0,  0,  0,  0,  0,  0,  0,  0},
    '{ 0,  0,  0,  0,  0,  0,  0,  0,  0,  0,  0,  0,  0,  0,  0}};
  localparam int EX_T [6][16] = '{
    '{ 0,  1,  0,  0, -1,  0,  1,  1,  1, -1, -1,  0, -1,  0, -1,  0},
    '{ 1,  1,  1,  1,  1,  1,  1,  1,  1,  1,  1,  1,  1,  1,  1,  0},
    '{-1, -1, -1, -1, -1, -1, -1, -1, -1, -1, -1, -1, -1, -1, -1,  0},
    '{ 1,  1,  1,  1,  1,  1,  1, -1, -1, -1, -1, -1,  0,  0,  0,  0},
    '{ 1,  1,  1,  1,  1,  1,  1,  1,  1,  1,  1,  1,  1,  1,  1,  0},
    '{-1, -1, -1, -1, -1, -1, -1, -1, -1, -1, -1, -1, -1, -1, -1,  0}};
  localparam int EX_W [6][16] = '{
    '{ 0,  0, -1,  0,  0,  1,  0, -1,  0, -1,  1,  1,  0,  0,  0,  1},
    '{ 0,  0,  0,  0,  0,  0,  0,  0,  0,  0,  0,  0,  0,  0,  0,  0},
    '{ 0,  0,  0,  0,  0,  0,  0,  0,  0,  0,  0,  0,  0,  0,  0,  0},
    '{ 0,  0,  0,  0,  0,  0, -1, -1,  1,  1,  1,  1,  1,  0,  0,  0},
    '{ 0, -1, -1, -1, -1, -1, -1, -1, -1, -1, -1, -1, -1, -1, -1, -1},
    '{ 0,  1,  1,  1,  1,  1,  1,  1,  1,  1,  1,  1,  1,  1,  1,  1}};
  localparam int EX_TP [6][16] = '{
    '{ 0,  0,  0,  0,  0,  0,  0,  0, -1,  0,  0,  0,  0,  0,  0,  0},
    '{ 0,  0,  0,  0,  0,  0,  0,  0,  0,  0,  0,  0,  0,  0,  0,  0},
    '{ 0,  0,  0,  0,  0,  0,  0,  0,  0,  0,  0,  0,  0,  0,  0,  0},
    '{ 0,  0,  0,  0,  0,  0, -1,  0,  0,  0,  0,  0,  0,  0,  0,  0},
    '{ 0,  0,  0,  0,  0,  0,  0,  0,  0,  0,  0,  0,  0,  0,  0,  0},
    '{ 0,  0,  0,  0,  0,  0,  0,  0,  0,  0,  0,  0,  0,  0,  0,  0}};
  localparam int EX_WP [6][16] = '{
    '{ 0,  1, -1,  0, -1,  1,  1,  0,  1,  0,  0,  1, -1,  0, -1,  1},
    '{ 1,  1,  1,  1,  1,  1,  1,  1,  1,  1,  1,  1,  1,  1,  1,  0},
    '{-1, -1, -1, -1, -1, -1, -1, -1, -1, -1, -1, -1, -1, -1, -1,  0},
    '{ 1,  1,  1,  1,  1,  1,  0,  0,  0,  0,  0,  0,  1,  0,  0,  0},
    '{ 1,  0,  0,  0,  0,  0,  0,  0,  0,  0,  0,  0,  0,  0,  0, -1},
    '{-1,  0,  0,  0,  0,  0,  0,  0,  0,  0,  0,  0,  0,  0,  0,  1}};
  localparam int EX_S [6][16] = '{
    '{ 0,  1, -1,  0, -1,  1,  1,  0,  0,  0,  0,  1, -1,  0, -1,  1},
    '{ 1,  1,  1,  1,  1,  1,  1,  1,  1,  1,  1,  1,  1,  1,  1,  0},
    '{-1, -1, -1, -1, -1, -1, -1, -1, -1, -1, -1, -1, -1, -1, -1,  0},
    '{ 1,  1,  1,  1,  1,  1, -1,  0,  0,  0,  0,  0,  1,  0,  0,  0},
    '{ 1,  0,  0,  0,  0,  0,  0,  0,  0,  0,  0,  0,  0,  0,  0, -1},
    '{-1,  0,  0,  0,  0,  0,  0,  0,  0,  0,  0,  0,  0,  0,  0,  1}};
  localparam longint EX_DEC [6][3] = '{
    '{13923, -6236, 7687},
    '{32767, 32767, 65534},
    '{-32767, -32767, -65534},
    '{31527, 32481, 64008},
    '{32767,  0, 32767},
    '{-32767,  0, -32767}};

  sd_digit_t [OPS-1:0][N-1:0] x, y;
  sd_digit_t [OPS-1:0][N:0]   t, w, tp, wp, s;

  int checks = 0;
  int failures = 0;
  int n_t_pos = 0, n_t_neg = 0, n_tp_pos = 0, n_tp_neg = 0, n_grow = 0, n_neg = 0;

  tsa_top dut (.x(x), .y(y), .t(t), .w(w), .tp(tp), .wp(wp), .s(s));

  function automatic longint value_n(sd_digit_t [N-1:0] v);
    longint r = 0;
    for (int i = N - 1; i >= 0; i--) r = 2 * r + longint'(v[i]);
    return r;
  endfunction

  function automatic longint value_n1(sd_digit_t [N:0] v);
    longint r = 0;
    for (int i = N; i >= 0; i--) r = 2 * r + longint'(v[i]);
    return r;
  endfunction

  task automatic check(string what, longint got, longint exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL tsa_top %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  task automatic count_events();
    for (int k = 0; k < OPS; k++) begin
      for (int i = 0; i <= N; i++) begin
        if (t[k][i] == SD_POS)  n_t_pos++;
        if (t[k][i] == SD_NEG)  n_t_neg++;
        if (tp[k][i] == SD_POS) n_tp_pos++;
        if (tp[k][i] == SD_NEG) n_tp_neg++;
      end
      if (s[k][N] != SD_ZERO) n_grow++;
      if (value_n1(s[k]) < 0) n_neg++;
    end
  endtask

  task automatic need(string what, int n);
    checks++;
    $display("tsa_top_tb: %s occurred %0d times", what, n);
    if (n == 0) begin
      failures++;
      $display("FAIL tsa_top: %s never occurred", what);
    end
  endtask

  initial begin
    x = '0; y = '0;
    #1;
    // Phase 1: the six worked operations in parallel.
    for (int k = 0; k < OPS; k++)
      for (int i = 0; i < N; i++) begin
        x[k][i] = sd_digit_t'(EX_X[k][N-1-i]);
        y[k][i] = sd_digit_t'(EX_Y[k][N-1-i]);
      end
    #1;
    for (int k = 0; k < OPS; k++) begin
      automatic int bad_t = 0, bad_w = 0, bad_tp = 0, bad_wp = 0, bad_s = 0;
      check($sformatf("op %0d x value", k + 1), value_n(x[k]), EX_DEC[k][0]);
      check($sformatf("op %0d y value", k + 1), value_n(y[k]), EX_DEC[k][1]);
      for (int i = 0; i <= N; i++) begin
        if (int'(t[k][i])  != EX_T[k][N-i])  bad_t++;
        if (int'(w[k][i])  != EX_W[k][N-i])  bad_w++;
        if (int'(tp[k][i]) != EX_TP[k][N-i]) bad_tp++;
        if (int'(wp[k][i]) != EX_WP[k][N-i]) bad_wp++;
        if (int'(s[k][i])  != EX_S[k][N-i])  bad_s++;
      end
      check($sformatf("op %0d T digits wrong", k + 1), longint'(bad_t), 0);
      check($sformatf("op %0d W digits wrong", k + 1), longint'(bad_w), 0);
      check($sformatf("op %0d T' digits wrong", k + 1), longint'(bad_tp), 0);
      check($sformatf("op %0d W' digits wrong", k + 1), longint'(bad_wp), 0);
      check($sformatf("op %0d S digits wrong", k + 1), longint'(bad_s), 0);
      check($sformatf("op %0d sum value", k + 1), value_n1(s[k]), EX_DEC[k][2]);
    end
    count_events();
    // Phase 2: random operands in every lane.
    for (int r = 0; r < 2000; r++) begin
      for (int k = 0; k < OPS; k++)
        for (int i = 0; i < N; i++) begin
          x[k][i] = sd_digit_t'(int'($urandom_range(2)) - 1);
          y[k][i] = sd_digit_t'(int'($urandom_range(2)) - 1);
        end
      #1;
      for (int k = 0; k < OPS; k++)
        check($sformatf("round %0d lane %0d sum value", r, k),
              value_n1(s[k]), value_n(x[k]) + value_n(y[k]));
      count_events();
    end
    need("positive step-one carry", n_t_pos);
    need("negative step-one carry", n_t_neg);
    need("positive step-two carry", n_tp_pos);
    need("negative step-two carry", n_tp_neg);
    need("sum growing into digit N", n_grow);
    need("negative result", n_neg);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("FAIL tsa_top: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

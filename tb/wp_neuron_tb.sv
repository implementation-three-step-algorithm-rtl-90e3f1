// wp_neuron_tb: self-checking testbench for wp_neuron, the W'-transformation (step two interim sum).
//
// Applies all nine combinations of two BMSD digits and compares the output
// with the rule table of the three-step algorithm, written out below as
// plain integers (inputs a, b and the expected output), independently of
// the neuron's sum-and-activation form. A watchdog ends the run if it
// hangs. Prints TB_RESULT with the number of checks and failures.
module wp_neuron_tb;
  import bmsd_pkg::*;

  localparam int ROWS = 9;
  localparam int TAB_A   [ROWS] = '{-1, -1, -1, 0, 0, 0, 1, 1, 1};
  localparam int TAB_B   [ROWS] = '{-1, 0, 1, -1, 0, 1, -1, 0, 1};
  localparam int TAB_OUT [ROWS] = '{0, -1, 0, -1, 0, 1, 0, 1, 0};

  sd_digit_t a, b, wp;
  int checks = 0;
  int failures = 0;

  wp_neuron dut (.a(a), .b(b), .wp(wp));

  initial begin
    a = SD_ZERO;
    b = SD_ZERO;
    #1;
    for (int r = 0; r < ROWS; r++) begin
      a = sd_digit_t'(TAB_A[r]);
      b = sd_digit_t'(TAB_B[r]);
      #1;
      checks++;
      if (int'(wp) != TAB_OUT[r]) begin
        failures++;
        $display("FAIL wp_neuron: a=%0d b=%0d got %0d expected %0d",
                 int'(a), int'(b), int'(wp), TAB_OUT[r]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Watchdog: the test needs about ten time steps.
  initial begin
    #1000;
    failures++;
    $display("FAIL wp_neuron: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_ale_step - convergence of the line enhancer's output to a constant input.
//
// Runs the adaptive line enhancer at its default size from reset with a
// constant input d(k) = 2000 LSB (about 0.0076 of full scale in Q18), so the
// reference x(k) = d(k-1) is constant too, and then with a step to -4000 LSB.
// The output y(k) must reach the input value to within 2 % and stay there.
// Each sample's y, e and step-size shift are compared bit for bit with the
// reference model in lms_ref_pkg, and the enable-to-filter_done latency is
// checked. The testbench prints how many samples and clock cycles each
// convergence took. A small input is the hard case for a step size limited
// to powers of two: the power-normalised rule then asks for a step above 1
// (mu_shift below 0), which the step-size unit provides down to 2^8.
module tb_ale_step;
  import lms_ref_pkg::*;

  localparam int W        = 19;
  localparam int SAMPLES  = 200;   // per level
  localparam int MAX_CONV = 80;    // samples allowed to reach the level

  logic clk = 0, n_reset = 1, enable = 0;
  logic signed [W-1:0] dk = '0, x_in = '0, y_out, e_out;
  logic filter_done, busy, warm, sat;
  logic signed [4:0] mu_shift;

  int checks = 0, failures = 0;
  longint cycle = 0;

  ale dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cycle <= cycle + 1;

  initial begin
    #2_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL: %s", what);
    end
  endtask

  initial begin
    static lms_ref ref_m = new(29);
    static longint prev = 0;
    static int bad_lat = 0, min_shift = 99;
    static longint levels [2] = '{2000, -4000};
    longint start_cycle;
    int lat, conv;
    #1 n_reset = 0;
    repeat (3) @(posedge clk);
    n_reset = 1;
    @(posedge clk);
    #1;
    foreach (levels[l]) begin
      conv = -1;
      start_cycle = cycle;
      for (int k = 0; k < SAMPLES; k++) begin
        longint err;
        dk     <= W'(levels[l]);
        x_in   <= W'(prev);
        enable <= 1;
        @(posedge clk);
        enable <= 0;
        ref_m.step(levels[l], prev);
        prev = levels[l];
        lat = 0;
        @(negedge clk);
        while (!filter_done && lat < 8) begin @(negedge clk); lat++; end
        if (lat != 1) bad_lat++;
        check(y_out == W'(ref_m.y), $sformatf("y %0d vs ref %0d at %0d", y_out, ref_m.y, k));
        check(e_out == W'(ref_m.e), $sformatf("e %0d vs ref %0d at %0d", e_out, ref_m.e, k));
        check(int'(mu_shift) == ref_m.shift,
              $sformatf("shift %0d vs %0d at %0d", mu_shift, ref_m.shift, k));
        if (int'(mu_shift) < min_shift) min_shift = int'(mu_shift);
        err = longint'(y_out) - levels[l];
        if (err < 0) err = -err;
        if (err * 50 <= (levels[l] < 0 ? -levels[l] : levels[l])) begin
          if (conv < 0) begin
            conv = k;
            $display("level %0d: y within 2%% after %0d samples (%0d clock cycles)",
                     levels[l], k + 1, cycle - start_cycle);
          end
        end else if (conv >= 0) begin
          check(0, $sformatf("y left the level again at sample %0d (y %0d)", k, y_out));
        end
        @(posedge clk);
        #1;
      end
      check(conv >= 0 && conv < MAX_CONV,
            $sformatf("level %0d not reached within %0d samples", levels[l], MAX_CONV));
    end
    check(bad_lat == 0, $sformatf("%0d samples with filter_done not one cycle after accept", bad_lat));
    check(min_shift < 0, "step size never went above 1 for the small input");
    $display("smallest mu_shift %0d", min_shift);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

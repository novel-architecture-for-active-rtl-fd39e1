// tb_serial_adder - self-checking testbench of the bit-serial saturating
// adder. Random operands (plus same-sign corner cases that overflow) are
// started one after another; the testbench checks that done arrives exactly
// DATA_W + 1 cycles after the start edge, that sum equals a + b clamped to
// 19 bits and that ovf reports the clamp.
module tb_serial_adder;
  localparam int W = 19;
  logic clk = 0, rst_n = 0, start = 0, done, busy, ovf;
  logic signed [W-1:0] a = '0, b = '0, sum;
  int checks = 0, failures = 0, n_ovf = 0;

  serial_adder #(.DATA_W(W)) dut (.*);
  always #5 clk = ~clk;

  initial begin #2_000_000; failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end

  task automatic check(input bit ok, input string what);
    checks++; if (!ok) begin failures++; if (failures < 10) $display("FAIL: %s", what); end
  endtask

  initial begin
    repeat (2) @(posedge clk); #1 rst_n = 1;
    for (int t = 0; t < 600; t++) begin
      longint e;
      int lat;
      a = W'($urandom);
      b = (t % 4 == 3) ? W'({a[W-1], {(W-1){~a[W-1]}}}) : W'($urandom);
      e = longint'(a) + longint'(b);
      start = 1;
      @(posedge clk); #1;
      start = 0;
      lat = 1;
      while (!done) begin @(posedge clk); #1; lat++; end
      check(lat - 1 == W + 1, $sformatf("latency %0d", lat));
      if (e > 262143 || e < -262144) begin
        n_ovf++;
        check(ovf, "ovf not reported");
        e = (e > 0) ? 262143 : -262144;
      end else check(!ovf, "false ovf");
      check(sum == W'(e), $sformatf("sum %0d expected %0d", sum, e));
      @(posedge clk); #1;
      check(!done && !busy && sum == W'(e), "result not held");
    end
    check(n_ovf > 0, "overflow never exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

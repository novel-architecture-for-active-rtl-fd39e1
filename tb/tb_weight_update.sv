// tb_weight_update - self-checking testbench of the LMS weight update.
// Applies random mu*e values and delay lines, with and without 'upd', and
// compares every weight with w + ((mu_err * x) >>> 33) clamped to 19 bits;
// large products drive the weights into the clamp. Also checks the reset
// value w = 0.
module tb_weight_update;
  localparam int N = 29, W = 19;
  logic clk = 0, rst_n = 0, upd = 0, sat;
  logic signed [W+15-1:0] mu_err = '0;
  logic signed [W-1:0] taps [N], w [N];
  int checks = 0, failures = 0, n_sat = 0;
  longint model [N];

  weight_update #(.N_TAPS(N), .DATA_W(W), .FRAC(18), .MUE_FRAC(15)) dut (.*);
  always #5 clk = ~clk;

  initial begin #1_000_000; failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end

  task automatic check(input bit ok, input string what);
    checks++; if (!ok) begin failures++; if (failures < 10) $display("FAIL: %s", what); end
  endtask

  initial begin
    foreach (model[i]) model[i] = 0;
    foreach (taps[i]) taps[i] = '0;
    repeat (2) @(posedge clk); #1 rst_n = 1;
    for (int i = 0; i < N; i++) check(w[i] == '0, "reset value");
    for (int c = 0; c < 500; c++) begin
      bit any_sat;
      longint nx;
      any_sat = 0;
      upd    = ($urandom_range(0, 4) != 0);
      mu_err = (W+15)'($signed(32'($urandom))) >>> ((c < 250) ? $urandom_range(2, 16) : 0);
      for (int i = 0; i < N; i++) taps[i] = W'($urandom);
      #1;
      for (int i = 0; i < N; i++) begin
        nx = model[i] + ((longint'(mu_err) * longint'(taps[i])) >>> 33);
        if (nx > 262143 || nx < -262144) any_sat = 1;
      end
      check(sat == any_sat, "sat flag");
      @(posedge clk); #1;
      if (upd) for (int i = 0; i < N; i++) begin
        nx = model[i] + ((longint'(mu_err) * longint'(taps[i])) >>> 33);
        model[i] = (nx > 262143) ? 262143 : (nx < -262144) ? -262144 : nx;
      end
      if (upd && any_sat) n_sat++;
      for (int i = 0; i < N; i++) check(w[i] == W'(model[i]), $sformatf("w[%0d] cycle %0d", i, c));
    end
    check(n_sat > 0, "clamping never exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

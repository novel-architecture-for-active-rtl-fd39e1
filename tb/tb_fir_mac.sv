// tb_fir_mac - self-checking testbench of the filter multiplier and adder
// arrays. Random weights and samples (including full-scale corners that
// force clamping) are applied; the expected output is the exact dot product
// in 64-bit integers, shifted right by 18 and clamped to 19 bits.
module tb_fir_mac;
  localparam int N = 29, W = 19;
  logic signed [W-1:0] w [N], taps [N], y;
  logic sat;
  int checks = 0, failures = 0, n_sat = 0;

  fir_mac #(.N_TAPS(N), .DATA_W(W), .FRAC(18)) dut (.*);

  initial begin #1_000_000; failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end

  task automatic check(input bit ok, input string what);
    checks++; if (!ok) begin failures++; if (failures < 10) $display("FAIL: %s", what); end
  endtask

  initial begin
    for (int t = 0; t < 600; t++) begin
      longint acc, exp_y;
      bit exp_sat;
      acc = 0;
      for (int i = 0; i < N; i++) begin
        if (t % 10 == 9) begin w[i] = 19'h3FFFF; taps[i] = (t % 20 == 9) ? 19'h3FFFF : 19'h40000; end
        else begin w[i] = W'($urandom); taps[i] = W'($urandom); end
        acc += longint'(w[i]) * longint'(taps[i]);
      end
      exp_y   = acc >>> 18;
      exp_sat = (exp_y > 262143) || (exp_y < -262144);
      if (exp_y > 262143) exp_y = 262143;
      if (exp_y < -262144) exp_y = -262144;
      #1;
      check(y == W'(exp_y), $sformatf("y %0d expected %0d", y, exp_y));
      check(sat == exp_sat, "sat flag");
      if (exp_sat) n_sat++;
    end
    check(n_sat > 0, "clamping never exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

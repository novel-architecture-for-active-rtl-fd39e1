// tb_tap_fifo - self-checking testbench of the filter delay line.
// Shifts random samples in (with random gaps), keeps a software copy of the
// last N samples and compares every tap, the leaving sample and the full
// flag after each cycle.
module tb_tap_fifo;
  localparam int N = 29, W = 19;
  logic clk = 0, rst_n = 0, shift_en = 0, full;
  logic signed [W-1:0] din = '0, dout_oldest;
  logic signed [W-1:0] taps [N];
  int checks = 0, failures = 0;
  logic signed [W-1:0] model [N];
  int seen = 0;

  tap_fifo #(.N_TAPS(N), .DATA_W(W)) dut (.*);
  always #5 clk = ~clk;

  initial begin #1_000_000; failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end

  task automatic check(input bit ok, input string what);
    checks++; if (!ok) begin failures++; if (failures < 10) $display("FAIL: %s", what); end
  endtask

  initial begin
    foreach (model[i]) model[i] = '0;
    repeat (2) @(posedge clk); #1 rst_n = 1;
    for (int c = 0; c < 400; c++) begin
      shift_en = ($urandom_range(0, 3) != 0);
      din      = W'($urandom);
      #1 check(dout_oldest == model[N-1], "dout_oldest before shift");
      @(posedge clk); #1;
      if (shift_en) begin
        for (int i = N - 1; i > 0; i--) model[i] = model[i-1];
        model[0] = din;
        if (seen < N) seen++;
      end
      for (int i = 0; i < N; i++) check(taps[i] == model[i], $sformatf("tap %0d cycle %0d", i, c));
      check(full == (seen == N), "full flag");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

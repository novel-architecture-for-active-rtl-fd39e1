// tb_sample_delay - self-checking testbench of the one-sample delay.
// Random samples arrive with random strobes; q must always show the sample
// of the previous strobe (zero after reset) and ignore cycles without one.
module tb_sample_delay;
  localparam int W = 19;
  logic clk = 0, rst_n = 0, en = 0;
  logic signed [W-1:0] d = '0, q;
  logic signed [W-1:0] last = '0;
  int checks = 0, failures = 0;

  sample_delay #(.DATA_W(W)) dut (.*);
  always #5 clk = ~clk;

  initial begin #1_000_000; failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end

  task automatic check(input bit ok, input string what);
    checks++; if (!ok) begin failures++; if (failures < 10) $display("FAIL: %s", what); end
  endtask

  initial begin
    repeat (2) @(posedge clk); #1 rst_n = 1;
    check(q == '0, "reset value");
    for (int c = 0; c < 500; c++) begin
      en = $urandom_range(0, 2) == 0;
      d  = W'($urandom);
      @(posedge clk); #1;
      if (en) last = d;
      check(q == last, $sformatf("cycle %0d", c));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_selector - self-checking testbench of the output selector.
// Random filtered / noisy words, select values and load strobes; 'out' must
// take the selected word on a load and hold it otherwise.
module tb_selector;
  localparam int W = 19;
  logic clk = 0, rst_n = 0, load = 0, sel = 0;
  logic signed [W-1:0] filtered = '0, noisy = '0, out, model = '0;
  int checks = 0, failures = 0;

  selector #(.DATA_W(W)) dut (.*);
  always #5 clk = ~clk;

  initial begin #1_000_000; failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end

  task automatic check(input bit ok, input string what);
    checks++; if (!ok) begin failures++; if (failures < 10) $display("FAIL: %s", what); end
  endtask

  initial begin
    repeat (2) @(posedge clk); #1 rst_n = 1;
    check(out == '0, "reset value");
    for (int c = 0; c < 400; c++) begin
      load = $urandom_range(0, 1); sel = $urandom_range(0, 1);
      filtered = W'($urandom); noisy = W'($urandom);
      @(posedge clk); #1;
      if (load) model = sel ? noisy : filtered;
      check(out == model, $sformatf("cycle %0d", c));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

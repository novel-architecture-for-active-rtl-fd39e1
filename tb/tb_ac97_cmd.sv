// tb_ac97_cmd - self-checking testbench of the codec command state machine.
// Gives frame_start pulses every 16 cycles, raises codec_ready after a few
// frames, and checks at each pulse (when the command is taken) that no
// command is valid before ready, that the register list 0x02, 0x04, 0x18,
// 0x1A, 0x1C repeats in order with the expected data, and that a volume or
// source change shows up in the next command that carries it.
module tb_ac97_cmd;
  logic clk = 0, rst_n = 0, frame_start = 0, codec_ready = 0;
  logic [4:0] volume = 5'd31;
  logic [2:0] source = 3'd0;
  logic [7:0] cmd_addr;
  logic [15:0] cmd_data;
  logic cmd_valid;
  int checks = 0, failures = 0, n_cmd = 0, n_wrap = 0;
  logic [7:0] exp_addr [5] = '{8'h02, 8'h04, 8'h18, 8'h1A, 8'h1C};

  ac97_cmd dut (.*);
  always #5 clk = ~clk;

  initial begin #1_000_000; failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end

  task automatic check(input bit ok, input string what);
    checks++; if (!ok) begin failures++; if (failures < 10) $display("FAIL: %s", what); end
  endtask

  function automatic logic [15:0] exp_data(int idx);
    logic [4:0] att = 5'd31 - volume;
    case (idx)
      0, 1: return {3'b0, att, 3'b0, att};
      2:    return 16'h0808;
      3:    return {5'b0, source, 5'b0, source};
      default: return 16'h0000;
    endcase
  endfunction

  initial begin
    static int idx = 0;
    repeat (2) @(posedge clk); #1 rst_n = 1;
    for (int f = 0; f < 120; f++) begin
      if (f == 5) codec_ready = 1;
      if (f == 40) volume = 5'd7;
      if (f == 60) source = 3'd4;
      repeat (15) @(posedge clk);
      #1 frame_start = 1;
      // The command is taken at this edge: check what is offered now.
      if (cmd_valid) begin
        check(f > 5, "command before ready");
        check(cmd_addr == exp_addr[idx], $sformatf("addr %h expected %h", cmd_addr, exp_addr[idx]));
        check(cmd_data == exp_data(idx), $sformatf("data %h for %h", cmd_data, cmd_addr));
        n_cmd++;
        idx = (idx + 1) % 5;
        if (idx == 0) n_wrap++;
      end else begin
        check(f <= 6, "command missing after ready");
      end
      @(posedge clk); #1 frame_start = 0;
    end
    check(n_cmd > 100 && n_wrap > 10, "command list not cycled");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

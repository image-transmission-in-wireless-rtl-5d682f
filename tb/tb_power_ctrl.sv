// tb_power_ctrl: checks that the gated clock is silent after reset, runs
// (one edge per clk_hf edge) after wake once the request has crossed the
// synchroniser, stops again after sleep, never produces a pulse shorter than
// a clk_hf high phase, and that active_ack follows in the low-frequency domain.
module tb_power_ctrl;
  logic clk_lf = 0, clk_hf = 0, rst_lf_n = 0, rst_hf_n = 0;
  logic wake = 0, sleep = 0, active_req, active_ack, hf_active, gclk_hf;
  int checks = 0, failures = 0, gedges = 0, hedges = 0, glitches = 0;
  realtime rise_t;

  power_ctrl dut (.clk_lf, .rst_lf_n, .wake, .sleep, .active_req, .active_ack, .clk_hf, .rst_hf_n, .hf_active, .gclk_hf);

  always #23 clk_lf = ~clk_lf;
  always #5 clk_hf = ~clk_hf;
  always @(posedge gclk_hf) begin gedges++; rise_t = $realtime; end
  always @(negedge gclk_hf) if ($realtime - rise_t < 4.9) glitches++;
  always @(posedge clk_hf) hedges++;

  initial begin
    repeat (20000) @(posedge clk_hf);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit c, input string what);
    checks++;
    if (!c) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    repeat (3) @(posedge clk_lf);
    rst_lf_n = 1; rst_hf_n = 1;
    gedges = 0;
    repeat (50) @(posedge clk_hf);
    check(gedges == 0, "clock runs while asleep after reset");
    check(!active_ack && !hf_active, "active after reset");
    for (int r = 0; r < 3; r++) begin
      @(negedge clk_lf); wake = 1; @(negedge clk_lf); wake = 0;
      repeat (4) @(posedge clk_hf);
      check(hf_active, "not active 4 cycles after wake");
      repeat (4) @(posedge clk_lf);
      check(active_ack, "active_ack missing");
      gedges = 0; hedges = 0;
      repeat (100) @(posedge clk_hf);
      check(gedges == hedges, "gated clock does not follow clk_hf");
      @(negedge clk_lf); sleep = 1; @(negedge clk_lf); sleep = 0;
      repeat (6) @(posedge clk_hf);
      gedges = 0;
      repeat (100) @(posedge clk_hf);
      check(gedges == 0, "clock runs after sleep");
      repeat (4) @(posedge clk_lf);
      check(!active_ack, "active_ack stays high after sleep");
    end
    check(glitches == 0, "short pulse on gated clock");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

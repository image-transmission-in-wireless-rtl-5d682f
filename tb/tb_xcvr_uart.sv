// tb_xcvr_uart: loops txd back to rxd and sends random bytes; checks every
// byte is received unchanged, that back-to-back bytes occupy ten bit times
// (plus at most two cycles) each, and that a frame with a missing stop bit gives rx_err.
module tb_xcvr_uart;
  localparam int CPB = 8;
  logic clk = 0, rst_n = 0;
  logic tx_valid = 0, tx_ready, txd, rxd, rx_valid, rx_err;
  logic [7:0] tx_data = 0, rx_data;
  logic force_low = 0;
  byte unsigned q[$];
  int checks = 0, failures = 0, errs = 0;

  xcvr_uart #(.CLKS_PER_BIT(CPB)) dut (.clk, .rst_n, .tx_valid, .tx_data, .tx_ready, .txd, .rxd, .rx_valid, .rx_data, .rx_err);
  assign rxd = txd && !force_low;

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) begin
    if (rx_err) errs++;
    if (rst_n && rx_valid) begin
      checks++;
      if (q.size() == 0 || rx_data !== q[0]) begin failures++; $display("rx %h unexpected", rx_data); end
      else void'(q.pop_front());
    end
  end

  initial begin
    int t0, t1;
    repeat (3) @(posedge clk);
    rst_n = 1;
    repeat (3) @(posedge clk);
    for (int i = 0; i < 200; i++) begin
      @(negedge clk);
      while (!tx_ready) @(negedge clk);
      tx_data = 8'($urandom); tx_valid = 1; q.push_back(tx_data);
      if (i == 10) t0 = $time;
      if (i == 20) begin
        t1 = $time;
        checks++;
        if (t1 - t0 < 10 * 10 * CPB * 10 || t1 - t0 > 10 * (10 * CPB + 2) * 10) begin failures++; $display("10 bytes took %0d", t1 - t0); end
      end
      @(negedge clk); tx_valid = 0;
    end
    while (q.size() != 0) @(posedge clk);
    // a frame whose stop bit is held low
    repeat (20 * CPB) @(posedge clk);
    @(negedge clk); tx_data = 8'h00; tx_valid = 1; @(negedge clk); tx_valid = 0;
    repeat (9 * CPB) @(posedge clk);
    force_low = 1; repeat (CPB) @(posedge clk); force_low = 0;
    repeat (4 * CPB) @(posedge clk);
    checks++;
    if (errs != 1) begin failures++; $display("rx_err count %0d", errs); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

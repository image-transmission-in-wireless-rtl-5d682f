// tb_cdc_msg_unit: sends random command words from the slow to the fast
// clock and random result words back, each side waiting for busy to drop;
// checks that every word arrives once, in order and unchanged, and that a
// word offered while busy is ignored.
module tb_cdc_msg_unit;
  logic clk_lf = 0, clk_hf = 0, rst_lf_n = 0, rst_hf_n = 0;
  logic lf_cmd_valid = 0, lf_cmd_busy, lf_rsp_valid, hf_cmd_valid, hf_rsp_valid = 0, hf_rsp_busy;
  logic [31:0] lf_cmd = 0, hf_cmd;
  logic [64:0] hf_rsp = 0, lf_rsp;
  logic [31:0] cq[$];
  logic [64:0] rq[$];
  int checks = 0, failures = 0, ncmd = 0, nrsp = 0;

  cdc_msg_unit dut (.clk_lf, .rst_lf_n, .clk_hf, .rst_hf_n, .lf_cmd_valid, .lf_cmd, .lf_cmd_busy,
    .lf_rsp_valid, .lf_rsp, .hf_cmd_valid, .hf_cmd, .hf_rsp_valid, .hf_rsp, .hf_rsp_busy);

  always #21 clk_lf = ~clk_lf;
  always #4 clk_hf = ~clk_hf;

  initial begin
    repeat (100000) @(posedge clk_hf);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk_hf) if (rst_hf_n && hf_cmd_valid) begin
    checks++; ncmd++;
    if (cq.size() == 0 || hf_cmd !== cq[0]) begin failures++; $display("cmd %h unexpected", hf_cmd); end
    else void'(cq.pop_front());
  end
  always @(posedge clk_lf) if (rst_lf_n && lf_rsp_valid) begin
    checks++; nrsp++;
    if (rq.size() == 0 || lf_rsp !== rq[0]) begin failures++; $display("rsp %h unexpected", lf_rsp); end
    else void'(rq.pop_front());
  end

  initial begin
    repeat (3) @(posedge clk_lf);
    rst_lf_n = 1; rst_hf_n = 1;
    fork
      for (int i = 0; i < 40; i++) begin
        @(negedge clk_lf);
        while (lf_cmd_busy) @(negedge clk_lf);
        lf_cmd = $urandom; lf_cmd_valid = 1; cq.push_back(lf_cmd);
        @(negedge clk_lf); lf_cmd_valid = 0;
        // offered while busy: must be dropped
        lf_cmd = ~lf_cmd; lf_cmd_valid = lf_cmd_busy;
        @(negedge clk_lf); lf_cmd_valid = 0;
      end
      for (int i = 0; i < 40; i++) begin
        @(negedge clk_hf);
        while (hf_rsp_busy) @(negedge clk_hf);
        hf_rsp = {1'($urandom), $urandom, $urandom}; hf_rsp_valid = 1; rq.push_back(hf_rsp);
        @(negedge clk_hf); hf_rsp_valid = 0;
      end
    join
    repeat (20) @(posedge clk_lf);
    checks++;
    if (ncmd != 40 || nrsp != 40 || cq.size() != 0 || rq.size() != 0) begin
      failures++; $display("delivered %0d commands and %0d results", ncmd, nrsp);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

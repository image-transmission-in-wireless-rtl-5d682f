// tb_ext_ram_if: port A (same clock) and port B (four-phase handshake from a
// slower, unrelated clock) write and read the SRAM model at the same time.
// Checks read data against a shadow copy, that an uncontended port-A access
// takes two cycles, that port A wins when both request, and that port B is
// still served.
module tb_ext_ram_if;
  localparam int AW = 12;
  logic clk = 0, clk_lf = 0, rst_n = 0;
  logic a_req = 0, a_we = 0, a_ack; logic [AW-1:0] a_addr = 0; logic [7:0] a_wdata = 0, a_rdata;
  logic b_req = 0, b_we = 0, b_ack; logic [AW-1:0] b_addr = 0; logic [7:0] b_wdata = 0, b_rdata;
  logic [AW-1:0] s_addr; logic [7:0] s_wd, s_rd; logic s_ce, s_oe, s_we;
  byte unsigned shadow [1 << AW];
  int checks = 0, failures = 0, b_done = 0, contended = 0;

  ext_ram_if #(.ADDR_W(AW)) dut (.clk, .rst_n, .a_req, .a_we, .a_addr, .a_wdata, .a_ack, .a_rdata,
    .b_req, .b_we, .b_addr, .b_wdata, .b_ack, .b_rdata,
    .sram_addr(s_addr), .sram_wdata(s_wd), .sram_rdata(s_rd), .sram_ce_n(s_ce), .sram_oe_n(s_oe), .sram_we_n(s_we));
  sram_model #(.ADDR_W(AW)) u_sram (.clk, .addr(s_addr), .wdata(s_wd), .rdata(s_rd), .ce_n(s_ce), .oe_n(s_oe), .we_n(s_we));

  always #5 clk = ~clk;
  always #17 clk_lf = ~clk_lf;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) if (a_req && b_req) contended++;

  // port A: address range 0 .. 2047
  task automatic a_access(input bit we, input int addr, input int data);
    int cyc = 0;
    @(negedge clk);
    a_req = 1; a_we = we; a_addr = AW'(addr); a_wdata = 8'(data);
    do begin @(posedge clk); cyc++; end while (!a_ack);
    checks++;
    if (!we && a_rdata !== shadow[addr]) begin failures++; $display("A read %0d got %0d exp %0d", addr, a_rdata, shadow[addr]); end
    if (we) shadow[addr] = byte'(data);
    #1 a_req = 0;
    if (cyc > 2 && !b_req) begin failures++; $display("A access took %0d cycles", cyc); end
  endtask

  // port B: address range 2048 .. 4095, four-phase on clk_lf
  task automatic b_access(input bit we, input int addr, input int data);
    @(posedge clk_lf);
    b_we = we; b_addr = AW'(addr); b_wdata = 8'(data);
    @(posedge clk_lf); b_req = 1;
    do @(posedge clk_lf); while (!b_ack);
    checks++;
    if (!we && b_rdata !== shadow[addr]) begin failures++; $display("B read %0d got %0d exp %0d", addr, b_rdata, shadow[addr]); end
    if (we) shadow[addr] = byte'(data);
    b_req = 0;
    do @(posedge clk_lf); while (b_ack);
    b_done++;
  endtask

  initial begin
    for (int i = 0; i < (1 << AW); i++) begin shadow[i] = byte'(i * 7); u_sram.mem[i] = 8'(i * 7); end
    repeat (3) @(posedge clk);
    rst_n = 1;
    fork
      for (int i = 0; i < 600; i++) a_access($urandom_range(0, 1), $urandom_range(0, 2047), $urandom_range(0, 255));
      for (int i = 0; i < 60; i++) b_access($urandom_range(0, 1), $urandom_range(2048, 4095), $urandom_range(0, 255));
    join
    for (int i = 0; i < 50; i++) b_access(0, $urandom_range(2048, 4095), 0);
    checks++;
    if (contended == 0) begin failures++; $display("no contention happened"); end
    $display("B accesses %0d, contended cycles %0d", b_done, contended);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

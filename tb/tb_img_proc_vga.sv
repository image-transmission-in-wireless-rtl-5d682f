// tb_img_proc_vga: the frame-processing workload at full VGA size. The image
// processing block (with ext_ram_if and the SRAM model) processes two
// 640 x 480 frames whose pixels are always ready: the first loads the
// background (alpha = 1), the second holds a 160 x 100 object. Checks that
// each frame takes 8 cycles per pixel, 2,457,600 cycles plus a fixed
// overhead of at most 4, the RAM contents and the object's bounding box.
module tb_img_proc_vga;
  import wmsn_pkg::*;
  localparam int W = 640, H = 480, N = W * H, AW = 20;
  localparam int OX = 200, OY = 150, OW = 160, OH = 100;
  logic clk = 0, rst_n = 1;
  logic start = 0, busy, done;
  cam_param_t param;
  obj_box_t box;
  logic pix_valid, pix_sof, pix_ready;
  logic [7:0] pix_data;
  logic ram_req, ram_we, ram_ack;
  logic [AW-1:0] ram_addr;
  logic [7:0] ram_wdata, ram_rdata;
  logic [AW-1:0] s_addr; logic [7:0] s_wd, s_rd; logic s_ce, s_oe, s_we;
  logic b_ack; logic [7:0] b_rdata;
  int checks = 0, failures = 0;
  int pix_i = 0;
  bit obj = 0;

  img_proc_block dut (
    .clk, .rst_n, .start, .param, .busy, .done, .box,
    .pix_valid, .pix_data, .pix_sof, .pix_ready,
    .ram_req, .ram_we, .ram_addr, .ram_wdata, .ram_ack, .ram_rdata);

  ext_ram_if u_ram (
    .clk, .rst_n, .a_req(ram_req), .a_we(ram_we), .a_addr(ram_addr), .a_wdata(ram_wdata),
    .a_ack(ram_ack), .a_rdata(ram_rdata),
    .b_req(1'b0), .b_we(1'b0), .b_addr('0), .b_wdata('0), .b_ack, .b_rdata,
    .sram_addr(s_addr), .sram_wdata(s_wd), .sram_rdata(s_rd), .sram_ce_n(s_ce), .sram_oe_n(s_oe), .sram_we_n(s_we));

  sram_model u_sram (.clk, .addr(s_addr), .wdata(s_wd), .rdata(s_rd), .ce_n(s_ce), .oe_n(s_oe), .we_n(s_we));

  always #10 clk = ~clk;

  function automatic byte unsigned scene(input int i, input bit o);
    int x = i % W, y = i / W;
    if (o && x >= OX && x < OX + OW && y >= OY && y < OY + OH) return 8'd200;
    return byte'(30 + (x + 2 * y) % 60);
  endfunction

  // pixel source that is never empty
  assign pix_valid = 1'b1;
  assign pix_data  = scene(pix_i, obj);
  assign pix_sof   = pix_i == 0;
  always @(posedge clk) if (pix_ready) pix_i <= (pix_i == N - 1) ? 0 : pix_i + 1;

  initial begin
    repeat (8_000_000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic frame(input int k, output int cyc);
    @(negedge clk); start = 1; @(negedge clk); start = 0;
    cyc = 1;
    while (!done) begin @(posedge clk); #1; cyc++; end
    $display("frame: %0d cycles for %0d pixels", cyc, N);
    checks++;
    if (cyc < 8 * N || cyc > 8 * N + 4) begin failures++; $display("expected %0d cycles", 8 * N); end
  endtask

  initial begin
    int cyc, bad;
    #1 rst_n = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    param = '{mode: 8'h00, diff_thr: 8'd8, upd_thr: 8'd25, alpha_k: 8'd0};
    frame(0, cyc);
    bad = 0;
    for (int i = 0; i < N; i++) if (u_sram.mem[N + i] != scene(i, 0)) bad++;
    checks++;
    if (bad != 0) begin failures++; $display("%0d background pixels wrong", bad); end
    obj = 1;
    param = '{mode: 8'h01, diff_thr: 8'd8, upd_thr: 8'd25, alpha_k: 8'd4};
    frame(4, cyc);
    bad = 0;
    for (int i = 0; i < N; i++) begin
      bit in_obj;
      in_obj = (scene(i, 1) != scene(i, 0));
      if (u_sram.mem[i] != scene(i, 1)) bad++;
      if (u_sram.mem[2 * N + i] != 8'(in_obj)) bad++;
      if (u_sram.mem[N + i] != scene(i, 0)) bad++;   // selective update keeps the background
    end
    checks++;
    if (bad != 0) begin failures++; $display("%0d RAM bytes wrong", bad); end
    checks++;
    if (!box.found || box.x0 != OX || box.y0 != OY || box.x1 != OX + OW - 1 || box.y1 != OY + OH - 1) begin
      failures++; $display("box %0d (%0d,%0d)-(%0d,%0d)", box.found, box.x0, box.y0, box.x1, box.y1);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

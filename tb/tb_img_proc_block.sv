// tb_img_proc_block: runs img_proc_block with ext_ram_if and an SRAM model
// over small frames. A reference computes, per pixel, the new background and
// U, and the object box; the testbench checks F, B and U in the RAM after each
// frame, the returned box, and the cycle count: with the camera queue never
// empty a frame takes 8 cycles per pixel plus a small constant. A frame with
// gaps in the pixel stream checks the stall. Frame 1 loads the background
// (alpha = 1), frame 2 adds an object with k = 3, frame 3 uses selective
// update.
module tb_img_proc_block;
  import wmsn_pkg::*;
  localparam int W = 16, H = 12, N = W * H, AW = 20;
  logic clk = 0, rst_n = 0;
  logic start = 0, busy, done;
  cam_param_t param;
  obj_box_t box;
  logic pix_valid = 0, pix_sof = 0, pix_ready;
  logic [7:0] pix_data = 0;
  logic ram_req, ram_we, ram_ack;
  logic [AW-1:0] ram_addr;
  logic [7:0] ram_wdata, ram_rdata;
  logic [AW-1:0] s_addr; logic [7:0] s_wd, s_rd; logic s_ce, s_oe, s_we;
  logic b_ack; logic [7:0] b_rdata;
  int checks = 0, failures = 0, stalls = 0;
  byte unsigned img [N];
  byte unsigned bg [N];
  bit ubit [N];

  img_proc_block #(.IMG_W(W), .IMG_H(H), .ADDR_W(AW)) dut (
    .clk, .rst_n, .start, .param, .busy, .done, .box,
    .pix_valid, .pix_data, .pix_sof, .pix_ready,
    .ram_req, .ram_we, .ram_addr, .ram_wdata, .ram_ack, .ram_rdata);

  ext_ram_if #(.ADDR_W(AW)) u_ram (
    .clk, .rst_n, .a_req(ram_req), .a_we(ram_we), .a_addr(ram_addr), .a_wdata(ram_wdata),
    .a_ack(ram_ack), .a_rdata(ram_rdata),
    .b_req(1'b0), .b_we(1'b0), .b_addr('0), .b_wdata('0), .b_ack, .b_rdata,
    .sram_addr(s_addr), .sram_wdata(s_wd), .sram_rdata(s_rd), .sram_ce_n(s_ce), .sram_oe_n(s_oe), .sram_we_n(s_we));

  sram_model #(.ADDR_W(AW)) u_sram (.clk, .addr(s_addr), .wdata(s_wd), .rdata(s_rd), .ce_n(s_ce), .oe_n(s_oe), .we_n(s_we));

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // pixel source: presents img[] in order, sof on pixel 0; optional gaps
  bit gaps = 0;
  task automatic feed();
    for (int i = 0; i < N; i++) begin
      if (gaps && (i % 16 == 5)) begin
        pix_valid = 0; repeat (12) @(negedge clk);
      end
      pix_valid = 1; pix_data = img[i]; pix_sof = (i == 0);
      do @(posedge clk); while (!pix_ready);
      @(negedge clk);
      pix_valid = 0;
    end
  endtask

  task automatic frame(input int k, input int t, input int d, input bit sel, input bit with_obj);
    int cyc, bn, diff, ymin, ymax, xmin, xmax, run;
    obj_box_t exp;
    for (int i = 0; i < N; i++) img[i] = byte'(bg[i] + $urandom_range(0, 4));
    if (with_obj)
      for (int y = 3; y < 9; y++) for (int x = 5; x < 12; x++) img[y * W + x] = 8'd230;
    param = '{mode: 8'(sel), diff_thr: 8'(d), upd_thr: 8'(t), alpha_k: 8'(k)};
    @(negedge clk); start = 1; @(negedge clk); start = 0;
    cyc = 1;
    fork
      feed();
      begin while (!done) begin @(posedge clk); #1; cyc++; end end
    join
    // reference
    for (int i = 0; i < N; i++) begin
      diff = int'(img[i]) - int'(bg[i]);
      bn = int'(bg[i]) + diff / (1 << k);
      ubit[i] = (diff > t) || (-diff > t);
      if (!(sel && ubit[i])) bg[i] = byte'(bn);
    end
    ymin = -1; ymax = -1; xmin = -1; xmax = -1;
    for (int y = 0; y < H; y++) begin run = 0;
      for (int x = 0; x < W; x++) begin run = ubit[y*W+x] ? run + 1 : 0; if (run > d) begin if (ymin < 0) ymin = y; ymax = y; end end end
    for (int x = 0; x < W; x++) begin run = 0;
      for (int y = 0; y < H; y++) begin run = ubit[y*W+x] ? run + 1 : 0; if (run > d) begin if (xmin < 0) xmin = x; xmax = x; end end end
    for (int i = 0; i < N; i++) begin
      checks += 3;
      if (u_sram.mem[i] !== img[i]) begin failures++; $display("F[%0d] %0d exp %0d", i, u_sram.mem[i], img[i]); end
      if (u_sram.mem[N + i] !== bg[i]) begin failures++; $display("B[%0d] %0d exp %0d", i, u_sram.mem[N+i], bg[i]); end
      if (u_sram.mem[2*N + i] !== 8'(ubit[i])) begin failures++; $display("U[%0d] %0d exp %0d", i, u_sram.mem[2*N+i], ubit[i]); end
    end
    exp = '0;
    exp.found = (ymin >= 0) && (xmin >= 0);
    if (exp.found) begin exp.x0 = 16'(xmin); exp.x1 = 16'(xmax); exp.y0 = 16'(ymin); exp.y1 = 16'(ymax); end
    checks++;
    if (box.found !== exp.found || (exp.found && box !== exp)) begin
      failures++; $display("box got %0d (%0d,%0d)-(%0d,%0d) exp %0d (%0d,%0d)-(%0d,%0d)", box.found, box.x0, box.y0,
                           box.x1, box.y1, exp.found, exp.x0, exp.y0, exp.x1, exp.y1);
    end
    checks++;
    if (!gaps && (cyc < 8 * N || cyc > 8 * N + 6)) begin
      failures++; $display("frame took %0d cycles, expected 8 per pixel (%0d)", cyc, 8 * N);
    end
    if (gaps) begin
      if (cyc > 8 * N + 6) stalls++;
      else begin failures++; $display("gaps did not stall the frame"); end
    end
    $display("frame: %0d cycles for %0d pixels, box found=%0d", cyc, N, box.found);
  endtask

  initial begin
    for (int i = 0; i < N; i++) bg[i] = 0;
    for (int i = 0; i < 3 * N; i++) u_sram.mem[i] = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < N; i++) bg[i] = byte'($urandom_range(20, 120));
    // frame 1 learns the scene: k = 0 copies F into B
    frame(0, 255, 2, 0, 0);
    frame(3, 20, 2, 0, 1);
    gaps = 1;
    frame(2, 20, 2, 1, 1);
    gaps = 0;
    frame(1, 20, 2, 1, 0);
    checks++;
    if (stalls != 1) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

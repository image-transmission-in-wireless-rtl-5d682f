// tb_camera_if: drives a camera bus (PCLK at one sixth of clk, YUV 4:2:2
// bytes with HREF per line, a VSYNC pulse per frame) and checks that the
// queue delivers the Y bytes in order, that only the first pixel of each
// frame carries pix_sof, that nothing is captured while en is low, and that a
// reader that stops causes counted overflows.
module tb_camera_if;
  localparam int W = 10, H = 4;
  logic clk = 0, rst_n = 0, en = 0;
  logic pclk = 0, vsync = 0, href = 0;
  logic [7:0] d = 0;
  logic pix_valid, pix_sof, pix_ready;
  logic [7:0] pix_data, overflows;
  int checks = 0, failures = 0;
  byte unsigned exp_q[$];
  bit exp_sof_q[$];
  bit reading = 1;

  camera_if #(.FIFO_DEPTH(8)) dut (.clk, .rst_n, .en, .cam_pclk(pclk), .cam_vsync(vsync), .cam_href(href),
    .cam_data(d), .pix_valid, .pix_data, .pix_sof, .pix_ready, .overflows);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // one PCLK period = 60 time units (6 clk cycles); data changes on the falling edge
  task automatic pbyte(input bit h, input byte unsigned v);
    #30 pclk = 0; href = h; d = v;
    #30 pclk = 1;
  endtask

  task automatic cam_frame(input bit expect_it, input int seed);
    pbyte(0, 0); vsync = 1; repeat (3) pbyte(0, 0); vsync = 0; repeat (3) pbyte(0, 0);
    for (int y = 0; y < H; y++) begin
      for (int x = 0; x < W; x++) begin
        byte unsigned yv;
        yv = byte'(seed + y * 31 + x * 3);
        if (expect_it) begin exp_q.push_back(yv); exp_sof_q.push_back(x == 0 && y == 0); end
        pbyte(1, yv);
        pbyte(1, 8'h80);   // chroma byte
      end
      repeat (4) pbyte(0, 8'h11);
    end
  endtask

  assign pix_ready = reading && pix_valid;

  always @(posedge clk) begin
    if (rst_n && pix_valid && pix_ready) begin
      checks++;
      if (exp_q.size() == 0) begin failures++; $display("unexpected pixel %0d at %0t en=%0d", pix_data, $time, en); end
      else begin
        byte unsigned e; bit es;
        e = exp_q.pop_front(); es = exp_sof_q.pop_front();
        if (pix_data !== e || pix_sof !== es) begin
          failures++; $display("pixel %0d sof %0d, expected %0d sof %0d", pix_data, pix_sof, e, es);
        end
      end
    end
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    cam_frame(0, 5);                    // en low: nothing captured
    en = 1;
    cam_frame(1, 9);
    cam_frame(1, 77);
    repeat (20) @(posedge clk);
    checks++;
    if (exp_q.size() != 0 || overflows != 0) begin failures++; $display("left %0d, overflows %0d", exp_q.size(), overflows); end
    // reader stops: the queue fills, the rest of the frame is lost and counted
    reading = 0;
    cam_frame(0, 3);
    checks++;
    if (overflows != 8'(W * H - 8)) begin failures++; $display("overflows %0d, expected %0d", overflows, W * H - 8); end
    en = 0;
    repeat (5) @(posedge clk);
    checks++;
    if (pix_valid) begin failures++; $display("queue not emptied by en low"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

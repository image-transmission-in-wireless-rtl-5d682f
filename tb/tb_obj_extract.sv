// tb_obj_extract: feeds update-bit frames (a random rectangle plus random
// noise, and an empty frame) into obj_extract and compares the bounding box
// with a reference that scans the stored frame row by row and column by
// column. Also checks that done comes one cycle after the last bit, and that
// gaps in u_valid do not disturb the scan.
module tb_obj_extract;
  import wmsn_pkg::*;
  localparam int W = 32, H = 24;
  logic clk = 0, rst_n = 0;
  logic sof = 0, u_valid = 0, u = 0;
  logic [7:0] dthr;
  logic done;
  obj_box_t box;
  bit frame [H][W];
  int checks = 0, failures = 0;

  obj_extract #(.IMG_W(W), .IMG_H(H)) dut (.clk, .rst_n, .sof, .u_valid, .u, .diff_thr(dthr), .done, .box);

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic obj_box_t ref_box(input int d);
    obj_box_t r;
    int run, ymin, ymax, xmin, xmax;
    ymin = -1; ymax = -1; xmin = -1; xmax = -1;
    for (int y = 0; y < H; y++) begin
      run = 0;
      for (int x = 0; x < W; x++) begin
        run = frame[y][x] ? run + 1 : 0;
        if (run > d) begin if (ymin < 0) ymin = y; ymax = y; end
      end
    end
    for (int x = 0; x < W; x++) begin
      run = 0;
      for (int y = 0; y < H; y++) begin
        run = frame[y][x] ? run + 1 : 0;
        if (run > d) begin if (xmin < 0) xmin = x; xmax = x; end
      end
    end
    r = '0;
    r.found = (ymin >= 0) && (xmin >= 0);
    if (r.found) begin
      r.x0 = 16'(xmin); r.x1 = 16'(xmax); r.y0 = 16'(ymin); r.y1 = 16'(ymax);
    end
    return r;
  endfunction

  task automatic run_frame(input int d, input bit gaps);
    obj_box_t exp;
    int lat;
    dthr = 8'(d);
    @(negedge clk); sof = 1; @(negedge clk); sof = 0;
    for (int y = 0; y < H; y++)
      for (int x = 0; x < W; x++) begin
        if (gaps && $urandom_range(0, 3) == 0) @(negedge clk);
        u_valid = 1; u = frame[y][x];
        @(negedge clk);
        u_valid = 0;
        checks++;
        if (done !== ((y == H - 1) && (x == W - 1))) begin
          failures++; $display("done at wrong time y=%0d x=%0d", y, x);
        end
      end
    exp = ref_box(d);
    checks++;
    if (box.found !== exp.found || (exp.found && box !== exp)) begin
      failures++;
      $display("BOX MISMATCH d=%0d got f=%0d (%0d,%0d)-(%0d,%0d) exp f=%0d (%0d,%0d)-(%0d,%0d)", d,
               box.found, box.x0, box.y0, box.x1, box.y1, exp.found, exp.x0, exp.y0, exp.x1, exp.y1);
    end
    lat = 0;
  endtask

  task automatic make_frame(input int noise_pct, input bit obj);
    int rx0, ry0, rw, rh;
    rx0 = $urandom_range(0, W - 6); ry0 = $urandom_range(0, H - 6);
    rw = $urandom_range(4, W - rx0); rh = $urandom_range(4, H - ry0);
    for (int y = 0; y < H; y++)
      for (int x = 0; x < W; x++)
        frame[y][x] = ($urandom_range(0, 99) < noise_pct) ||
                      (obj && x >= rx0 && x < rx0 + rw && y >= ry0 && y < ry0 + rh);
  endtask

  initial begin
    dthr = 3;
    repeat (3) @(posedge clk);
    rst_n = 1;
    make_frame(0, 0); run_frame(3, 0);      // empty frame
    make_frame(0, 1); run_frame(3, 0);      // clean rectangle
    for (int i = 0; i < 20; i++) begin
      make_frame($urandom_range(0, 30), 1);
      run_frame($urandom_range(1, 6), i[0]);
    end
    make_frame(100, 0); run_frame(0, 0);    // all ones, D = 0
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

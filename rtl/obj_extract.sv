// obj_extract: locates the updated object from the stream of update bits U.
//
// U arrives in raster order, one bit per u_valid, starting after sof. Row
// scanning counts consecutive 1s along each row; a row whose run becomes
// longer than the difference threshold D is an object row. Column scanning
// does the same down each column, with one run counter per column held in a
// small memory (read and written back as each pixel passes), so the column
// scan needs no second pass over the frame. The object's vertical extent is
// the first and last object row, its horizontal extent the first and last
// object column. One cycle after the last pixel of the frame, done pulses with
// the box; box.found is 0 if no row or no column qualified.
//
// The document gives the row/column run counting and the threshold
// comparison; the one-pass streaming form, the per-column run memory and the
// box rule (rows give y, columns give x) are this design's choices. Run
// counters saturate at 2^RUN_W - 1, above any 8-bit threshold.
module obj_extract
  import wmsn_pkg::*;
#(
  parameter int unsigned IMG_W = 640,
  parameter int unsigned IMG_H = 480,
  parameter int unsigned RUN_W = 9
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       sof,       // start of frame: clears the scan state
  input  logic       u_valid,
  input  logic       u,
  input  logic [7:0] diff_thr,  // difference threshold D
  output logic       done,
  output obj_box_t   box
);

  localparam int unsigned XW = $clog2(IMG_W);
  localparam int unsigned YW = $clog2(IMG_H);
  localparam logic [RUN_W-1:0] RUN_MAX = '1;

  logic [XW-1:0]    x;
  logic [YW-1:0]    y;
  logic [RUN_W-1:0] hrun;
  logic [RUN_W-1:0] vrun_mem [IMG_W];
  logic [RUN_W-1:0] v_old, v_new, h_new;
  logic             row_hit, col_hit;
  logic             rows_any, cols_any;
  logic [XW-1:0]    xmin, xmax;
  logic [YW-1:0]    ymin, ymax;
  logic             last_pix;

  always_comb begin
    v_old    = (y == '0) ? '0 : vrun_mem[x];
    h_new    = !u ? '0 : ((x == '0) ? RUN_W'(1) : ((hrun == RUN_MAX) ? hrun : hrun + 1'b1));
    v_new    = !u ? '0 : ((v_old == RUN_MAX) ? v_old : v_old + 1'b1);
    row_hit  = h_new > RUN_W'(diff_thr);
    col_hit  = v_new > RUN_W'(diff_thr);
    last_pix = (x == XW'(IMG_W - 1)) && (y == YW'(IMG_H - 1));
  end

  always_ff @(posedge clk) begin
    if (u_valid) vrun_mem[x] <= v_new;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      x <= '0; y <= '0; hrun <= '0;
      rows_any <= 1'b0; cols_any <= 1'b0;
      xmin <= '0; xmax <= '0; ymin <= '0; ymax <= '0;
      done <= 1'b0;
      box  <= '0;
    end else begin
      done <= 1'b0;
      if (sof) begin
        x <= '0; y <= '0; hrun <= '0;
        rows_any <= 1'b0; cols_any <= 1'b0;
      end else if (u_valid) begin
        hrun <= h_new;
        if (row_hit) begin
          if (!rows_any) ymin <= y;
          ymax     <= y;
          rows_any <= 1'b1;
        end
        if (col_hit) begin
          if (!cols_any || x < xmin) xmin <= x;
          if (!cols_any || x > xmax) xmax <= x;
          cols_any <= 1'b1;
        end
        if (x == XW'(IMG_W - 1)) begin
          x <= '0;
          y <= (y == YW'(IMG_H - 1)) ? '0 : y + 1'b1;
        end else begin
          x <= x + 1'b1;
        end
        if (last_pix) begin
          done      <= 1'b1;
          box.found <= (rows_any || row_hit) && (cols_any || col_hit);
          box.y0    <= COORD_W'(rows_any ? ymin : y);
          box.y1    <= COORD_W'(y);
          box.x0    <= COORD_W'((cols_any && !(col_hit && x < xmin)) ? xmin : x);
          box.x1    <= COORD_W'((cols_any && !(col_hit && x > xmax)) ? xmax : x);
          if (!row_hit) box.y1 <= COORD_W'(ymax);
        end
      end
    end
  end

endmodule

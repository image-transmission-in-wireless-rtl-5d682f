// camera_if: pixel capture from a parallel CMOS camera bus.
//
// The sensor's PCLK, VSYNC, HREF and D[7:0] are asynchronous to clk, which
// must be at least four times faster than PCLK. All four are passed through a
// two-flop synchroniser together; a rising edge of the synchronised PCLK
// samples HREF and D. While HREF is high the bytes of a line arrive in YUV
// 4:2:2 order, Y first, so every second byte (the luminance) is one pixel.
// A rising VSYNC marks a frame boundary: the next pixel is flagged pix_sof.
// Pixels go into a FIFO_DEPTH-entry queue read with pix_valid/pix_ready; a
// pixel that finds the queue full is lost and counted in overflows.
// Capture runs only while en is high; when en is low the queue is emptied.
//
// The document names the camera interface and the sensor (OV7640/8); the
// bus sampling, the use of the luminance byte only and the queue are this
// design's choices.
module camera_if #(
  parameter int unsigned FIFO_DEPTH = 8
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       en,
  input  logic       cam_pclk,
  input  logic       cam_vsync,
  input  logic       cam_href,
  input  logic [7:0] cam_data,
  output logic       pix_valid,
  output logic [7:0] pix_data,
  output logic       pix_sof,
  input  logic       pix_ready,
  output logic [7:0] overflows
);

  localparam int unsigned AW = $clog2(FIFO_DEPTH);

  logic [10:0] s1, s2;   // {pclk, vsync, href, data}
  logic        pclk_d, vsync_d;
  logic        byte_odd;
  logic        sof_pend;
  logic [8:0]  mem [FIFO_DEPTH];
  logic [AW:0] wr_ptr, rd_ptr;
  logic        full, push;
  logic        pclk_rise;

  assign pclk_rise = s2[10] && !pclk_d;
  assign full      = (wr_ptr[AW-1:0] == rd_ptr[AW-1:0]) && (wr_ptr[AW] != rd_ptr[AW]);
  assign pix_valid = wr_ptr != rd_ptr;
  assign {pix_sof, pix_data} = mem[rd_ptr[AW-1:0]];
  assign push      = en && pclk_rise && s2[8] && !byte_odd;

  always_ff @(posedge clk) begin
    if (push && !full) mem[wr_ptr[AW-1:0]] <= {sof_pend, s2[7:0]};
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      s1 <= '0; s2 <= '0;
      pclk_d <= 1'b0; vsync_d <= 1'b0;
      byte_odd <= 1'b0; sof_pend <= 1'b0;
      wr_ptr <= '0; rd_ptr <= '0;
      overflows <= '0;
    end else begin
      s1 <= {cam_pclk, cam_vsync, cam_href, cam_data};
      s2 <= s1;
      pclk_d  <= s2[10];
      vsync_d <= s2[9];
      if (!en) begin
        wr_ptr <= '0; rd_ptr <= '0;
        byte_odd <= 1'b0; sof_pend <= 1'b0;
      end else begin
        if (s2[9] && !vsync_d) sof_pend <= 1'b1;
        if (pclk_rise) byte_odd <= s2[8] ? !byte_odd : 1'b0;
        if (push) begin
          if (full) begin
            if (overflows != '1) overflows <= overflows + 1'b1;
          end else begin
            wr_ptr   <= wr_ptr + 1'b1;
          end
          sof_pend <= 1'b0;
        end
        if (pix_valid && pix_ready) rd_ptr <= rd_ptr + 1'b1;
      end
    end
  end

endmodule

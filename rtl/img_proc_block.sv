// img_proc_block: background subtraction and object extraction over one
// camera frame, with the background, frame and update bits kept in external
// RAM.
//
// After start (with the camera parameters) the block waits for the first
// pixel of a frame (pix_sof) and then handles one pixel per eight clock
// cycles: it reads B_{n-1} from RAM while taking F_n from the camera queue,
// passes both through bg_subtract, and writes F_n, the new background and the
// update bit U back to RAM. Each RAM access takes two cycles, so the four
// accesses give the eight cycles. U is also streamed into obj_extract, whose
// bounding box is returned with done at the end of the frame. A missing
// camera pixel stalls the sequence.
//
// RAM map (bytes): F_n at 0, B at IMG_W*IMG_H, U (one byte per pixel, bit 0)
// at 2*IMG_W*IMG_H; at 640x480 this uses 921,600 of the 1 MByte. The
// document gives the background subtraction, the storing of U in external
// RAM and a total of 2,457,600 cycles for a 640x480 frame, that is eight per
// pixel; the access order and the RAM map are this design's choices.
//
// Parameters alpha_k, T, D and the selective-update mode come from param and
// are latched at start. busy is high from start to done.
module img_proc_block
  import wmsn_pkg::*;
#(
  parameter int unsigned IMG_W  = 640,
  parameter int unsigned IMG_H  = 480,
  parameter int unsigned ADDR_W = 20
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              start,
  input  cam_param_t        param,
  output logic              busy,
  output logic              done,
  output obj_box_t          box,
  // camera pixel queue
  input  logic              pix_valid,
  input  logic [PIX_W-1:0]  pix_data,
  input  logic              pix_sof,
  output logic              pix_ready,
  // external RAM port
  output logic              ram_req,
  output logic              ram_we,
  output logic [ADDR_W-1:0] ram_addr,
  output logic [PIX_W-1:0]  ram_wdata,
  input  logic              ram_ack,
  input  logic [PIX_W-1:0]  ram_rdata
);

  localparam int unsigned NPIX = IMG_W * IMG_H;
  localparam logic [ADDR_W-1:0] F_BASE = '0;
  localparam logic [ADDR_W-1:0] B_BASE = ADDR_W'(NPIX);
  localparam logic [ADDR_W-1:0] U_BASE = ADDR_W'(2 * NPIX);

  typedef enum logic [2:0] {S_IDLE, S_RDB, S_WRF, S_WRB, S_WRU, S_FIN} state_e;
  state_e            state;
  cam_param_t        prm;
  logic [ADDR_W-1:0] idx;
  logic [PIX_W-1:0]  f_r;
  logic              take;      // read of B_{n-1} completes, pixel consumed
  logic              drop;      // discard pixels until a frame starts
  logic              bs_valid;
  logic [PIX_W-1:0]  bs_bnew, bs_bwr;
  logic              bs_upd;
  logic              ox_done;
  obj_box_t          ox_box;

  initial begin
    assert (3 * NPIX <= (1 << ADDR_W)) else $error("image does not fit the RAM address space");
  end

  always_comb begin
    drop      = (state == S_RDB) && pix_valid && (idx == '0) && !pix_sof;
    ram_req   = 1'b0;
    ram_we    = 1'b0;
    ram_addr  = '0;
    ram_wdata = '0;
    unique case (state)
      S_RDB: begin ram_req = pix_valid && !drop; ram_addr = B_BASE + idx; end
      S_WRF: begin ram_req = 1'b1; ram_we = 1'b1; ram_addr = F_BASE + idx; ram_wdata = f_r; end
      S_WRB: begin ram_req = 1'b1; ram_we = 1'b1; ram_addr = B_BASE + idx; ram_wdata = bs_bwr; end
      S_WRU: begin ram_req = 1'b1; ram_we = 1'b1; ram_addr = U_BASE + idx; ram_wdata = PIX_W'(bs_upd); end
      default: ;
    endcase
    take      = (state == S_RDB) && ram_ack;
    pix_ready = take || drop;
  end

  bg_subtract #(.PIX_W(PIX_W)) u_bg (
    .clk, .rst_n,
    .in_valid  (take),
    .f_pix     (pix_data),
    .b_pix     (ram_rdata),
    .alpha_k   (prm.alpha_k[2:0]),
    .thr       (prm.upd_thr),
    .sel_update(prm.mode[0]),
    .out_valid (bs_valid),
    .b_new     (bs_bnew),
    .b_wr      (bs_bwr),
    .upd       (bs_upd)
  );

  obj_extract #(.IMG_W(IMG_W), .IMG_H(IMG_H)) u_ox (
    .clk, .rst_n,
    .sof     (start && (state == S_IDLE)),
    .u_valid ((state == S_WRU) && ram_ack),
    .u       (bs_upd),
    .diff_thr(prm.diff_thr),
    .done    (ox_done),
    .box     (ox_box)
  );

  assign busy = state != S_IDLE;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= S_IDLE;
      prm   <= '0;
      idx   <= '0;
      f_r   <= '0;
      done  <= 1'b0;
      box   <= '0;
    end else begin
      done <= 1'b0;
      unique case (state)
        S_IDLE: if (start) begin
          prm   <= param;
          idx   <= '0;
          state <= S_RDB;
        end
        S_RDB: if (take) begin
          f_r   <= pix_data;
          state <= S_WRF;
        end
        S_WRF: if (ram_ack) state <= S_WRB;
        S_WRB: if (ram_ack) state <= S_WRU;
        S_WRU: if (ram_ack) begin
          idx   <= idx + 1'b1;
          state <= (idx == ADDR_W'(NPIX - 1)) ? S_FIN : S_RDB;
        end
        S_FIN: if (ox_done) begin
          box   <= ox_box;
          done  <= 1'b1;
          state <= S_IDLE;
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  // A pixel is only taken from the camera queue when one is there, and the
  // background result is ready one cycle after the pixel is taken.
  assert property (@(posedge clk) disable iff (!rst_n) pix_ready |-> pix_valid);
  assert property (@(posedge clk) disable iff (!rst_n) take |=> bs_valid);

endmodule

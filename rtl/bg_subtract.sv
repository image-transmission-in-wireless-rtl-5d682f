// bg_subtract: running-average background update and foreground decision for
// one pixel per clock.
//
// Implements B_n = B_{n-1} + (F_n - B_{n-1}) / 2^k and U = |F_n - B_{n-1}| > T.
// The difference F_n - B_{n-1} is formed once and reused by both: its
// magnitude is shifted right by k (alpha = 1/2^k, so no multiplier) and added
// to or subtracted from B_{n-1}; the same magnitude is compared with T. As in
// the shift-and-add datapath this follows, the 9-bit sum saturates at 255.
// The document's datapath shows an 8-bit unsigned difference; here the sign of
// the difference is kept so that the background also follows a pixel that gets
// darker, and a result below zero would clamp to 0. k = 0 (alpha = 1) loads
// the current frame into the background; the drawn shifter offers k = 1..7.
// The drawing also feeds the comparator from the shifter output, while the
// threshold formula compares the unshifted difference; this design follows
// the formula, so T does not depend on k.
//
// The value to write back, b_wr, is B_n, except that with sel_update set a
// pixel classified as foreground (U = 1) keeps B_{n-1}, so moving objects do
// not leak into the background.
//
// Interface: in_valid with f_pix, b_pix, alpha_k, thr, sel_update; one cycle
// later out_valid with b_new (B_n), b_wr and upd (U). Fully pipelined.
module bg_subtract #(
  parameter int unsigned PIX_W = 8
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             in_valid,
  input  logic [PIX_W-1:0] f_pix,       // F_n
  input  logic [PIX_W-1:0] b_pix,       // B_{n-1}
  input  logic [2:0]       alpha_k,     // alpha = 1/2^k
  input  logic [PIX_W-1:0] thr,         // updating threshold T
  input  logic             sel_update,  // keep B_{n-1} where U = 1
  output logic             out_valid,
  output logic [PIX_W-1:0] b_new,       // B_n
  output logic [PIX_W-1:0] b_wr,        // value to store as background
  output logic             upd          // U
);

  logic             neg;     // F_n < B_{n-1}
  logic [PIX_W-1:0] mag;     // |F_n - B_{n-1}|
  logic [PIX_W-1:0] shifted; // |F_n - B_{n-1}| / 2^k
  logic [PIX_W:0]   sum;
  logic [PIX_W-1:0] bn_c;
  logic             u_c;

  always_comb begin
    neg     = f_pix < b_pix;
    mag     = neg ? (b_pix - f_pix) : (f_pix - b_pix);
    shifted = mag >> alpha_k;
    sum     = neg ? ({1'b0, b_pix} - {1'b0, shifted}) : ({1'b0, b_pix} + {1'b0, shifted});
    if (sum[PIX_W]) bn_c = neg ? '0 : '1;
    else            bn_c = sum[PIX_W-1:0];
    u_c = mag > thr;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      b_new     <= '0;
      b_wr      <= '0;
      upd       <= 1'b0;
    end else begin
      out_valid <= in_valid;
      if (in_valid) begin
        b_new <= bn_c;
        b_wr  <= (sel_update && u_c) ? b_pix : bn_c;
        upd   <= u_c;
      end
    end
  end

endmodule

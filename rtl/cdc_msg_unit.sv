// cdc_msg_unit: cross clock domain message passing unit between the network
// processor (low-frequency clock) and the image processing block
// (high-frequency clock).
//
// Two independent mailboxes: a command word goes from the low- to the
// high-frequency side (here the camera parameters that start an object
// extraction), and a result word goes back (the object's bounding box). Each
// holds its word in a register while a toggle request and a toggle
// acknowledge cross with two-flop synchronisers, so the word itself never
// crosses while it changes. The sender may send again once its busy is low.
// The document names this unit and shows where it sits; the toggle
// handshake and word widths are this design's choices.
module cdc_msg_unit #(
  parameter int unsigned CMD_W = 32,
  parameter int unsigned RSP_W = 65
) (
  input  logic             clk_lf,
  input  logic             rst_lf_n,
  input  logic             clk_hf,
  input  logic             rst_hf_n,
  // low-frequency side
  input  logic             lf_cmd_valid,
  input  logic [CMD_W-1:0] lf_cmd,
  output logic             lf_cmd_busy,
  output logic             lf_rsp_valid,
  output logic [RSP_W-1:0] lf_rsp,
  // high-frequency side
  output logic             hf_cmd_valid,
  output logic [CMD_W-1:0] hf_cmd,
  input  logic             hf_rsp_valid,
  input  logic [RSP_W-1:0] hf_rsp,
  output logic             hf_rsp_busy
);

  cdc_mailbox #(.W(CMD_W)) u_cmd (
    .s_clk(clk_lf), .s_rst_n(rst_lf_n), .s_valid(lf_cmd_valid), .s_data(lf_cmd), .s_busy(lf_cmd_busy),
    .d_clk(clk_hf), .d_rst_n(rst_hf_n), .d_valid(hf_cmd_valid), .d_data(hf_cmd)
  );

  cdc_mailbox #(.W(RSP_W)) u_rsp (
    .s_clk(clk_hf), .s_rst_n(rst_hf_n), .s_valid(hf_rsp_valid), .s_data(hf_rsp), .s_busy(hf_rsp_busy),
    .d_clk(clk_lf), .d_rst_n(rst_lf_n), .d_valid(lf_rsp_valid), .d_data(lf_rsp)
  );

endmodule

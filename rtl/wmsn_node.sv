// wmsn_node: processing system of a camera node for image transfer over a
// wireless sensor network.
//
// Two clock domains. The low-frequency side holds the radio link
// (xcvr_uart), the application-layer protocol engine (app_proto) and the
// request side of the power control unit. The high-frequency side holds the
// camera interface and the image processing block (background subtraction
// and object extraction); its clock is gated off by power_ctrl except while
// a frame is processed. Commands and results cross between the domains in
// cdc_msg_unit. Both sides share the external SRAM through ext_ram_if (which
// runs on the ungated high-frequency clock): the image block stores the
// frame, the background and the update bits there, and the protocol engine
// reads the object's pixels back when it sends image packets. When the node
// relays traffic of other nodes in a multi-hop network, that traffic passes
// through pkt_router, which forwards an image packet only after its CRC-8
// has been checked; the relay ports are separate from the node's own link.
//
// One image transfer: the base station sends IMAGE QUERY; app_proto wakes
// the image side, sends the camera parameters across, the image block
// processes the next camera frame (8 high-frequency cycles per pixel) and
// returns the object's bounding box; the image side is put back to sleep and
// the node answers IMAGE SIZE. START-OF-TRANSMISSION then starts the
// stop-and-wait packet transfer of the object.
//
// The block structure and clock domains follow the document's system
// architecture; the network processor is replaced by the hardware protocol
// engine, and no wavelet transform is applied to the object before it is
// sent. The resets are asynchronous, active low, one per clock domain.
module wmsn_node
  import wmsn_pkg::*;
#(
  parameter int unsigned IMG_W        = 640,
  parameter int unsigned IMG_H        = 480,
  parameter int unsigned ADDR_W       = 20,
  parameter int unsigned CLKS_PER_BIT = 139,
  parameter int unsigned CAM_FIFO     = 8,
  parameter int unsigned RELAY_DEPTH  = 1024
) (
  input  logic              clk_lf,
  input  logic              rst_lf_n,
  input  logic              clk_hf,
  input  logic              rst_hf_n,
  // radio module (UART)
  input  logic              uart_rxd,
  output logic              uart_txd,
  // camera bus
  input  logic              cam_pclk,
  input  logic              cam_vsync,
  input  logic              cam_href,
  input  logic [7:0]        cam_data,
  // external SRAM
  output logic [ADDR_W-1:0] sram_addr,
  output logic [7:0]        sram_wdata,
  input  logic [7:0]        sram_rdata,
  output logic              sram_ce_n,
  output logic              sram_oe_n,
  output logic              sram_we_n,
  // relay (router) byte streams, low-frequency clock
  input  logic              up_in_valid,
  input  logic [7:0]        up_in_data,
  output logic              up_out_valid,
  output logic [7:0]        up_out_data,
  input  logic              up_out_ready,
  input  logic              dn_in_valid,
  input  logic [7:0]        dn_in_data,
  output logic              dn_out_valid,
  output logic [7:0]        dn_out_data,
  input  logic              dn_out_ready,
  output logic [15:0]       relay_crc_drops,
  output logic [15:0]       relay_ovf_drops,
  // status
  output logic              img_active,     // image side clock running
  output logic              img_clk,        // the gated image-side clock, for observation
  output logic              img_busy,       // a frame is being processed
  output logic [15:0]       pkts_sent,
  output logic [15:0]       resends,
  output logic [7:0]        cam_overflows,
  output logic              uart_rx_err
);

  // low-frequency side
  logic       rx_valid, tx_valid, tx_ready;
  logic [7:0] rx_data, tx_data;
  logic       pcu_wake, pcu_sleep, pcu_req, pcu_ack;
  logic       cmd_valid, cmd_busy, rsp_valid;
  cam_param_t cmd;
  obj_box_t   rsp;
  logic       b_req, b_ack;
  logic [ADDR_W-1:0] b_addr;
  logic [7:0] b_rdata;
  logic [8:0] relay_pkt_n;

  // high-frequency side
  logic       gclk_hf, hf_active;
  assign img_clk = gclk_hf;
  logic       hf_cmd_valid, hf_rsp_busy, img_done;
  cam_param_t hf_cmd;
  obj_box_t   img_box;
  logic       pix_valid, pix_sof, pix_ready;
  logic [7:0] pix_data;
  logic       a_req, a_we, a_ack;
  logic [ADDR_W-1:0] a_addr;
  logic [7:0] a_wdata, a_rdata;

  xcvr_uart #(.CLKS_PER_BIT(CLKS_PER_BIT)) u_uart (
    .clk(clk_lf), .rst_n(rst_lf_n),
    .tx_valid, .tx_data, .tx_ready, .txd(uart_txd),
    .rxd(uart_rxd), .rx_valid, .rx_data, .rx_err(uart_rx_err)
  );

  app_proto #(.IMG_W(IMG_W), .ADDR_W(ADDR_W)) u_proto (
    .clk(clk_lf), .rst_n(rst_lf_n),
    .rx_valid, .rx_data, .tx_valid, .tx_data, .tx_ready,
    .pcu_wake, .pcu_sleep, .pcu_active(pcu_ack),
    .cmd_valid, .cmd, .cmd_busy, .rsp_valid, .rsp,
    .ram_req(b_req), .ram_addr(b_addr), .ram_ack(b_ack), .ram_rdata(b_rdata),
    .pkts_sent, .resends
  );

  // active_req (pcu_req) is not used here: the protocol engine waits for the
  // acknowledged state, pcu_ack, before it sends the camera parameters.
  power_ctrl u_pcu (
    .clk_lf, .rst_lf_n, .wake(pcu_wake), .sleep(pcu_sleep), .active_req(pcu_req), .active_ack(pcu_ack),
    .clk_hf, .rst_hf_n, .hf_active, .gclk_hf
  );

  // hf_rsp_busy is left unused: the image block produces one result per
  // command, and the next command is only sent after the protocol engine has
  // received that result, so the result mailbox is always free at done.
  cdc_msg_unit #(.CMD_W($bits(cam_param_t)), .RSP_W($bits(obj_box_t))) u_msg (
    .clk_lf, .rst_lf_n, .clk_hf, .rst_hf_n,
    .lf_cmd_valid(cmd_valid), .lf_cmd(cmd), .lf_cmd_busy(cmd_busy),
    .lf_rsp_valid(rsp_valid), .lf_rsp(rsp),
    .hf_cmd_valid, .hf_cmd, .hf_rsp_valid(img_done), .hf_rsp(img_box), .hf_rsp_busy
  );

  camera_if #(.FIFO_DEPTH(CAM_FIFO)) u_cam (
    .clk(gclk_hf), .rst_n(rst_hf_n), .en(img_busy),
    .cam_pclk, .cam_vsync, .cam_href, .cam_data,
    .pix_valid, .pix_data, .pix_sof, .pix_ready, .overflows(cam_overflows)
  );

  img_proc_block #(.IMG_W(IMG_W), .IMG_H(IMG_H), .ADDR_W(ADDR_W)) u_img (
    .clk(gclk_hf), .rst_n(rst_hf_n),
    .start(hf_cmd_valid), .param(hf_cmd), .busy(img_busy), .done(img_done), .box(img_box),
    .pix_valid, .pix_data, .pix_sof, .pix_ready,
    .ram_req(a_req), .ram_we(a_we), .ram_addr(a_addr), .ram_wdata(a_wdata), .ram_ack(a_ack), .ram_rdata(a_rdata)
  );

  ext_ram_if #(.ADDR_W(ADDR_W), .DATA_W(8)) u_ram (
    .clk(clk_hf), .rst_n(rst_hf_n),
    .a_req, .a_we, .a_addr, .a_wdata, .a_ack, .a_rdata,
    .b_req, .b_we(1'b0), .b_addr, .b_wdata(8'h00), .b_ack, .b_rdata,
    .sram_addr, .sram_wdata, .sram_rdata, .sram_ce_n, .sram_oe_n, .sram_we_n
  );

  // queue control for traffic this node relays for other nodes
  pkt_router #(.DEPTH(RELAY_DEPTH)) u_relay (
    .clk(clk_lf), .rst_n(rst_lf_n),
    .up_in_valid, .up_in_data, .up_out_valid, .up_out_data, .up_out_ready,
    .dn_in_valid, .dn_in_data, .dn_out_valid, .dn_out_data, .dn_out_ready,
    .pkt_n(relay_pkt_n), .crc_drops(relay_crc_drops), .ovf_drops(relay_ovf_drops)
  );

  assign img_active = hf_active;

endmodule

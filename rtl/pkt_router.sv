// pkt_router: queue control of a relaying node, one pkt_queue per direction.
//
// The upstream queue carries traffic from the camera node towards the base
// station (image packets, IMAGE SIZE, ACKs), the downstream queue the base
// station's messages. Image packets travel upstream, but their size is set
// by the START-OF-TRANSMISSION that travels downstream, so the packet size
// seen in either queue is kept in a register shared by both. Every image
// packet is therefore checked (CRC-8) before it is passed on, and a corrupt
// one is dropped here instead of travelling on to the base station. Both
// directions run on one clock; the byte interfaces are those of pkt_queue.
// The document describes the checking before forwarding; the two-queue
// organisation is this design's choice.
module pkt_router #(
  parameter int unsigned DEPTH = 1024
) (
  input  logic        clk,
  input  logic        rst_n,
  // camera side -> base side
  input  logic        up_in_valid,
  input  logic [7:0]  up_in_data,
  output logic        up_out_valid,
  output logic [7:0]  up_out_data,
  input  logic        up_out_ready,
  // base side -> camera side
  input  logic        dn_in_valid,
  input  logic [7:0]  dn_in_data,
  output logic        dn_out_valid,
  output logic [7:0]  dn_out_data,
  input  logic        dn_out_ready,
  // status
  output logic [8:0]  pkt_n,
  output logic [15:0] crc_drops,
  output logic [15:0] ovf_drops
);

  logic        up_sot, dn_sot;
  logic [8:0]  up_sot_n, dn_sot_n;
  logic [15:0] up_crc, dn_crc, up_ovf, dn_ovf;

  pkt_queue #(.DEPTH(DEPTH)) u_up (
    .clk, .rst_n, .in_valid(up_in_valid), .in_data(up_in_data),
    .out_valid(up_out_valid), .out_data(up_out_data), .out_ready(up_out_ready),
    .pkt_n, .sot_seen(up_sot), .sot_n(up_sot_n), .crc_drops(up_crc), .ovf_drops(up_ovf)
  );

  pkt_queue #(.DEPTH(DEPTH)) u_dn (
    .clk, .rst_n, .in_valid(dn_in_valid), .in_data(dn_in_data),
    .out_valid(dn_out_valid), .out_data(dn_out_data), .out_ready(dn_out_ready),
    .pkt_n, .sot_seen(dn_sot), .sot_n(dn_sot_n), .crc_drops(dn_crc), .ovf_drops(dn_ovf)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)      pkt_n <= 9'd256;
    else if (dn_sot) pkt_n <= dn_sot_n;
    else if (up_sot) pkt_n <= up_sot_n;
  end

  assign crc_drops = up_crc + dn_crc;
  assign ovf_drops = up_ovf + dn_ovf;

endmodule

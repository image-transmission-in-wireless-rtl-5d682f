// app_proto: camera-node side of the application-layer image transfer
// protocol.
//
// Every message starts with 0xAA and a type byte (see wmsn_pkg). The parser
// collects the fixed-length payload of each type; unknown types are skipped.
// The node then answers as the protocol's message sequence prescribes:
//   CAMERA SETUP (4 bytes)  -> stores the parameters, answers ACK 0xFFFF.
//   IMAGE QUERY             -> wakes the image processing block through the
//                              power control unit, sends it the parameters
//                              through the clock-domain message unit, waits
//                              for the object's bounding box, puts the block
//                              back to sleep and answers IMAGE SIZE with the
//                              object's size in bytes (0 if none, at most
//                              65,535).
//   START-OF-TRANSMISSION   -> takes the packet size N (0 means 256), answers
//                              ACK 0xFFFF and sends image packet 0.
//   ACK id                  -> for the packet in flight: sends the next one,
//                              or, after the last, waits for END-OF-TRANSMISSION.
//   NACK id                 -> for the packet in flight: sends it again.
//   END-OF-TRANSMISSION     -> ends the transfer, back to idle.
// An image packet is 0xAA 0xAA, the packet ID (2 bytes, MSB first), N bytes
// of the object read row by row from the frame in external RAM, and a CRC-8
// over all the bytes before it. Every packet carries exactly N data bytes, so
// a relay can find packet ends without knowing the image size; the last one
// is padded with zeros after the object's final byte. Only one
// packet is in flight (stop and wait), which with the single-transmitter rule
// of START/END-OF-TRANSMISSION is the protocol's congestion control.
//
// The message codes and sequence follow the document. The CRC polynomial and
// coverage, the byte order, the ACK ID for control messages, the meaning of
// the four camera-parameter bytes and of IMAGE SIZE, the zero padding of the
// last packet, and N = 0 for 256 are
// this design's choices. RAM reads use a four-phase handshake (ram_req /
// ram_ack, ram_ack synchronised here) because the RAM interface runs on the
// other clock.
module app_proto
  import wmsn_pkg::*;
#(
  parameter int unsigned IMG_W  = 640,
  parameter int unsigned ADDR_W = 20
) (
  input  logic              clk,
  input  logic              rst_n,
  // bytes from / to the transceiver interface
  input  logic              rx_valid,
  input  logic [7:0]        rx_data,
  output logic              tx_valid,
  output logic [7:0]        tx_data,
  input  logic              tx_ready,
  // power control unit
  output logic              pcu_wake,
  output logic              pcu_sleep,
  input  logic              pcu_active,
  // clock-domain message unit
  output logic              cmd_valid,
  output cam_param_t        cmd,
  input  logic              cmd_busy,
  input  logic              rsp_valid,
  input  obj_box_t          rsp,
  // external RAM, read only, four-phase
  output logic              ram_req,
  output logic [ADDR_W-1:0] ram_addr,
  input  logic              ram_ack,
  input  logic [7:0]        ram_rdata,
  // status
  output logic [15:0]       pkts_sent,
  output logic [15:0]       resends
);

  // ---------------- message parser ----------------
  typedef enum logic [1:0] {P_SYNC, P_TYPE, P_PAY} pstate_e;
  pstate_e    pstate;
  msg_type_e  ptype;
  logic [2:0] plen, pcnt;
  logic [23:0] pay;
  logic       msg_valid;
  msg_type_e  msg_type;
  logic [31:0] msg_pay;

  function automatic logic [2:0] pay_len(input logic [7:0] t);
    unique case (t)
      MSG_SETUP:                    return 3'd4;
      MSG_SIZE, MSG_ACK, MSG_NACK:  return 3'd2;
      MSG_SOT:                      return 3'd1;
      default:                      return 3'd0;
    endcase
  endfunction

  function automatic logic known(input logic [7:0] t);
    return t inside {MSG_SETUP, MSG_QUERY, MSG_SIZE, MSG_ACK, MSG_NACK, MSG_SOT, MSG_EOT};
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      pstate <= P_SYNC; ptype <= MSG_QUERY; plen <= '0; pcnt <= '0; pay <= '0;
      msg_valid <= 1'b0; msg_type <= MSG_QUERY; msg_pay <= '0;
    end else begin
      msg_valid <= 1'b0;
      if (rx_valid) begin
        unique case (pstate)
          P_SYNC: if (rx_data == SYNC_BYTE) pstate <= P_TYPE;
          P_TYPE: begin
            if (!known(rx_data)) begin
              pstate <= P_SYNC;
            end else if (pay_len(rx_data) == '0) begin
              msg_valid <= 1'b1;
              msg_type  <= msg_type_e'(rx_data);
              msg_pay   <= '0;
              pstate    <= P_SYNC;
            end else begin
              ptype  <= msg_type_e'(rx_data);
              plen   <= pay_len(rx_data);
              pcnt   <= 3'd1;
              pay    <= '0;
              pstate <= P_PAY;
            end
          end
          P_PAY: begin
            pay  <= {pay[15:0], rx_data};
            pcnt <= pcnt + 1'b1;
            if (pcnt == plen) begin
              msg_valid <= 1'b1;
              msg_type  <= ptype;
              msg_pay   <= {pay[23:0], rx_data};
              pstate    <= P_SYNC;
            end
          end
          default: pstate <= P_SYNC;
        endcase
      end
    end
  end

  // ---------------- RAM handshake ----------------
  logic [1:0] ack_sync;
  logic       ack_s;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) ack_sync <= '0;
    else        ack_sync <= {ack_sync[0], ram_ack};
  end
  assign ack_s = ack_sync[1];

  // ---------------- protocol and transmit engine ----------------
  typedef enum logic [3:0] {
    M_IDLE, M_WAKE, M_CMD, M_RSP, M_SIZE, M_CTRL, M_HDR, M_FETCH, M_REL, M_DATA, M_CRC, M_WACK, M_WEOT
  } mstate_e;
  mstate_e mstate, ctrl_ret;

  cam_param_t        prm;
  obj_box_t          box;
  logic [31:0]       hdr;          // bytes to send, MSB first
  logic [2:0]        hdr_len, hdr_idx;
  logic [8:0]        pkt_n;        // packet payload size N
  logic [15:0]       pkt_id;
  logic [16:0]       obj_size, rem, rem_s;
  logic [8:0]        dcnt;         // data bytes left in this packet
  logic [15:0]       cx, cx_s;     // column within the box
  logic [ADDR_W-1:0] row_addr, row_addr_s;
  logic [7:0]        crc, dbyte;
  logic [15:0]       bw, bh;
  logic [31:0]       area;

  assign bw   = box.x1 - box.x0 + 1'b1;
  assign bh   = box.y1 - box.y0 + 1'b1;
  assign area = bw * bh;
  assign cmd  = prm;
  assign ram_addr = row_addr + ADDR_W'(cx);

  always_comb begin
    tx_valid = 1'b0;
    tx_data  = '0;
    unique case (mstate)
      M_CTRL, M_HDR: begin tx_valid = 1'b1; tx_data = hdr[31:24]; end
      M_DATA:        begin tx_valid = 1'b1; tx_data = dbyte; end
      M_CRC:         begin tx_valid = 1'b1; tx_data = crc; end
      default: ;
    endcase
  end

  assign ram_req = (mstate == M_FETCH) && (rem != '0);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      mstate <= M_IDLE; ctrl_ret <= M_IDLE;
      prm <= '0; box <= '0; hdr <= '0; hdr_len <= '0; hdr_idx <= '0;
      pkt_n <= 9'd256; pkt_id <= '0; obj_size <= '0; rem <= '0; rem_s <= '0; dcnt <= '0;
      cx <= '0; cx_s <= '0; row_addr <= '0; row_addr_s <= '0; crc <= '0; dbyte <= '0;
      pcu_wake <= 1'b0; pcu_sleep <= 1'b0; cmd_valid <= 1'b0;
      pkts_sent <= '0; resends <= '0;
    end else begin
      pcu_wake  <= 1'b0;
      pcu_sleep <= 1'b0;
      cmd_valid <= 1'b0;
      unique case (mstate)
        M_IDLE, M_WACK, M_WEOT: if (msg_valid) begin
          unique case (msg_type)
            MSG_SETUP: if (mstate == M_IDLE) begin
              prm      <= {msg_pay[7:0], msg_pay[15:8], msg_pay[23:16], msg_pay[31:24]};
              hdr      <= {SYNC_BYTE, MSG_ACK, CTRL_ACK_ID};
              hdr_len  <= 3'd4; hdr_idx <= '0;
              ctrl_ret <= M_IDLE;
              mstate   <= M_CTRL;
            end
            MSG_QUERY: if (mstate == M_IDLE) begin
              pcu_wake <= 1'b1;
              mstate   <= M_WAKE;
            end
            MSG_SOT: if (mstate == M_IDLE) begin
              pkt_n    <= (msg_pay[7:0] == '0) ? 9'd256 : {1'b0, msg_pay[7:0]};
              pkt_id   <= '0;
              rem      <= obj_size;
              cx       <= '0;
              row_addr <= ADDR_W'(box.y0) * ADDR_W'(IMG_W) + ADDR_W'(box.x0);
              hdr      <= {SYNC_BYTE, MSG_ACK, CTRL_ACK_ID};
              hdr_len  <= 3'd4; hdr_idx <= '0;
              ctrl_ret <= (obj_size == '0) ? M_WEOT : M_HDR;
              mstate   <= M_CTRL;
            end
            MSG_ACK: if (mstate == M_WACK && msg_pay[15:0] == pkt_id) begin
              pkt_id <= pkt_id + 1'b1;
              if (rem == '0) mstate <= M_WEOT;
              else           mstate <= M_HDR;
            end
            MSG_NACK: if (mstate == M_WACK && msg_pay[15:0] == pkt_id) begin
              rem      <= rem_s;
              cx       <= cx_s;
              row_addr <= row_addr_s;
              resends  <= resends + 1'b1;
              mstate   <= M_HDR;
            end
            MSG_EOT: mstate <= M_IDLE;
            default: ;
          endcase
          // prepare an image packet header whenever one is to be sent
          if ((msg_type == MSG_ACK && mstate == M_WACK && msg_pay[15:0] == pkt_id && rem != '0) ||
              (msg_type == MSG_NACK && mstate == M_WACK && msg_pay[15:0] == pkt_id)) begin
            hdr     <= {SYNC_BYTE, SYNC_BYTE, (msg_type == MSG_ACK) ? pkt_id + 1'b1 : pkt_id};
            hdr_len <= 3'd4; hdr_idx <= '0;
            crc     <= '0;
          end
        end
        M_WAKE: if (pcu_active) mstate <= M_CMD;
        M_CMD: if (!cmd_busy) begin
          cmd_valid <= 1'b1;
          mstate    <= M_RSP;
        end
        M_RSP: if (rsp_valid) begin
          box       <= rsp;
          pcu_sleep <= 1'b1;
          mstate    <= M_SIZE;
        end
        M_SIZE: begin
          obj_size <= !box.found ? '0 : ((area > 32'hFFFF) ? 17'hFFFF : area[16:0]);
          hdr      <= {SYNC_BYTE, MSG_SIZE, !box.found ? 16'h0000 : ((area > 32'hFFFF) ? 16'hFFFF : area[15:0])};
          hdr_len  <= 3'd4; hdr_idx <= '0;
          ctrl_ret <= M_IDLE;
          mstate   <= M_CTRL;
        end
        M_CTRL: if (tx_ready) begin
          hdr     <= {hdr[23:0], 8'h00};
          hdr_idx <= hdr_idx + 1'b1;
          if (hdr_idx == hdr_len - 1'b1) begin
            mstate <= ctrl_ret;
            if (ctrl_ret == M_HDR) begin
              hdr     <= {SYNC_BYTE, SYNC_BYTE, pkt_id};
              hdr_idx <= '0;
              crc     <= '0;
            end
          end
        end
        M_HDR: if (tx_ready) begin
          if (hdr_idx == '0) begin
            // a packet starts: remember where, for a resend
            rem_s      <= rem;
            cx_s       <= cx;
            row_addr_s <= row_addr;
            dcnt       <= pkt_n;
          end
          crc     <= crc8_byte(crc, hdr[31:24]);
          hdr     <= {hdr[23:0], 8'h00};
          hdr_idx <= hdr_idx + 1'b1;
          if (hdr_idx == 3'd3) mstate <= M_FETCH;
        end
        M_FETCH: if (rem == '0) begin
          dbyte  <= 8'h00;            // padding after the last object byte
          mstate <= M_DATA;
        end else if (ack_s) begin
          dbyte  <= ram_rdata;
          mstate <= M_REL;
        end
        M_REL: if (!ack_s) mstate <= M_DATA;
        M_DATA: if (tx_ready) begin
          crc  <= crc8_byte(crc, dbyte);
          dcnt <= dcnt - 1'b1;
          if (rem != '0) begin
            rem <= rem - 1'b1;
            if (cx == bw - 1'b1) begin
              cx       <= '0;
              row_addr <= row_addr + ADDR_W'(IMG_W);
            end else begin
              cx <= cx + 1'b1;
            end
          end
          mstate <= (dcnt == 9'd1) ? M_CRC : M_FETCH;
        end
        M_CRC: if (tx_ready) begin
          pkts_sent <= pkts_sent + 1'b1;
          mstate    <= M_WACK;
        end
        default: mstate <= M_IDLE;
      endcase
    end
  end

endmodule

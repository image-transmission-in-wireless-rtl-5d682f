// pkt_queue: store-and-forward byte queue with CRC checking, the queue
// control of a relaying node.
//
// Bytes of protocol messages enter on in_valid/in_data and leave on
// out_valid/out_data/out_ready. A message is written into a circular buffer
// behind a tentative write pointer and becomes visible to the output only
// when it is complete. An image packet (0xAA 0xAA, ID, pkt_n data bytes,
// CRC-8) is released only if its CRC-8 is correct; otherwise it is discarded
// (crc_drops counts it). Control messages are released when their fixed
// payload is complete. A message that does not fit in the free space is
// discarded (ovf_drops), and bytes that do not start with 0xAA are skipped.
// When a START-OF-TRANSMISSION passes, sot_seen pulses with its packet size
// (0 stands for 256) so that the relay can tell the queue of the other
// direction how long image packets will be.
//
// The document gives the idea (packets are checked by CRC before they are
// forwarded, and routers have small queues); the buffer organisation, its
// size and the rules for dropping are this design's choices.
module pkt_queue
  import wmsn_pkg::*;
#(
  parameter int unsigned DEPTH = 1024
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       in_valid,
  input  logic [7:0] in_data,
  output logic       out_valid,
  output logic [7:0] out_data,
  input  logic       out_ready,
  input  logic [8:0] pkt_n,       // image packet payload size
  output logic       sot_seen,
  output logic [8:0] sot_n,
  output logic [15:0] crc_drops,
  output logic [15:0] ovf_drops
);

  localparam int unsigned AW = $clog2(DEPTH);

  typedef enum logic [1:0] {Q_SYNC, Q_TYPE, Q_BODY, Q_CRC} qstate_e;
  qstate_e     qs;
  logic [7:0]  mem [DEPTH];
  logic [AW:0] rd_ptr, wr_commit, wr_tent;
  logic [9:0]  left;         // payload bytes still to come
  logic        is_img, is_sot, dropping;
  logic [7:0]  crc;
  logic        space;

  assign out_valid = rd_ptr != wr_commit;
  assign out_data  = mem[rd_ptr[AW-1:0]];
  assign space     = (wr_tent - rd_ptr) < (AW+1)'(DEPTH);

  function automatic logic [9:0] ctrl_len(input logic [7:0] t);
    unique case (t)
      MSG_SETUP:                   return 10'd4;
      MSG_SIZE, MSG_ACK, MSG_NACK: return 10'd2;
      MSG_SOT:                     return 10'd1;
      default:                     return 10'd0;
    endcase
  endfunction

  always_ff @(posedge clk) begin
    if (in_valid && space && !dropping && !(qs == Q_SYNC && in_data != SYNC_BYTE))
      mem[wr_tent[AW-1:0]] <= in_data;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      qs <= Q_SYNC; rd_ptr <= '0; wr_commit <= '0; wr_tent <= '0;
      left <= '0; is_img <= 1'b0; is_sot <= 1'b0; dropping <= 1'b0; crc <= '0;
      sot_seen <= 1'b0; sot_n <= 9'd256; crc_drops <= '0; ovf_drops <= '0;
    end else begin
      sot_seen <= 1'b0;
      if (out_valid && out_ready) rd_ptr <= rd_ptr + 1'b1;
      if (in_valid) begin
        // store the byte unless the message is already being dropped
        if (!(qs == Q_SYNC && in_data != SYNC_BYTE) && !dropping) begin
          if (space) wr_tent <= wr_tent + 1'b1;
          else begin
            dropping  <= 1'b1;
            ovf_drops <= ovf_drops + 1'b1;
          end
        end
        unique case (qs)
          Q_SYNC: if (in_data == SYNC_BYTE) begin
            qs       <= Q_TYPE;
            crc      <= crc8_byte(8'h00, in_data);
          end
          Q_TYPE: begin
            crc    <= crc8_byte(crc, in_data);
            is_img <= in_data == MSG_IMG;
            is_sot <= in_data == MSG_SOT;
            if (in_data == MSG_IMG) begin
              left <= 10'd2 + 10'(pkt_n);
              qs   <= Q_BODY;
            end else if (in_data inside {MSG_QUERY, MSG_EOT}) begin
              qs <= Q_SYNC;
              if (!dropping && space) wr_commit <= wr_tent + 1'b1;
              else wr_tent <= wr_commit;
              dropping <= 1'b0;
            end else if (ctrl_len(in_data) != '0) begin
              left <= ctrl_len(in_data);
              qs   <= Q_BODY;
            end else begin
              wr_tent  <= wr_commit;    // unknown type: discard
              dropping <= 1'b0;
              qs       <= Q_SYNC;
            end
          end
          Q_BODY: begin
            crc  <= crc8_byte(crc, in_data);
            left <= left - 1'b1;
            if (left == 10'd1) begin
              if (is_img) qs <= Q_CRC;
              else begin
                qs <= Q_SYNC;
                if (is_sot) begin
                  sot_seen <= 1'b1;
                  sot_n    <= (in_data == '0) ? 9'd256 : {1'b0, in_data};
                end
                if (!dropping && space) wr_commit <= wr_tent + 1'b1;
                else wr_tent <= wr_commit;
                dropping <= 1'b0;
              end
            end
          end
          Q_CRC: begin
            qs <= Q_SYNC;
            if (!dropping && space && in_data == crc) begin
              wr_commit <= wr_tent + 1'b1;
            end else begin
              wr_tent <= wr_commit;
              if (!dropping && space) crc_drops <= crc_drops + 1'b1;
            end
            dropping <= 1'b0;
          end
          default: qs <= Q_SYNC;
        endcase
      end
    end
  end

endmodule

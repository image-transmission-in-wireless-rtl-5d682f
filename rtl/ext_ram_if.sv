// ext_ram_if: shared interface to the node's external asynchronous SRAM.
//
// Two masters share the memory. Port A belongs to the image processing block
// and runs on this module's clock: the master holds a_req with a_we, a_addr
// and a_wdata, and the access ends in the cycle a_ack is high (a_rdata valid in
// that cycle for reads). Port B belongs to the network side, which runs on
// another clock, and uses a four-phase handshake: the master sets b_we, b_addr
// and b_wdata, then raises b_req; b_ack rises when the access is done (b_rdata
// then holds the read byte) and falls after b_req has dropped. b_req is
// synchronised here with two flip-flops; the master must synchronise b_ack.
//
// Each access holds the SRAM strobes for ACC_CYC cycles after the cycle in
// which it is accepted, so with ACC_CYC = 1 port A completes one access every
// two cycles. Port A has fixed priority over port B. The document names the
// interface and gives the memory size (1 MByte); the arbitration, handshakes
// and timing are this design's choices.
module ext_ram_if #(
  parameter int unsigned ADDR_W  = 20,
  parameter int unsigned DATA_W  = 8,
  parameter int unsigned ACC_CYC = 1
) (
  input  logic              clk,
  input  logic              rst_n,
  // port A: image processing block (same clock)
  input  logic              a_req,
  input  logic              a_we,
  input  logic [ADDR_W-1:0] a_addr,
  input  logic [DATA_W-1:0] a_wdata,
  output logic              a_ack,
  output logic [DATA_W-1:0] a_rdata,
  // port B: network side (four-phase, other clock)
  input  logic              b_req,
  input  logic              b_we,
  input  logic [ADDR_W-1:0] b_addr,
  input  logic [DATA_W-1:0] b_wdata,
  output logic              b_ack,
  output logic [DATA_W-1:0] b_rdata,
  // SRAM pins (active-low strobes)
  output logic [ADDR_W-1:0] sram_addr,
  output logic [DATA_W-1:0] sram_wdata,
  input  logic [DATA_W-1:0] sram_rdata,
  output logic              sram_ce_n,
  output logic              sram_oe_n,
  output logic              sram_we_n
);

  localparam int unsigned CW = (ACC_CYC > 1) ? $clog2(ACC_CYC) : 1;

  typedef enum logic {S_IDLE, S_BUSY} state_e;
  state_e        state;
  logic          owner_b;
  logic [CW-1:0] cnt;
  logic [1:0]    b_req_sync;
  logic          b_req_s;
  logic          last;

  assign b_req_s = b_req_sync[1];
  assign last    = (state == S_BUSY) && (cnt == '0);
  assign a_ack   = last && !owner_b;
  assign a_rdata = sram_rdata;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state      <= S_IDLE;
      owner_b    <= 1'b0;
      cnt        <= '0;
      b_req_sync <= '0;
      b_ack      <= 1'b0;
      b_rdata    <= '0;
      sram_addr  <= '0;
      sram_wdata <= '0;
      sram_ce_n  <= 1'b1;
      sram_oe_n  <= 1'b1;
      sram_we_n  <= 1'b1;
    end else begin
      b_req_sync <= {b_req_sync[0], b_req};
      if (!b_req_s) b_ack <= 1'b0;
      unique case (state)
        S_IDLE: begin
          if (a_req || (b_req_s && !b_ack)) begin
            owner_b    <= !a_req;
            sram_addr  <= a_req ? a_addr : b_addr;
            sram_wdata <= a_req ? a_wdata : b_wdata;
            sram_ce_n  <= 1'b0;
            sram_oe_n  <= a_req ? a_we : b_we;
            sram_we_n  <= a_req ? !a_we : !b_we;
            cnt        <= CW'(ACC_CYC - 1);
            state      <= S_BUSY;
          end
        end
        S_BUSY: begin
          if (cnt == '0) begin
            if (owner_b) begin
              b_ack   <= 1'b1;
              b_rdata <= sram_rdata;
            end
            sram_ce_n <= 1'b1;
            sram_oe_n <= 1'b1;
            sram_we_n <= 1'b1;
            state     <= S_IDLE;
          end else begin
            cnt <= cnt - 1'b1;
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end

endmodule

// cdc_mailbox: one-way transfer of a data word between two clock domains.
//
// The source pulses s_valid with s_data when s_busy is low; the word is held
// in a register and a request flag toggles. The destination synchronises the
// flag with two flip-flops and, on a change, pulses d_valid with the held word
// (stable for the whole transfer). It answers with an acknowledge toggle,
// synchronised back, which clears s_busy. A word sent while s_busy is high is
// ignored. Latency is about three destination plus three source cycles.
module cdc_mailbox #(
  parameter int unsigned W = 32
) (
  input  logic         s_clk,
  input  logic         s_rst_n,
  input  logic         s_valid,
  input  logic [W-1:0] s_data,
  output logic         s_busy,
  input  logic         d_clk,
  input  logic         d_rst_n,
  output logic         d_valid,
  output logic [W-1:0] d_data
);

  logic       req_t, ack_t;
  logic [2:0] req_sync;
  logic [1:0] ack_sync;
  logic [W-1:0] hold;

  always_ff @(posedge s_clk or negedge s_rst_n) begin
    if (!s_rst_n) begin
      req_t    <= 1'b0;
      ack_sync <= '0;
      hold     <= '0;
    end else begin
      ack_sync <= {ack_sync[0], ack_t};
      if (s_valid && !s_busy) begin
        hold  <= s_data;
        req_t <= !req_t;
      end
    end
  end

  assign s_busy = req_t != ack_sync[1];

  always_ff @(posedge d_clk or negedge d_rst_n) begin
    if (!d_rst_n) begin
      req_sync <= '0;
      ack_t    <= 1'b0;
      d_valid  <= 1'b0;
      d_data   <= '0;
    end else begin
      req_sync <= {req_sync[1:0], req_t};
      d_valid  <= 1'b0;
      if (req_sync[2] != req_sync[1]) begin
        d_valid <= 1'b1;
        d_data  <= hold;
        ack_t   <= req_sync[1];
      end
    end
  end

endmodule

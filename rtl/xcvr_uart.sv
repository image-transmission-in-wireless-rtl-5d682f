// xcvr_uart: wireless transceiver interface, a byte-serial UART link to the
// radio module (8 data bits, no parity, one stop bit, LSB first).
//
// Transmit: tx_valid/tx_ready handshake; a byte is accepted when both are
// high and is shifted out on txd over 10 bit times. Receive: rxd passes a
// two-flop synchroniser; a falling edge starts a frame, each bit is sampled in
// the middle of its bit time, and rx_valid pulses with rx_data after a valid
// stop bit (a missing stop bit pulses rx_err instead). One bit lasts
// CLKS_PER_BIT clock cycles. The document only names this interface; the
// UART framing and rate are this design's choices (the default is an 8 MHz
// low-frequency clock at 57,600 baud).
module xcvr_uart #(
  parameter int unsigned CLKS_PER_BIT = 139
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       tx_valid,
  input  logic [7:0] tx_data,
  output logic       tx_ready,
  output logic       txd,
  input  logic       rxd,
  output logic       rx_valid,
  output logic [7:0] rx_data,
  output logic       rx_err
);

  localparam int unsigned CW = $clog2(CLKS_PER_BIT + 1);

  // transmitter
  logic [9:0]    tx_sh;
  logic [3:0]    tx_bits;
  logic [CW-1:0] tx_cnt;

  assign tx_ready = tx_bits == '0;
  assign txd      = tx_ready ? 1'b1 : tx_sh[0];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      tx_sh <= '1; tx_bits <= '0; tx_cnt <= '0;
    end else if (tx_ready) begin
      if (tx_valid) begin
        tx_sh   <= {1'b1, tx_data, 1'b0};
        tx_bits <= 4'd10;
        tx_cnt  <= CW'(CLKS_PER_BIT - 1);
      end
    end else if (tx_cnt == '0) begin
      tx_sh   <= {1'b1, tx_sh[9:1]};
      tx_bits <= tx_bits - 1'b1;
      tx_cnt  <= CW'(CLKS_PER_BIT - 1);
    end else begin
      tx_cnt <= tx_cnt - 1'b1;
    end
  end

  // receiver
  logic [1:0]    rx_sync;
  logic          rx_busy;
  logic [3:0]    rx_bits;
  logic [CW-1:0] rx_cnt;
  logic [8:0]    rx_sh;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rx_sync <= '1; rx_busy <= 1'b0; rx_bits <= '0; rx_cnt <= '0; rx_sh <= '0;
      rx_valid <= 1'b0; rx_data <= '0; rx_err <= 1'b0;
    end else begin
      rx_sync  <= {rx_sync[0], rxd};
      rx_valid <= 1'b0;
      rx_err   <= 1'b0;
      if (!rx_busy) begin
        if (!rx_sync[1]) begin
          rx_busy <= 1'b1;
          rx_bits <= 4'd0;
          rx_cnt  <= CW'(CLKS_PER_BIT / 2);
        end
      end else if (rx_cnt == '0) begin
        rx_cnt <= CW'(CLKS_PER_BIT - 1);
        if (rx_bits == 4'd0 && rx_sync[1]) begin
          rx_busy <= 1'b0;              // false start
        end else if (rx_bits == 4'd9) begin
          rx_busy <= 1'b0;
          if (rx_sync[1]) begin
            rx_valid <= 1'b1;
            rx_data  <= rx_sh[8:1];
          end else begin
            rx_err <= 1'b1;
          end
        end else begin
          rx_sh   <= {rx_sync[1], rx_sh[8:1]};
          rx_bits <= rx_bits + 1'b1;
        end
      end else begin
        rx_cnt <= rx_cnt - 1'b1;
      end
    end
  end

endmodule

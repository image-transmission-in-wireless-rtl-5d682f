// power_ctrl: power control unit that puts the image processing block to
// sleep by suppressing its clock.
//
// The network processor, in the low-frequency domain, pulses wake or sleep;
// the request is held in a register (active_req) that is 0 after reset, so the
// block starts asleep. The request is synchronised into the high-frequency
// domain with two flip-flops and drives a clock gate: a latch that is open
// while clk_hf is low feeds an AND with clk_hf, so gclk_hf only starts or
// stops on a whole clock period. The latch is intended and is the standard
// glitch-free clock-gating cell. hf_active is the synchronised enable in the
// high-frequency domain (for the block's reset/enable), and active_ack brings
// it back to the low-frequency domain, so the processor knows when the clock
// is really running or stopped.
//
// The document gives the function (inactive by default, clock suppressed,
// woken by the network processor); the gating cell and synchronisers are this
// design's choices.
module power_ctrl (
  input  logic clk_lf,
  input  logic rst_lf_n,
  input  logic wake,
  input  logic sleep,
  output logic active_req,
  output logic active_ack,
  input  logic clk_hf,
  input  logic rst_hf_n,
  output logic hf_active,
  output logic gclk_hf
);

  logic [1:0] en_sync;
  logic [1:0] ack_sync;
  logic       en_latch;

  always_ff @(posedge clk_lf or negedge rst_lf_n) begin
    if (!rst_lf_n) begin
      active_req <= 1'b0;
      ack_sync   <= '0;
    end else begin
      if (wake)       active_req <= 1'b1;
      else if (sleep) active_req <= 1'b0;
      ack_sync <= {ack_sync[0], hf_active};
    end
  end

  assign active_ack = ack_sync[1];

  always_ff @(posedge clk_hf or negedge rst_hf_n) begin
    if (!rst_hf_n) en_sync <= '0;
    else           en_sync <= {en_sync[0], active_req};
  end

  assign hf_active = en_sync[1];

  always_latch begin
    if (!clk_hf) en_latch = hf_active;
  end

  assign gclk_hf = clk_hf & en_latch;

endmodule

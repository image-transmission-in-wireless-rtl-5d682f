// tb_pkt_router: sends a START-OF-TRANSMISSION downstream (packet size 8),
// then upstream a mix of good image packets, packets with a corrupted byte,
// control messages and stray bytes. Checks that each direction delivers
// exactly the valid messages, whole and in order, that corrupt packets are
// counted and dropped, and that with a stalled output a full queue drops
// whole packets only (counted as overflow).
module tb_pkt_router;
  localparam int DEPTH = 64, N = 8;
  logic clk = 0, rst_n = 0;
  logic up_in_valid = 0, dn_in_valid = 0, up_out_valid, dn_out_valid;
  logic up_out_ready = 1, dn_out_ready = 1;
  logic [7:0] up_in_data = 0, dn_in_data = 0, up_out_data, dn_out_data;
  logic [8:0] pkt_n;
  logic [15:0] crc_drops, ovf_drops;
  byte unsigned up_exp[$], dn_exp[$];
  int checks = 0, failures = 0;

  pkt_router #(.DEPTH(DEPTH)) dut (.clk, .rst_n, .up_in_valid, .up_in_data, .up_out_valid, .up_out_data, .up_out_ready,
    .dn_in_valid, .dn_in_data, .dn_out_valid, .dn_out_data, .dn_out_ready, .pkt_n, .crc_drops, .ovf_drops);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) if (rst_n) begin
    if (up_out_valid && up_out_ready) begin
      checks++;
      if (up_exp.size() == 0 || up_out_data !== up_exp[0]) begin failures++; $display("up: got %h", up_out_data); end
      else void'(up_exp.pop_front());
    end
    if (dn_out_valid && dn_out_ready) begin
      checks++;
      if (dn_exp.size() == 0 || dn_out_data !== dn_exp[0]) begin failures++; $display("dn: got %h", dn_out_data); end
      else void'(dn_exp.pop_front());
    end
  end

  function automatic byte unsigned crc_ref(input byte unsigned b[$]);
    bit [7:0] c = 0;
    foreach (b[i]) for (int k = 7; k >= 0; k--) begin
      bit fb = c[7] ^ b[i][k];
      c = {c[6:0], 1'b0} ^ (fb ? 8'h07 : 8'h00);
    end
    return c;
  endfunction

  task automatic put(input bit up, input byte unsigned m[$], input bit keep);
    foreach (m[i]) begin
      @(negedge clk);
      if (up) begin up_in_valid = 1; up_in_data = m[i]; end
      else    begin dn_in_valid = 1; dn_in_data = m[i]; end
      @(negedge clk);
      up_in_valid = 0; dn_in_valid = 0;
    end
    if (keep) foreach (m[i]) if (up) up_exp.push_back(m[i]); else dn_exp.push_back(m[i]);
  endtask

  function automatic void img_pkt(input int id, output byte unsigned p[$]);
    p = '{8'hAA, 8'hAA, 8'(id >> 8), 8'(id)};
    for (int i = 0; i < N; i++) p.push_back(8'($urandom));
    p.push_back(crc_ref(p));
  endfunction

  initial begin
    byte unsigned p[$];
    int drops = 0, kept = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    put(0, '{8'hAA, 8'h05, 8'(N)}, 1);                 // START-OF-TRANSMISSION
    put(0, '{8'h42, 8'h17}, 0);                        // stray bytes
    put(1, '{8'hAA, 8'h03, 8'hFF, 8'hFF}, 1);          // ACK
    put(1, '{8'hAA, 8'h02, 8'h01, 8'h00}, 1);          // IMAGE SIZE
    for (int id = 0; id < 20; id++) begin
      img_pkt(id, p);
      if (id % 3 == 1) begin
        p[4 + id % N] ^= 8'h10;                        // corrupted on the way
        put(1, p, 0); drops++;
      end else put(1, p, 1);
      put(0, '{8'hAA, 8'h03, 8'(id >> 8), 8'(id)}, 1);
    end
    put(1, '{8'hAA, 8'h77}, 0);                        // unknown type
    put(0, '{8'hAA, 8'h06}, 1);                        // END-OF-TRANSMISSION
    repeat (50) @(posedge clk);
    checks++;
    if (pkt_n != N || crc_drops != drops || up_exp.size() != 0 || dn_exp.size() != 0) begin
      failures++; $display("pkt_n %0d crc_drops %0d/%0d left %0d %0d", pkt_n, crc_drops, drops, up_exp.size(), dn_exp.size());
    end
    // stalled output: 64 bytes hold 4 packets of 13 bytes, the rest is dropped
    up_out_ready = 0;
    for (int id = 0; id < 7; id++) begin
      img_pkt(id, p);
      put(1, p, id < DEPTH / (N + 5));
    end
    checks++;
    if (ovf_drops != 7 - DEPTH / (N + 5)) begin failures++; $display("ovf_drops %0d", ovf_drops); end
    up_out_ready = 1;
    repeat (100) @(posedge clk);
    checks++;
    if (up_exp.size() != 0) begin failures++; $display("%0d bytes not delivered", up_exp.size()); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

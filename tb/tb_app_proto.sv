// tb_app_proto: plays the base station against the camera-node protocol
// engine at byte level, with models of the power control unit, of the image
// processing block behind the clock-domain message unit, and of the
// four-phase RAM port. It runs CAMERA SETUP, IMAGE QUERY, START-OF-TRANSMISSION
// with 16-byte packets, ACKs, one NACK (the packet must come again, byte for
// byte; the last packet is zero-padded to N bytes), an ACK with a wrong ID (ignored), END-OF-TRANSMISSION, and then a
// query that finds no object. Every byte the node sends is checked against
// the message format, the object's pixels in RAM and a bitwise CRC-8.
module tb_app_proto;
  import wmsn_pkg::*;
  localparam int IMGW = 32, AW = 20;
  logic clk = 0, rst_n = 0;
  logic rx_valid = 0; logic [7:0] rx_data = 0;
  logic tx_valid, tx_ready; logic [7:0] tx_data;
  logic pcu_wake, pcu_sleep, pcu_active = 0;
  logic cmd_valid, cmd_busy = 0, rsp_valid = 0;
  cam_param_t cmd;
  obj_box_t rsp = '0;
  logic ram_req, ram_ack = 0; logic [AW-1:0] ram_addr; logic [7:0] ram_rdata = 0;
  logic [15:0] pkts_sent, resends;
  byte unsigned mem [4096];
  byte unsigned txq[$];
  int checks = 0, failures = 0, wakes = 0, sleeps = 0;
  cam_param_t got_cmd;

  app_proto #(.IMG_W(IMGW), .ADDR_W(AW)) dut (.clk, .rst_n, .rx_valid, .rx_data, .tx_valid, .tx_data, .tx_ready,
    .pcu_wake, .pcu_sleep, .pcu_active, .cmd_valid, .cmd, .cmd_busy, .rsp_valid, .rsp,
    .ram_req, .ram_addr, .ram_ack, .ram_rdata, .pkts_sent, .resends);

  always #10 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // transmit side: accepts bytes irregularly
  always @(posedge clk) begin
    tx_ready <= ($urandom_range(0, 3) != 0);
    if (rst_n && tx_valid && tx_ready) txq.push_back(tx_data);
  end

  // power control model
  always @(posedge clk) begin
    if (rst_n && pcu_wake) begin wakes++; fork begin repeat (5) @(posedge clk); pcu_active <= 1; end join_none end
    if (rst_n && pcu_sleep) begin sleeps++; fork begin repeat (5) @(posedge clk); pcu_active <= 0; end join_none end
  end

  // image processing model: answers a command with the box in rsp after a while
  obj_box_t next_box;
  always @(posedge clk) if (rst_n && cmd_valid) begin
    got_cmd <= cmd;
    fork begin
      cmd_busy <= 1; repeat (8) @(posedge clk); cmd_busy <= 0;
      repeat (30) @(posedge clk);
      checks++;
      if (!pcu_active) begin failures++; $display("block asked to run while asleep at %0t wakes %0d", $time, wakes); end
      rsp <= next_box; rsp_valid <= 1; @(posedge clk); rsp_valid <= 0;
    end join_none
  end

  // RAM model, four-phase
  always @(posedge clk) begin
    if (ram_req && !ram_ack) begin repeat (3) @(posedge clk); ram_rdata <= mem[ram_addr]; ram_ack <= 1; end
    else if (!ram_req && ram_ack) begin repeat (2) @(posedge clk); ram_ack <= 0; end
  end

  function automatic byte unsigned crc_ref(input byte unsigned b[$]);
    bit [7:0] c = 0;
    foreach (b[i]) for (int k = 7; k >= 0; k--) begin
      bit fb = c[7] ^ b[i][k];
      c = {c[6:0], 1'b0} ^ (fb ? 8'h07 : 8'h00);
    end
    return c;
  endfunction

  task automatic send(input byte unsigned b[$]);
    foreach (b[i]) begin
      @(negedge clk); rx_valid = 1; rx_data = b[i];
      @(negedge clk); rx_valid = 0;
      repeat (3) @(negedge clk);
    end
  endtask

  task automatic expect_bytes(input byte unsigned e[$], input string what);
    int t = 0;
    while (txq.size() < e.size() && t < 20000) begin @(posedge clk); t++; end
    checks++;
    if (txq.size() < e.size()) begin failures++; $display("%s: only %0d of %0d bytes", what, txq.size(), e.size()); return; end
    foreach (e[i]) begin
      byte unsigned g = txq.pop_front();
      if (g !== e[i]) begin failures++; $display("%s: byte %0d is %h, expected %h", what, i, g, e[i]); return; end
    end
  endtask

  task automatic expect_silence(input string what);
    repeat (400) @(posedge clk);
    checks++;
    if (txq.size() != 0) begin failures++; $display("%s: %0d unexpected bytes", what, txq.size()); txq.delete(); end
  endtask

  task automatic expect_packet(input int id, input int first, input int n, input obj_box_t b, input int pad_to);
    byte unsigned p[$];
    int w = b.x1 - b.x0 + 1;
    p = '{8'hAA, 8'hAA, 8'(id >> 8), 8'(id)};
    for (int k = first; k < first + n; k++)
      p.push_back(mem[(b.y0 + k / w) * IMGW + b.x0 + k % w]);
    while (p.size() < 4 + pad_to) p.push_back(8'h00);
    p.push_back(crc_ref(p));
    expect_bytes(p, $sformatf("image packet %0d", id));
  endtask

  initial begin
    obj_box_t bx;
    for (int i = 0; i < 4096; i++) mem[i] = byte'($urandom);
    repeat (3) @(posedge clk);
    rst_n = 1;
    // junk and an unknown type are skipped
    send('{8'h13, 8'hAA, 8'h7E, 8'h55});
    expect_silence("junk");
    send('{8'hAA, 8'h00, 8'h03, 8'h14, 8'h05, 8'h01});
    expect_bytes('{8'hAA, 8'h03, 8'hFF, 8'hFF}, "ACK for CAMERA SETUP");
    bx = '{found: 1'b1, x0: 16'd5, y0: 16'd3, x1: 16'd14, y1: 16'd7};   // 10 x 5 = 50 bytes
    next_box = bx;
    send('{8'hAA, 8'h01});
    expect_bytes('{8'hAA, 8'h02, 8'h00, 8'd50}, "IMAGE SIZE");
    checks++;
    if (got_cmd !== '{mode: 8'h01, diff_thr: 8'h05, upd_thr: 8'h14, alpha_k: 8'h03} || wakes != 1 || sleeps != 1) begin
      failures++; $display("parameters %h, wakes %0d, sleeps %0d", got_cmd, wakes, sleeps);
    end
    send('{8'hAA, 8'h05, 8'd16});
    expect_bytes('{8'hAA, 8'h03, 8'hFF, 8'hFF}, "ACK for START-OF-TRANSMISSION");
    expect_packet(0, 0, 16, bx, 16);
    send('{8'hAA, 8'h03, 8'h00, 8'h00});
    expect_packet(1, 16, 16, bx, 16);
    send('{8'hAA, 8'h04, 8'h00, 8'h01});            // NACK 1
    expect_packet(1, 16, 16, bx, 16);
    send('{8'hAA, 8'h03, 8'h00, 8'h07});            // ACK for a packet not in flight
    expect_silence("ACK with wrong ID");
    send('{8'hAA, 8'h03, 8'h00, 8'h01});
    expect_packet(2, 32, 16, bx, 16);
    send('{8'hAA, 8'h03, 8'h00, 8'h02});
    expect_packet(3, 48, 2, bx, 16);
    send('{8'hAA, 8'h03, 8'h00, 8'h03});
    expect_silence("after last ACK");
    send('{8'hAA, 8'h06});
    expect_silence("END-OF-TRANSMISSION");
    checks++;
    if (pkts_sent != 5 || resends != 1) begin failures++; $display("pkts_sent %0d resends %0d", pkts_sent, resends); end
    // second image: nothing found
    next_box = '0;
    send('{8'hAA, 8'h01});
    expect_bytes('{8'hAA, 8'h02, 8'h00, 8'h00}, "IMAGE SIZE 0");
    send('{8'hAA, 8'h05, 8'h00});
    expect_bytes('{8'hAA, 8'h03, 8'hFF, 8'hFF}, "ACK for empty transfer");
    expect_silence("empty transfer");
    send('{8'hAA, 8'h06});
    // third image: packet size 0 means 256, one short packet of 50 bytes
    next_box = bx;
    send('{8'hAA, 8'h01});
    expect_bytes('{8'hAA, 8'h02, 8'h00, 8'd50}, "IMAGE SIZE again");
    send('{8'hAA, 8'h05, 8'h00});
    expect_bytes('{8'hAA, 8'h03, 8'hFF, 8'hFF}, "ACK for START-OF-TRANSMISSION 256");
    expect_packet(0, 0, 50, bx, 256);
    send('{8'hAA, 8'h03, 8'h00, 8'h00});
    expect_silence("after single packet");
    send('{8'hAA, 8'h06});
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

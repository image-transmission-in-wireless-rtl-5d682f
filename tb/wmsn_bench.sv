// wmsn_bench: end-to-end bench for wmsn_node, shared by the reduced-size and
// the full-size testbench (FULL = 1 instantiates the node with its default
// parameters).
//
// The bench is the base station and the node's surroundings: a camera that
// streams YUV 4:2:2 frames (a fixed textured scene, plus a bright rectangle
// once the object is switched on), the SRAM model, and a UART peer that
// sends protocol messages and decodes the node's answers. Sequence:
//   1. CAMERA SETUP with alpha = 1: IMAGE QUERY makes the node copy a frame
//      into the background.
//   2. CAMERA SETUP with alpha = 1/8, selective update: the object appears;
//      IMAGE QUERY must report the rectangle's area as IMAGE SIZE.
//   3. START-OF-TRANSMISSION, then image packets (zero-padded to N bytes); the bench checks each
//      packet's ID, length, CRC-8 and pixels, NACKs one packet once (it must
//      come again) and ACKs the rest, then sends END-OF-TRANSMISSION.
// Everything on the link is also passed through the node's relay queues, which
// must repeat it unchanged, and a corrupted packet fed to the relay must be
// dropped. It also checks the RAM contents the image block left (frame, background
// kept under the object, update bits) and that the image side's clock stops
// while it sleeps. Each mechanism is counted and must happen at least once.
module wmsn_bench #(
  parameter bit FULL = 0
);
  import wmsn_pkg::*;
  localparam int W    = FULL ? 640 : 32;
  localparam int H    = FULL ? 480 : 24;
  localparam int CPB  = FULL ? 139 : 8;
  localparam int AW   = 20;
  localparam int NPIX = W * H;
  // object rectangle and packet size
  localparam int OX0 = FULL ? 300 : 10, OY0 = FULL ? 200 : 5;
  localparam int OW  = FULL ? 160 : 10, OH  = FULL ? 100 : 8;
  localparam int PKT = FULL ? 0 : 16;   // START-OF-TRANSMISSION byte (0 = 256)
  localparam int PN  = (PKT == 0) ? 256 : PKT;

  logic clk_lf = 0, clk_hf = 0, rst_lf_n = 1, rst_hf_n = 1;
  // the resets are asynchronous: give them a falling edge, so that the
  // image side is reset although its clock is gated off
  initial begin #1 rst_lf_n = 0; rst_hf_n = 0; end
  logic rxd = 1, txd;
  logic pclk = 0, vsync = 0, href = 0;
  logic [7:0] cd = 0;
  logic [AW-1:0] s_addr; logic [7:0] s_wd, s_rd; logic s_ce, s_oe, s_we;
  logic img_active, img_busy, rx_err;
  logic [15:0] pkts_sent, resends;
  logic [7:0] cam_ovf;
  logic up_in_valid = 0, dn_in_valid = 0, up_out_valid, dn_out_valid;
  logic [7:0] up_in_data = 0, dn_in_data = 0, up_out_data, dn_out_data;
  logic [15:0] relay_crc_drops, relay_ovf_drops;
  int relay_up_bytes = 0, relay_dn_bytes = 0, node_bytes = 0, base_bytes = 0, relay_mismatch = 0;
  byte unsigned relay_upq[$], relay_dnq[$];

  int checks = 0, failures = 0;
  // mechanism counters
  int n_wake = 0, n_quiet_sleep = 0, n_stall_frames = 0, n_nack = 0, n_pkt_ok = 0, n_sel_kept = 0, n_frames = 0;

  logic gclk_mon;
  if (FULL) begin : g_full
    wmsn_node dut (
      .clk_lf, .rst_lf_n, .clk_hf, .rst_hf_n, .uart_rxd(rxd), .uart_txd(txd),
      .cam_pclk(pclk), .cam_vsync(vsync), .cam_href(href), .cam_data(cd),
      .sram_addr(s_addr), .sram_wdata(s_wd), .sram_rdata(s_rd), .sram_ce_n(s_ce), .sram_oe_n(s_oe), .sram_we_n(s_we),
      .up_in_valid, .up_in_data, .up_out_valid, .up_out_data, .up_out_ready(1'b1),
      .dn_in_valid, .dn_in_data, .dn_out_valid, .dn_out_data, .dn_out_ready(1'b1), .relay_crc_drops, .relay_ovf_drops,
      .img_active, .img_clk(gclk_mon), .img_busy, .pkts_sent, .resends, .cam_overflows(cam_ovf),   .uart_rx_err(rx_err));
  end else begin : g_small
    wmsn_node #(.IMG_W(W), .IMG_H(H), .CLKS_PER_BIT(CPB)) dut (
      .clk_lf, .rst_lf_n, .clk_hf, .rst_hf_n, .uart_rxd(rxd), .uart_txd(txd),
      .cam_pclk(pclk), .cam_vsync(vsync), .cam_href(href), .cam_data(cd),
      .sram_addr(s_addr), .sram_wdata(s_wd), .sram_rdata(s_rd), .sram_ce_n(s_ce), .sram_oe_n(s_oe), .sram_we_n(s_we),
      .up_in_valid, .up_in_data, .up_out_valid, .up_out_data, .up_out_ready(1'b1),
      .dn_in_valid, .dn_in_data, .dn_out_valid, .dn_out_data, .dn_out_ready(1'b1), .relay_crc_drops, .relay_ovf_drops,
      .img_active, .img_clk(gclk_mon), .img_busy, .pkts_sent, .resends, .cam_overflows(cam_ovf), .uart_rx_err(rx_err));
  end

  sram_model #(.ADDR_W(AW)) u_sram (.clk(clk_hf), .addr(s_addr), .wdata(s_wd), .rdata(s_rd), .ce_n(s_ce), .oe_n(s_oe), .we_n(s_we));

  always #10 clk_hf = ~clk_hf;    // 50 MHz
  always #62 clk_lf = ~clk_lf;    // about 8 MHz

  // ---------------- camera ----------------
  bit obj_on = 0;
  function automatic byte unsigned scene(input int x, input int y, input bit obj);
    if (obj && x >= OX0 && x < OX0 + OW && y >= OY0 && y < OY0 + OH) return 8'd230;
    return byte'(40 + (x * 3 + y * 5) % 50);
  endfunction

  task automatic pbyte(input bit h, input byte unsigned v);
    #60 pclk = 0; href = h; cd = v;
    #60 pclk = 1;                 // PCLK = 6 clk_hf cycles
  endtask

  initial begin
    #1000;
    forever begin
      bit o;
      o = obj_on;
      vsync = 1; repeat (3) pbyte(0, 0); vsync = 0; repeat (3) pbyte(0, 0);
      for (int y = 0; y < H; y++) begin
        for (int x = 0; x < W; x++) begin pbyte(1, scene(x, y, o)); pbyte(1, 8'h80); end
        repeat (4) pbyte(0, 0);
      end
    end
  end

  // ---------------- UART peer ----------------
  byte unsigned rxq[$];
  task automatic put(input byte unsigned b);
    rxd = 0; repeat (CPB) @(posedge clk_lf);
    for (int i = 0; i < 8; i++) begin rxd = b[i]; repeat (CPB) @(posedge clk_lf); end
    rxd = 1; repeat (CPB) @(posedge clk_lf);
  endtask
  // every byte also goes through the node's relay, downstream
  task automatic send(input byte unsigned m[$]);
    foreach (m[i]) begin
      relay_dnq.push_back(m[i]);
      fork begin
        @(negedge clk_lf); dn_in_valid = 1; dn_in_data = m[i]; @(negedge clk_lf); dn_in_valid = 0;
      end join_none
      put(m[i]);
    end
  endtask
  initial begin
    forever begin
      byte unsigned b;
      @(negedge txd);
      repeat (CPB / 2) @(posedge clk_lf);
      for (int i = 0; i < 8; i++) begin repeat (CPB) @(posedge clk_lf); b[i] = txd; end
      repeat (CPB) @(posedge clk_lf);
      rxq.push_back(b);
      relay_upq.push_back(b);
      // and through the relay, upstream
      fork begin
        @(negedge clk_lf); up_in_valid = 1; up_in_data = b; @(negedge clk_lf); up_in_valid = 0;
      end join_none
    end
  end
  task automatic get(input int n, output byte unsigned m[$]);
    longint t = 0;
    while (rxq.size() < n && t < 64'd400_000_000) begin @(posedge clk_lf); t++; end
    m = {};
    if (rxq.size() < n) begin failures++; $display("timeout waiting for %0d bytes", n); return; end
    repeat (n) m.push_back(rxq.pop_front());
  endtask

  function automatic byte unsigned crc_ref(input byte unsigned b[$]);
    bit [7:0] c = 0;
    foreach (b[i]) for (int k = 7; k >= 0; k--) begin
      bit fb = c[7] ^ b[i][k];
      c = {c[6:0], 1'b0} ^ (fb ? 8'h07 : 8'h00);
    end
    return c;
  endfunction

  function automatic bit same(input byte unsigned a[$], input byte unsigned b[$]);
    if (a.size() != b.size()) return 0;
    foreach (a[i]) if (a[i] != b[i]) return 0;
    return 1;
  endfunction

  task automatic check(input bit c, input string what);
    checks++;
    if (!c) begin failures++; $display("FAIL: %s", what); end
  endtask

  // relay outputs must repeat what went in
  always @(posedge clk_lf) if (rst_lf_n) begin
    if (up_out_valid) begin
      relay_up_bytes++;
      if (relay_upq.size() == 0 || relay_upq.pop_front() != up_out_data) relay_mismatch++;
    end
    if (dn_out_valid) begin
      relay_dn_bytes++;
      if (relay_dnq.size() == 0 || relay_dnq.pop_front() != dn_out_data) relay_mismatch++;
    end
  end

  // ---------------- monitors ----------------
  int gedges_asleep = 0, busy_cyc = 0;
  always @(posedge clk_hf) begin
    if (rst_hf_n && !img_active && gclk_mon) gedges_asleep++;
    if (img_busy) busy_cyc++;
  end
  always @(posedge img_active) n_wake++;
  always @(negedge img_busy) if (rst_hf_n) begin
    n_frames++;
    if (busy_cyc > 8 * NPIX + 8) n_stall_frames++;
    check(busy_cyc >= 8 * NPIX, $sformatf("frame took %0d cycles, fewer than 8 per pixel", busy_cyc));
    $display("frame processed in %0d cycles (%0d pixels)", busy_cyc, NPIX);
    busy_cyc = 0;
  end

  // ---------------- sequence ----------------
  initial begin
    byte unsigned m[$], p[$], e[$];
    int total, sent, id, size;
    bit nacked;
    for (int i = 0; i < 3 * NPIX; i++) u_sram.mem[i] = 0;
    repeat (4) @(posedge clk_lf);
    rst_lf_n = 1; rst_hf_n = 1;
    repeat (4) @(posedge clk_lf);

    // 1: learn the background
    send('{8'hAA, 8'h00, 8'h00, 8'd20, 8'd3, 8'h00});
    get(4, m); check(same(m, '{8'hAA, 8'h03, 8'hFF, 8'hFF}), "ACK for first CAMERA SETUP");
    send('{8'hAA, 8'h01});
    get(4, m); check(m.size() == 4 && m[0] == 8'hAA && m[1] == 8'h02, "IMAGE SIZE after background frame");
    repeat (200) @(posedge clk_lf);
    check(!img_active, "image side asleep after the query");
    begin
      int bad = 0;
      for (int y = 0; y < H; y++) for (int x = 0; x < W; x++)
        if (u_sram.mem[NPIX + y * W + x] != scene(x, y, 0)) bad++;
      check(bad == 0, $sformatf("background not loaded, %0d pixels differ", bad));
    end

    // 2: object appears
    obj_on = 1;
    send('{8'hAA, 8'h00, 8'h03, 8'd20, 8'd3, 8'h01});
    get(4, m); check(same(m, '{8'hAA, 8'h03, 8'hFF, 8'hFF}), "ACK for second CAMERA SETUP");
    // the camera must be showing the object before the query's frame starts
    #(FULL ? 64'd10_000_000 : 64'd250_000);
    send('{8'hAA, 8'h01});
    get(4, m);
    size = OW * OH;
    check(same(m, '{8'hAA, 8'h02, 8'(size >> 8), 8'(size)}), $sformatf("IMAGE SIZE %0d expected", size));
    begin
      int bad_f = 0, bad_u = 0;
      for (int y = 0; y < H; y++) for (int x = 0; x < W; x++) begin
        bit in_obj;
        in_obj = x >= OX0 && x < OX0 + OW && y >= OY0 && y < OY0 + OH;
        if (u_sram.mem[y * W + x] != scene(x, y, 1)) begin bad_f++; if (bad_f < 6) $display("F(%0d,%0d)=%0d exp %0d", x, y, u_sram.mem[y * W + x], scene(x, y, 1)); end
        if (u_sram.mem[2 * NPIX + y * W + x] != 8'(in_obj)) bad_u++;
        if (in_obj && u_sram.mem[NPIX + y * W + x] == scene(x, y, 0)) n_sel_kept++;
      end
      check(bad_f == 0 && bad_u == 0, $sformatf("frame/update bits in RAM: %0d/%0d wrong", bad_f, bad_u));
    end

    // 3: transfer
    send('{8'hAA, 8'h05, 8'(PKT)});
    get(4, m); check(same(m, '{8'hAA, 8'h03, 8'hFF, 8'hFF}), "ACK for START-OF-TRANSMISSION");
    total = size; sent = 0; id = 0; nacked = 0;
    while (sent < total) begin
      int n;
      n = (total - sent > PN) ? PN : total - sent;
      get(PN + 5, p);
      e = '{8'hAA, 8'hAA, 8'(id >> 8), 8'(id)};
      for (int k = sent; k < sent + n; k++) e.push_back(scene(OX0 + k % OW, OY0 + k / OW, 1));
      while (e.size() < PN + 4) e.push_back(8'h00);
      e.push_back(crc_ref(e));
      check(same(p, e), $sformatf("image packet %0d", id));
      if (!same(p, e)) begin
        foreach (p[i]) $write("%h ", p[i]); $display("");
        foreach (e[i]) $write("%h ", e[i]); $display("");
      end
      begin byte unsigned h[$]; h = p; void'(h.pop_back()); if (p.size() == PN + 5 && p[PN + 4] == crc_ref(h)) n_pkt_ok++; end
      if (id == 1 && !nacked) begin
        nacked = 1; n_nack++;
        send('{8'hAA, 8'h04, 8'(id >> 8), 8'(id)});
      end else begin
        send('{8'hAA, 8'h03, 8'(id >> 8), 8'(id)});
        sent += n; id++;
      end
    end
    send('{8'hAA, 8'h06});
    repeat (20 * CPB) @(posedge clk_lf);
    check(rxq.size() == 0, "bytes after the transfer");
    check(int'(resends) == n_nack, "resend count");
    check(cam_ovf == 0 && !rx_err, "camera overflow or UART error");
    check(gedges_asleep == 0, "image clock ran while asleep");
    n_quiet_sleep = (gedges_asleep == 0) ? 1 : 0;
    check(relay_mismatch == 0 && relay_upq.size() == 0 && relay_dnq.size() == 0 && relay_up_bytes > 0,
          $sformatf("relay: %0d mismatches, %0d/%0d bytes left", relay_mismatch, relay_upq.size(), relay_dnq.size()));
    // a packet corrupted on the previous hop must stop at the relay
    begin
      byte unsigned bad[$];
      bad = '{8'hAA, 8'hAA, 8'h00, 8'h09};
      repeat (PN) bad.push_back(8'h5A);
      bad.push_back(8'h00);
      bad[6] = 8'hA5;
      foreach (bad[i]) begin @(negedge clk_lf); up_in_valid = 1; up_in_data = bad[i]; @(negedge clk_lf); up_in_valid = 0; end
      repeat (10) @(posedge clk_lf);
      check(relay_crc_drops == 1 && relay_upq.size() == 0 && relay_mismatch == 0, "relay did not drop the corrupted packet");
    end

    $display("relay: %0d bytes up, %0d down, %0d packets dropped for CRC", relay_up_bytes, relay_dn_bytes, relay_crc_drops);
    $display("mechanisms: wakes=%0d quiet_sleep=%0d frames=%0d stalled_frames=%0d nacks=%0d crc_ok_packets=%0d sel_kept=%0d",
             n_wake, n_quiet_sleep, n_frames, n_stall_frames, n_nack, n_pkt_ok, n_sel_kept);
    check(n_wake >= 2, "wake never happened");
    check(n_quiet_sleep == 1, "sleep never held the clock");
    check(n_frames >= 2, "frames");
    check(n_stall_frames >= 1, "camera stall never happened");
    check(n_nack >= 1, "NACK retransmission never happened");
    check(n_pkt_ok >= 2, "CRC-checked packets");
    check(n_sel_kept == OW * OH, "selective update did not keep the background under the object");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

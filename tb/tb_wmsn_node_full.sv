// tb_wmsn_node_full: the end-to-end test of wmsn_bench with the camera node
// at its default parameters (640 x 480 frames, 1 MByte RAM map, 57,600 baud
// at an 8 MHz low-frequency clock): a background frame, a frame with a
// 160 x 100 object, and the transfer of the object in 256-byte packets.
module tb_wmsn_node_full;
  wmsn_bench #(.FULL(1)) bench ();
  // watchdog
  initial begin
    #6_000_000_000;
    $display("TB_RESULT checks=%0d failures=%0d", bench.checks, bench.failures + 1);
    $finish;
  end
endmodule

// tb_wmsn_node: end-to-end test of the camera node at a reduced image size
// (32 x 24) and a fast UART; see wmsn_bench for the sequence and checks.
module tb_wmsn_node;
  int cycles = 0;
  wmsn_bench #(.FULL(0)) bench ();
  // watchdog
  initial begin
    #50_000_000;
    $display("TB_RESULT checks=%0d failures=%0d", bench.checks, bench.failures + 1);
    $finish;
  end
endmodule

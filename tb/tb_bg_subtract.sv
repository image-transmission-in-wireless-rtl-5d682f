// tb_bg_subtract: random and corner-case check of the background update and
// foreground decision against an integer model of B_n = B + (F - B) / 2^k
// (division rounding toward zero) and U = |F - B| > T, including the
// one-cycle latency and the selective-update write-back value.
module tb_bg_subtract;
  logic clk = 0, rst_n = 0;
  logic in_valid = 0;
  logic [7:0] f, b, thr;
  logic [2:0] k;
  logic sel;
  logic out_valid, upd;
  logic [7:0] b_new, b_wr;
  int checks = 0, failures = 0;

  bg_subtract dut (.clk, .rst_n, .in_valid, .f_pix(f), .b_pix(b), .alpha_k(k), .thr,
                   .sel_update(sel), .out_valid, .b_new, .b_wr, .upd);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic apply(input int fv, input int bv, input int kv, input int tv, input bit sv);
    int d, expn, expw;
    bit expu;
    f = 8'(fv); b = 8'(bv); k = 3'(kv); thr = 8'(tv); sel = sv; in_valid = 1;
    d    = fv - bv;
    expn = bv + d / (1 << kv);
    expu = (d > tv) || (-d > tv);
    expw = (sv && expu) ? bv : expn;
    @(posedge clk); #1;
    in_valid = 0;
    checks++;
    if (!out_valid || b_new !== 8'(expn) || upd !== expu || b_wr !== 8'(expw)) begin
      failures++;
      $display("MISMATCH F=%0d B=%0d k=%0d T=%0d sel=%0d: got Bn=%0d U=%0d wr=%0d exp Bn=%0d U=%0d wr=%0d",
               fv, bv, kv, tv, sv, b_new, upd, b_wr, expn, expu, expw);
    end
  endtask

  initial begin
    f = 0; b = 0; k = 0; thr = 0; sel = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    apply(255, 0, 1, 10, 0);     // 127
    apply(0, 255, 1, 10, 0);     // darker pixel: 128
    apply(100, 100, 3, 0, 0);    // no change, U = 0
    apply(200, 50, 7, 149, 0);   // |d| = 150 > 149
    apply(200, 50, 7, 150, 0);   // |d| = 150 not > 150
    apply(90, 10, 0, 5, 0);      // alpha = 1: Bn = F
    apply(90, 10, 2, 5, 1);      // foreground, selective update keeps B
    apply(12, 10, 2, 5, 1);      // background, selective update writes Bn
    repeat (3000) apply($urandom_range(0, 255), $urandom_range(0, 255), $urandom_range(0, 7),
                        $urandom_range(0, 255), 1'($urandom_range(0, 1)));
    // out_valid must drop when no input is given
    @(posedge clk); #1;
    checks++;
    if (out_valid) begin failures++; $display("out_valid stuck high"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

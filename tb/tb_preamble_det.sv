// tb_preamble_det: random bits followed by the 128-chip O-QPSK preamble
// reference (four symbol-0 sequences written out independently), with chip
// errors injected, inverted, or absent. Checks found/score/peak index and
// polarity against values computed here, and that done comes WIN bits after
// the threshold crossing.
module tb_preamble_det;
  import rx_pkg::*;
  import tb_sig_pkg::*;
  logic clk = 0, rst_n = 0, start = 0, allow_inv = 0, bit_valid = 0, bit_in = 0;
  logic [127:0] ref_bits;
  logic [7:0] thr_detect = 8'd80;
  logic [15:0] bit_limit = 16'd400;
  logic done, found, peak_inv;
  logic [7:0] peak_score;
  logic [15:0] peak_idx;
  int checks = 0, failures = 0;

  preamble_det #(.WIN(32), .IDX_W(16)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(string what, bit cond);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", what); end
  endtask

  // one run: lead random bits, then the preamble (errs chips flipped,
  // optionally inverted), then random bits
  task automatic run(int lead, int errs, bit inv, bit present, bit ainv,
                     output bit f, output int sc, output int idx, output bit pinv, output int ncyc);
    bit pre[128];
    int cnt = 0;
    for (int n = 0; n < 128; n++) pre[n] = chip_of(0, n % 32) ^ inv;
    for (int e = 0; e < errs; e++) pre[(e * 37 + 5) % 128] ^= 1'b1;
    @(negedge clk) begin start = 1; allow_inv = ainv; end
    @(negedge clk) start = 0;
    ncyc = 0;
    for (int n = 0; n < 400 && !done; n++) begin
      bit_valid = 1;
      if (n >= lead && n < lead + 128 && present) bit_in = pre[n - lead];
      else bit_in = 1'($urandom);
      @(negedge clk);
      ncyc++;
    end
    bit_valid = 0;
    while (!done) @(negedge clk);
    f = found; sc = peak_score; idx = peak_idx; pinv = peak_inv;
  endtask

  initial begin
    bit f, pinv;
    int sc, idx, nc;
    ref_bits = '0;
    for (int n = 0; n < 128; n++) ref_bits[127 - n] = chip_of(0, n % 32);
    repeat (3) @(posedge clk);
    rst_n = 1;
    // clean preamble after 50 random bits: peak at bit 177, score 128
    run(50, 0, 0, 1, 0, f, sc, idx, pinv, nc);
    check("clean found", f);
    check($sformatf("clean score %0d", sc), sc == 128);
    check($sformatf("clean idx %0d", idx), idx == 177);
    check($sformatf("window: done after %0d bits", nc), nc == 177 + 32 + 1);
    // 20 chip errors: score 108
    run(10, 20, 0, 1, 0, f, sc, idx, pinv, nc);
    check("noisy found", f);
    check($sformatf("noisy score %0d", sc), sc == 108);
    check($sformatf("noisy idx %0d", idx), idx == 137);
    // inverted preamble, inversion allowed
    run(30, 0, 1, 1, 1, f, sc, idx, pinv, nc);
    check("inverted found", f && pinv && sc == 128 && idx == 157);
    // inverted, not allowed: no peak near 128
    run(30, 0, 1, 1, 0, f, sc, idx, pinv, nc);
    check($sformatf("inverted rejected: score %0d", sc), sc < 100);
    // constant bits only: never reaches the threshold
    for (int k = 0; k < 2; k++) begin
      @(negedge clk) begin start = 1; allow_inv = 0; end
      @(negedge clk) start = 0;
      for (int n = 0; n < 400; n++) begin
        bit_valid = 1; bit_in = 1'(k);
        @(negedge clk);
      end
      bit_valid = 0;
      check($sformatf("constant %0d: found=%0d", k, found), !found);
    end
    // limit: with a short limit the search gives up
    bit_limit = 16'd150;
    @(negedge clk) start = 1;
    @(negedge clk) start = 0;
    nc = 0;
    while (!done && nc < 400) begin
      bit_valid = 1; bit_in = 1'b0;
      @(negedge clk);
      nc++;
    end
    bit_valid = 0;
    check($sformatf("limit: found=%0d after %0d bits", found, nc), !found && nc == 150);
    bit_limit = 16'd400;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

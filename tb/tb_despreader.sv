// tb_despreader: random symbols are spread with the standard chip table
// (written out in the stimulus package), up to five chips are flipped, and
// the despreader must return the symbol, its clean chip sequence and a score
// of 32 minus the flips, one cycle after the 32nd chip. The MSK chain is fed
// the MSK-equivalent bits worked out from consecutive chips, chip 0 garbled.
// Heavily corrupted sequences must clear sym_ok.
module tb_despreader;
  import rx_pkg::*;
  import tb_sig_pkg::*;
  logic clk = 0, rst_n = 0, start = 0, bit_valid = 0, bit_in = 0;
  chain_e chain = CHAIN_OQPSK;
  logic sym_valid, sym_ok;
  logic [3:0] sym;
  chipseq_t chips;
  logic [5:0] score;
  int checks = 0, failures = 0;

  despreader #(.SYM_THR(27)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic send(bit b[32], int want, int want_score, bit want_ok);
    for (int n = 0; n < 32; n++) begin
      @(negedge clk) begin bit_valid = 1; bit_in = b[n]; end
    end
    @(negedge clk) bit_valid = 0;
    // sym_valid was registered on the edge after the 32nd chip
    checks++;
    if (!sym_valid) begin failures++; $display("no sym_valid"); return; end
    checks++;
    if (int'(sym) != want || int'(score) != want_score || sym_ok != want_ok) begin
      failures++;
      $display("chain %0d: sym %0d/%0d score %0d/%0d ok %0d/%0d", chain, sym, want, score, want_score, sym_ok, want_ok);
    end
    checks++;
    for (int n = 0; n < 32; n++)
      if (chips[31 - n] != chip_of(int'(sym), n)) begin failures++; $display("chips wrong"); break; end
  endtask

  initial begin
    bit b[32];
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(negedge clk) start = 1;
    @(negedge clk) start = 0;
    for (int k = 0; k < 400; k++) begin
      int s, e;
      s = $urandom_range(0, 15);
      e = $urandom_range(0, 5);
      for (int n = 0; n < 32; n++) b[n] = chip_of(s, n);
      for (int i = 0; i < e; i++) b[(i * 7 + k) % 32] ^= 1'b1;
      send(b, s, 32 - e, 32 - e >= 27);
    end
    chain = CHAIN_MSK;
    for (int k = 0; k < 400; k++) begin
      int s, e;
      s = $urandom_range(0, 15);
      e = $urandom_range(0, 4);
      for (int n = 1; n < 32; n++) b[n] = msk_equiv(n, chip_of(s, n), chip_of(s, n - 1));
      b[0] = 1'($urandom);
      for (int i = 0; i < e; i++) b[1 + (i * 7 + k) % 31] ^= 1'b1;
      send(b, s, 31 - e, 31 - e >= 26);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

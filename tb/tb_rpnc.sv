// tb_rpnc: the residual phase noise compensator closed with the despreader,
// as in the receiver. A long frame is sent with carrier offset f while the
// compensator is told v_hat = f - e: the residual e makes the phase drift
// by more than a turn over the frame. Every payload symbol must still come
// out right. For contrast the testbench also decides the same chips with the
// coarse compensation alone (phi - k*v_hat - theta) and checks that this
// baseline does fail, so the residual in the stimulus is real. Chips enter
// one per cycle; each decision leaves one cycle after its chip, each symbol
// two cycles after its last chip.
module tb_rpnc;
  import rx_pkg::*;
  import tb_sig_pkg::*;
  localparam int N_RCFO = 16;
  logic clk = 0, rst_n = 0, start = 0, in_valid = 0;
  phase_t v_hat = '0, in_phase = '0;
  logic chip_valid, chip_bit;
  logic sym_valid, sym_ok;
  logic [3:0] sym;
  chipseq_t chips_out;
  logic [5:0] score;
  int checks = 0, failures = 0, cyc = 0, last_in = 0;
  int exp_syms[$];
  int sym_errs = 0, nsym = 0;

  rpnc #(.N_RCFO(N_RCFO)) dut (
    .clk, .rst_n, .start, .v_hat, .in_valid, .in_phase, .chip_valid, .chip_bit,
    .corr_valid(sym_valid), .corr_ok(sym_ok), .corr_chips(chips_out));
  despreader u_dsp (
    .clk, .rst_n, .start, .chain(CHAIN_OQPSK), .bit_valid(chip_valid), .bit_in(chip_bit),
    .sym_valid, .sym, .chips(chips_out), .score, .sym_ok);
  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) if (rst_n && sym_valid) begin
    checks++;
    if (exp_syms.size() == 0 || int'(sym) != exp_syms.pop_front()) sym_errs++;
    nsym++;
    if (cyc - last_in != 2 && nsym == 1) begin failures++; $display("symbol latency %0d", cyc - last_in); end
  end

  initial begin
    bit chips[$];
    int syms[$];
    byte unsigned pl[$];
    shortint x, y;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int r = 0; r < 3; r++) begin
      real f, e, th, vh;
      int base_errs, nchips;
      bit dec[$];
      pl = {};
      for (int i = 0; i < 60; i++) pl.push_back(8'($urandom));
      frame_symbols(pl, syms);
      spread(syms, chips);
      // a carrier offset of 0.03..0.06 turn per chip, either sign: large
      // enough that the i*v_hat terms of bank 1 matter
      f  = real'($urandom_range(30, 60)) / 1000.0;
      if (r == 1) f = -f;
      e  = (r % 2 == 0 ? 1.0 : -1.0) / 3000.0;
      th = real'($urandom_range(0, 628)) / 100.0;
      vh = f - e;
      exp_syms = {};
      for (int s = 4; s < syms.size(); s++) exp_syms.push_back(syms[s]);
      sym_errs = 0; nsym = 0;
      @(negedge clk) begin start = 1; v_hat = phase_t'(longint'($floor(vh * 4294967296.0))); end
      @(negedge clk) start = 0;
      // training symbol = preamble symbol 3, then everything from chip 128
      nchips = chips.size();
      base_errs = 0;
      dec = {};
      for (int k = 96; k < nchips; k++) begin
        real ph;
        sample(chips, k * 8, 8, 0.0, f, th, 8000.0, 800.0, x, y);
        in_valid = 1;
        in_phase = phase_t'(turns32(real'(x), real'(y)));
        // baseline: coarse compensation only
        ph = $atan2(real'(y), real'(x)) / (2.0 * PI) - vh * real'(k) - th / (2.0 * PI);
        ph = ph - $floor(ph);
        dec.push_back((k % 2 == 0) ? (ph < 0.25 || ph > 0.75) : (ph < 0.5));
        if (k == 127 + 32) last_in = cyc;
        @(negedge clk);
      end
      in_valid = 0;
      repeat (5) @(negedge clk);
      // baseline symbol errors
      for (int s = 4; s < syms.size(); s++) begin
        int best, bsc;
        best = 0; bsc = -1;
        for (int c = 0; c < 16; c++) begin
          int sc = 0;
          for (int n = 0; n < 32; n++) sc += int'(dec[(s - 3) * 32 + n] == chip_of(c, n));
          if (sc > bsc) begin bsc = sc; best = c; end
        end
        if (best != syms[s]) base_errs++;
      end
      $display("residual %f turns/chip over %0d chips: rpnc %0d symbol errors, coarse only %0d",
               e, nchips, sym_errs, base_errs);
      checks++;
      if (sym_errs != 0 || exp_syms.size() != 0) begin
        failures++; $display("rpnc: %0d symbol errors, %0d missing", sym_errs, exp_syms.size());
      end
      checks++;
      if (base_errs < 10) begin failures++; $display("stimulus too easy"); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

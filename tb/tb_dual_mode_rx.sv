// tb_dual_mode_rx: end-to-end test of the dual-mode receiver at its default
// parameters. Frames are generated (half-sine O-QPSK, timing offset, carrier
// frequency and phase offset, noise), written through the ADC port, and
// received in manual and automatic mode. The symbols and serial data bits
// must match the transmitted frame from the payload address on. Every
// mechanism of the design must occur at least once: timing recovery, a
// coarse estimate, a reused estimate, both chains, both automatic switches
// (MSK to O-QPSK on a poor MSK preamble, O-QPSK back to MSK on a good
// coherent preamble), a chip decision of the compensator corrected by the
// despreader. A frame with no signal must be reported lost.
// Frame 4 is noisy on purpose (noise sigma 6500 against amplitude 8000 per
// sample, plusarg +sigma4= overrides) so the differential preamble scores
// below 110; it is checked for the symbol count and at most 3 symbol errors.
// At this level the decision-directed compensator can still lose lock now
// and then (about one random seed in sixteen in this design's own runs).
// +trace prints every despread symbol with its score.
module tb_dual_mode_rx;
  import rx_pkg::*;
  import tb_sig_pkg::*;
  localparam int SPS = 8;
  localparam int AW = 16;

  logic clk = 0, rst_n = 0;
  logic adc_valid = 0;
  logic [AW-1:0] adc_addr = '0;
  sample_t adc_i = '0, adc_q = '0;
  logic frame_start = 0, manual_mode = 1, cfo_req = 0;
  chain_e manual_chain = CHAIN_MSK;
  logic [AW-1:0] frame_base = '0, frame_len = '0;
  logic busy, frame_done, frame_lost, mode_switch, cfo_run, sym_valid, sym_ok, data_valid, data_bit;
  chain_e chain_used;
  logic [7:0] pd_score;
  logic [AW-1:0] payload_addr;
  logic [2:0] tau;
  phase_t v_hat, theta_hat;
  logic [3:0] sym;

  dual_mode_rx dut (.*);
  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  // mechanism counters
  int n_str = 0, n_cfo = 0, n_reuse = 0, n_msk = 0, n_oqpsk = 0, n_sw_to_oqpsk = 0,
      n_sw_to_msk = 0, n_lost = 0, n_rpnc_fix = 0, n_manual = 0, n_auto = 0;

  initial begin
    repeat (3000000) @(posedge clk);
    failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(string what, bit cond);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", what); end
  endtask

  // received symbols and bits of the current frame
  int rx_syms[$];
  bit rx_bits[$];
  always @(posedge clk) if (rst_n) begin
    if (sym_valid) rx_syms.push_back(int'(sym));
    if (sym_valid && $test$plusargs("trace")) $display("sym %0d score %0d ok %0d", sym, dut.dsp_score, sym_ok);
    if (data_valid) rx_bits.push_back(data_bit);
    if (dut.str_done) n_str++;
    if (cfo_run) n_cfo++;
    if (mode_switch && dut.u_ctrl.cur_chain == CHAIN_OQPSK) n_sw_to_oqpsk++;
    if (mode_switch && dut.u_ctrl.cur_chain == CHAIN_MSK) n_sw_to_msk++;
    // a compensator decision the despreader later corrected
    if (dut.u_dsp.sym_valid && dut.dsp_chain == CHAIN_OQPSK &&
        dut.u_dsp.chips != dut.u_dsp.sr) n_rpnc_fix++;
  end

  int cur_syms[$];
  int cur_chips;

  task automatic load(int base, byte unsigned pl[$], real tau0, real f, real th, real sigma, bit silent);
    bit chips[$];
    shortint x, y;
    frame_symbols(pl, cur_syms);
    spread(cur_syms, chips);
    cur_chips = chips.size();
    for (int s = 0; s < (cur_chips + 1) * SPS; s++) begin
      if (silent) begin x = 0; y = 0; end
      else sample(chips, s, SPS, tau0, f, th, 8000.0, sigma, x, y);
      @(negedge clk);
      adc_valid = 1; adc_addr = AW'(base + s); adc_i = x; adc_q = y;
    end
    @(negedge clk) adc_valid = 0;
  endtask

  // receive the frame at base; returns lost and the chain used
  task automatic receive(int base, bit manual, chain_e ch, bit req, output bit lost, output chain_e used,
                         output int first_sym);
    rx_syms = {}; rx_bits = {};
    if ($test$plusargs("trace")) $display("frame at %0d", base);
    @(negedge clk) begin
      frame_start = 1; frame_base = AW'(base); frame_len = AW'((cur_chips + 1) * SPS);
      manual_mode = manual; manual_chain = ch; cfo_req = req;
    end
    @(negedge clk) begin frame_start = 0; cfo_req = 0; end
    while (!frame_done) @(negedge clk);
    lost = frame_lost;
    used = chain_used;
    first_sym = (int'(payload_addr) - base - int'(tau)) / (32 * SPS);
    if (manual) n_manual++; else n_auto++;
  endtask

  task automatic compare(string tag, int first_sym);
    int nexp;
    nexp = cur_syms.size() - first_sym;
    check($sformatf("%s: %0d symbols, expected %0d", tag, rx_syms.size(), nexp), rx_syms.size() == nexp);
    for (int i = 0; i < rx_syms.size() && i < nexp; i++)
      if (rx_syms[i] != cur_syms[first_sym + i]) begin
        check($sformatf("%s: symbol %0d is %0d, expected %0d", tag, i, rx_syms[i], cur_syms[first_sym + i]), 0);
        break;
      end
    checks++;
    if (rx_bits.size() != 4 * rx_syms.size()) begin failures++; $display("%s: bit count", tag); end
    else for (int i = 0; i < rx_bits.size(); i++)
      if (rx_bits[i] != 1'((rx_syms[i / 4] >> (i % 4)) & 1)) begin failures++; $display("%s: bit %0d", tag, i); break; end
  endtask

  // noisy frame: count must match, at most maxerr symbol errors
  task automatic compare_noisy(string tag, int first_sym, int maxerr);
    int nexp, nerr;
    nexp = cur_syms.size() - first_sym;
    nerr = 0;
    check($sformatf("%s: %0d symbols, expected %0d", tag, rx_syms.size(), nexp), rx_syms.size() == nexp);
    for (int i = 0; i < rx_syms.size() && i < nexp; i++)
      if (rx_syms[i] != cur_syms[first_sym + i]) nerr++;
    if (nerr > maxerr)
      for (int i = 0; i < rx_syms.size() && i < nexp; i++)
        $display("%s: symbol %0d got %0d expected %0d", tag, i, rx_syms[i], cur_syms[first_sym + i]);
    check($sformatf("%s: %0d symbol errors (at most %0d)", tag, nerr, maxerr), nerr <= maxerr);
  endtask

  initial begin
    byte unsigned pl[$];
    bit lost;
    chain_e used;
    int fs;
    real f, sig4;
    repeat (3) @(posedge clk);
    rst_n = 1;
    f = 0.04;   // about 80 kHz at 2 Mchip/s

    // 1: manual O-QPSK, first estimate
    pl = {};
    for (int i = 0; i < 30; i++) pl.push_back(8'($urandom));
    load(0, pl, 3.0, f, 1.1, 400.0, 0);
    receive(0, 1, CHAIN_OQPSK, 0, lost, used, fs);
    check("frame 1 not lost", !lost);
    check("frame 1 chain", used == CHAIN_OQPSK);
    check($sformatf("frame 1 tau %0d", tau), tau == 3'd3);
    check($sformatf("frame 1 v_hat %f", real'(signed'(v_hat)) / 4294967296.0),
          fabs(real'(signed'(v_hat)) / 4294967296.0 - f) < 1.0 / 4096.0);
    compare("frame 1", fs);
    if (used == CHAIN_OQPSK) n_oqpsk++;

    // 2: manual MSK, other timing, other phase
    pl = {};
    for (int i = 0; i < 30; i++) pl.push_back(8'($urandom));
    load(20000, pl, 6.0, f, 2.5, 400.0, 0);
    receive(20000, 1, CHAIN_MSK, 0, lost, used, fs);
    check("frame 2 not lost", !lost && used == CHAIN_MSK);
    compare("frame 2", fs);
    if (used == CHAIN_MSK) n_msk++;

    // 3: manual O-QPSK with the held estimate (same burst: same phase)
    pl = {};
    for (int i = 0; i < 20; i++) pl.push_back(8'($urandom));
    load(0, pl, 1.0, f, 1.1, 400.0, 0);
    fs = n_cfo;
    receive(0, 1, CHAIN_OQPSK, 0, lost, used, fs);
    if (n_cfo == 1) n_reuse++;
    check("frame 3 not lost", !lost && used == CHAIN_OQPSK);
    compare("frame 3", fs);
    if (used == CHAIN_OQPSK) n_oqpsk++;

    // 4: automatic mode starts in MSK; a noisy frame makes it switch to
    // O-QPSK for the same frame (same burst: the held estimate is used)
    pl = {};
    for (int i = 0; i < 10; i++) pl.push_back(8'($urandom));
    if (!$value$plusargs("sigma4=%f", sig4)) sig4 = 6500.0;
    load(20000, pl, 5.0, f, 1.1, sig4, 0);
    receive(20000, 0, CHAIN_MSK, 0, lost, used, fs);
    $display("frame 4: score %0d chain %0d lost %0d tau %0d v_hat %f theta %f", pd_score, used, lost, tau,
             real'(signed'(v_hat)) / 4294967296.0, real'(theta_hat) / 4294967296.0);
    check("frame 4 switched to O-QPSK", used == CHAIN_OQPSK && !lost);
    compare_noisy("frame 4", fs, 3);
    if (used == CHAIN_OQPSK) n_oqpsk++;

    // the coherent preamble of that frame was good (score >= 110), so the
    // receiver has already gone back to MSK for the next frame
    check($sformatf("frame 4 O-QPSK score %0d", pd_score), pd_score >= 8'd110);
    // 5: automatic, clean frame, now in MSK
    pl = {};
    for (int i = 0; i < 10; i++) pl.push_back(8'($urandom));
    load(0, pl, 2.0, f, 0.7, 300.0, 0);
    receive(0, 0, CHAIN_MSK, 0, lost, used, fs);
    check("frame 5 MSK", used == CHAIN_MSK && !lost);
    compare("frame 5", fs);
    if (used == CHAIN_MSK) n_msk++;

    // 7: a silent frame is lost
    load(40000, pl, 0.0, 0.0, 0.0, 0.0, 1);
    receive(40000, 1, CHAIN_OQPSK, 0, lost, used, fs);
    check("frame 7 lost", lost);
    if (lost) n_lost++;

    $display("mechanisms: str %0d cfo %0d reuse %0d msk %0d oqpsk %0d msk->oqpsk %0d oqpsk->msk %0d lost %0d rpnc-corrected %0d manual %0d auto %0d",
             n_str, n_cfo, n_reuse, n_msk, n_oqpsk, n_sw_to_oqpsk, n_sw_to_msk, n_lost, n_rpnc_fix, n_manual, n_auto);
    check("timing recovery ran", n_str > 0);
    check("coarse estimate ran", n_cfo > 0);
    check("estimate reused", n_reuse > 0);
    check("MSK chain used", n_msk > 0);
    check("O-QPSK chain used", n_oqpsk > 0);
    check("switch MSK->O-QPSK", n_sw_to_oqpsk > 0);
    check("switch O-QPSK->MSK", n_sw_to_msk > 0);
    check("frame lost", n_lost > 0);
    check("despreader corrected compensator chips", n_rpnc_fix > 0);
    check("manual mode", n_manual > 0);
    check("automatic mode", n_auto > 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

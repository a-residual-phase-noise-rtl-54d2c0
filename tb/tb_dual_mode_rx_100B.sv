// tb_dual_mode_rx_100B: the receiver at its default parameters on the frame
// sizes a link budget is usually quoted for: an 80-byte and a 100-byte
// payload, each received once by the coherent O-QPSK chain and once by the
// differential MSK chain (manual mode). Each frame carries a carrier offset of
// 0.04 turn per chip (80 kHz at 2 Mchip/s) and mild noise; the 100-byte frame
// fills 54272 of the 65536 sample addresses. Every symbol from the payload
// address on must come out right. The testbench prints the cycles from
// frame_start to frame_done and bounds them: the O-QPSK chain takes one chip
// per cycle (about 32 cycles per symbol, bound 64 per symbol plus 12000 for
// timing recovery, the FFT estimate and the preamble search), the MSK chain
// one sample per cycle (256 per symbol, bound 256 per frame symbol plus 64
// per received symbol). Measured: about 38 and 270 cycles per symbol.
module tb_dual_mode_rx_100B;
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

  int rx_syms[$];
  always @(posedge clk) if (rst_n && sym_valid) rx_syms.push_back(int'(sym));

  int cur_syms[$];
  int cur_chips;
  task automatic load(byte unsigned pl[$], real tau0, real th);
    bit chips[$];
    shortint x, y;
    frame_symbols(pl, cur_syms);
    spread(cur_syms, chips);
    cur_chips = chips.size();
    for (int s = 0; s < (cur_chips + 1) * SPS; s++) begin
      sample(chips, s, SPS, tau0, 0.04, th, 8000.0, 1500.0, x, y);
      @(negedge clk);
      adc_valid = 1; adc_addr = AW'(s); adc_i = x; adc_q = y;
    end
    @(negedge clk) adc_valid = 0;
  endtask

  task automatic run(string tag, chain_e ch);
    int t0, fs, nexp, nerr;
    rx_syms = {};
    @(negedge clk) begin
      frame_start = 1; frame_base = '0; frame_len = AW'((cur_chips + 1) * SPS);
      manual_mode = 1; manual_chain = ch;
    end
    t0 = 0;
    @(negedge clk) frame_start = 0;
    while (!frame_done) begin @(negedge clk); t0++; end
    check($sformatf("%s: found in chain %0d", tag, ch), !frame_lost && chain_used == ch);
    fs = (int'(payload_addr) - int'(tau)) / (32 * SPS);
    nexp = cur_syms.size() - fs;
    nerr = 0;
    for (int i = 0; i < rx_syms.size() && i < nexp; i++) if (rx_syms[i] != cur_syms[fs + i]) nerr++;
    check($sformatf("%s: %0d symbols (expected %0d), %0d errors", tag, rx_syms.size(), nexp, nerr),
          rx_syms.size() == nexp && nerr == 0);
    $display("%s: %0d symbols, %0d cycles from start to done (%0.1f per symbol), score %0d",
             tag, rx_syms.size(), t0, real'(t0) / real'(rx_syms.size()), pd_score);
    check($sformatf("%s: cycles per symbol", tag),
          t0 <= 64 * rx_syms.size() + (ch == CHAIN_MSK ? 256 * cur_syms.size() : 12000));
  endtask

  initial begin
    byte unsigned pl[$];
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int n = 80; n <= 100; n += 20) begin
      pl = {};
      for (int i = 0; i < n; i++) pl.push_back(8'($urandom));
      load(pl, 2.0, 0.9);
      run($sformatf("%0d bytes O-QPSK", n), CHAIN_OQPSK);
      run($sformatf("%0d bytes MSK", n), CHAIN_MSK);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

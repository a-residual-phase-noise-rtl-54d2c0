// tb_ioc_pd: chip-peak phases of a frame (preamble from chip 0) with carrier
// offset f and phase theta. Given the true v_hat and theta_hat the block must
// find the preamble at bit 127 with the full score, decide every chip of the
// frame correctly, and report peak_inv when theta_hat is off
// by half a turn. Without the frequency compensation the preamble must not
// reach the mode threshold.
module tb_ioc_pd;
  import rx_pkg::*;
  import tb_sig_pkg::*;
  logic clk = 0, rst_n = 0, start = 0, in_valid = 0;
  phase_t v_hat = '0, theta_hat = '0, in_phase = '0;
  logic [7:0] thr_detect = 8'd80;
  logic [15:0] chip_limit = 16'd320;
  logic bit_valid, bit_out, done, found, peak_inv;
  logic [7:0] peak_score;
  logic [15:0] peak_idx;
  int checks = 0, failures = 0;
  int nbit = 0, bit_err = 0;
  bit chips[$];
  bit inv_exp = 0;

  ioc_pd #(.IDX_W(16)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) if (rst_n && bit_valid) begin
    if (nbit < chips.size() && bit_out != (chips[nbit] ^ inv_exp)) bit_err++;
    nbit++;
  end

  task automatic run(real f, real th, phase_t vh, phase_t thh);
    shortint x, y;
    @(negedge clk) begin start = 1; v_hat = vh; theta_hat = thh; end
    @(negedge clk) start = 0;
    nbit = 0; bit_err = 0;
    for (int k = 0; k < 320; k++) begin
      sample(chips, k * 8, 8, 0.0, f, th, 8000.0, 300.0, x, y);
      in_valid = 1;
      in_phase = phase_t'(turns32(real'(x), real'(y)));
      @(negedge clk);
    end
    in_valid = 0;
    repeat (3) @(negedge clk);
  endtask

  function automatic phase_t turns(real t);
    return phase_t'(longint'($floor(t * 4294967296.0)));
  endfunction

  initial begin
    int syms[$];
    byte unsigned pl[$];
    bit got_done;
    repeat (3) @(posedge clk);
    rst_n = 1;
    pl = {8'h5A, 8'hC3, 8'h01};
    frame_symbols(pl, syms);
    spread(syms, chips);
    for (int r = 0; r < 4; r++) begin
      real f, th;
      f  = real'(int'($urandom_range(0, 200)) - 100) / 1000.0;
      th = real'($urandom_range(0, 628)) / 100.0;
      inv_exp = 0;
      fork
        run(f, th, turns(f), turns(th / (2.0 * PI)));
        begin got_done = 0; wait (done); got_done = 1; end
      join
      checks++;
      if (!found || peak_idx != 16'd127 || peak_score != 8'd128 || peak_inv) begin
        failures++;
        $display("f=%f: found %0d idx %0d score %0d inv %0d", f, found, peak_idx, peak_score, peak_inv);
      end
      checks++;
      if (bit_err != 0 || nbit != 320) begin failures++; $display("%0d chip errors of %0d", bit_err, nbit); end
      // theta_hat off by half a turn: same peak, inverted
      inv_exp = 1;
      run(f, th, turns(f), turns(th / (2.0 * PI) + 0.5));
      checks++;
      if (!found || peak_idx != 16'd127 || !peak_inv || bit_err != 0) begin
        failures++;
        $display("inverted: found %0d idx %0d inv %0d errs %0d", found, peak_idx, peak_inv, bit_err);
      end
    end
    // large offset left uncompensated: no clean preamble
    inv_exp = 0;
    run(0.08, 1.0, '0, turns(1.0 / (2.0 * PI)));
    checks++;
    if (found && peak_score >= 8'd110) begin failures++; $display("uncompensated score %0d", peak_score); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

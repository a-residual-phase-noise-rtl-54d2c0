// tb_str_est: half-sine O-QPSK sample phases (from the stimulus package, with
// carrier frequency and phase offset and some noise) are fed for several true
// timing offsets; the block must return the sample offset nearest the pulse
// peaks, one cycle after the last of (NCHIP+1)*SPS samples.
module tb_str_est;
  import rx_pkg::*;
  import tb_sig_pkg::*;
  localparam int SPS = 8, NCHIP = 128;
  logic clk = 0, rst_n = 0, start = 0, in_valid = 0, done;
  phase_t in_phase = '0;
  logic [2:0] tau;
  int checks = 0, failures = 0;

  str_est #(.SPS(SPS), .NCHIP(NCHIP)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    bit chips[$];
    int syms[$];
    byte unsigned pl[$];
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int r = 0; r < 12; r++) begin
      real tau0, f, th;
      int want, lat;
      shortint x, y;
      pl = {};
      for (int i = 0; i < 8; i++) pl.push_back(8'($urandom));
      frame_symbols(pl, syms);
      // start inside the payload so the chips are not periodic
      syms = syms[12:$];
      spread(syms, chips);
      tau0 = real'($urandom_range(0, 17)) * 0.4;
      f    = real'(int'($urandom_range(0, 100)) - 50) / 1000.0;
      th   = real'($urandom_range(0, 628)) / 100.0;
      want = int'($floor(tau0 + 0.5)) % SPS;
      @(negedge clk) start = 1;
      @(negedge clk) start = 0;
      for (int s = 0; s < (NCHIP + 1) * SPS; s++) begin
        sample(chips, s, SPS, tau0, f, th, 8000.0, 300.0, x, y);
        in_valid = 1;
        in_phase = phase_t'(turns32(real'(x), real'(y)));
        @(negedge clk);
      end
      in_valid = 0;
      lat = 0;
      while (!done && lat < 10) begin @(negedge clk); lat++; end
      checks++;
      if (!done || int'(tau) != want) begin
        failures++;
        $display("tau0=%f f=%f: got %0d want %0d (done=%0d)", tau0, f, tau, want, done);
      end
      checks++;
      if (lat != 1) begin failures++; $display("done after %0d cycles", lat); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

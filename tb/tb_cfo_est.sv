// tb_cfo_est: q_k = e^{j2phi_k} of 128 chip-peak samples of a half-sine O-QPSK
// preamble with a known carrier offset f (cycles per chip) and phase theta.
// The estimate must satisfy |v_hat - f| <= 1/4096 turn per chip (half an FFT
// bin), arg(peak)/2 must equal theta modulo half a turn within 0.02 turn,
// and done must be seen (NFFT - NQ) + (NFFT/2)*log2(NFFT) + NFFT + 2 clock edges after
// the last input.
module tb_cfo_est;
  import rx_pkg::*;
  import tb_sig_pkg::*;
  localparam int NFFT = 1024, NQ = 128;
  logic clk = 0, rst_n = 0, start = 0, in_valid = 0, done;
  logic signed [15:0] in_re = '0, in_im = '0, peak_x, peak_y;
  phase_t v_hat;
  logic [9:0] peak_bin;
  int checks = 0, failures = 0;

  cfo_est #(.NFFT(NFFT), .NQ(NQ), .DW(24)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (500000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    bit chips[$];
    int syms[$];
    byte unsigned pl[$];
    shortint x, y;
    repeat (3) @(posedge clk);
    rst_n = 1;
    pl = {8'h12, 8'h34};
    frame_symbols(pl, syms);
    spread(syms, chips);
    for (int r = 0; r < 6; r++) begin
      real f, th, ph, fe, te, the;
      int lat;
      f  = (r == 0) ? 0.0 : real'(int'($urandom_range(0, 360)) - 180) / 1000.0;
      th = real'($urandom_range(0, 628)) / 100.0;
      @(negedge clk) start = 1;
      @(negedge clk) start = 0;
      for (int k = 0; k < NQ; k++) begin
        sample(chips, k * 8, 8, 0.0, f, th, 8000.0, 300.0, x, y);
        ph = 2.0 * $atan2(real'(y), real'(x));
        in_valid = 1;
        in_re = 16'($rtoi(16384.0 * $cos(ph)));
        in_im = 16'($rtoi(16384.0 * $sin(ph)));
        @(negedge clk);
      end
      in_valid = 0;
      lat = 0;
      while (!done && lat < 20000) begin @(posedge clk); lat++; end
      fe = real'(signed'(v_hat)) / 4294967296.0 - f;
      // theta in turns modulo one half
      the = $atan2(real'(peak_y), real'(peak_x)) / (4.0 * PI) - th / (2.0 * PI);
      the = the - $floor(the * 2.0 + 0.5) / 2.0;
      checks++;
      if (fabs(fe) > 1.0 / 4096.0 + 1.0e-6) begin
        failures++;
        $display("f=%f: v_hat error %f turns/chip (bin %0d)", f, fe, peak_bin);
      end
      checks++;
      if (fabs(the) > 0.02) begin
        failures++;
        $display("theta=%f: error %f turns", th, the);
      end
      checks++;
      if (lat != (NFFT - NQ) + (NFFT / 2) * 10 + NFFT + 2) begin
        failures++;
        $display("latency %0d", lat);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

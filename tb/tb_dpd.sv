// tb_dpd: the differential detector with a rotation CORDIC attached. Sample
// phases of a half-sine O-QPSK frame with frequency and phase offset are fed
// at 8 samples per chip with the strobe on the chip peaks; every detected bit
// must equal the MSK-equivalent bit worked out from consecutive chips, and
// the first bit must appear 16 + 2 cycles after its sample.
module tb_dpd;
  import rx_pkg::*;
  import tb_sig_pkg::*;
  localparam int SPS = 8;
  logic clk = 0, rst_n = 0, start = 0, in_valid = 0, in_strobe = 0;
  phase_t in_phase = '0;
  logic rot_valid, rot_out_valid, bit_valid, bit_out;
  phase_t rot_angle;
  logic [1:0] rot_tag, rot_out_tag;
  logic signed [15:0] rot_out_sin, rot_out_cos;
  int checks = 0, failures = 0, cyc = 0, first_in = -1, first_out = -1;
  bit exp_q[$];

  dpd #(.DLY(SPS)) dut (.*);
  cordic_rotation #(.OUT_W(16), .STAGES(16), .TAG_W(2)) u_rot (
    .clk, .rst_n, .in_valid(rot_valid), .in_angle(rot_angle), .in_tag(rot_tag),
    .out_valid(rot_out_valid), .out_cos(rot_out_cos), .out_sin(rot_out_sin), .out_tag(rot_out_tag));
  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) if (rst_n && bit_valid) begin
    if (first_out < 0) first_out = cyc;
    checks++;
    if (exp_q.size() == 0) begin failures++; $display("extra bit"); end
    else if (bit_out != exp_q.pop_front()) failures++;
  end

  initial begin
    bit chips[$];
    int syms[$];
    byte unsigned pl[$];
    shortint x, y;
    int tau0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int r = 0; r < 3; r++) begin
      real f, th;
      pl = {};
      for (int i = 0; i < 10; i++) pl.push_back(8'($urandom));
      frame_symbols(pl, syms);
      spread(syms, chips);
      tau0 = $urandom_range(0, SPS - 1);
      f  = real'(int'($urandom_range(0, 120)) - 60) / 1000.0;
      th = real'($urandom_range(0, 628)) / 100.0;
      first_in = -1; first_out = -1;
      @(negedge clk) start = 1;
      @(negedge clk) start = 0;
      for (int s = 0; s < chips.size() * SPS; s++) begin
        int n;
        sample(chips, s, SPS, real'(tau0), f, th, 8000.0, 200.0, x, y);
        in_valid  = 1;
        in_phase  = phase_t'(turns32(real'(x), real'(y)));
        in_strobe = (s % SPS) == tau0;
        n = s / SPS;
        if (in_strobe && s >= SPS) begin
          exp_q.push_back(msk_equiv(n, chips[n], chips[n - 1]));
          if (first_in < 0) first_in = cyc;
        end
        @(negedge clk);
      end
      in_valid = 0;
      repeat (30) @(negedge clk);
      checks++;
      if (exp_q.size() != 0) begin failures++; $display("%0d bits missing", exp_q.size()); exp_q = {}; end
      checks++;
      if (first_out - first_in != 18) begin failures++; $display("latency %0d", first_out - first_in); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

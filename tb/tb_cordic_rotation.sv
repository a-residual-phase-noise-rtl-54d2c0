// tb_cordic_rotation: random angles, one per cycle, are compared with
// 16384*cos and 16384*sin; results must appear exactly 16 cycles later with
// their tag.
module tb_cordic_rotation;
  import rx_pkg::*;
  import tb_sig_pkg::*;
  logic clk = 0, rst_n = 0, in_valid = 0, out_valid;
  phase_t in_angle = '0;
  logic [3:0] in_tag = '0, out_tag;
  logic signed [15:0] out_cos, out_sin;
  int checks = 0, failures = 0, cyc = 0;
  localparam real PI = 3.14159265358979323846;

  cordic_rotation #(.OUT_W(16), .STAGES(16), .TAG_W(4), .AMP(16384)) dut (.*);
  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  typedef struct { longint unsigned a; int t; int cyc; } item_t;
  item_t q[$];

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < 2000; n++) begin
      @(negedge clk);
      in_valid = 1;
      in_angle = (n < 8) ? phase_t'(n) << 29 : phase_t'($urandom);
      in_tag = 4'(n);
      q.push_back('{64'(in_angle), n % 16, cyc});
    end
    @(negedge clk) in_valid = 0;
    repeat (40) @(posedge clk);
    checks++;
    if (q.size() != 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) if (rst_n && out_valid) begin
    item_t it;
    real a;
    it = q.pop_front();
    a = 2.0 * PI * real'(it.a) / 4294967296.0;
    checks++;
    if (fabs(real'(out_cos) - 16384.0 * $cos(a)) > 12.0 || fabs(real'(out_sin) - 16384.0 * $sin(a)) > 12.0) begin
      failures++;
      $display("angle %f: got %0d %0d want %f %f", a, out_cos, out_sin, 16384.0 * $cos(a), 16384.0 * $sin(a));
    end
    if (out_tag != 4'(it.t) || cyc - it.cyc != 16) begin
      failures++;
      $display("tag/latency mismatch %0d", cyc - it.cyc);
    end
  end
endmodule

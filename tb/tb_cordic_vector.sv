// tb_cordic_vector: random Cartesian inputs, one per cycle, are compared with
// atan2 and the scaled magnitude; the result must appear exactly 16 cycles
// after its input, with its tag.
module tb_cordic_vector;
  import rx_pkg::*;
  import tb_sig_pkg::*;
  logic clk = 0, rst_n = 0, in_valid = 0, out_valid;
  logic signed [15:0] in_x = '0, in_y = '0;
  logic [3:0] in_tag = '0, out_tag;
  phase_t out_phase;
  logic [17:0] out_mag;
  int checks = 0, failures = 0;
  int cyc = 0;

  cordic_vector #(.IN_W(16), .STAGES(16), .TAG_W(4)) dut (.*);
  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  typedef struct { int x; int y; int t; int cyc; } item_t;
  item_t q[$];

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < 2000; n++) begin
      @(negedge clk);
      in_valid = 1;
      in_x = 16'($urandom_range(0, 60000) - 30000);
      in_y = 16'($urandom_range(0, 60000) - 30000);
      if (n < 8) begin  // axes and quadrant corners
        in_x = (n % 2) ? 16'sd20000 : -16'sd20000;
        in_y = (n / 2 % 2) ? 16'sd0 : 16'sd100;
      end
      in_tag = 4'(n);
      q.push_back('{int'(in_x), int'(in_y), n % 16, cyc});
    end
    @(negedge clk) in_valid = 0;
    repeat (40) @(posedge clk);
    checks++;
    if (q.size() != 0) begin failures++; $display("%0d results missing", q.size()); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) if (rst_n && out_valid) begin
    item_t it;
    real mag, e;
    it = q.pop_front();
    checks++;
    e = pdiff(64'(out_phase), turns32(real'(it.x), real'(it.y)));
    mag = 1.646760258 * $sqrt(real'(it.x) ** 2 + real'(it.y) ** 2);
    if (fabs(e) > 1.0e-4 + 16.0 / (mag + 1.0)) begin
      failures++;
      $display("(%0d,%0d): phase error %f turns", it.x, it.y, e);
    end
    if (fabs(real'(out_mag) - mag) > 8.0 + mag * 1.0e-3) begin
      failures++;
      $display("(%0d,%0d): magnitude %0d want %f", it.x, it.y, out_mag, mag);
    end
    if (out_tag != 4'(it.t) || cyc - it.cyc != 16) begin
      failures++;
      $display("tag %0d/%0d latency %0d", out_tag, it.t, cyc - it.cyc);
    end
  end
endmodule

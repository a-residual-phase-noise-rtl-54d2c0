// tb_sample_mem: writes random I/Q pairs to random addresses of the sample
// memory, reads them back and checks the data and the one-cycle read latency.
module tb_sample_mem;
  import rx_pkg::*;
  localparam int AW = 10;
  logic clk = 0, wr_en = 0;
  logic [AW-1:0] wr_addr = '0, rd_addr = '0;
  sample_t wr_x = '0, wr_y = '0, rd_x, rd_y;
  int checks = 0, failures = 0;
  sample_t ref_x [2**AW];
  sample_t ref_y [2**AW];

  sample_mem #(.ADDR_W(AW)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int a = 0; a < 2**AW; a++) begin
      @(negedge clk);
      wr_en = 1; wr_addr = AW'(a);
      wr_x = sample_t'($urandom); wr_y = sample_t'($urandom);
      ref_x[a] = wr_x; ref_y[a] = wr_y;
    end
    @(negedge clk) wr_en = 0;
    for (int n = 0; n < 500; n++) begin
      int a;
      a = $urandom_range(0, 2**AW - 1);
      @(negedge clk) rd_addr = AW'(a);
      @(posedge clk); #1;
      checks++;
      if (rd_x !== ref_x[a] || rd_y !== ref_y[a]) begin
        failures++;
        $display("addr %0d: got %0d/%0d want %0d/%0d", a, rd_x, rd_y, ref_x[a], ref_y[a]);
      end
    end
    // overwrite one word while reading another: ports are independent
    @(negedge clk) begin wr_en = 1; wr_addr = 5; wr_x = 16'sd1234; wr_y = -16'sd1234; rd_addr = 7; end
    @(posedge clk); #1;
    checks++;
    if (rd_x !== ref_x[7]) failures++;
    @(negedge clk) begin wr_en = 0; rd_addr = 5; end
    @(posedge clk); #1;
    checks++;
    if (rd_x !== 16'sd1234 || rd_y !== -16'sd1234) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

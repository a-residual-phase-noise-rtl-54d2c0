// tb_sym_decoder: random symbols every 32 cycles; each must come out as four
// bits, least significant first, on the four cycles after it.
module tb_sym_decoder;
  logic clk = 0, rst_n = 0, sym_valid = 0, bit_valid, bit_out;
  logic [3:0] sym = '0;
  int checks = 0, failures = 0;
  bit exp_q[$];

  sym_decoder dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) if (rst_n && bit_valid) begin
    checks++;
    if (exp_q.size() == 0) failures++;
    else if (bit_out != exp_q.pop_front()) failures++;
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < 200; n++) begin
      @(negedge clk);
      sym_valid = 1;
      sym = 4'($urandom);
      for (int b = 0; b < 4; b++) exp_q.push_back(sym[b]);
      @(negedge clk) sym_valid = 0;
      // the four bits are registered on the four edges after the load
      repeat (5) @(posedge clk);
      #1 checks++;
      if (exp_q.size() != 0) begin failures++; $display("bits late"); end
      repeat ($urandom_range(0, 27)) @(posedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// sample_mem: the receiver's sample store ("external memory"), two memory
// blocks of equal depth, block 0 for the I rail and block 1 for the Q rail.
//
// The ADC side writes one I/Q pair per cycle at wr_addr when wr_en is high.
// The receiver side reads one pair per cycle: rd_x/rd_y hold the words at the
// address presented on the previous clock (one cycle of read latency, as an
// SRAM macro would give). Both ports are independent.
//
// The document names the two memory blocks and the 16-bit sample width; the
// depth (65536 pairs, enough for a 100-byte payload at 8 samples per chip) and
// the one-cycle synchronous read are choices of this design.
module sample_mem
  import rx_pkg::*;
#(
  parameter int unsigned ADDR_W = 16
) (
  input  logic              clk,
  input  logic              wr_en,
  input  logic [ADDR_W-1:0] wr_addr,
  input  sample_t           wr_x,
  input  sample_t           wr_y,
  input  logic [ADDR_W-1:0] rd_addr,
  output sample_t           rd_x,
  output sample_t           rd_y
);
  sample_t mem_i [2**ADDR_W];   // memory block 0
  sample_t mem_q [2**ADDR_W];   // memory block 1

  always_ff @(posedge clk) begin
    if (wr_en) begin
      mem_i[wr_addr] <= wr_x;
      mem_q[wr_addr] <= wr_y;
    end
    rd_x <= mem_i[rd_addr];
    rd_y <= mem_q[rd_addr];
  end
endmodule

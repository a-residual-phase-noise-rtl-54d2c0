// sym_decoder: symbol-to-bit conversion ("decoding") towards the MAC layer.
//
// Each 4-bit symbol from the despreader is sent out as four serial bits,
// least significant bit first as IEEE 802.15.4 orders them, one bit per
// clock, starting the cycle after sym_valid. A symbol arrives at most once
// per 32 chips, far slower than the four cycles needed, so no back-pressure
// is provided; an assertion checks that a symbol never arrives while the
// previous one is still being sent.
//
// The document names the block and its function (symbol to bit conversion);
// the serial format is this design's choice.
module sym_decoder (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       sym_valid,
  input  logic [3:0] sym,
  output logic       bit_valid,
  output logic       bit_out
);
  logic [3:0] sh;
  logic [2:0] left;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sh <= '0; left <= '0; bit_valid <= 1'b0; bit_out <= 1'b0;
    end else begin
      bit_valid <= 1'b0;
      if (sym_valid) begin
        sh   <= sym;
        left <= 3'd4;
      end else if (left != 0) begin
        bit_valid <= 1'b1;
        bit_out   <= sh[0];
        sh        <= sh >> 1;
        left      <= left - 1'b1;
      end
    end
  end

  a_no_overrun: assert property (@(posedge clk) disable iff (!rst_n)
    sym_valid |-> left == 0)
    else $error("sym_decoder: symbol arrived while the previous one was still being sent");
endmodule

// preamble_det: sliding preamble correlator with threshold comparator, used
// by both demodulator chains.
//
// Detected chip bits enter a 128-bit shift register. From the 128th bit on,
// every new bit gives a score: the number of positions where the register
// agrees with the reference preamble (a 128-bit XNOR and an adder tree).
// When allow_inv is set the score is also taken against the inverted
// reference and the better of the two wins; the coherent chain needs this
// because its phase estimate is only known up to half a turn. The highest score
// (the correlation peak) and its bit index are kept. Once a score reaches
// thr_detect, done pulses with found = 1 as soon as WIN bits have passed
// without a higher score, so a false alignment that just crosses the
// threshold does not hide the true peak that follows it. If bit_limit bits pass without a
// crossing, done pulses with found = 0 and the best score seen. The peak score
// doubles as the channel-quality indicator of the automatic mode.
//
// Interface: pulse start, then bits on bit_valid. peak_idx counts bits from
// 0, so the payload begins at bit peak_idx + 1. Timing: one bit per cycle,
// scores registered, done one cycle after the deciding bit.
//
// From the document: the 128-bit register, the XOR correlation with the
// reference preamble, the adder and threshold comparator, the thresholds 80
// (frame rejected below it) and 110 (mode decision). The peak window, the
// inverted-reference test and the search limit are this design's choices.
module preamble_det
  import rx_pkg::*;
#(
  parameter int unsigned WIN   = 32,
  parameter int unsigned IDX_W = 16
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic                   start,
  input  logic [PRE_BITS-1:0]    ref_bits,
  input  logic                   allow_inv,
  input  logic [7:0]             thr_detect,
  input  logic [IDX_W-1:0]       bit_limit,
  input  logic                   bit_valid,
  input  logic                   bit_in,
  output logic                   done,
  output logic                   found,
  output logic [7:0]             peak_score,
  output logic [IDX_W-1:0]       peak_idx,
  output logic                   peak_inv
);
  logic [PRE_BITS-1:0] sr, sr_next;
  logic [IDX_W-1:0]    nbits;
  logic                busy, armed;
  logic [$clog2(WIN+1)-1:0] wcnt;

  logic [7:0] s_pos, s_neg, score;
  logic       inv;
  always_comb begin
    sr_next = {sr[PRE_BITS-2:0], bit_in};
    s_pos = '0;
    for (int i = 0; i < int'(PRE_BITS); i++) s_pos += {7'b0, sr_next[i] ~^ ref_bits[i]};
    s_neg = 8'(PRE_BITS) - s_pos;
    inv   = allow_inv && (s_neg > s_pos);
    score = inv ? s_neg : s_pos;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sr <= '0; nbits <= '0; busy <= 1'b0; armed <= 1'b0; wcnt <= '0;
      done <= 1'b0; found <= 1'b0; peak_score <= '0; peak_idx <= '0; peak_inv <= 1'b0;
    end else begin
      done <= 1'b0;
      if (start) begin
        busy <= 1'b1; armed <= 1'b0; nbits <= '0; wcnt <= '0;
        found <= 1'b0; peak_score <= '0; peak_idx <= '0; peak_inv <= 1'b0;
      end else if (busy && bit_valid) begin
        sr    <= sr_next;
        nbits <= nbits + 1'b1;
        if (nbits >= IDX_W'(PRE_BITS - 1)) begin
          if (score > peak_score) begin
            peak_score <= score;
            peak_idx   <= nbits;
            peak_inv   <= inv;
          end
          if (armed) begin
            // the window restarts at every new peak
            if (score > peak_score) wcnt <= '0;
            else if (wcnt == ($clog2(WIN+1))'(WIN - 1)) begin
              busy <= 1'b0; done <= 1'b1; found <= 1'b1;
            end else wcnt <= wcnt + 1'b1;
          end else if (score >= thr_detect) begin
            armed <= 1'b1;
            wcnt  <= '0;
          end
        end
        if (!armed && nbits == bit_limit - 1'b1) begin
          busy <= 1'b0; done <= 1'b1; found <= 1'b0;
        end
      end
    end
  end
endmodule

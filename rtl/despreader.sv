// despreader: DSSS de-spreading shared by both chains.
//
// Chip bits enter a 32-bit shift register. On every 32nd bit the register is
// matched against the sixteen 32-chip reference sequences at once (XNOR and
// population count per reference) and the closest one wins; the winner gives
// the 4-bit symbol and, from the DSSS look-up table, its clean O-QPSK chip
// sequence, which the residual phase noise compensator uses as corrected
// decisions. In the non-coherent (MSK) chain the references are the
// MSK-equivalent sequences and chip 0, which depends on the previous symbol,
// is not compared. A threshold comparator flags symbols whose best match
// falls below SYM_THR agreeing chips.
//
// Interface: pulse start at a symbol boundary, then bits on bit_valid;
// chain selects the reference set. sym_valid pulses one cycle after the 32nd
// bit with sym, chips (O-QPSK sequence of sym, c_0 in bit 31), score and
// sym_ok. Ties go to the lower symbol value.
//
// From the document: the 32-bit shift register, the sixteen references, the
// look-up table feeding the compensator, the chip-to-symbol mapping and a
// threshold comparator. The parallel match and the value 27 for SYM_THR
// (five chip errors, the number the document says the code corrects) are
// this design's choices.
module despreader
  import rx_pkg::*;
#(
  parameter int unsigned SYM_THR = 27
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        start,
  input  chain_e      chain,
  input  logic        bit_valid,
  input  logic        bit_in,
  output logic        sym_valid,
  output logic [3:0]  sym,
  output chipseq_t    chips,
  output logic [5:0]  score,
  output logic        sym_ok
);
  chipseq_t   sr, sr_next;
  logic [4:0] cnt;

  assign sr_next = {sr[30:0], bit_in};

  logic [5:0] sc   [16];
  logic [5:0] best_sc;
  logic [3:0] best;
  always_comb begin
    for (int s = 0; s < 16; s++) begin
      chipseq_t r, m;
      r = (chain == CHAIN_MSK) ? msk_seq(4'(s)) : chip_seq(4'(s));
      m = ~(sr_next ^ r);
      if (chain == CHAIN_MSK) m[31] = 1'b0;
      sc[s] = '0;
      for (int b = 0; b < 32; b++) sc[s] += {5'b0, m[b]};
    end
    best = '0;
    best_sc = sc[0];
    for (int s = 1; s < 16; s++)
      if (sc[s] > best_sc) begin
        best = 4'(s);
        best_sc = sc[s];
      end
  end

  // the MSK chain compares 31 chips, so its threshold is one lower
  logic [5:0] thr;
  assign thr = (chain == CHAIN_MSK) ? 6'(SYM_THR - 1) : 6'(SYM_THR);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sr <= '0; cnt <= '0; sym_valid <= 1'b0; sym <= '0;
      chips <= '0; score <= '0; sym_ok <= 1'b0;
    end else begin
      sym_valid <= 1'b0;
      if (start) begin
        cnt <= '0;
      end else if (bit_valid) begin
        sr  <= sr_next;
        cnt <= cnt + 1'b1;
        if (cnt == 5'd31) begin
          sym_valid <= 1'b1;
          sym       <= best;
          chips     <= chip_seq(best);
          score     <= best_sc;
          sym_ok    <= best_sc >= thr;
        end
      end
    end
  end
endmodule

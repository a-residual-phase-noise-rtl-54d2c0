// rpnc: DSSS-aided residual phase noise compensator of the coherent chain.
//
// After coarse compensation a small frequency error remains and the chip
// phases keep drifting over a long frame. Instead of referencing every chip to
// the start of the frame, each chip k is re-estimated from its N_RCFO
// predecessors:
//   phi_hat_(k,i) = phi_z(k) + [phi_xhat(k-i) - phi_z(k-i)] - i*v_hat,
// i = 1..N_RCFO. The bracketed terms live in register bank 0 (a window over
// the last N_RCFO chips), i*v_hat in register bank 1; the N_RCFO sums are
// formed in parallel, each is decided by the quadrant rule and
// the chip bit is the majority (mode) of the N_RCFO decisions (a tie
// takes the decision from the nearest chip). A chip's ideal phase from that
// decision enters bank 0 at once. When the despreader has matched the whole
// 32-chip symbol, its clean chip sequence replaces the decided bits of that
// symbol in bank 0, so later chips are referenced to corrected decisions.
// The rewrite is made only when the despreader trusts its match (corr_ok);
// a weak match keeps the compensator's own decisions, so one wrong symbol
// does not corrupt the reference of the following chips.
// The raw phases of the last two symbols are kept for that rewrite.
//
// The first 32 chips after start are a training symbol with known chips
// (the last preamble symbol, symbol 0): they fill bank 0 and are not sent to
// the despreader.
//
// Interface: pulse start (loads bank 1 from v_hat), then one raw chip phase
// per in_valid, the first 32 being training chips; chip_valid/chip_bit go to
// the despreader one cycle later; corr_valid/corr_chips bring the corrected
// sequence back with its trust flag corr_ok, at most 16 chips after the
// symbol's last chip.
//
// From the document: the per-predecessor estimates and their majority, the two register banks, the N_RCFO-wide
// majority decision, the write-back of the look-up-table chips, N_RCFO = 16.
// The training symbol, the corr_ok gate, the tie rule and the one-chip-per-cycle parallel
// datapath (3*N_RCFO adders) are this design's choices.
module rpnc
  import rx_pkg::*;
#(
  parameter int unsigned N_RCFO = 16
) (
  input  logic     clk,
  input  logic     rst_n,
  input  logic     start,
  input  phase_t   v_hat,
  input  logic     in_valid,
  input  phase_t   in_phase,
  output logic     chip_valid,
  output logic     chip_bit,
  input  logic     corr_valid,
  input  logic     corr_ok,
  input  chipseq_t corr_chips
);
  localparam int unsigned CW = $clog2(N_RCFO + 1);

  phase_t     bank0 [N_RCFO];   // phi_xhat(k-1-i) - phi_z(k-1-i)
  phase_t     bank1 [N_RCFO];   // (i+1) * v_hat
  phase_t     zbuf  [2][CHIPS]; // raw phases, two symbols
  logic       zsel;             // buffer of the symbol being received
  logic [4:0] j;                // chip position within the symbol
  logic       train;
  logic [4:0] since;            // chips received since the last symbol ended
  logic       wait_corr;

  // bank 0 with a pending correction applied
  phase_t bank_c [N_RCFO];
  always_comb begin
    for (int i = 0; i < int'(N_RCFO); i++) begin
      int t;
      t = i - int'(since);      // chip 31-t of the previous symbol
      bank_c[i] = bank0[i];
      if (corr_valid && corr_ok && t >= 0 && t < int'(CHIPS))
        bank_c[i] = chip_phase(31 - t, corr_chips[t]) - zbuf[~zsel][31 - t];
    end
  end

  // N_RCFO estimates, decisions and their majority
  phase_t        est [N_RCFO];
  logic [CW-1:0] ones;
  logic          dec, bit_k;
  always_comb begin
    ones = '0;
    for (int i = 0; i < int'(N_RCFO); i++) begin
      est[i] = in_phase + bank_c[i] - bank1[i];
      ones  += CW'(chip_decide(j[0], est[i]));
    end
    if (2 * int'(ones) > int'(N_RCFO))      dec = 1'b1;
    else if (2 * int'(ones) < int'(N_RCFO)) dec = 1'b0;
    else                                    dec = chip_decide(j[0], est[0]);
    bit_k = train ? SYM0_CHIPS[31 - j] : dec;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      j <= '0; train <= 1'b0; since <= '0; zsel <= 1'b0; wait_corr <= 1'b0;
      chip_valid <= 1'b0; chip_bit <= 1'b0;
      for (int i = 0; i < int'(N_RCFO); i++) begin
        bank0[i] <= '0;
        bank1[i] <= '0;
      end
    end else begin
      chip_valid <= 1'b0;
      if (start) begin
        j <= '0; train <= 1'b1; since <= '0; zsel <= 1'b0; wait_corr <= 1'b0;
        for (int i = 0; i < int'(N_RCFO); i++) begin
          bank0[i] <= '0;
          bank1[i] <= phase_t'(i + 1) * v_hat;
        end
      end else begin
        if (corr_valid) wait_corr <= 1'b0;
        if (in_valid) begin
          bank0[0] <= chip_phase(int'(j), bit_k) - in_phase;
          for (int i = 1; i < int'(N_RCFO); i++) bank0[i] <= bank_c[i-1];
          zbuf[zsel][j] <= in_phase;
          chip_valid <= ~train;
          chip_bit   <= bit_k;
          j     <= j + 1'b1;
          since <= since + 1'b1;
          if (j == 5'd31) begin
            zsel  <= ~zsel;
            since <= '0;
            train <= 1'b0;
            wait_corr <= ~train;
          end
        end else begin
          for (int i = 0; i < int'(N_RCFO); i++) bank0[i] <= bank_c[i];
        end
      end
    end
  end

  a_corr_in_time: assert property (@(posedge clk) disable iff (!rst_n)
    wait_corr |-> since < 5'd16)
    else $error("rpnc: corrected chips arrived too late");
endmodule

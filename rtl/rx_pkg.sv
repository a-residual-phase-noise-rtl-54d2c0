// rx_pkg: types, widths and constant tables shared by the dual-mode
// IEEE 802.15.4 (2.4 GHz O-QPSK) baseband receiver.
//
// Phases are unsigned fractions of a full turn: a PHASE_W-bit value p stands
// for 2*pi*p/2**PHASE_W, so adding and subtracting phases wraps for free.
// Chip vectors are kept "first chip in the MSB": bit (31-n) holds chip c_n,
// which is the order a left-shifting 32-bit register ends up with.
//
// The sixteen chip sequences are those of the IEEE 802.15.4 2.4 GHz PHY:
// symbols 1..7 are symbol 0 rotated by 4*s chips, symbols 8..15 are symbols
// 0..7 with every odd-indexed chip inverted. The MSK-equivalent sequences
// used by the non-coherent chain follow from the half-sine O-QPSK phase
// trajectory: for chip n the phase step from chip n-1 has sin() > 0 exactly
// when b_n = 0, with b_n = c_n ^ c_(n-1) for odd n and ~(c_n ^ c_(n-1)) for
// even n (even chips ride on I, odd chips on Q).
package rx_pkg;

  localparam int unsigned PHASE_W  = 32;  // phase word, full turn = 2**32
  localparam int unsigned SAMPLE_W = 16;  // ADC sample width per rail
  localparam int unsigned CHIPS    = 32;  // chips per 4-bit symbol
  localparam int unsigned PRE_BITS = 128; // preamble correlator length

  typedef logic [PHASE_W-1:0]         phase_t;
  typedef logic signed [SAMPLE_W-1:0] sample_t;
  typedef logic [CHIPS-1:0]           chipseq_t;

  typedef enum logic {CHAIN_MSK = 1'b0, CHAIN_OQPSK = 1'b1} chain_e;

  // Chip sequence of symbol 0, c_0 in bit 31.
  localparam chipseq_t SYM0_CHIPS = 32'hD9C3522E;

  function automatic chipseq_t chip_seq(input logic [3:0] sym);
    chipseq_t v;
    v = SYM0_CHIPS;
    for (int r = 0; r < 8; r++)
      if (r < int'(sym[2:0])) v = {v[3:0], v[31:4]};
    if (sym[3]) v = v ^ 32'h5555_5555;
    return v;
  endfunction

  // MSK-equivalent bit of chip n given the chip itself and its predecessor.
  function automatic logic msk_bit(input int n, input logic c, input logic c_prev);
    return (n % 2 == 1) ? (c ^ c_prev) : ~(c ^ c_prev);
  endfunction

  // MSK-equivalent sequence of a symbol. Chip 0 depends on the last chip of
  // the preceding symbol; it is computed here as if the symbol repeated
  // itself and callers that do not know the predecessor mask bit 31.
  function automatic chipseq_t msk_seq(input logic [3:0] sym);
    chipseq_t c, m;
    c = chip_seq(sym);
    for (int n = 0; n < 32; n++)
      m[31-n] = msk_bit(n, c[31-n], c[31-((n+31)%32)]);
    return m;
  endfunction

  // 128-chip preamble references: four repetitions of symbol 0.
  function automatic logic [PRE_BITS-1:0] oqpsk_preamble();
    return {4{chip_seq(4'd0)}};
  endfunction

  function automatic logic [PRE_BITS-1:0] msk_preamble();
    return {4{msk_seq(4'd0)}};
  endfunction

  // Ideal phase of chip c at position n of a symbol: I chips at 0 or 1/2
  // turn, Q chips at +1/4 or -1/4 turn.
  function automatic phase_t chip_phase(input int n, input logic c);
    if (n % 2 == 0) return c ? phase_t'(0) : phase_t'(1) << (PHASE_W-1);
    else            return c ? phase_t'(1) << (PHASE_W-2) : phase_t'(3) << (PHASE_W-2);
  endfunction

  // Decision rule: I chips by the sign of cos, Q chips by sin.
  function automatic logic chip_decide(input logic odd, input phase_t p);
    if (!odd) return p[PHASE_W-1] == p[PHASE_W-2]; // within (-1/4, 1/4) turn
    else      return ~p[PHASE_W-1];                // within (0, 1/2) turn
  endfunction

endpackage

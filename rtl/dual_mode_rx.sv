// dual_mode_rx: dual-mode IEEE 802.15.4 (2.4 GHz O-QPSK) digital baseband
// receiver with residual phase noise compensation.
//
// The same received signal can be demodulated two ways. The coherent O-QPSK
// chain (coarse FFT-based offset estimate, initial compensation and preamble
// detection, DSSS-aided residual phase noise compensation) performs well at
// low SNR but costs more; the non-coherent MSK chain (differential phase
// detection, preamble detection) is cheaper and enough on a good channel. Both
// end in the shared despreader and symbol-to-bit decoder. All blocks read the
// sample memory through the memory controller and share one vectoring and one
// rotation CORDIC. In manual mode the chain is chosen from outside; in
// automatic mode the preamble correlation peak picks it (below 110 of 128:
// coherent, otherwise MSK).
//
// Interface: the ADC side writes I/Q pairs (adc_*) into the sample memory at
// SPS samples per chip. Pulse frame_start with the frame's first sample
// address and length; the receiver reports the 4-bit symbols (sym_*) and the
// data bits (data_*, least significant bit of each symbol first), then
// pulses frame_done (with frame_lost if no preamble was found). Status
// outputs tell the chain used, the preamble score, the payload address, the
// timing offset and the held coarse estimate. One clock domain; the
// document's system clock is 16 MHz, which gives SPS = 8 at 2 Mchip/s.
//
// The block structure follows the document's architecture; the ADCs are
// outside the design. Sharing one despreader and one decoder between the
// chains, the payload address rule and the tag-routed CORDIC sharing are
// this design's choices. Some block outputs are left unused here: the
// CORDIC magnitude, the FFT peak bin, the MSK detector's inversion flag, the
// O-QPSK chip stream of the preamble search and the despreader score (kept
// for observation). The low 21 bits of v_hat are always zero (FFT
// resolution).
module dual_mode_rx
  import rx_pkg::*;
#(
  parameter int unsigned ADDR_W       = 16,
  parameter int unsigned SPS          = 8,
  parameter int unsigned N_RCFO       = 16,
  parameter int unsigned NFFT         = 1024,
  parameter int unsigned NQ           = 128,
  parameter int unsigned STR_CHIPS    = 128,
  parameter int unsigned SEARCH_CHIPS = 320
) (
  input  logic                   clk,
  input  logic                   rst_n,
  // ADC side of the sample memory
  input  logic                   adc_valid,
  input  logic [ADDR_W-1:0]      adc_addr,
  input  sample_t                adc_i,
  input  sample_t                adc_q,
  // frame and mode control
  input  logic                   frame_start,
  input  logic [ADDR_W-1:0]      frame_base,
  input  logic [ADDR_W-1:0]      frame_len,
  input  logic                   manual_mode,
  input  chain_e                 manual_chain,
  input  logic                   cfo_req,
  // status
  output logic                   busy,
  output logic                   frame_done,
  output logic                   frame_lost,
  output chain_e                 chain_used,
  output logic                   mode_switch,
  output logic                   cfo_run,
  output logic [7:0]             pd_score,
  output logic [ADDR_W-1:0]      payload_addr,
  output logic [$clog2(SPS)-1:0] tau,
  output phase_t                 v_hat,
  output phase_t                 theta_hat,
  // received data
  output logic                   sym_valid,
  output logic [3:0]             sym,
  output logic                   sym_ok,
  output logic                   data_valid,
  output logic                   data_bit
);
  // sample memory
  logic [ADDR_W-1:0] rd_addr;
  sample_t           rd_x, rd_y;

  sample_mem #(.ADDR_W(ADDR_W)) u_mem (
    .clk, .wr_en(adc_valid), .wr_addr(adc_addr), .wr_x(adc_i), .wr_y(adc_q),
    .rd_addr, .rd_x, .rd_y
  );

  // shared CORDICs
  logic          cv_valid, cv_out_valid;
  sample_t       cv_x, cv_y;
  logic [3:0]    cv_tag, cv_out_tag;
  phase_t        cv_out_phase;
  logic [17:0]   cv_out_mag;

  cordic_vector #(.IN_W(SAMPLE_W), .STAGES(16), .TAG_W(4)) u_cv (
    .clk, .rst_n, .in_valid(cv_valid), .in_x(cv_x), .in_y(cv_y), .in_tag(cv_tag),
    .out_valid(cv_out_valid), .out_phase(cv_out_phase), .out_mag(cv_out_mag),
    .out_tag(cv_out_tag)
  );

  logic               rot_valid, rot_out_valid;
  phase_t             rot_angle;
  logic [1:0]         rot_tag, rot_out_tag;
  logic signed [15:0] rot_cos, rot_sin;

  cordic_rotation #(.OUT_W(16), .STAGES(16), .TAG_W(2)) u_cr (
    .clk, .rst_n, .in_valid(rot_valid), .in_angle(rot_angle), .in_tag(rot_tag),
    .out_valid(rot_out_valid), .out_cos(rot_cos), .out_sin(rot_sin), .out_tag(rot_out_tag)
  );

  // controller <-> blocks
  logic str_start, str_valid, str_done;
  logic [$clog2(SPS)-1:0] str_tau;
  logic cfo_start, cfo_valid, cfo_done;
  phase_t cfo_v_hat;
  logic [$clog2(NFFT)-1:0] cfo_bin;
  logic signed [15:0] cfo_px, cfo_py;
  logic ioc_start, ioc_valid, ioc_done, ioc_found, ioc_inv;
  logic [ADDR_W-1:0] search_chips, ioc_idx, mpd_idx;
  logic [7:0] thr_detect, ioc_score, mpd_score;
  logic rpnc_start, rpnc_valid;
  logic dpd_start, dpd_valid, dpd_strobe, dpd_rot_valid;
  phase_t dpd_rot_angle;
  logic [1:0] dpd_rot_tag;
  logic mpd_start, mpd_run, mpd_done, mpd_found, mpd_inv;
  logic dsp_start;
  chain_e dsp_chain;

  mem_ctrl #(
    .ADDR_W(ADDR_W), .SPS(SPS), .STR_CHIPS(STR_CHIPS), .NQ(NQ), .SEARCH_CHIPS(SEARCH_CHIPS)
  ) u_ctrl (
    .clk, .rst_n,
    .frame_start, .frame_base, .frame_len, .manual_mode, .manual_chain, .cfo_req,
    .busy, .frame_done, .frame_lost, .chain_used, .mode_switch, .cfo_run, .pd_score,
    .payload_addr, .frame_tau(tau),
    .rd_addr, .rd_x, .rd_y,
    .cv_valid, .cv_x, .cv_y, .cv_tag, .cv_out_valid, .cv_out_phase, .cv_out_tag,
    .rot_valid, .rot_angle, .rot_tag, .rot_out_valid, .rot_out_tag,
    .dpd_rot_valid, .dpd_rot_angle, .dpd_rot_tag,
    .str_start, .str_valid, .str_done, .str_tau,
    .cfo_start, .cfo_valid, .cfo_done, .cfo_v_hat, .cfo_peak_x(cfo_px), .cfo_peak_y(cfo_py),
    .v_hat, .theta_hat,
    .ioc_start, .ioc_valid, .search_chips, .thr_detect, .ioc_done, .ioc_found, .ioc_score,
    .ioc_idx, .ioc_inv,
    .rpnc_start, .rpnc_valid,
    .dpd_start, .dpd_valid, .dpd_strobe, .mpd_start, .mpd_run, .mpd_done, .mpd_found,
    .mpd_score, .mpd_idx,
    .dsp_start, .dsp_chain
  );

  // symbol timing recovery
  str_est #(.SPS(SPS), .NCHIP(STR_CHIPS)) u_str (
    .clk, .rst_n, .start(str_start), .in_valid(str_valid), .in_phase(cv_out_phase),
    .done(str_done), .tau(str_tau)
  );

  // O-QPSK chain
  cfo_est #(.NFFT(NFFT), .NQ(NQ)) u_cfo (
    .clk, .rst_n, .start(cfo_start), .in_valid(cfo_valid), .in_re(rot_cos), .in_im(rot_sin),
    .done(cfo_done), .v_hat(cfo_v_hat), .peak_bin(cfo_bin), .peak_x(cfo_px), .peak_y(cfo_py)
  );

  logic ioc_bit_valid, ioc_bit;
  ioc_pd #(.IDX_W(ADDR_W)) u_ioc (
    .clk, .rst_n, .start(ioc_start), .v_hat, .theta_hat, .thr_detect,
    .chip_limit(search_chips), .in_valid(ioc_valid), .in_phase(cv_out_phase),
    .bit_valid(ioc_bit_valid), .bit_out(ioc_bit),
    .done(ioc_done), .found(ioc_found), .peak_score(ioc_score), .peak_idx(ioc_idx),
    .peak_inv(ioc_inv)
  );

  logic     rpnc_chip_valid, rpnc_chip;
  logic     dsp_sym_valid;
  chipseq_t dsp_chips;
  rpnc #(.N_RCFO(N_RCFO)) u_rpnc (
    .clk, .rst_n, .start(rpnc_start), .v_hat, .in_valid(rpnc_valid), .in_phase(cv_out_phase),
    .chip_valid(rpnc_chip_valid), .chip_bit(rpnc_chip),
    .corr_valid(dsp_sym_valid && dsp_chain == CHAIN_OQPSK), .corr_ok(sym_ok), .corr_chips(dsp_chips)
  );

  // MSK chain
  logic dpd_bit_valid, dpd_bit;
  dpd #(.DLY(SPS)) u_dpd (
    .clk, .rst_n, .start(dpd_start), .in_valid(dpd_valid), .in_strobe(dpd_strobe),
    .in_phase(cv_out_phase),
    .rot_valid(dpd_rot_valid), .rot_angle(dpd_rot_angle), .rot_tag(dpd_rot_tag),
    .rot_out_valid, .rot_out_sin(rot_sin), .rot_out_tag,
    .bit_valid(dpd_bit_valid), .bit_out(dpd_bit)
  );

  preamble_det #(.IDX_W(ADDR_W)) u_mpd (
    .clk, .rst_n, .start(mpd_start), .ref_bits(msk_preamble()), .allow_inv(1'b0),
    .thr_detect, .bit_limit(search_chips), .bit_valid(dpd_bit_valid && mpd_run),
    .bit_in(dpd_bit), .done(mpd_done), .found(mpd_found), .peak_score(mpd_score),
    .peak_idx(mpd_idx), .peak_inv(mpd_inv)
  );

  // shared despreader and decoder
  logic       dsp_bit_valid, dsp_bit;
  logic [5:0] dsp_score;
  assign dsp_bit_valid = (dsp_chain == CHAIN_MSK) ? (dpd_bit_valid && !mpd_run) : rpnc_chip_valid;
  assign dsp_bit       = (dsp_chain == CHAIN_MSK) ? dpd_bit : rpnc_chip;

  despreader u_dsp (
    .clk, .rst_n, .start(dsp_start), .chain(dsp_chain), .bit_valid(dsp_bit_valid),
    .bit_in(dsp_bit), .sym_valid(dsp_sym_valid), .sym, .chips(dsp_chips),
    .score(dsp_score), .sym_ok
  );
  assign sym_valid = dsp_sym_valid;

  sym_decoder u_dec (
    .clk, .rst_n, .sym_valid(dsp_sym_valid), .sym, .bit_valid(data_valid), .bit_out(data_bit)
  );
endmodule

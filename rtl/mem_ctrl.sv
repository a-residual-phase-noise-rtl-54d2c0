// mem_ctrl: memory controller and mode control of the dual-mode receiver.
//
// A frame of samples (SPS per chip) sits in the sample memory. The controller
// reads it once per processing step, one sample per clock, and pushes every
// sample through the shared vectoring CORDIC; the CORDIC tag says which block
// the resulting phase is for, so the blocks share one CORDIC without a
// second arbiter. It also owns the shared rotation CORDIC: it feeds it the
// doubled phases for the coarse offset estimator and passes the differential
// detector's requests through.
//
// Steps of one frame:
//   1. timing recovery: (STR_CHIPS+1)*SPS samples to str_est, giving tau;
//      later steps read chip samples at base + tau + SPS*k.
//   2. chain choice: manual mode takes manual_chain; automatic mode starts
//      every receiver life in the MSK chain and keeps the last chain used.
//   MSK chain
//   3m. all samples of the preamble region to the differential detector and
//      the MSK preamble correlator. Automatic mode: a peak score below
//      THR_MODE (110) switches to the O-QPSK chain for this same frame.
//      Manual mode: no peak at THR_DETECT (80) loses the frame.
//   4m. all samples from the payload start to the frame end to the
//      differential detector; its bits go to the despreader.
//   O-QPSK chain
//   3o. when no estimate is held or cfo_req is set: NQ chip samples, doubled
//      phase, rotation CORDIC, FFT estimator, then the FFT peak through the
//      vectoring CORDIC for theta_hat = arg/2. The estimate is kept for
//      later frames.
//   4o. chip samples of the preamble region to the offset compensator and
//      its correlator. No peak at THR_DETECT: frame lost. Automatic mode: a
//      peak at or above THR_MODE sends the next frame to the MSK chain.
//   5o. chip samples from one symbol before the payload (the training symbol)
//      to the frame end to the residual phase noise compensator, whose chip
//      decisions go to the despreader.
// frame_done pulses at the end; frame_lost with it when no preamble was found.
//
// From the document: the controller's role (memory accesses of all blocks,
// mode switching), manual and automatic modes, starting in MSK, switching on
// the preamble correlation peak with thresholds 110 and 80, reusing the
// coarse estimate over a burst, and once tau is known bypassing timing
// recovery: every later step reads only what it needs at base + tau. The
// step order, the tag scheme, the search length and the drain time are
// this design's choices. search_chips and thr_detect are constants handed
// to the detectors.
module mem_ctrl
  import rx_pkg::*;
#(
  parameter int unsigned ADDR_W       = 16,
  parameter int unsigned SPS          = 8,
  parameter int unsigned STR_CHIPS    = 128,
  parameter int unsigned NQ           = 128,
  parameter int unsigned SEARCH_CHIPS = 320,
  parameter int unsigned THR_DETECT   = 80,
  parameter int unsigned THR_MODE     = 110,
  parameter int unsigned DRAIN        = 64
) (
  input  logic                   clk,
  input  logic                   rst_n,
  // frame and mode control
  input  logic                   frame_start,
  input  logic [ADDR_W-1:0]      frame_base,
  input  logic [ADDR_W-1:0]      frame_len,
  input  logic                   manual_mode,
  input  chain_e                 manual_chain,
  input  logic                   cfo_req,
  output logic                   busy,
  output logic                   frame_done,
  output logic                   frame_lost,
  output chain_e                 chain_used,
  output logic                   mode_switch,   // pulse: automatic chain change
  output logic                   cfo_run,       // pulse: coarse estimate taken
  output logic [7:0]             pd_score,
  output logic [ADDR_W-1:0]      payload_addr,
  output logic [$clog2(SPS)-1:0] frame_tau,
  // sample memory read port (one cycle latency)
  output logic [ADDR_W-1:0]      rd_addr,
  input  sample_t                rd_x,
  input  sample_t                rd_y,
  // shared vectoring CORDIC
  output logic                   cv_valid,
  output sample_t                cv_x,
  output sample_t                cv_y,
  output logic [3:0]             cv_tag,
  input  logic                   cv_out_valid,
  input  phase_t                 cv_out_phase,
  input  logic [3:0]             cv_out_tag,
  // shared rotation CORDIC
  output logic                   rot_valid,
  output phase_t                 rot_angle,
  output logic [1:0]             rot_tag,
  input  logic                   rot_out_valid,
  input  logic [1:0]             rot_out_tag,
  input  logic                   dpd_rot_valid,
  input  phase_t                 dpd_rot_angle,
  input  logic [1:0]             dpd_rot_tag,
  // timing recovery
  output logic                   str_start,
  output logic                   str_valid,
  input  logic                   str_done,
  input  logic [$clog2(SPS)-1:0] str_tau,
  // coarse offset estimation
  output logic                   cfo_start,
  output logic                   cfo_valid,
  input  logic                   cfo_done,
  input  phase_t                 cfo_v_hat,
  input  logic signed [15:0]     cfo_peak_x,
  input  logic signed [15:0]     cfo_peak_y,
  output phase_t                 v_hat,
  output phase_t                 theta_hat,
  // initial offset compensation and preamble detection
  output logic                   ioc_start,
  output logic                   ioc_valid,
  output logic [ADDR_W-1:0]      search_chips,
  output logic [7:0]             thr_detect,
  input  logic                   ioc_done,
  input  logic                   ioc_found,
  input  logic [7:0]             ioc_score,
  input  logic [ADDR_W-1:0]      ioc_idx,
  input  logic                   ioc_inv,
  // residual phase noise compensation
  output logic                   rpnc_start,
  output logic                   rpnc_valid,
  // differential detection and MSK preamble detection
  output logic                   dpd_start,
  output logic                   dpd_valid,
  output logic                   dpd_strobe,
  output logic                   mpd_start,
  output logic                   mpd_run,
  input  logic                   mpd_done,
  input  logic                   mpd_found,
  input  logic [7:0]             mpd_score,
  input  logic [ADDR_W-1:0]      mpd_idx,
  // despreader
  output logic                   dsp_start,
  output chain_e                 dsp_chain
);
  localparam int unsigned OW = $clog2(SPS);
  typedef enum logic [2:0] {D_NONE, D_STR, D_CFO, D_IOC, D_RPNC, D_DPD, D_THETA} dest_e;

  typedef enum logic [3:0] {
    S_IDLE, S_STR, S_CHOOSE, S_MSK_PD, S_MSK_DATA, S_CFO, S_THETA_W,
    S_IOC, S_RPNC, S_DRAIN, S_DONE
  } state_e;
  state_e state;

  // frame registers
  logic [ADDR_W-1:0] base, len;
  logic [OW-1:0]     tau;
  chain_e            cur_chain;     // automatic mode's current chain
  logic              est_held;      // a coarse estimate is held
  logic              cfo_req_q;
  logic              lost;

  // sample streamer
  logic              s_on;
  logic [ADDR_W-1:0] s_addr, s_left;
  logic              s_step_chip;   // stride SPS (chip samples) or 1
  dest_e             s_dest;
  logic [OW-1:0]     s_ph;          // sample offset within the chip
  logic [6:0]        drain;

  logic              rd_v_q, theta_q;
  logic [3:0]        rd_tag_q;

  assign frame_tau = tau;
  assign rd_addr   = s_addr;
  assign cv_valid  = rd_v_q | theta_q;
  assign cv_x      = theta_q ? cfo_peak_x : rd_x;
  assign cv_y      = theta_q ? cfo_peak_y : rd_y;
  assign cv_tag    = theta_q ? {D_THETA, 1'b0} : rd_tag_q;

  // phase routing from the vectoring CORDIC
  logic [2:0] odest;
  assign odest      = cv_out_tag[3:1];
  assign str_valid  = cv_out_valid && odest == D_STR;
  assign ioc_valid  = cv_out_valid && odest == D_IOC;
  assign rpnc_valid = cv_out_valid && odest == D_RPNC;
  assign dpd_valid  = cv_out_valid && odest == D_DPD;
  assign dpd_strobe = cv_out_tag[0];

  // rotation CORDIC: doubled phase for the estimator, else the detector
  always_comb begin
    if (cv_out_valid && odest == D_CFO) begin
      rot_valid = 1'b1;
      rot_angle = cv_out_phase << 1;
      rot_tag   = 2'b01;
    end else begin
      rot_valid = dpd_rot_valid;
      rot_angle = dpd_rot_angle;
      rot_tag   = dpd_rot_tag;
    end
  end
  assign cfo_valid = rot_out_valid && rot_out_tag == 2'b01;

  assign search_chips = ADDR_W'(SEARCH_CHIPS);
  assign thr_detect   = 8'(THR_DETECT);

  // chip sample address
  function automatic logic [ADDR_W-1:0] chip_addr(input logic [ADDR_W-1:0] k);
    return base + ADDR_W'(tau) + ADDR_W'(k * ADDR_W'(SPS));
  endfunction

  // whole chips in the frame after tau
  logic [ADDR_W-1:0] frame_chips;
  assign frame_chips = (len - ADDR_W'(tau)) / ADDR_W'(SPS);

  task automatic stream(input logic [ADDR_W-1:0] a, input logic [ADDR_W-1:0] n,
                        input logic chip, input dest_e d, input logic [OW-1:0] ph);
    s_on        <= (n != 0);
    s_addr      <= a;
    s_left      <= n;
    s_step_chip <= chip;
    s_dest      <= d;
    s_ph        <= ph;
    drain       <= '0;
  endtask

  logic s_end;   // streamer finished and the pipeline drained
  assign s_end = !s_on && drain == 7'(DRAIN);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= S_IDLE; base <= '0; len <= '0; tau <= '0;
      cur_chain <= CHAIN_MSK; est_held <= 1'b0; cfo_req_q <= 1'b0; lost <= 1'b0;
      s_on <= 1'b0; s_addr <= '0; s_left <= '0; s_step_chip <= 1'b0; s_dest <= D_NONE;
      s_ph <= '0; drain <= '0;
      rd_v_q <= 1'b0; theta_q <= 1'b0; rd_tag_q <= '0;
      busy <= 1'b0; frame_done <= 1'b0; frame_lost <= 1'b0; chain_used <= CHAIN_MSK;
      mode_switch <= 1'b0; cfo_run <= 1'b0; pd_score <= '0; payload_addr <= '0;
      v_hat <= '0; theta_hat <= '0;
      str_start <= 1'b0; cfo_start <= 1'b0; ioc_start <= 1'b0; rpnc_start <= 1'b0;
      dpd_start <= 1'b0; mpd_start <= 1'b0; mpd_run <= 1'b0; dsp_start <= 1'b0;
      dsp_chain <= CHAIN_MSK;
    end else begin
      // single-cycle pulses
      str_start <= 1'b0; cfo_start <= 1'b0; ioc_start <= 1'b0; rpnc_start <= 1'b0;
      dpd_start <= 1'b0; mpd_start <= 1'b0; dsp_start <= 1'b0;
      frame_done <= 1'b0; frame_lost <= 1'b0; mode_switch <= 1'b0; cfo_run <= 1'b0;
      theta_q <= 1'b0;
      if (cfo_req) cfo_req_q <= 1'b1;

      // streamer: one read per cycle, data and tag to the CORDIC a cycle later
      rd_v_q   <= s_on;
      rd_tag_q <= {s_dest, s_ph == tau};
      if (s_on) begin
        s_addr <= s_addr + (s_step_chip ? ADDR_W'(SPS) : ADDR_W'(1));
        s_ph   <= s_step_chip ? s_ph : ((s_ph == OW'(SPS-1)) ? '0 : s_ph + 1'b1);
        s_left <= s_left - 1'b1;
        if (s_left == 1) s_on <= 1'b0;
      end else if (drain != 7'(DRAIN)) begin
        drain <= drain + 1'b1;
      end

      case (state)
        S_IDLE: if (frame_start) begin
          base <= frame_base;
          len  <= frame_len;
          lost <= 1'b0;
          busy <= 1'b1;
          str_start <= 1'b1;
          stream(frame_base, ADDR_W'((STR_CHIPS + 1) * SPS), 1'b0, D_STR, '0);
          state <= S_STR;
        end

        S_STR: if (str_done) begin
          tau   <= str_tau;
          state <= S_CHOOSE;
        end

        S_CHOOSE: begin
          if ((manual_mode ? manual_chain : cur_chain) == CHAIN_MSK) begin
            dpd_start <= 1'b1;
            mpd_start <= 1'b1;
            mpd_run   <= 1'b1;
            stream(base, ADDR_W'((SEARCH_CHIPS + 2) * SPS), 1'b0, D_DPD, '0);
            state <= S_MSK_PD;
          end else if (!est_held || cfo_req_q) begin
            cfo_start <= 1'b1;
            cfo_req_q <= 1'b0;
            stream(chip_addr('0), ADDR_W'(NQ), 1'b1, D_CFO, tau);
            state <= S_CFO;
          end else begin
            ioc_start <= 1'b1;
            stream(chip_addr('0), ADDR_W'(SEARCH_CHIPS), 1'b1, D_IOC, tau);
            state <= S_IOC;
          end
        end

        S_MSK_PD: begin
          if (mpd_done) s_on <= 1'b0;            // stop reading, let it drain
          if (s_end) begin
            mpd_run  <= 1'b0;
            pd_score <= mpd_score;
            if (!manual_mode && (!mpd_found || mpd_score < 8'(THR_MODE))) begin
              // channel too poor for the MSK chain: this frame goes coherent
              cur_chain   <= CHAIN_OQPSK;
              mode_switch <= 1'b1;
              state       <= S_CHOOSE;
            end else if (!mpd_found) begin
              lost  <= 1'b1;
              state <= S_DONE;
            end else begin
              // bit b of the detector is chip b+1; the payload follows the peak
              payload_addr <= chip_addr(mpd_idx + ADDR_W'(2));
              chain_used   <= CHAIN_MSK;
              dpd_start    <= 1'b1;
              dsp_start    <= 1'b1;
              dsp_chain    <= CHAIN_MSK;
              stream(chip_addr(mpd_idx + ADDR_W'(2)) - ADDR_W'(SPS),
                     (frame_chips - mpd_idx - ADDR_W'(2)) * ADDR_W'(SPS) + ADDR_W'(SPS),
                     1'b0, D_DPD, tau);
              state <= S_MSK_DATA;
            end
          end
        end

        S_MSK_DATA: if (s_end) state <= S_DONE;

        S_CFO: if (cfo_done) begin
          v_hat   <= cfo_v_hat;
          theta_q <= 1'b1;
          state   <= S_THETA_W;
        end

        S_THETA_W: if (cv_out_valid && odest == D_THETA) begin
          theta_hat <= cv_out_phase >> 1;
          est_held  <= 1'b1;
          cfo_run   <= 1'b1;
          ioc_start <= 1'b1;
          stream(chip_addr('0), ADDR_W'(SEARCH_CHIPS), 1'b1, D_IOC, tau);
          state <= S_IOC;
        end

        S_IOC: begin
          if (ioc_done) s_on <= 1'b0;
          if (ioc_done) begin
            pd_score <= ioc_score;
            if (!ioc_found) begin
              lost  <= 1'b1;
              state <= S_DONE;
            end else begin
              if (ioc_inv) theta_hat <= theta_hat + (phase_t'(1) << (PHASE_W-1));
              if (!manual_mode && ioc_score >= 8'(THR_MODE)) begin
                cur_chain   <= CHAIN_MSK;
                mode_switch <= 1'b1;
              end
              payload_addr <= chip_addr(ioc_idx + 1'b1);
              chain_used   <= CHAIN_OQPSK;
              rpnc_start   <= 1'b1;
              dsp_start    <= 1'b1;
              dsp_chain    <= CHAIN_OQPSK;
              state        <= S_RPNC;
            end
          end else if (s_end) begin
            lost  <= 1'b1;
            state <= S_DONE;
          end
        end

        S_RPNC: begin
          // launched one cycle after rpnc_start so bank 1 is loaded
          stream(chip_addr(ioc_idx + 1'b1 - ADDR_W'(CHIPS)),
                 frame_chips - ioc_idx - 1'b1 + ADDR_W'(CHIPS), 1'b1, D_RPNC, tau);
          state <= S_DRAIN;
        end

        S_DRAIN: if (s_end) state <= S_DONE;

        S_DONE: begin
          busy       <= 1'b0;
          frame_done <= 1'b1;
          frame_lost <= lost;
          state      <= S_IDLE;
        end

        default: state <= S_IDLE;
      endcase
    end
  end
endmodule

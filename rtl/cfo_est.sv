// cfo_est: coarse frequency and phase offset estimator (FFT-based maximum
// likelihood estimate, the "R & B" method).
//
// The input is q_k = e^{j*2*phi_k} for NQ consecutive chip samples (phase
// doubled to strip the O-QPSK modulation, M = 2), delivered as cos/sin words
// by the shared rotation CORDIC. They are written in bit-reversed order into
// an NFFT-point buffer that is otherwise zero, an in-place radix-2
// decimation-in-time FFT is run on it (log2(NFFT) stages of NFFT/2
// butterflies, one butterfly per clock), and the bin with the largest
// |X(m)|^2 is taken. Because even chips sit on I and odd chips on Q, the
// doubled phase alternates by half a turn from chip to chip, which moves the
// tone by NFFT/2 bins; the estimator removes that shift, so
//   phase step per chip  v_hat = (m - NFFT/2) / (2*NFFT)  turns,
// and returns X(m) itself so that the shared vectoring CORDIC can give
// arg X(m) = 2*theta_hat (theta_hat is known up to half a turn).
//
// Interface: pulse start, then NQ words on in_valid (any spacing). done
// pulses once v_hat, peak_bin and peak_x/peak_y are valid. Timing: NFFT
// cycles to load, (NFFT/2)*log2(NFFT) cycles of butterflies and NFFT cycles
// of peak search.
//
// From the document: the DFT/FFT estimator, M = 2, q_k over 128 samples, a
// 1024-point radix-2 FFT. This design's choices: one butterfly per cycle on a
// two-read/two-write buffer, Q1.14 twiddles built at elaboration, 24-bit
// data, the peak value scaled down by 2^8 for the CORDIC. v_hat has the
// FFT's resolution of 1/(2*NFFT) turn, so its low 21 bits are always zero.
module cfo_est
  import rx_pkg::*;
#(
  parameter int unsigned NFFT = 1024,
  parameter int unsigned NQ   = 128,
  parameter int unsigned DW   = 24
) (
  input  logic                      clk,
  input  logic                      rst_n,
  input  logic                      start,
  input  logic                      in_valid,
  input  logic signed [15:0]        in_re,
  input  logic signed [15:0]        in_im,
  output logic                      done,
  output phase_t                    v_hat,
  output logic [$clog2(NFFT)-1:0]   peak_bin,
  output logic signed [15:0]        peak_x,
  output logic signed [15:0]        peak_y
);
  localparam int unsigned LG = $clog2(NFFT);
  localparam int unsigned TW = 16;

  typedef logic signed [DW-1:0] data_t;
  typedef logic signed [TW-1:0] tw_t;

  // twiddles W^n = e^{-j 2 pi n / NFFT}, n < NFFT/2, scaled by 2^14
  function automatic tw_t tw_cos(input int n);
    return tw_t'(longint'($floor(16384.0 * $cos(2.0 * 3.14159265358979323846 * n / NFFT) + 0.5)));
  endfunction
  function automatic tw_t tw_sin(input int n);
    return tw_t'(longint'($floor(-16384.0 * $sin(2.0 * 3.14159265358979323846 * n / NFFT) + 0.5)));
  endfunction

  tw_t tcos [NFFT/2];
  tw_t tsin [NFFT/2];
  for (genvar g = 0; g < int'(NFFT/2); g++) begin : g_tw
    assign tcos[g] = tw_cos(g);
    assign tsin[g] = tw_sin(g);
  end

  function automatic logic [LG-1:0] bitrev(input logic [LG-1:0] a);
    for (int i = 0; i < int'(LG); i++) bitrev[i] = a[LG-1-i];
  endfunction

  data_t re [NFFT];
  data_t im [NFFT];

  typedef enum logic [2:0] {S_IDLE, S_LOAD, S_ZERO, S_FFT, S_PEAK, S_DONE} state_e;
  state_e state;

  logic [LG:0]            cnt;      // load / peak index
  logic [$clog2(LG)-1:0]  stage;
  logic [LG-2:0]          bfly;

  // butterfly addressing
  logic [LG-1:0] i0, i1, half_mask;
  logic [LG-2:0] tidx;
  always_comb begin
    half_mask = LG'((1 << stage) - 1);
    i0   = LG'((({1'b0, bfly} & ~half_mask) << 1) | ({1'b0, bfly} & half_mask));
    i1   = i0 | LG'(1 << stage);
    tidx = (LG-1)'(({1'b0, bfly} & half_mask) << (LG - 1 - int'(stage)));
  end

  logic signed [DW+TW-1:0] pr, pi;
  data_t br, bi;
  always_comb begin
    pr = re[i1] * tcos[tidx] - im[i1] * tsin[tidx];
    pi = re[i1] * tsin[tidx] + im[i1] * tcos[tidx];
    br = DW'(pr >>> 14);
    bi = DW'(pi >>> 14);
  end

  // peak search
  logic [2*DW-1:0] pw, best_pw;
  logic [LG-1:0]   addr_pk;
  assign addr_pk = cnt[LG-1:0];
  assign pw = (2*DW)'(re[addr_pk] * re[addr_pk]) + (2*DW)'(im[addr_pk] * im[addr_pk]);

  function automatic logic signed [15:0] sat16(input data_t v);
    data_t s;
    s = v >>> 8;
    if (s > 32767) return 16'sd32767;
    if (s < -32767) return -16'sd32767;
    return 16'(s);
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state    <= S_IDLE;
      cnt      <= '0;
      stage    <= '0;
      bfly     <= '0;
      done     <= 1'b0;
      v_hat    <= '0;
      peak_bin <= '0;
      peak_x   <= '0;
      peak_y   <= '0;
      best_pw  <= '0;
    end else begin
      done <= 1'b0;
      case (state)
        S_IDLE: if (start) begin
          state <= S_LOAD;
          cnt   <= '0;
        end
        S_LOAD: if (in_valid) begin
          re[bitrev(cnt[LG-1:0])] <= DW'(in_re);
          im[bitrev(cnt[LG-1:0])] <= DW'(in_im);
          cnt <= cnt + 1'b1;
          if (cnt == (LG+1)'(NQ-1)) state <= S_ZERO;
        end
        S_ZERO: begin
          re[bitrev(cnt[LG-1:0])] <= '0;
          im[bitrev(cnt[LG-1:0])] <= '0;
          cnt <= cnt + 1'b1;
          if (cnt == (LG+1)'(NFFT-1)) begin
            state <= S_FFT;
            stage <= '0;
            bfly  <= '0;
          end
        end
        S_FFT: begin
          re[i0] <= re[i0] + br;
          im[i0] <= im[i0] + bi;
          re[i1] <= re[i0] - br;
          im[i1] <= im[i0] - bi;
          bfly <= bfly + 1'b1;
          if (bfly == '1) begin
            stage <= stage + 1'b1;
            if (stage == ($clog2(LG))'(LG-1)) begin
              state   <= S_PEAK;
              cnt     <= '0;
              best_pw <= '0;
            end
          end
        end
        S_PEAK: begin
          if (pw > best_pw || cnt == '0) begin
            best_pw  <= pw;
            peak_bin <= addr_pk;
            peak_x   <= sat16(re[addr_pk]);
            peak_y   <= sat16(im[addr_pk]);
          end
          cnt <= cnt + 1'b1;
          if (cnt == (LG+1)'(NFFT-1)) state <= S_DONE;
        end
        S_DONE: begin
          // remove the NFFT/2 modulation shift; the doubled phase halves the step
          v_hat <= phase_t'(signed'(peak_bin - LG'(NFFT/2))) << (PHASE_W - LG - 1);
          done  <= 1'b1;
          state <= S_IDLE;
        end
        default: state <= S_IDLE;
      endcase
    end
  end
endmodule

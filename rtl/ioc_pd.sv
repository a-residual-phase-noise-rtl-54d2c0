// ioc_pd: initial offset compensation and preamble detection of the coherent
// (O-QPSK) chain.
//
// Each chip phase phi_k from the shared vectoring CORDIC has the coarse
// offset removed, phi_hat_k = phi_k - k*v_hat - theta_hat, where
// k*v_hat is kept by an accumulator that adds v_hat once per chip. The chip
// bit is then decided from the quadrant: even chips (I rail) by
// the sign of cos(phi_hat), odd chips (Q rail) by the sign of sin(phi_hat).
// The bits feed a preamble_det correlator against four repetitions of the
// symbol-0 chip sequence, inverted reference allowed.
//
// Interface: pulse start with the chip counter at k = 0, then one phase per
// chip on in_valid. done/found/peak_score/peak_idx come from the correlator;
// the payload begins at chip peak_idx + 1 and peak_inv tells that the phase
// estimate is off by half a turn. Timing: one chip per cycle, one cycle from
// phase to bit.
//
// The compensation and detection follow the document;
// the half-turn polarity handling is this design's choice.
module ioc_pd
  import rx_pkg::*;
#(
  parameter int unsigned IDX_W = 16
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             start,
  input  phase_t           v_hat,
  input  phase_t           theta_hat,
  input  logic [7:0]       thr_detect,
  input  logic [IDX_W-1:0] chip_limit,
  input  logic             in_valid,
  input  phase_t           in_phase,
  output logic             bit_valid,
  output logic             bit_out,
  output logic             done,
  output logic             found,
  output logic [7:0]       peak_score,
  output logic [IDX_W-1:0] peak_idx,
  output logic             peak_inv
);
  phase_t rot;      // k * v_hat
  logic   odd;      // parity of k
  phase_t comp;

  assign comp = in_phase - rot - theta_hat;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rot <= '0; odd <= 1'b0; bit_valid <= 1'b0; bit_out <= 1'b0;
    end else begin
      bit_valid <= 1'b0;
      if (start) begin
        rot <= '0; odd <= 1'b0;
      end else if (in_valid) begin
        rot       <= rot + v_hat;
        odd       <= ~odd;
        bit_valid <= 1'b1;
        bit_out   <= chip_decide(odd, comp);
      end
    end
  end

  preamble_det #(.IDX_W(IDX_W)) u_pd (
    .clk, .rst_n, .start,
    .ref_bits  (oqpsk_preamble()),
    .allow_inv (1'b1),
    .thr_detect,
    .bit_limit (chip_limit),
    .bit_valid,
    .bit_in    (bit_out),
    .done, .found, .peak_score, .peak_idx, .peak_inv
  );
endmodule

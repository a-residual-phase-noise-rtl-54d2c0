// dpd: differential phase detection of the non-coherent (MSK) chain.
//
// Half-sine O-QPSK is MSK: the phase turns by +/- a quarter turn per chip.
// The block keeps the phases of the last DLY samples (DLY = samples per chip)
// and forms the phase step over one chip, phi_k - phi_(k-DLY). Frequency and
// phase offsets add only a small constant to that step. The step is sent to
// the shared rotation CORDIC, whose sine comes back
// 16 cycles later, and the bit is decided by its sign: b = 1 when
// sin < 0. Only samples flagged as chip peaks by the timing recovery
// (in_strobe, carried through the CORDIC in its tag) produce bits.
//
// Interface: pulse start, then one sample phase per in_valid with in_strobe
// on the chip-peak samples; rot_* connect to the shared rotation CORDIC
// (tag bit 0 = strobe, bit 1 = this block's request). bit_valid/bit_out
// leave one cycle after the CORDIC result. The first DLY samples after start
// only fill the delay line.
//
// From the document: the z^-8 delay, the subtraction, the shared CORDIC
// rotation for the sine and the sign detection. Reading the
// delay as one chip period at 8 samples per chip is this design's choice.
module dpd
  import rx_pkg::*;
#(
  parameter int unsigned DLY = 8
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               start,
  input  logic               in_valid,
  input  logic               in_strobe,
  input  phase_t             in_phase,
  // shared rotation CORDIC
  output logic               rot_valid,
  output phase_t             rot_angle,
  output logic [1:0]         rot_tag,
  input  logic               rot_out_valid,
  input  logic signed [15:0] rot_out_sin,
  input  logic [1:0]         rot_out_tag,
  // detected bits
  output logic               bit_valid,
  output logic               bit_out
);
  phase_t                   dly [DLY];
  logic [$clog2(DLY+1)-1:0] fill;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      fill <= '0; rot_valid <= 1'b0; rot_angle <= '0; rot_tag <= '0;
      bit_valid <= 1'b0; bit_out <= 1'b0;
      for (int i = 0; i < int'(DLY); i++) dly[i] <= '0;
    end else begin
      rot_valid <= 1'b0;
      bit_valid <= 1'b0;
      if (start) begin
        fill <= '0;
      end else if (in_valid) begin
        dly[0] <= in_phase;
        for (int i = 1; i < int'(DLY); i++) dly[i] <= dly[i-1];
        if (fill != ($clog2(DLY+1))'(DLY)) fill <= fill + 1'b1;
        else begin
          rot_valid <= 1'b1;
          rot_angle <= in_phase - dly[DLY-1];
          rot_tag   <= {1'b1, in_strobe};
        end
      end
      if (rot_out_valid && rot_out_tag == 2'b11) begin
        bit_valid <= 1'b1;
        bit_out   <= rot_out_sin < 0;
      end
    end
  end
endmodule

// str_est: symbol (chip) timing recovery. Finds which of the SPS samples of a
// chip period sits on the pulse peaks, so that later blocks read one sample
// per chip.
//
// Non-linear timing metric: a half-sine O-QPSK (equivalently MSK) signal
// turns its phase at a constant rate of a quarter turn per chip, with the
// turning points exactly at the pulse peaks. Over one chip period the phase
// therefore moves by a full quarter turn only when both ends sit on peaks;
// at any other offset the step is shorter whenever two chips of opposite
// direction meet. The block takes the phase of every sample, forms the
// absolute phase step over one chip period (|phi_n - phi_(n-SPS)|, wrapped),
// accumulates it separately for each of the SPS sample offsets over NCHIP
// chips and reports the offset with the largest sum. A carrier frequency
// offset adds the same small bias to every offset and does not move the peak.
//
// Interface: pulse start, then stream (NCHIP+1)*SPS phases on in_valid (the
// first chip period only fills the delay line). done pulses one cycle after
// the last phase with tau in 0..SPS-1, counted from the first sample.
//
// The document gives the block's function (find the timing boundary at the
// pulse peaks, via a non-linear transformation) but not its insides; this
// metric is this design's own choice.
module str_est
  import rx_pkg::*;
#(
  parameter int unsigned SPS   = 8,
  parameter int unsigned NCHIP = 128
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic                   start,
  input  logic                   in_valid,
  input  phase_t                 in_phase,
  output logic                   done,
  output logic [$clog2(SPS)-1:0] tau
);
  localparam int unsigned OW  = $clog2(SPS);
  localparam int unsigned MW  = 16;                      // metric sample width
  localparam int unsigned AW  = MW + $clog2(NCHIP) + 1;  // accumulator width
  localparam int unsigned CNT = (NCHIP + 1) * SPS;

  phase_t                     dly [SPS];
  logic [AW-1:0]              acc [SPS];
  logic [OW-1:0]              off;
  logic [$clog2(CNT+1)-1:0]   n;
  logic                       busy;

  logic signed [PHASE_W-1:0]  step;
  logic [PHASE_W-1:0]         step_abs;
  assign step     = signed'(in_phase - dly[SPS-1]);
  assign step_abs = step[PHASE_W-1] ? -step : step;

  // argmax over the accumulators
  logic [OW-1:0] best;
  always_comb begin
    best = '0;
    for (int i = 1; i < int'(SPS); i++)
      if (acc[i] > acc[best]) best = OW'(i);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy <= 1'b0;
      done <= 1'b0;
      tau  <= '0;
      off  <= '0;
      n    <= '0;
      for (int i = 0; i < int'(SPS); i++) begin
        acc[i] <= '0;
        dly[i] <= '0;
      end
    end else begin
      done <= 1'b0;
      if (start) begin
        busy <= 1'b1;
        off  <= '0;
        n    <= '0;
        for (int i = 0; i < int'(SPS); i++) acc[i] <= '0;
      end else if (busy && in_valid) begin
        dly[0] <= in_phase;
        for (int i = 1; i < int'(SPS); i++) dly[i] <= dly[i-1];
        if (int'(n) >= int'(SPS))
          acc[off] <= acc[off] + AW'(step_abs[PHASE_W-1 -: MW]);
        off <= (off == OW'(SPS-1)) ? '0 : off + 1'b1;
        n   <= n + 1'b1;
        if (int'(n) == int'(CNT) - 1) busy <= 1'b0;
      end
      if (!busy && !start && int'(n) == int'(CNT)) begin
        done <= 1'b1;
        tau  <= best;
        n    <= '0;
      end
    end
  end
endmodule

// cordic_rotation: pipelined CORDIC in rotation mode, shared by the blocks
// that need a sinusoid of a phase (the sin() of the MSK differential phase,
// the e^{j2phi} terms of the coarse offset estimator).
//
// The input angle (a fraction of a full turn) is folded into [-1/4, 1/4] turn
// by taking out half a turn, which is given back by negating the result.
// STAGES micro-rotations of a vector of length AMP/K (K ~ 1.647, the CORDIC
// gain) then drive the residual angle to zero, leaving AMP*cos and AMP*sin.
// One stage per clock, a new angle every cycle, results STAGES cycles later
// with the caller's tag.
//
// The document fixes the shared rotation CORDIC and its 16-cycle delay; the
// output scale AMP, the widths and the tag are choices of this design.
module cordic_rotation
  import rx_pkg::*;
#(
  parameter int unsigned OUT_W  = 16,
  parameter int unsigned STAGES = 16,
  parameter int unsigned TAG_W  = 4,
  parameter int          AMP    = 16384
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    in_valid,
  input  phase_t                  in_angle,
  input  logic [TAG_W-1:0]        in_tag,
  output logic                    out_valid,
  output logic signed [OUT_W-1:0] out_cos,
  output logic signed [OUT_W-1:0] out_sin,
  output logic [TAG_W-1:0]        out_tag
);
  localparam int unsigned W = OUT_W + 2;
  localparam int X0 = int'(real'(AMP) / 1.646760258121 + 0.5);

  function automatic phase_t atan_turn(input int i);
    real a;
    a = $atan(2.0 ** (-i)) / (2.0 * 3.14159265358979323846);
    return phase_t'(longint'(a * (2.0 ** PHASE_W) + 0.5));
  endfunction

  logic signed [W-1:0] xs [STAGES+1];
  logic signed [W-1:0] ys [STAGES+1];
  phase_t              zs [STAGES+1];
  logic [STAGES:0]     vs;
  logic [STAGES:0]     ns;   // negate the result
  logic [TAG_W-1:0]    ts [STAGES+1];

  always_comb begin
    xs[0] = W'(X0);
    ys[0] = '0;
    // angles in [1/4, 3/4) turn: the top two bits are 01 or 10
    ns[0] = in_angle[PHASE_W-1] ^ in_angle[PHASE_W-2];
    zs[0] = ns[0] ? in_angle - (phase_t'(1) << (PHASE_W-1)) : in_angle;
    vs[0] = in_valid;
    ts[0] = in_tag;
  end

  for (genvar i = 0; i < STAGES; i++) begin : g_stage
    localparam phase_t ANG = atan_turn(i);
    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) begin
        vs[i+1] <= 1'b0;
        ns[i+1] <= 1'b0;
        xs[i+1] <= '0;
        ys[i+1] <= '0;
        zs[i+1] <= '0;
        ts[i+1] <= '0;
      end else begin
        vs[i+1] <= vs[i];
        ns[i+1] <= ns[i];
        ts[i+1] <= ts[i];
        if (!zs[i][PHASE_W-1]) begin  // residual angle >= 0
          xs[i+1] <= xs[i] - (ys[i] >>> i);
          ys[i+1] <= ys[i] + (xs[i] >>> i);
          zs[i+1] <= zs[i] - ANG;
        end else begin
          xs[i+1] <= xs[i] + (ys[i] >>> i);
          ys[i+1] <= ys[i] - (xs[i] >>> i);
          zs[i+1] <= zs[i] + ANG;
        end
      end
    end
  end

  assign out_valid = vs[STAGES];
  assign out_cos   = OUT_W'(ns[STAGES] ? -xs[STAGES] : xs[STAGES]);
  assign out_sin   = OUT_W'(ns[STAGES] ? -ys[STAGES] : ys[STAGES]);
  assign out_tag   = ts[STAGES];
endmodule

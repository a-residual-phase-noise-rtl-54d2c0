// cordic_vector: pipelined CORDIC in vectoring mode, shared by every block of
// the receiver that needs the polar form of a sample.
//
// A Cartesian input (x, y) is first folded into the right half plane (a
// rotation by half a turn when x < 0), then STAGES micro-rotations drive y to
// zero while the rotation angles, taken from an arctangent table built at
// elaboration, are summed into the phase. One stage per clock: a new sample
// may enter every cycle and its result leaves STAGES cycles later together
// with the caller's tag. The magnitude carries the usual CORDIC gain of about
// 1.647.
//
// The document fixes the pipelined CORDIC, its 16-cycle initial delay, the
// 16-bit I and Q inputs and the 32-bit phase output; the fold into the right
// half plane, the internal width and the tag are choices of this design.
module cordic_vector
  import rx_pkg::*;
#(
  parameter int unsigned IN_W   = 16,
  parameter int unsigned STAGES = 16,
  parameter int unsigned TAG_W  = 4
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    in_valid,
  input  logic signed [IN_W-1:0]  in_x,
  input  logic signed [IN_W-1:0]  in_y,
  input  logic [TAG_W-1:0]        in_tag,
  output logic                    out_valid,
  output phase_t                  out_phase,
  output logic [IN_W+1:0]         out_mag,
  output logic [TAG_W-1:0]        out_tag
);
  localparam int unsigned W = IN_W + 2;

  // atan(2^-i) as a fraction of a full turn
  function automatic phase_t atan_turn(input int i);
    real a;
    a = $atan(2.0 ** (-i)) / (2.0 * 3.14159265358979323846);
    return phase_t'(longint'(a * (2.0 ** PHASE_W) + 0.5));
  endfunction

  logic signed [W-1:0] xs [STAGES+1];
  logic signed [W-1:0] ys [STAGES+1];
  phase_t              zs [STAGES+1];
  logic [STAGES:0]     vs;
  logic [TAG_W-1:0]    ts [STAGES+1];

  // Stage input 0: fold into the right half plane.
  always_comb begin
    if (in_x < 0) begin
      xs[0] = -W'(in_x);
      ys[0] = -W'(in_y);
      zs[0] = phase_t'(1) << (PHASE_W-1);
    end else begin
      xs[0] = W'(in_x);
      ys[0] = W'(in_y);
      zs[0] = '0;
    end
    vs[0] = in_valid;
    ts[0] = in_tag;
  end

  for (genvar i = 0; i < STAGES; i++) begin : g_stage
    localparam phase_t ANG = atan_turn(i);
    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) begin
        vs[i+1] <= 1'b0;
        xs[i+1] <= '0;
        ys[i+1] <= '0;
        zs[i+1] <= '0;
        ts[i+1] <= '0;
      end else begin
        vs[i+1] <= vs[i];
        ts[i+1] <= ts[i];
        if (ys[i] >= 0) begin
          xs[i+1] <= xs[i] + (ys[i] >>> i);
          ys[i+1] <= ys[i] - (xs[i] >>> i);
          zs[i+1] <= zs[i] + ANG;
        end else begin
          xs[i+1] <= xs[i] - (ys[i] >>> i);
          ys[i+1] <= ys[i] + (xs[i] >>> i);
          zs[i+1] <= zs[i] - ANG;
        end
      end
    end
  end

  assign out_valid = vs[STAGES];
  assign out_phase = zs[STAGES];
  assign out_mag   = xs[STAGES];
  assign out_tag   = ts[STAGES];
endmodule

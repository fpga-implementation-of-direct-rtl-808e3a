// cordic_core: STAGES-deep pipelined circular CORDIC in rotation mode that
// turns a first-quadrant angle into its cosine and sine.
//
// The vector starts at (x0, 0), where x0 is the full-scale amplitude
// 2^(OUT_W-1)-1 with XY_W-OUT_W guard bits, pre-divided by the CORDIC gain
// (about 1.6468), and the residual angle starts at the input angle. Each of
// the STAGES cordic_stage instances rotates the vector by +/-atan(2^-i) so as
// to drive the residual angle to zero; after the last stage
// (x, y) = A*(cos a, sin a). The guard bits are then removed by rounding to
// nearest and the result is clipped to +/-(2^(OUT_W-1)-1).
//
// Input angle: unsigned ANGLE_W bits, 2^ANGLE_W = pi/2, so the angle lies in
// [0, pi/2). That is inside the CORDIC convergence range (about +/-99.9
// degrees) without any pre-rotation.
//
// The 16 stages, 16-bit angle and 8-bit amplitude follow the design; the
// internal width XY_W, the rounding and the clipping are this
// implementation's choices. With 16 stages the angle error left after the
// last stage is below one angle LSB, far below the 8-bit amplitude LSB.
//
// Timing: latency STAGES clock cycles, one new angle per cycle. cos_o and
// sin_o are combinational functions of the last stage's registers.
module cordic_core
  import ddfs_pkg::*;
#(
  parameter int STAGES_P  = STAGES,
  parameter int ANGLE_W_P = ANGLE_W,
  parameter int OUT_W_P   = OUT_W,
  parameter int XY_W_P    = XY_W
) (
  input  logic                        clk,
  input  logic                        rst_n,
  input  logic        [ANGLE_W_P-1:0] angle,
  output logic signed [OUT_W_P-1:0]   cos_o,
  output logic signed [OUT_W_P-1:0]   sin_o
);

  localparam int Z_W   = ANGLE_W_P + 2;
  localparam int GUARD = XY_W_P - OUT_W_P;
  localparam logic signed [XY_W_P:0] MAXV = (XY_W_P+1)'((1 << (OUT_W_P - 1)) - 1);

  logic signed [XY_W_P-1:0] xs [STAGES_P+1];
  logic signed [XY_W_P-1:0] ys [STAGES_P+1];
  logic signed [Z_W-1:0]    zs [STAGES_P+1];

  assign xs[0] = XY_W_P'(cordic_x0(OUT_W_P, XY_W_P));
  assign ys[0] = '0;
  assign zs[0] = {2'b00, angle};

  for (genvar i = 0; i < STAGES_P; i++) begin : g_stage
    cordic_stage #(
      .XY_W  (XY_W_P),
      .Z_W   (Z_W),
      .SHIFT (i),
      .ATAN  (Z_W'(atan_angle(5'(i), ANGLE_W_P)))
    ) u_stage (
      .clk   (clk),
      .rst_n (rst_n),
      .x_i   (xs[i]),
      .y_i   (ys[i]),
      .z_i   (zs[i]),
      .x_o   (xs[i+1]),
      .y_o   (ys[i+1]),
      .z_o   (zs[i+1])
    );
  end

  // Round to nearest (half away from minus infinity) and clip.
  function automatic logic signed [OUT_W_P-1:0] round_clip(input logic signed [XY_W_P-1:0] v);
    logic signed [XY_W_P:0] r;
    r = ((XY_W_P+1)'(v) + (XY_W_P+1)'(1 << (GUARD - 1))) >>> GUARD;
    if (r > MAXV)       return OUT_W_P'(MAXV);
    else if (r < -MAXV) return OUT_W_P'(-MAXV);
    else                return OUT_W_P'(r);
  endfunction

  assign cos_o = round_clip(xs[STAGES_P]);
  assign sin_o = round_clip(ys[STAGES_P]);

endmodule

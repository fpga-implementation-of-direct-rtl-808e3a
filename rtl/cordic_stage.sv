// cordic_stage: one pipelined micro-rotation of a circular CORDIC in rotation
// mode.
//
// The residual angle z decides the direction d = +1 (z >= 0) or -1 (z < 0).
// The stage then computes, with shifts and additions only,
//   x' = x - d * (y >>> SHIFT)
//   y' = y + d * (x >>> SHIFT)
//   z' = z - d * ATAN
// where ATAN = atan(2^-SHIFT) in the angle units of z. x and y are signed
// two's complement words, z is a signed angle.
//
// Timing: all three outputs are registered; one cycle latency and a new
// input accepted every clock. Asynchronous active-low reset clears them.
module cordic_stage #(
  parameter int                 XY_W  = 18,
  parameter int                 Z_W   = 18,
  parameter int                 SHIFT = 0,
  parameter logic [Z_W-1:0]     ATAN  = '0
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic signed [XY_W-1:0] x_i,
  input  logic signed [XY_W-1:0] y_i,
  input  logic signed [Z_W-1:0]  z_i,
  output logic signed [XY_W-1:0] x_o,
  output logic signed [XY_W-1:0] y_o,
  output logic signed [Z_W-1:0]  z_o
);

  logic signed [XY_W-1:0] x_sh, y_sh;
  logic signed [Z_W-1:0]  atan_s;

  assign x_sh   = x_i >>> SHIFT;
  assign y_sh   = y_i >>> SHIFT;
  assign atan_s = $signed(ATAN);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      x_o <= '0;
      y_o <= '0;
      z_o <= '0;
    end else if (!z_i[Z_W-1]) begin
      x_o <= x_i - y_sh;
      y_o <= y_i + x_sh;
      z_o <= z_i - atan_s;
    end else begin
      x_o <= x_i + y_sh;
      y_o <= y_i - x_sh;
      z_o <= z_i + atan_s;
    end
  end

endmodule

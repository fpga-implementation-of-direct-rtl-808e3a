// quadrant_map: output mapping of the mapped CORDIC.
//
// The CORDIC core only sees the angle a inside a quadrant. With the phase
// equal to q*pi/2 + a, the full-circle values follow from the symmetries of
// sine and cosine:
//   q = 0: ( cos a,  sin a)
//   q = 1: (-sin a,  cos a)
//   q = 2: (-cos a, -sin a)
//   q = 3: ( sin a, -cos a)
// so the block only swaps and negates. The inputs are limited to
// +/-(2^(OUT_W-1)-1), so a negation can never overflow.
//
// Mapping the outputs of the CORDIC by the two quadrant bits is the design's
// "mapped CORDIC"; the exact swap/negate circuit is this implementation's.
//
// Timing: outputs registered, one cycle latency, asynchronous active-low
// reset to zero.
module quadrant_map
  import ddfs_pkg::*;
#(
  parameter int W = OUT_W
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic [1:0]          quad,
  input  logic signed [W-1:0] cos_i,
  input  logic signed [W-1:0] sin_i,
  output logic signed [W-1:0] cos_o,
  output logic signed [W-1:0] sin_o
);

  logic signed [W-1:0] cos_m, sin_m;

  always_comb begin
    unique case (quad)
      2'd0: begin cos_m =  cos_i; sin_m =  sin_i; end
      2'd1: begin cos_m = -sin_i; sin_m =  cos_i; end
      2'd2: begin cos_m = -cos_i; sin_m = -sin_i; end
      default: begin cos_m =  sin_i; sin_m = -cos_i; end
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cos_o <= '0;
      sin_o <= '0;
    end else begin
      cos_o <= cos_m;
      sin_o <= sin_m;
    end
  end

endmodule

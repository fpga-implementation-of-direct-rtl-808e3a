// mapped_cordic: phase-to-amplitude converter of the synthesizer.
//
// The PHASE_W-bit phase (2^PHASE_W = one turn) is split into its two top
// quadrant bits and the ANGLE_W = PHASE_W-2 angle bits below them. The angle
// goes through the pipelined cordic_core, which returns cosine and sine of the
// angle inside the quadrant; the quadrant bits travel through a shift
// register of the same depth so that they meet their own sample, and
// quadrant_map then rotates the result into the right quadrant. Cosine and
// sine come out together, giving the quadrature pair.
//
// Timing: latency STAGES + 1 clock cycles from phase to cos_o/sin_o, one
// sample per clock. out_valid rises once the pipeline holds samples taken
// after reset (a marker travelling beside the data; this flag is an addition
// of this implementation).
module mapped_cordic
  import ddfs_pkg::*;
#(
  parameter int PHASE_W_P = PHASE_W,
  parameter int STAGES_P  = STAGES,
  parameter int OUT_W_P   = OUT_W,
  parameter int XY_W_P    = XY_W
) (
  input  logic                      clk,
  input  logic                      rst_n,
  input  logic [PHASE_W_P-1:0]      phase,
  output logic signed [OUT_W_P-1:0] cos_o,
  output logic signed [OUT_W_P-1:0] sin_o,
  output logic                      out_valid
);

  localparam int ANGLE_W_P = PHASE_W_P - 2;

  logic signed [OUT_W_P-1:0] cos_q, sin_q;
  logic [1:0]                quad_d [STAGES_P+1];
  logic                      vld_d  [STAGES_P+2];

  assign quad_d[0] = phase[PHASE_W_P-1 -: 2];
  assign vld_d[0]  = 1'b1;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 1; i <= STAGES_P; i++)     quad_d[i] <= '0;
      for (int i = 1; i <= STAGES_P + 1; i++) vld_d[i]  <= 1'b0;
    end else begin
      for (int i = 1; i <= STAGES_P; i++)     quad_d[i] <= quad_d[i-1];
      for (int i = 1; i <= STAGES_P + 1; i++) vld_d[i]  <= vld_d[i-1];
    end
  end

  cordic_core #(
    .STAGES_P  (STAGES_P),
    .ANGLE_W_P (ANGLE_W_P),
    .OUT_W_P   (OUT_W_P),
    .XY_W_P    (XY_W_P)
  ) u_core (
    .clk   (clk),
    .rst_n (rst_n),
    .angle (phase[ANGLE_W_P-1:0]),
    .cos_o (cos_q),
    .sin_o (sin_q)
  );

  quadrant_map #(.W(OUT_W_P)) u_map (
    .clk   (clk),
    .rst_n (rst_n),
    .quad  (quad_d[STAGES_P]),
    .cos_i (cos_q),
    .sin_i (sin_q),
    .cos_o (cos_o),
    .sin_o (sin_o)
  );

  assign out_valid = vld_d[STAGES_P+1];

endmodule

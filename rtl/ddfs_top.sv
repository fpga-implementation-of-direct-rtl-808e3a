// ddfs_top: CORDIC-based direct digital frequency synthesizer with quadrature
// outputs.
//
// Chain: fcw_select picks one of three frequency control words with the
// 2-bit en input; phase_accumulator adds it to an 18-bit phase every clock;
// mapped_cordic turns the phase into 8-bit cosine and sine through a
// 16-stage pipelined CORDIC plus quadrant mapping. The output frequency is
// fclk * FCW / 2^18 and one sample pair leaves every clock. The two outputs
// are the digital inputs of the external DAC and reconstruction filter,
// which are not part of this RTL.
//
// The chain, the widths, the stage count and the three-word bank follow the
// design; the reset, the stop code en = 00, the default FCW values and the
// out_valid flag are this implementation's choices.
//
// Timing: a new en value changes the increment added at the next clock edge.
// A phase takes 1 (phase register) + 16 (CORDIC stages) + 1 (mapping
// register) = 18 cycles from the accumulator input to cos_o/sin_o; the phase
// port shows the accumulator register, whose sample appears at the outputs
// 17 cycles later. Throughput is one sample per clock.
module ddfs_top
  import ddfs_pkg::*;
#(
  parameter logic signed [PHASE_W-1:0] FCW0 = PHASE_W'(1024),
  parameter logic signed [PHASE_W-1:0] FCW1 = PHASE_W'(2048),
  parameter logic signed [PHASE_W-1:0] FCW2 = PHASE_W'(4096)
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic [1:0]              en,
  output logic signed [OUT_W-1:0] cos_o,
  output logic signed [OUT_W-1:0] sin_o,
  output logic                    out_valid,
  output logic [PHASE_W-1:0]      phase
);

  logic signed [PHASE_W-1:0] fcw;

  fcw_select #(
    .W    (PHASE_W),
    .FCW0 (FCW0),
    .FCW1 (FCW1),
    .FCW2 (FCW2)
  ) u_fcw (
    .en  (en_e'(en)),
    .fcw (fcw)
  );

  phase_accumulator #(.W(PHASE_W)) u_pa (
    .clk   (clk),
    .rst_n (rst_n),
    .fcw   (fcw),
    .phase (phase)
  );

  mapped_cordic u_pac (
    .clk       (clk),
    .rst_n     (rst_n),
    .phase     (phase),
    .cos_o     (cos_o),
    .sin_o     (sin_o),
    .out_valid (out_valid)
  );

endmodule

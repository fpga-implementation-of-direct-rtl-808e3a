// phase_accumulator: the phase accumulator (PA) of the synthesizer.
//
// A W-bit adder followed by a W-bit register. Every clock the frequency
// control word is added to the stored phase; the sum wraps modulo 2^W, which
// is exactly one turn of the phase circle. The output frequency is therefore
// fclk * fcw / 2^W, and a negative (two's complement) word turns the phase
// the other way.
//
// The 18-bit signed adder with a register after it is the design's own
// structure; the asynchronous active-low reset to phase zero is this
// implementation's choice.
//
// Timing: phase changes on the rising clock edge after fcw is applied
// (one-cycle latency), one new phase per clock.
module phase_accumulator
  import ddfs_pkg::*;
#(
  parameter int W = PHASE_W
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic signed [W-1:0] fcw,
  output logic        [W-1:0] phase
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) phase <= '0;
    else        phase <= phase + W'(fcw);
  end

endmodule

// fcw_select: frequency control word bank of the synthesizer.
//
// The synthesizer holds three frequency control words (FCWs). The 2-bit EN
// input chooses which of them is added to the phase accumulator: EN = 01, 10
// and 11 select FCW0, FCW1 and FCW2. EN = 00 selects a zero increment, so the
// accumulator holds its phase and the outputs stay at a constant level.
// Switching EN between the three words gives three-tone frequency-shift
// keying.
//
// The three words and the 2-bit EN come from the design; the stop code on
// EN = 00 and the default word values (output frequencies fclk/256, fclk/128
// and fclk/64 at an 18-bit phase) are choices of this implementation. The
// words are signed, so a negative word runs the phase backwards.
//
// Purely combinational: fcw follows en in the same cycle.
module fcw_select
  import ddfs_pkg::*;
#(
  parameter int                W    = PHASE_W,
  parameter logic signed [W-1:0] FCW0 = W'(1024),
  parameter logic signed [W-1:0] FCW1 = W'(2048),
  parameter logic signed [W-1:0] FCW2 = W'(4096)
) (
  input  en_e                 en,
  output logic signed [W-1:0] fcw
);

  always_comb begin
    unique case (en)
      EN_F0:   fcw = FCW0;
      EN_F1:   fcw = FCW1;
      EN_F2:   fcw = FCW2;
      default: fcw = '0;
    endcase
  end

endmodule

// ddfs_pkg: sizes and constants shared by the CORDIC-based direct digital
// frequency synthesizer.
//
// Phase format: an unsigned PHASE_W-bit word where 2^PHASE_W is one full turn.
// Its two top bits are the quadrant, the remaining ANGLE_W bits the angle
// inside the quadrant (2^ANGLE_W = pi/2). The 18-bit phase, the 16 angle bits,
// the 2 quadrant bits, the 16 CORDIC stages and the 8-bit amplitude are the
// design's published sizes; the internal CORDIC word width XY_W (10 guard bits
// below the output LSB) is this implementation's choice.
//
// The elementary rotation angles atan(2^-i) are stored in quarter-turn units
// scaled by 2^30, i.e. ATAN_Q30[i] = round(atan(2^-i) / (pi/2) * 2^30), and are
// rescaled to the actual angle width by atan_angle(). CORDIC_K_Q32 is the
// inverse CORDIC gain prod(1/sqrt(1 + 2^-2i)) for 16 stages times 2^32.
package ddfs_pkg;

  localparam int PHASE_W = 18;   // phase accumulator / FCW width
  localparam int QUAD_W  = 2;    // quadrant bits
  localparam int ANGLE_W = PHASE_W - QUAD_W; // angle bits fed to the CORDIC
  localparam int STAGES  = 16;   // CORDIC pipeline stages
  localparam int OUT_W   = 8;    // amplitude bits of sine and cosine
  localparam int XY_W    = 18;   // internal x/y width (OUT_W + 10 guard bits)

  localparam int ATAN_ENTRIES = 24;

  localparam logic [31:0] ATAN_Q30 [ATAN_ENTRIES] = '{
    32'd536870912, 32'd316933406, 32'd167458907, 32'd85004756,
    32'd42667331,  32'd21354465,  32'd10679838,  32'd5340245,
    32'd2670163,   32'd1335087,   32'd667544,    32'd333772,
    32'd166886,    32'd83443,     32'd41722,     32'd20861,
    32'd10430,     32'd5215,      32'd2608,      32'd1304,
    32'd652,       32'd326,       32'd163,       32'd81
  };

  localparam logic [31:0] CORDIC_K_Q32 = 32'd2608131497;

  // Elementary angle of stage i expressed with angle_w bits per quarter turn,
  // rounded to nearest.
  function automatic logic [31:0] atan_angle(input logic [4:0] i, input int angle_w);
    logic [63:0] v;
    v = 64'(ATAN_Q30[i]);
    if (angle_w >= 30) return 32'(v << (angle_w - 30));
    return 32'((v + (64'd1 << (29 - angle_w))) >> (30 - angle_w));
  endfunction

  // Starting x of the rotation: full-scale amplitude (2^(out_w-1) - 1) with
  // guard bits below the output LSB, pre-scaled by the inverse CORDIC gain so
  // that the final vector has exactly full-scale length.
  function automatic logic [31:0] cordic_x0(input int out_w, input int xy_w);
    logic [63:0] amp;
    amp = ((64'd1 << (out_w - 1)) - 64'd1) << (xy_w - out_w);
    return 32'((amp * 64'(CORDIC_K_Q32) + (64'd1 << 31)) >> 32);
  endfunction

  // Frequency-selection code on the 2-bit EN input.
  typedef enum logic [1:0] {
    EN_STOP = 2'b00,
    EN_F0   = 2'b01,
    EN_F1   = 2'b10,
    EN_F2   = 2'b11
  } en_e;

endpackage

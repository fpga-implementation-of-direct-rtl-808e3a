// tb_fcw_select: checks the frequency control word bank for every EN code,
// with the default words and with a second instance holding negative and
// extreme words.
module tb_fcw_select;
  import ddfs_pkg::*;

  int checks = 0, failures = 0;

  logic [1:0]                en;
  logic signed [PHASE_W-1:0] fcw_a, fcw_b;

  localparam logic signed [PHASE_W-1:0] B0 = -PHASE_W'(7);
  localparam logic signed [PHASE_W-1:0] B1 = PHASE_W'(131071);
  localparam logic signed [PHASE_W-1:0] B2 = PHASE_W'(-131072);

  fcw_select dut_a (.en(en_e'(en)), .fcw(fcw_a));
  fcw_select #(.FCW0(B0), .FCW1(B1), .FCW2(B2)) dut_b (.en(en_e'(en)), .fcw(fcw_b));

  task automatic check(input logic signed [PHASE_W-1:0] got, exp_v, input string what);
    checks++;
    if (got !== exp_v) begin
      failures++;
      $display("FAIL %s en=%0d got=%0d exp=%0d", what, en, got, exp_v);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int r = 0; r < 3; r++) begin
      for (int e = 0; e < 4; e++) begin
        en = 2'(e);
        #1;
        case (e)
          0: begin check(fcw_a, '0, "a");             check(fcw_b, '0, "b"); end
          1: begin check(fcw_a, PHASE_W'(1024), "a"); check(fcw_b, B0, "b"); end
          2: begin check(fcw_a, PHASE_W'(2048), "a"); check(fcw_b, B1, "b"); end
          default: begin check(fcw_a, PHASE_W'(4096), "a"); check(fcw_b, B2, "b"); end
        endcase
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

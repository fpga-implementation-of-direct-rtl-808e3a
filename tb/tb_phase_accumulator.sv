// tb_phase_accumulator: drives random signed frequency control words, some
// large enough to wrap the phase often, and compares the phase register with
// a modulo-2^18 model every cycle. Also checks reset to zero and the
// one-cycle latency from fcw to phase.
module tb_phase_accumulator;
  import ddfs_pkg::*;

  int checks = 0, failures = 0, wraps = 0;

  logic                      clk = 1'b0, rst_n = 1'b0;
  logic signed [PHASE_W-1:0] fcw;
  logic        [PHASE_W-1:0] phase;
  logic        [PHASE_W-1:0] model;
  logic        [PHASE_W:0]   sum;

  phase_accumulator dut (.clk(clk), .rst_n(rst_n), .fcw(fcw), .phase(phase));

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    fcw = PHASE_W'(12345);
    repeat (3) @(posedge clk);
    #1;
    checks++;
    if (phase !== '0) begin failures++; $display("FAIL reset phase=%0h", phase); end
    @(negedge clk);
    rst_n = 1'b1;
    model = '0;
    for (int n = 0; n < 2000; n++) begin
      // the word applied now shows up in phase right after the next edge
      case (n % 4)
        0: fcw = PHASE_W'($urandom);
        1: fcw = PHASE_W'(1024);
        2: fcw = -PHASE_W'($urandom_range(0, 5000));
        default: fcw = PHASE_W'($urandom_range(60000, 131071));
      endcase
      @(posedge clk);
      #1;
      sum   = {1'b0, model} + {1'b0, fcw};
      if (sum[PHASE_W] && !fcw[PHASE_W-1]) wraps++;
      model = model + fcw;
      checks++;
      if (phase !== model) begin
        failures++;
        if (failures < 10) $display("FAIL n=%0d phase=%0h exp=%0h", n, phase, model);
      end
    end
    checks++;
    if (wraps == 0) begin failures++; $display("FAIL no wrap-around seen"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

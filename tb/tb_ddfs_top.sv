// tb_ddfs_top: end-to-end run of the synthesizer at its default parameters.
//
// The EN input walks through FCW0, FCW1, FCW2, the stop code and back to
// FCW0, several full output periods each. Every cycle the testbench
//   - advances its own model of the 18-bit phase with the selected word and
//     compares it with the accumulator,
//   - checks the cosine/sine pair against 127*cos and 127*sin of the phase
//     the accumulator held 17 cycles earlier (one LSB tolerance), which also
//     pins the pipeline latency and the one-sample-per-clock rate,
//   - checks that out_valid rises exactly when the sample of the reset
//     phase (zero) reaches the outputs.
// It counts how often each mechanism happened (each EN code, a held phase
// during stop, each output quadrant, a phase wrap-around, a frequency switch)
// and counts a failure for any that never did.
module tb_ddfs_top;
  import ddfs_pkg::*;

  int checks = 0, failures = 0, max_err = 0;
  int en_cycles [4] = '{0, 0, 0, 0};
  int quad_seen [4] = '{0, 0, 0, 0};
  int holds = 0, wraps = 0, switches = 0;

  localparam int LAT = STAGES + 1;   // accumulator register to outputs
  localparam real PI = 3.14159265358979323846;
  localparam int AMP = (1 << (OUT_W - 1)) - 1;
  localparam int N = 2400;

  logic                      clk = 1'b0, rst_n = 1'b0;
  logic [1:0]                en;
  logic signed [OUT_W-1:0]   cos_o, sin_o;
  logic                      out_valid;
  logic        [PHASE_W-1:0] phase;
  logic        [PHASE_W-1:0] model, prev;
  logic        [PHASE_W-1:0] hist [N];

  ddfs_top dut (.clk(clk), .rst_n(rst_n), .en(en), .cos_o(cos_o), .sin_o(sin_o),
                .out_valid(out_valid), .phase(phase));

  always #5 clk = ~clk;

  function automatic int absi(input int v);
    return v < 0 ? -v : v;
  endfunction

  function automatic int word(input logic [1:0] e);
    case (e)
      2'b01:   return 1024;
      2'b10:   return 2048;
      2'b11:   return 4096;
      default: return 0;
    endcase
  endfunction

  task automatic check_pair(input logic [PHASE_W-1:0] p);
    real th;
    int  ec, es, dc, ds;
    th = 2.0 * PI * real'(p) / real'(1 << PHASE_W);
    ec = int'(AMP * $cos(th));
    es = int'(AMP * $sin(th));
    dc = absi(int'(cos_o) - ec);
    ds = absi(int'(sin_o) - es);
    if (dc > max_err) max_err = dc;
    if (ds > max_err) max_err = ds;
    quad_seen[p[PHASE_W-1 -: 2]]++;
    checks++;
    if (dc > 1 || ds > 1) begin
      failures++;
      if (failures < 10) $display("FAIL phase=%0h got=(%0d,%0d) exp=(%0d,%0d)", p, cos_o, sin_o, ec, es);
    end
  endtask

  task automatic need(input int count, input string what);
    $display("%-22s %0d", what, count);
    checks++;
    if (count == 0) begin
      failures++;
      $display("FAIL mechanism never exercised: %s", what);
    end
  endtask

  initial begin
    repeat (N + 200) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    en = 2'b01;
    repeat (3) @(posedge clk);
    #1;
    checks++;
    if (phase !== '0 || out_valid !== 1'b0) begin
      failures++;
      $display("FAIL reset state phase=%0h out_valid=%0b", phase, out_valid);
    end
    @(negedge clk);
    rst_n = 1'b1;
    model = '0;
    for (int n = 0; n < N; n++) begin
      logic [1:0] e_new;
      if      (n <  600) e_new = 2'b01;
      else if (n < 1200) e_new = 2'b10;
      else if (n < 1800) e_new = 2'b11;
      else if (n < 2000) e_new = 2'b00;
      else               e_new = 2'b01;
      if (n > 0 && e_new != en) switches++;
      en = e_new;
      en_cycles[en]++;
      prev = model;
      @(posedge clk);
      #1;
      model = model + PHASE_W'(word(en));
      if (model < prev) wraps++;
      if (en == 2'b00 && phase == prev) holds++;
      hist[n] = phase;
      checks++;
      if (phase !== model) begin
        failures++;
        if (failures < 10) $display("FAIL n=%0d phase=%0h exp=%0h", n, phase, model);
      end
      checks++;
      if (out_valid !== (n >= LAT - 1)) begin
        failures++;
        $display("FAIL out_valid=%0b at n=%0d", out_valid, n);
      end
      if (n >= LAT)          check_pair(hist[n - LAT]);
      else if (n == LAT - 1) check_pair('0);  // the reset phase, first valid sample
    end
    need(en_cycles[0], "stop (EN=00) cycles");
    need(en_cycles[1], "FCW0 cycles");
    need(en_cycles[2], "FCW1 cycles");
    need(en_cycles[3], "FCW2 cycles");
    need(holds, "held phases");
    need(switches, "frequency switches");
    need(wraps, "phase wrap-arounds");
    need(quad_seen[0], "quadrant 0 samples");
    need(quad_seen[1], "quadrant 1 samples");
    need(quad_seen[2], "quadrant 2 samples");
    need(quad_seen[3], "quadrant 3 samples");
    $display("max error %0d LSB", max_err);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_mapped_cordic: a new 18-bit phase every clock (the four quadrant
// boundaries first, then random phases over the whole circle); every output
// pair is checked STAGES+1 cycles later against 127*cos and 127*sin of
// 2*pi*phase/2^18 within one LSB, and out_valid must rise exactly when the
// first post-reset sample arrives.
module tb_mapped_cordic;
  import ddfs_pkg::*;

  int checks = 0, failures = 0, max_err = 0;
  int quad_seen [4] = '{0, 0, 0, 0};

  localparam int N = 3000;
  localparam int LAT = STAGES + 1;
  localparam real PI = 3.14159265358979323846;
  localparam int AMP = (1 << (OUT_W - 1)) - 1;

  logic                      clk = 1'b0, rst_n = 1'b0;
  logic        [PHASE_W-1:0] phase;
  logic signed [OUT_W-1:0]   cos_o, sin_o;
  logic                      out_valid;
  logic        [PHASE_W-1:0] hist [N];

  mapped_cordic dut (.clk(clk), .rst_n(rst_n), .phase(phase), .cos_o(cos_o), .sin_o(sin_o),
                     .out_valid(out_valid));

  always #5 clk = ~clk;

  function automatic int absi(input int v);
    return v < 0 ? -v : v;
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

  initial begin
    repeat (N + 100) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    phase = '0;
    repeat (2) @(posedge clk);
    @(negedge clk);
    rst_n = 1'b1;
    for (int n = 0; n < N; n++) begin
      if (n < 8) phase = PHASE_W'(n / 2) << (PHASE_W - 2) | PHASE_W'((n % 2) ? -1 : 0) >> 2;
      else       phase = PHASE_W'($urandom);
      hist[n] = phase;
      @(posedge clk);
      #1;
      checks++;
      if (out_valid !== (n >= LAT - 1)) begin
        failures++;
        $display("FAIL out_valid=%0b at n=%0d", out_valid, n);
      end
      if (n >= LAT - 1) check_pair(hist[n - LAT + 1]);
    end
    for (int q = 0; q < 4; q++) begin
      checks++;
      if (quad_seen[q] == 0) failures++;
    end
    $display("max error %0d LSB", max_err);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_cordic_core: feeds a new first-quadrant angle every clock (edge values 0
// and the largest angle, then random ones) and checks each cosine/sine pair
// exactly STAGES cycles later against 127*cos and 127*sin computed in real
// arithmetic, allowing one output LSB of error.
module tb_cordic_core;
  import ddfs_pkg::*;

  int checks = 0, failures = 0, max_err = 0;

  localparam int N = 3000;
  localparam real PI = 3.14159265358979323846;
  localparam int AMP = (1 << (OUT_W - 1)) - 1;

  logic                      clk = 1'b0, rst_n = 1'b0;
  logic        [ANGLE_W-1:0] angle;
  logic signed [OUT_W-1:0]   cos_o, sin_o;
  logic        [ANGLE_W-1:0] hist [N];

  cordic_core dut (.clk(clk), .rst_n(rst_n), .angle(angle), .cos_o(cos_o), .sin_o(sin_o));

  always #5 clk = ~clk;

  function automatic int absi(input int v);
    return v < 0 ? -v : v;
  endfunction

  task automatic check_pair(input logic [ANGLE_W-1:0] a);
    real th;
    int  ec, es, dc, ds;
    th = real'(a) / real'(1 << ANGLE_W) * PI / 2.0;
    ec = int'(AMP * $cos(th));
    es = int'(AMP * $sin(th));
    dc = absi(int'(cos_o) - ec);
    ds = absi(int'(sin_o) - es);
    if (dc > max_err) max_err = dc;
    if (ds > max_err) max_err = ds;
    checks++;
    if (dc > 1 || ds > 1) begin
      failures++;
      if (failures < 10) $display("FAIL angle=%0d got=(%0d,%0d) exp=(%0d,%0d)", a, cos_o, sin_o, ec, es);
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
    angle = '0;
    repeat (2) @(posedge clk);
    @(negedge clk);
    rst_n = 1'b1;
    for (int n = 0; n < N; n++) begin
      case (n)
        0:       angle = '0;
        1:       angle = '1;
        2:       angle = ANGLE_W'(1 << (ANGLE_W - 1));
        default: angle = ANGLE_W'($urandom);
      endcase
      hist[n] = angle;
      @(posedge clk);
      #1;
      if (n >= STAGES - 1) check_pair(hist[n - STAGES + 1]);
    end
    $display("max error %0d LSB", max_err);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

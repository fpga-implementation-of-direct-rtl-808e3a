// tb_cordic_stage: random vectors and angles of both signs through single
// CORDIC stages with shift 0 and shift 5; the registered outputs are compared
// with the micro-rotation equations evaluated in the testbench.
module tb_cordic_stage;
  int checks = 0, failures = 0, pos_dir = 0, neg_dir = 0;

  localparam int W = 18;

  logic                clk = 1'b0, rst_n = 1'b0;
  logic signed [W-1:0] x, y, z;
  logic signed [W-1:0] xa, ya, za, xb, yb, zb;

  cordic_stage #(.XY_W(W), .Z_W(W), .SHIFT(0), .ATAN(W'(32768))) dut_a (
    .clk(clk), .rst_n(rst_n), .x_i(x), .y_i(y), .z_i(z), .x_o(xa), .y_o(ya), .z_o(za));
  cordic_stage #(.XY_W(W), .Z_W(W), .SHIFT(5), .ATAN(W'(1303))) dut_b (
    .clk(clk), .rst_n(rst_n), .x_i(x), .y_i(y), .z_i(z), .x_o(xb), .y_o(yb), .z_o(zb));

  always #5 clk = ~clk;

  task automatic expect_stage(input int sh, input int at,
                              input logic signed [W-1:0] xi, yi, zi, xo, yo, zo);
    int ex, ey, ez;
    if (zi >= 0) begin
      ex = int'(xi) - (int'(yi) >>> sh); ey = int'(yi) + (int'(xi) >>> sh); ez = int'(zi) - at;
    end else begin
      ex = int'(xi) + (int'(yi) >>> sh); ey = int'(yi) - (int'(xi) >>> sh); ez = int'(zi) + at;
    end
    checks++;
    if (int'(xo) != ex || int'(yo) != ey || int'(zo) != ez) begin
      failures++;
      if (failures < 10)
        $display("FAIL sh=%0d in=(%0d,%0d,%0d) got=(%0d,%0d,%0d) exp=(%0d,%0d,%0d)",
                 sh, xi, yi, zi, xo, yo, zo, ex, ey, ez);
    end
  endtask

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic signed [W-1:0] xi, yi, zi;
    x = '0; y = '0; z = '0;
    repeat (2) @(posedge clk);
    @(negedge clk);
    rst_n = 1'b1;
    for (int n = 0; n < 1000; n++) begin
      // keep |x|,|y| below 2^16 so the sum cannot overflow, as in the core
      xi = W'($signed($urandom_range(0, 131070)) - 65535);
      yi = W'($signed($urandom_range(0, 131070)) - 65535);
      zi = W'($signed($urandom_range(0, 131070)) - 65535);
      x = xi; y = yi; z = zi;
      if (zi >= 0) pos_dir++; else neg_dir++;
      @(posedge clk);
      #1;
      expect_stage(0, 32768, xi, yi, zi, xa, ya, za);
      expect_stage(5, 1303,  xi, yi, zi, xb, yb, zb);
    end
    checks++;
    if (pos_dir == 0 || neg_dir == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

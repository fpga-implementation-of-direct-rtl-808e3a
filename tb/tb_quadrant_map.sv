// tb_quadrant_map: random first-quadrant cosine/sine pairs in all four
// quadrants; the registered outputs must equal the swapped and negated pair
// given by the sine/cosine symmetries, one cycle later.
module tb_quadrant_map;
  import ddfs_pkg::*;

  int checks = 0, failures = 0;
  int seen [4] = '{0, 0, 0, 0};

  logic                    clk = 1'b0, rst_n = 1'b0;
  logic [1:0]              quad;
  logic signed [OUT_W-1:0] ci, si, co, so;

  quadrant_map dut (.clk(clk), .rst_n(rst_n), .quad(quad), .cos_i(ci), .sin_i(si),
                    .cos_o(co), .sin_o(so));

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int c, s, ec, es;
    quad = '0; ci = '0; si = '0;
    repeat (2) @(posedge clk);
    @(negedge clk);
    rst_n = 1'b1;
    for (int n = 0; n < 2000; n++) begin
      c = $urandom_range(0, 127);
      s = $urandom_range(0, 127);
      quad = 2'(n % 4);
      ci = OUT_W'(c);
      si = OUT_W'(s);
      case (n % 4)
        0:       begin ec =  c; es =  s; end
        1:       begin ec = -s; es =  c; end
        2:       begin ec = -c; es = -s; end
        default: begin ec =  s; es = -c; end
      endcase
      seen[n % 4]++;
      @(posedge clk);
      #1;
      checks++;
      if (int'(co) != ec || int'(so) != es) begin
        failures++;
        if (failures < 10) $display("FAIL q=%0d in=(%0d,%0d) got=(%0d,%0d) exp=(%0d,%0d)",
                                    n % 4, c, s, co, so, ec, es);
      end
    end
    for (int q = 0; q < 4; q++) begin
      checks++;
      if (seen[q] == 0) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

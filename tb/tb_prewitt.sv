// tb_prewitt: random 3x3 windows through L_x and L_y instances; checks the
// Prewitt derivative (right minus left column, bottom minus top row) and
// the one-cycle latency.
module tb_prewitt;
  import femip_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic in_valid = 0;
  logic [2:0][2:0][9:0] win = '0;
  logic vx, vy;
  logic signed [12:0] dx, dy;
  int checks = 0, failures = 0;

  prewitt #(.DIR(0), .D_W(13)) u_x (.clk, .rst_n, .in_valid, .win, .out_valid(vx), .out_d(dx));
  prewitt #(.DIR(1), .D_W(13)) u_y (.clk, .rst_n, .in_valid, .win, .out_valid(vy), .out_d(dy));

  task automatic check(input bit ok, input string s);
    checks++; if (!ok) begin failures++; if (failures < 10) $display("FAIL %s", s); end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < 200; t++) begin
      int ex, ey;
      for (int r = 0; r < 3; r++) for (int c = 0; c < 3; c++)
        win[r][c] = (t < 4) ? ((t[0] ^ (c == 0)) ? 10'd1023 : 10'd0) : 10'($urandom % 1024);
      ex = 0; ey = 0;
      for (int k = 0; k < 3; k++) begin
        ex += int'(win[k][2]) - int'(win[k][0]);
        ey += int'(win[2][k]) - int'(win[0][k]);
      end
      in_valid = 1;
      @(posedge clk); #1 in_valid = 0;
      check(vx && vy, "valid after one cycle");
      check(int'(dx) == ex, $sformatf("Lx %0d expected %0d", dx, ex));
      check(int'(dy) == ey, $sformatf("Ly %0d expected %0d", dy, ey));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin repeat (10000) @(posedge clk); failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule

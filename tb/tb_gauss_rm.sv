// tb_gauss_rm: random 7x7 windows through the convolution module. Checks the
// result of the reset kernel (Gaussian with variance 2, computed here from
// the formula), then loads a different kernel through the coefficient write
// port and checks again; checks the two-cycle latency and saturation.
module tb_gauss_rm;
  import femip_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic in_valid = 0, cfg_we = 0;
  logic [9:0] in_x = 0, in_y = 0;
  logic [6:0][6:0][9:0] in_win = '0;
  logic [5:0] cfg_addr = 0;
  logic [11:0] cfg_data = 0;
  logic out_valid;
  logic [9:0] out_x, out_y, out_pix;
  int checks = 0, failures = 0;
  int kern [7][7];

  gauss_rm #(.COORD_W(10)) dut (.*);

  task automatic check(input bit ok, input string s);
    checks++; if (!ok) begin failures++; if (failures < 10) $display("FAIL %s", s); end
  endtask

  function automatic void gk(input real s2);
    real w [7][7], s;
    s = 0;
    for (int i = 0; i < 7; i++) for (int j = 0; j < 7; j++) begin
      w[i][j] = $exp(-real'((i-3)*(i-3) + (j-3)*(j-3)) / (2.0 * s2)); s += w[i][j]; end
    for (int i = 0; i < 7; i++) for (int j = 0; j < 7; j++) kern[i][j] = int'($floor(w[i][j] * 4096.0 / s + 0.5));
  endfunction

  task automatic run(input int n, input bit bright);
    for (int t = 0; t < n; t++) begin
      int s;
      s = 0;
      for (int i = 0; i < 7; i++) for (int j = 0; j < 7; j++) begin
        in_win[i][j] = bright ? 10'd1023 : 10'($urandom % 1024);
        s += int'(in_win[i][j]) * kern[i][j];
      end
      s = (s + 2048) >>> 12;
      if (s > 1023) s = 1023;
      in_valid = 1; in_x = 10'(t); in_y = 10'(t + 1);
      @(posedge clk); #1 in_valid = 0;
      check(!out_valid, "latency: not after one cycle");
      @(posedge clk); #1;
      check(out_valid && out_x == 10'(t) && out_y == 10'(t + 1), "valid after two cycles");
      check(int'(out_pix) == s, $sformatf("pixel %0d expected %0d", out_pix, s));
    end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(posedge clk); #1;
    gk(2.0);
    run(50, 0);
    // a sharper kernel, with one coefficient enlarged so that saturation occurs
    gk(0.5);
    kern[3][3] += 600;
    for (int c = 0; c < 49; c++) begin
      cfg_we = 1; cfg_addr = 6'(c); cfg_data = 12'(kern[c/7][c%7]);
      @(posedge clk); #1;
    end
    cfg_we = 0;
    run(50, 0);
    run(2, 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin repeat (10000) @(posedge clk); failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule

// tb_sliding_window: feeds the columns of a 9x7 random image (first
// coordinate (1,1)) into a 3x3 window and checks every output window, its
// centre coordinates, and that exactly the windows inside the image appear.
module tb_sliding_window;
  localparam int W = 9, H = 7, K = 3, X0 = 1, Y0 = 1;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic in_valid = 0;
  logic [9:0] in_x = 0, in_y = 0;
  logic [K-1:0][9:0] in_col = '0;
  logic out_valid;
  logic [9:0] out_x, out_y;
  logic [K-1:0][K-1:0][9:0] win;
  int checks = 0, failures = 0, nout = 0;
  int img [H+Y0][W+X0];

  sliding_window #(.K(K), .WIDTH(10), .COORD_W(10), .X0(X0), .Y0(Y0)) dut (.*);

  task automatic check(input bit ok, input string s);
    checks++; if (!ok) begin failures++; if (failures < 10) $display("FAIL %s", s); end
  endtask

  initial begin
    for (int y = 0; y < H + Y0; y++) for (int x = 0; x < W + X0; x++) img[y][x] = $urandom % 1024;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int y = Y0; y < H + Y0; y++)
      for (int x = X0; x < W + X0; x++) begin
        in_valid <= 1; in_x <= 10'(x); in_y <= 10'(y);
        for (int k = 0; k < K; k++) in_col[k] <= 10'(img[(y - (K-1) + k < 0) ? 0 : y - (K-1) + k][x]);
        @(posedge clk);
        in_valid <= 0;
        #1;
        if (x >= X0 + K - 1 && y >= Y0 + K - 1) begin
          check(out_valid, "window expected");
          check(out_x == 10'(x - 1) && out_y == 10'(y - 1), "centre");
          for (int r = 0; r < K; r++)
            for (int c = 0; c < K; c++)
              check(int'(win[r][c]) == img[y-(K-1)+r][x-(K-1)+c], $sformatf("win (%0d,%0d)[%0d][%0d]", x, y, r, c));
        end else check(!out_valid, "no window expected");
        if (out_valid) nout++;
      end
    check(nout == (W - K + 1) * (H - K + 1), "number of windows");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin repeat (10000) @(posedge clk); failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule

// tb_row_buffer: streams an 8x6 random image through a 3-row buffer and
// checks every output column (rows y-2..y at the same column) and its
// coordinates, one cycle after each input pixel.
module tb_row_buffer;
  localparam int W = 8, H = 6, K = 3;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic in_valid = 0;
  logic [9:0] in_x = 0, in_y = 0, in_data = 0;
  logic out_valid;
  logic [9:0] out_x, out_y;
  logic [K-1:0][9:0] out_col;
  int checks = 0, failures = 0;
  int img [H][W];

  row_buffer #(.K(K), .WIDTH(10), .DEPTH(W), .COORD_W(10)) dut (.*);

  task automatic check(input bit ok, input string s);
    checks++; if (!ok) begin failures++; if (failures < 10) $display("FAIL %s", s); end
  endtask

  initial begin
    for (int y = 0; y < H; y++) for (int x = 0; x < W; x++) img[y][x] = $urandom % 1024;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int f = 0; f < 2; f++)
      for (int y = 0; y < H; y++)
        for (int x = 0; x < W; x++) begin
          in_valid <= 1; in_x <= 10'(x); in_y <= 10'(y); in_data <= 10'(img[y][x]);
          @(posedge clk);
          in_valid <= 0;
          #1;
          check(out_valid && out_x == 10'(x) && out_y == 10'(y), "coordinates");
          if (y >= K - 1 || f > 0)
            for (int k = 0; k < K; k++) begin
              int ry;
              ry = y - (K - 1) + k;
              if (ry < 0) ry += H;   // previous frame's rows
              check(int'(out_col[k]) == img[ry][x],
                    $sformatf("(%0d,%0d) k=%0d got %0d exp %0d", x, y, k, out_col[k], img[ry][x]));
            end
          if ($urandom % 4 == 0) @(posedge clk);   // idle cycles in between
        end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin repeat (10000) @(posedge clk); failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule

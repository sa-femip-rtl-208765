// tb_gaussian_filter: two 20x14 random frames through the 7x7 filter. Each
// filtered pixel is compared with the convolution computed here with the
// reset kernel (variance 2); the number of outputs ((W-6)*(H-6)), the
// coordinates, the frame_done pulse and the 4-cycle latency are checked.
module tb_gaussian_filter;
  localparam int W = 20, H = 14;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic in_valid = 0, cfg_we = 0;
  logic [9:0] in_x = 0, in_y = 0, in_pix = 0;
  logic [5:0] cfg_addr = 0;
  logic [11:0] cfg_data = 0;
  logic out_valid, frame_done;
  logic [9:0] out_x, out_y, out_pix;
  int checks = 0, failures = 0, nout = 0, ndone = 0;
  int img [H][W];
  int kern [7][7];
  longint cyc = 0, in_cyc [H][W];
  always @(posedge clk) cyc <= cyc + 1;

  gaussian_filter #(.IMG_W(W), .IMG_H(H), .COORD_W(10)) dut (.*);

  task automatic check(input bit ok, input string s);
    checks++; if (!ok) begin failures++; if (failures < 10) $display("FAIL %s", s); end
  endtask

  always @(posedge clk) if (rst_n) begin
    if (frame_done) ndone++;
    if (out_valid) begin
      int s, x, y;
      x = int'(out_x); y = int'(out_y);
      nout++;
      check(x >= 3 && x < W - 3 && y >= 3 && y < H - 3, "output inside the border");
      s = 0;
      for (int i = 0; i < 7; i++) for (int j = 0; j < 7; j++) s += img[y-3+i][x-3+j] * kern[i][j];
      s = (s + 2048) >>> 12;
      check(int'(out_pix) == s, $sformatf("(%0d,%0d) %0d expected %0d", x, y, out_pix, s));
      check(cyc - in_cyc[y+3][x+3] == 5, $sformatf("latency %0d", cyc - in_cyc[y+3][x+3]));
      check(frame_done == (x == W - 4 && y == H - 4), "frame_done position");
    end
  end

  initial begin
    real w [7][7], s;
    s = 0;
    for (int i = 0; i < 7; i++) for (int j = 0; j < 7; j++) begin
      w[i][j] = $exp(-real'((i-3)*(i-3) + (j-3)*(j-3)) / 4.0); s += w[i][j]; end
    for (int i = 0; i < 7; i++) for (int j = 0; j < 7; j++) kern[i][j] = int'($floor(w[i][j] * 4096.0 / s + 0.5));
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int f = 0; f < 2; f++) begin
      for (int y = 0; y < H; y++) for (int x = 0; x < W; x++) img[y][x] = $urandom % 1024;
      for (int y = 0; y < H; y++)
        for (int x = 0; x < W; x++) begin
          in_valid <= 1; in_x <= 10'(x); in_y <= 10'(y); in_pix <= 10'(img[y][x]);
          in_cyc[y][x] = cyc;
          @(posedge clk);
        end
      in_valid <= 0;
      repeat (10) @(posedge clk);
      check(nout == (f + 1) * (W - 6) * (H - 6), $sformatf("outputs %0d", nout));
      check(ndone == f + 1, "frame_done count");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin repeat (10000) @(posedge clk); failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule

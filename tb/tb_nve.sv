// tb_nve: frames of a flat image with approximately Gaussian noise of
// several standard deviations. The estimate must equal, within one 1/16
// step, sqrt(pi/2)/(6(W-2)(H-2)) * sum |I * M| computed here in real
// arithmetic, and grow with the injected noise.
module tb_nve;
  localparam int W = 32, H = 24;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic in_valid = 0;
  logic [9:0] in_x = 0, in_y = 0, in_pix = 0;
  logic sigma_valid;
  logic [15:0] sigma_q4;
  int checks = 0, failures = 0;
  int img [H][W];

  nve #(.IMG_W(W), .IMG_H(H), .COORD_W(10), .SIGMA_W(16)) dut (.*);

  task automatic check(input bit ok, input string s);
    checks++; if (!ok) begin failures++; if (failures < 10) $display("FAIL %s", s); end
  endtask

  initial begin
    automatic real sds [4] = '{0.0, 3.0, 12.0, 30.0};
    automatic int prev = -1;
    repeat (3) @(posedge clk);
    rst_n = 1;
    foreach (sds[n]) begin
      real acc, sg;
      int got;
      for (int y = 0; y < H; y++) for (int x = 0; x < W; x++) begin
        real g;
        g = 0;
        for (int k = 0; k < 12; k++) g += real'($urandom % 65536) / 65536.0;
        img[y][x] = 500 + int'($floor((g - 6.0) * sds[n] + 0.5)) + ((x > W/2 && y > H/2) ? 200 : 0);
      end
      acc = 0;
      for (int y = 1; y < H - 1; y++) for (int x = 1; x < W - 1; x++) begin
        int v;
        v = img[y-1][x-1] + img[y-1][x+1] + img[y+1][x-1] + img[y+1][x+1]
          - 2 * (img[y-1][x] + img[y][x-1] + img[y][x+1] + img[y+1][x]) + 4 * img[y][x];
        acc += real'((v < 0) ? -v : v);
      end
      sg = acc * $sqrt(3.14159265358979 / 2.0) / (6.0 * real'(W - 2) * real'(H - 2)) * 16.0;
      for (int y = 0; y < H; y++)
        for (int x = 0; x < W; x++) begin
          in_valid <= 1; in_x <= 10'(x); in_y <= 10'(y); in_pix <= 10'(img[y][x]);
          @(posedge clk);
        end
      in_valid <= 0;
      got = -1;
      for (int t = 0; t < 10 && got < 0; t++) begin
        @(posedge clk); #1;
        if (sigma_valid) got = int'(sigma_q4);
      end
      check(got >= 0, "estimate produced");
      check(got - int'($floor(sg)) <= 1 && int'($floor(sg)) - got <= 1,
            $sformatf("sd %f: sigma_q4 %0d expected %f", sds[n], got, sg));
      check(got > prev, "estimate grows with the noise");
      prev = got;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin repeat (20000) @(posedge clk); failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule

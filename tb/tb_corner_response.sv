// tb_corner_response: streams random signed derivatives L_x, L_y (full
// +-3069 range, plus a flat region and a strong corner pattern) over a 32x32
// derivative image whose coordinates start at (4,4), with random gaps, for
// two frames. Every response is compared in order with the reference
// (3x3 sums, det - k*tr^2, shift, saturation), and the 6-cycle latency
// and the output coordinates are checked.
module tb_corner_response;
  import femip_pkg::*;
  import tb_harris_pkg::*;
  localparam int W = 32, SH = 24;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic in_valid = 0, out_valid;
  logic [9:0] in_x = 0, in_y = 0, out_x, out_y;
  logic signed [12:0] in_lx = 0, in_ly = 0;
  logic signed [31:0] out_r;
  int checks = 0, failures = 0, nout = 0, cyc = 0, last_in = 0;
  bit skip_r = 0;
  int lx [W][W], ly [W][W];
  longint q_r [$]; int q_x [$], q_y [$];

  corner_response #(.IMG_W(W), .COORD_W(10), .D_W(13), .X0(4), .Y0(4), .R_SHIFT(SH)) dut (.*);

  task automatic check(input bit ok, input string s);
    checks++; if (!ok) begin failures++; if (failures < 10) $display("FAIL %s", s); end
  endtask

  always @(posedge clk) cyc++;
  always @(negedge clk) if (out_valid) begin
    nout++;
    if (q_r.size() == 0) check(0, "unexpected output");
    else begin
      int ex, ey; longint er;
      ex = q_x.pop_front(); ey = q_y.pop_front(); er = q_r.pop_front();
      check(int'(out_x) == ex && int'(out_y) == ey, $sformatf("coords (%0d,%0d) expected (%0d,%0d)", out_x, out_y, ex, ey));
      check(skip_r || longint'(out_r) == er, $sformatf("R at (%0d,%0d) %0d expected %0d", ex, ey, out_r, er));
    end
  end

  initial begin
    longint sxx, syy, sxy;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int f = 0; f < 2; f++) begin
      for (int y = 4; y < W - 4; y++)
        for (int x = 4; x < W - 4; x++) begin
          if (f == 1 && x < 12) begin lx[y][x] = 0; ly[y][x] = 0; end
          else if (f == 1 && y < 16) begin lx[y][x] = 3069; ly[y][x] = (x % 2) ? 3069 : -3069; end
          else begin lx[y][x] = int'($urandom % 6139) - 3069; ly[y][x] = int'($urandom % 6139) - 3069; end
        end
      for (int y = 5; y < W - 5; y++)
        for (int x = 5; x < W - 5; x++) begin
          sxx = 0; syy = 0; sxy = 0;
          for (int a = -1; a <= 1; a++)
            for (int b = -1; b <= 1; b++) begin
              sxx += longint'(lx[y+a][x+b]) * lx[y+a][x+b];
              syy += longint'(ly[y+a][x+b]) * ly[y+a][x+b];
              sxy += longint'(lx[y+a][x+b]) * ly[y+a][x+b];
            end
          q_x.push_back(x); q_y.push_back(y); q_r.push_back(r_ref(sxx, syy, sxy, SH));
        end
      for (int y = 4; y < W - 4; y++)
        for (int x = 4; x < W - 4; x++) begin
          @(negedge clk);
          while ($urandom % 5 == 0) begin in_valid = 0; @(negedge clk); end
          in_valid = 1; in_x = 10'(x); in_y = 10'(y); in_lx = 13'(lx[y][x]); in_ly = 13'(ly[y][x]);
        end
      @(negedge clk) in_valid = 0;
      repeat (20) @(negedge clk);
    end
    check(q_r.size() == 0 && nout == 2 * (W - 10) * (W - 10), "all responses produced");
    // latency: one extra pixel after a pause
    @(negedge clk);
    in_valid = 1; in_x = 10'(W - 5); in_y = 10'(W - 5); in_lx = 0; in_ly = 0;
    last_in = cyc;
    skip_r = 1;   // the window now repeats column W-5: only timing and coordinates are checked
    q_x.push_back(W - 6); q_y.push_back(W - 6); q_r.push_back(0);
    @(negedge clk) in_valid = 0;
    while (!out_valid) @(negedge clk);
    check(cyc - last_in == 6, $sformatf("latency %0d", cyc - last_in));
    @(negedge clk);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin repeat (100000) @(posedge clk); failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule

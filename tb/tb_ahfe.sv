// tb_ahfe: adaptive Harris feature extractor on a 64x64 frame (filtered
// pixels at 3..60, 8x8-pixel cells). Three frames of noise with bright
// squares are streamed with random gaps. A reference computes the Prewitt
// derivatives, the 3x3 second-moment sums, R, the per-cell thresholding and,
// between frames, the threshold/target update (tb_alg1_pkg); every output
// (coordinates, R, val_feat) is compared in order, as are Curr_EF, TF_slack
// and frame_done.
module tb_ahfe;
  import femip_pkg::*;
  import tb_harris_pkg::*;
  import tb_alg1_pkg::*;
  localparam int W = 64, L = 3, SH = 24, OTF = 400, TH0 = 20000000;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic in_valid = 0;
  logic [9:0] in_x = 0, in_y = 0, out_x, out_y;
  logic [9:0] in_pix = 0;
  logic out_valid, val_feat, frame_done, busy, update_done;
  logic signed [31:0] out_r;
  logic [23:0] curr_ef, tf_slack;
  logic [15:0] lowth_events;
  int checks = 0, failures = 0, nframe_done = 0;
  int img [W][W];
  longint q_r [$]; int q_x [$], q_y [$]; bit q_f [$];
  cellarr_t th, tf, nf, th2, tf2;

  ahfe #(.IMG_W(W), .IMG_H(W), .COORD_W(10), .CELL_LOG2(L), .R_SHIFT(SH), .OTF(OTF), .TF_INIT(48),
         .TH_INIT(TH0)) dut (.*);

  task automatic check(input bit ok, input string s);
    checks++; if (!ok) begin failures++; if (failures < 10) $display("FAIL %s", s); end
  endtask

  always @(negedge clk) begin
    if (frame_done) nframe_done++;
    if (out_valid) begin
      if (q_r.size() == 0) check(0, "unexpected output");
      else begin
        int ex, ey; longint er; bit ef;
        ex = q_x.pop_front(); ey = q_y.pop_front(); er = q_r.pop_front(); ef = q_f.pop_front();
        check(int'(out_x) == ex && int'(out_y) == ey, $sformatf("coords (%0d,%0d) expected (%0d,%0d)", out_x, out_y, ex, ey));
        check(longint'(out_r) == er, $sformatf("R at (%0d,%0d) %0d expected %0d", ex, ey, out_r, er));
        check(val_feat == ef, $sformatf("val_feat at (%0d,%0d)", ex, ey));
        check(frame_done == (ex == W - 6 && ey == W - 6), "frame_done");
      end
    end
  end

  initial begin
    longint sxx, syy, sxy, rr, slack, cef;
    int lx [W][W], ly [W][W]; int nlow, ci;
    for (int k = 0; k < 64; k++) begin th[k] = TH0; tf[k] = 48; end
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int f = 0; f < 3; f++) begin
      for (int y = 0; y < W; y++)
        for (int x = 0; x < W; x++) begin
          img[y][x] = $urandom % 64;
          if (((x / 6) + (y / 6) + f) % 3 == 0 && x % 6 < 4 && y % 6 < 4) img[y][x] += 600 + (f * 40);
        end
      for (int y = 4; y < W - 4; y++)
        for (int x = 4; x < W - 4; x++) begin
          lx[y][x] = 0; ly[y][x] = 0;
          for (int k = -1; k <= 1; k++) begin
            lx[y][x] += img[y+k][x+1] - img[y+k][x-1];
            ly[y][x] += img[y+1][x+k] - img[y-1][x+k];
          end
        end
      for (int k = 0; k < 64; k++) nf[k] = 0;
      for (int y = 5; y < W - 5; y++)
        for (int x = 5; x < W - 5; x++) begin
          sxx = 0; syy = 0; sxy = 0;
          for (int a = -1; a <= 1; a++)
            for (int b = -1; b <= 1; b++) begin
              sxx += longint'(lx[y+a][x+b]) * lx[y+a][x+b];
              syy += longint'(ly[y+a][x+b]) * ly[y+a][x+b];
              sxy += longint'(lx[y+a][x+b]) * ly[y+a][x+b];
            end
          rr = r_ref(sxx, syy, sxy, SH);
          ci = (y >> L) * 8 + (x >> L);
          q_x.push_back(x); q_y.push_back(y); q_r.push_back(rr); q_f.push_back(rr > th[ci]);
          if (rr > th[ci]) nf[ci]++;
        end
      alg1(nf, th, tf, OTF, th2, tf2, slack, cef, nlow);
      for (int y = 3; y < W - 3; y++)
        for (int x = 3; x < W - 3; x++) begin
          @(negedge clk);
          while ($urandom % 6 == 0) begin in_valid = 0; @(negedge clk); end
          in_valid = 1; in_x = 10'(x); in_y = 10'(y); in_pix = 10'(img[y][x]);
        end
      @(negedge clk) in_valid = 0;
      while (!update_done) @(negedge clk);
      check(q_r.size() == 0, "all responses of the frame produced");
      check(longint'(curr_ef) == cef, $sformatf("frame %0d Curr_EF %0d expected %0d", f, curr_ef, cef));
      check(longint'(tf_slack) == slack, $sformatf("frame %0d TF_slack", f));
      for (int k = 0; k < 64; k++) begin th[k] = th2[k]; tf[k] = tf2[k]; end
    end
    check(nframe_done == 3, "three frame_done pulses");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin repeat (200000) @(posedge clk); failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule

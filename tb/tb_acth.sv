// tb_acth: adaptive ci-based thresholding on a 64x64 image (corner
// responses at 5..58, 8x8-pixel cells). Over four frames it streams random
// corner responses whose level depends on the ci (some cells quiet, so
// their thresholds fall to the lower bound, some busy), with random gaps.
// Every response is checked for val_feat against the threshold of its ci;
// after each frame it checks Curr_EF, TF_slack and the thresholds and
// targets of all cells against the reference algorithm (tb_alg1_pkg), and
// that the pass-through stream is one cycle late and unchanged.
module tb_acth;
  import femip_pkg::*;
  import tb_alg1_pkg::*;
  localparam int W = 64, L = 3, XL = W - 6, OTF = 100, TH0 = 20;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic r_valid = 0;
  logic [9:0] r_x = 0, r_y = 0;
  logic signed [31:0] r = 0;
  logic out_valid, val_feat, busy, update_done;
  logic [9:0] out_x, out_y;
  logic signed [31:0] out_r;
  logic [23:0] curr_ef, tf_slack;
  logic [15:0] lowth_events;
  int checks = 0, failures = 0;

  acth #(.COORD_W(10), .CELL_LOG2(L), .X_LAST(XL), .Y_LAST(XL), .OTF(OTF), .TF_INIT(48),
         .TH_INIT(TH0)) dut (.*);

  task automatic check(input bit ok, input string s);
    checks++; if (!ok) begin failures++; if (failures < 10) $display("FAIL %s", s); end
  endtask

  cellarr_t th, tf, nf, th2, tf2;
  int lvl [64];
  logic exp_feat; logic [9:0] exp_x, exp_y; logic signed [31:0] exp_r; logic exp_v = 0;

  always @(negedge clk) begin
    if (exp_v) begin
      check(out_valid && out_x == exp_x && out_y == exp_y && out_r == exp_r, "pass-through");
      check(val_feat == exp_feat, $sformatf("val_feat (%0d,%0d) r %0d", exp_x, exp_y, exp_r));
    end else check(!out_valid && !val_feat, "no output without input");
  end

  initial begin
    longint slack, cef; int nlow, ci;
    for (int k = 0; k < 64; k++) begin th[k] = TH0; tf[k] = 48; end
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    for (int f = 0; f < 4; f++) begin
      for (int k = 0; k < 64; k++) begin
        nf[k] = 0;
        lvl[k] = (k % 5 == 0) ? 0 : (k % 5 == 1) ? 100000 : 3000 + 200 * (k % 7);
      end
      for (int y = 5; y <= XL; y++)
        for (int x = 5; x <= XL; x++) begin
          while ($urandom % 4 == 0) begin
            r_valid = 0;
            @(posedge clk); exp_v = 0; @(negedge clk);
          end
          ci = (y >> L) * 8 + (x >> L);
          r_valid = 1; r_x = 10'(x); r_y = 10'(y);
          r = (lvl[ci] == 0) ? -32'sd5 : 32'($urandom % lvl[ci]) - 32'sd1000;
          @(posedge clk);
          exp_v = 1; exp_x = r_x; exp_y = r_y; exp_r = r;
          exp_feat = (longint'(r) > th[ci]);
          if (exp_feat) nf[ci]++;
          @(negedge clk);
        end
      r_valid = 0;
      @(posedge clk); exp_v = 0;
      alg1(nf, th, tf, OTF, th2, tf2, slack, cef, nlow);
      while (!update_done) @(posedge clk);
      check(longint'(curr_ef) == cef, $sformatf("frame %0d Curr_EF %0d expected %0d", f, curr_ef, cef));
      check(longint'(tf_slack) == slack, $sformatf("frame %0d TF_slack %0d expected %0d", f, tf_slack, slack));
      for (int k = 0; k < 64; k++) begin
        check(longint'(dut.u_th_vec.sr[k / 8][7 - k % 8]) == th2[k],
              $sformatf("frame %0d ci %0d TH %0d expected %0d", f, k, dut.u_th_vec.sr[k / 8][7 - k % 8], th2[k]));
        check(longint'(dut.u_upd.tf[k]) == tf2[k], $sformatf("frame %0d ci %0d TF", f, k));
        th[k] = th2[k]; tf[k] = tf2[k];
      end
      @(negedge clk);
    end
    check(lowth_events > 0, "lower bound reached");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin repeat (200000) @(posedge clk); failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule

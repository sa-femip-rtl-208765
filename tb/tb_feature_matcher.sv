// tb_feature_matcher: four frames of random features (64x64 image, many
// equal responses so the tie rule is exercised) with random filtered images
// in the two frame slots of a small memory model that grants at random and
// answers three cycles later. A reference performs the buffer limit, 3x3
// non-maxima suppression, the NMS buffer limit, the +-17 candidate test and
// the 11x11 cross-correlation; every matching point (coordinates and
// correlation) is compared in order, and the feature, NMS, drop, candidate
// and match counts after every frame. The third frame has more features
// than the buffers hold.
module tb_feature_matcher;
  import femip_pkg::*;
  localparam int W = 64, FD = 256, NS = 40, MD = 17;
  localparam logic [31:0] CCTH = 32'd32_000_000;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic f_valid = 0, frame_end = 0, cur_slot = 0;
  logic [9:0] f_x = 0, f_y = 0;
  logic signed [31:0] f_r = 0;
  logic rd_req, rd_gnt, rd_rvalid;
  logic [23:0] rd_addr;
  logic [31:0] rd_rdata;
  logic m_valid, nms_phase, busy, done;
  logic [9:0] m_x1, m_y1, m_x2, m_y2;
  logic [31:0] m_cc, cand_count, match_count;
  logic [15:0] feat_count, nms_count, feat_drop, nms_drop;
  int checks = 0, failures = 0;
  int mem [2 * W * W];
  int q_x1 [$], q_y1 [$], q_x2 [$], q_y2 [$]; longint q_cc [$];

  feature_matcher #(.IMG_W(W), .IMG_H(W), .COORD_W(10), .FEAT_DEPTH(FD), .NMS_SUB(NS),
                    .MAX_DISP(MD), .CC_WIN(11), .CC_TH(CCTH)) dut (.*);

  task automatic check(input bit ok, input string s);
    checks++; if (!ok) begin failures++; if (failures < 10) $display("FAIL %s", s); end
  endtask

  // memory model: random grant, fixed three-cycle read latency
  logic [2:0] pv; logic [23:0] pa [3];
  always @(negedge clk) rd_gnt <= ($urandom % 10 < 7);
  assign rd_rvalid = pv[2];
  assign rd_rdata  = pv[2] ? 32'(mem[pa[2]]) : 32'hDEAD_BEEF;
  always @(posedge clk) begin
    pv <= {pv[1:0], rd_req && rd_gnt};
    pa[2] <= pa[1]; pa[1] <= pa[0]; pa[0] <= rd_addr;
  end
  initial pv = 0;

  always @(negedge clk) if (m_valid) begin
    if (q_cc.size() == 0) check(0, "unexpected match");
    else begin
      int x1, y1, x2, y2; longint cc;
      x1 = q_x1.pop_front(); y1 = q_y1.pop_front(); x2 = q_x2.pop_front(); y2 = q_y2.pop_front();
      cc = q_cc.pop_front();
      check(int'(m_x1) == x1 && int'(m_y1) == y1 && int'(m_x2) == x2 && int'(m_y2) == y2,
            $sformatf("match (%0d,%0d)-(%0d,%0d) expected (%0d,%0d)-(%0d,%0d)", m_x1, m_y1, m_x2, m_y2, x1, y1, x2, y2));
      check(longint'(m_cc) == cc, "match correlation");
    end
  end

  initial begin
    int fx [$], fy [$], fr [$], kx [$], ky [$], px [$], py [$];
    int ndrop_nms = 0, ncand = 0, nmatch = 0, nfd = 0, nf, sup_total = 0;
    bit supp; longint cc;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int f = 0; f < 4; f++) begin
      fx = {}; fy = {}; fr = {};
      for (int y = 5; y < W - 5; y++)
        for (int x = 5; x < W - 5; x++)
          if ($urandom % ((f == 2) ? 8 : 40) == 0) begin fx.push_back(x); fy.push_back(y); fr.push_back($urandom % 6); end
      for (int k = 0; k < W * W; k++) mem[(f % 2) * W * W + k] = $urandom % 1024;
      // reference: buffer limit, NMS, NMS buffer limit
      nf = fx.size();
      if (nf > FD) begin nfd += nf - FD; nf = FD; end
      kx = {}; ky = {};
      for (int i = 0; i < nf; i++) begin
        supp = 0;
        for (int j = 0; j < nf; j++)
          if (j != i && fx[j] - fx[i] <= 1 && fx[i] - fx[j] <= 1 && fy[j] - fy[i] <= 1 && fy[i] - fy[j] <= 1)
            if ((j < i) ? (fr[j] >= fr[i]) : (fr[j] > fr[i])) supp = 1;
        sup_total += supp;
        if (!supp) begin
          if (kx.size() < NS) begin kx.push_back(fx[i]); ky.push_back(fy[i]); end
          else ndrop_nms++;
        end
      end
      // reference: matching against the previous frame
      if (f > 0)
        for (int a = 0; a < px.size(); a++)
          for (int b = 0; b < kx.size(); b++)
            if (kx[b] - px[a] <= MD && px[a] - kx[b] <= MD && ky[b] - py[a] <= MD && py[a] - ky[b] <= MD) begin
              ncand++;
              cc = 0;
              for (int v = -5; v <= 5; v++)
                for (int u = -5; u <= 5; u++)
                  cc += longint'(mem[((f + 1) % 2) * W * W + (py[a] + v) * W + px[a] + u])
                      * mem[(f % 2) * W * W + (ky[b] + v) * W + kx[b] + u];
              cc = cc & 64'hFFFF_FFFF;
              if (cc < CCTH) begin
                nmatch++;
                q_x1.push_back(px[a]); q_y1.push_back(py[a]); q_x2.push_back(kx[b]); q_y2.push_back(ky[b]);
                q_cc.push_back(cc);
              end
            end
      // stream the features
      cur_slot = f[0];
      for (int i = 0; i < fx.size(); i++) begin
        @(negedge clk);
        while ($urandom % 3 == 0) begin f_valid = 0; @(negedge clk); end
        f_valid = 1; f_x = 10'(fx[i]); f_y = 10'(fy[i]); f_r = fr[i];
      end
      @(negedge clk) f_valid = 0;
      #1 check(int'(feat_count) == nf, $sformatf("frame %0d feature count %0d expected %0d", f, feat_count, nf));
      frame_end = 1;
      @(negedge clk) frame_end = 0;
      while (!done) begin
        @(negedge clk);
      end
      check(int'(nms_count) == kx.size(), $sformatf("frame %0d NMS count %0d expected %0d", f, nms_count, kx.size()));
      check(int'(feat_drop) == nfd && int'(nms_drop) == ndrop_nms, "drop counts");
      check(int'(cand_count) == ncand && int'(match_count) == nmatch,
            $sformatf("frame %0d candidates %0d/%0d matches %0d/%0d", f, cand_count, ncand, match_count, nmatch));
      check(q_cc.size() == 0, "all matches produced");
      px = kx; py = ky;
    end
    check(nmatch > 0 && ncand > nmatch && sup_total > 0 && ndrop_nms > 0 && nfd > 0, "all mechanisms exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin repeat (3000000) @(posedge clk); failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule

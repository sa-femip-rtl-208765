// tb_sa_femip_core: end-to-end test bench body for the sa_femip core.
//
// Streams NFRAMES synthetic frames (bright squares on a flat background that
// move by a few pixels from frame to frame, plus approximately Gaussian
// noise whose level changes between frames) through the core with an
// external memory model, and checks against values computed here:
//  - every filtered pixel written to the frame slot equals the 7x7
//    convolution with the kernel of the configuration expected for that
//    frame (kernels computed here from the Gaussian formula);
//  - one filtered pixel per input pixel: the last filtered pixel of a frame
//    leaves within IMG_W*IMG_H + 16 cycles of the first input pixel;
//  - the noise estimate matches the estimator formula evaluated in real
//    arithmetic, and the configuration chosen for the next frame matches
//    the noise-variance ranges;
//  - the number of features kept by non-maxima suppression, the number of
//    candidate pairs within 17 pixels, and every matching point's
//    cross-correlation and its acceptance against CC_TH.
// Mechanisms counted (each must happen unless FULL): reconfiguration,
// skipped reconfiguration, threshold update, threshold lower bound reached,
// NMS suppression, candidate
// rejection by distance, correlation accepted and rejected.
// FULL = 1 instantiates the core with its default parameters.
module tb_sa_femip_core #(
  parameter int unsigned W        = 64,
  parameter int unsigned H        = 64,
  parameter int unsigned NFRAMES  = 3,
  parameter bit          FULL     = 1'b0,
  parameter int unsigned OTF_T    = 200,
  parameter int unsigned TF_T     = 4,
  parameter logic [31:0] TH_T     = 32'd300,
  parameter logic [31:0] CC_TH_T  = 32'd3_000_000,
  parameter int unsigned MAXCYC   = 400000
) ();
  import femip_pkg::*;

  localparam int unsigned SLOT   = W * H;
  localparam int unsigned BSBASE = 2 * W * H;
  localparam int unsigned MEMD   = 2 * W * H + 5 * 64;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic pix_valid = 1'b0;
  logic [31:0] pix_word = '0;
  logic ready, m_valid, frame_done;
  logic [9:0] m_x1, m_y1, m_x2, m_y2, feat_x, feat_y;
  logic [31:0] m_cc, cand_count, match_count, mem_conflicts;
  logic mem_en, mem_we, mem_rvalid, feat_valid, reconfig_busy, nms_phase;
  logic [23:0] mem_addr, curr_ef, tf_slack;
  logic [31:0] mem_wdata, mem_rdata;
  logic [15:0] sigma_q4, reconfig_count, lowth_events, nms_count, feat_count, feat_drop, nms_drop;
  logic [2:0] filter_cfg;
  logic [7:0] cfg_err_count;

  if (FULL) begin : g_dut
    sa_femip dut (.*);
  end else begin : g_dut
    sa_femip #(.IMG_W(W), .IMG_H(H), .OTF(OTF_T), .TF_INIT(TF_T), .TH_INIT(TH_T),
               .CC_TH(CC_TH_T)) dut (.*);
  end

  ext_mem_model #(.DEPTH(MEMD), .ADDR_W(24), .LAT(3)) u_mem (
    .clk, .en(mem_en), .we(mem_we), .addr(mem_addr), .wdata(mem_wdata),
    .rvalid(mem_rvalid), .rdata(mem_rdata)
  );

  int checks = 0, failures = 0;
  longint cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL [%0t] %s", $time, what);
    end
  endtask

  // ---------------- reference data ----------------
  int img [H][W];
  int ref_f [2][H][W];          // reference filtered frames by slot
  int kern [5][7][7];
  real cfg_s2 [5] = '{0.5, 0.75, 1.0, 1.5, 2.0};

  function automatic void make_kernels();
    for (int c = 0; c < 5; c++) begin
      real s, wgt [7][7];
      s = 0.0;
      for (int i = 0; i < 7; i++)
        for (int j = 0; j < 7; j++) begin
          wgt[i][j] = $exp(-(real'((i-3)*(i-3) + (j-3)*(j-3))) / (2.0 * cfg_s2[c]));
          s += wgt[i][j];
        end
      for (int i = 0; i < 7; i++)
        for (int j = 0; j < 7; j++) kern[c][i][j] = int'($floor(wgt[i][j] * 4096.0 / s + 0.5));
    end
  endfunction

  function automatic int gnoise(input real sd);
    real acc;
    acc = 0.0;
    for (int k = 0; k < 12; k++) acc += real'($urandom % 65536) / 65536.0;
    return int'($floor((acc - 6.0) * sd + 0.5));
  endfunction

  function automatic void make_frame(input int f, input real sd);
    int ox, oy, v;
    ox = 2 * f;
    oy = f;
    for (int y = 0; y < H; y++)
      for (int x = 0; x < W; x++) begin
        v = 100;
        if (x >= W/8 + ox && x < W/8 + ox + W/5 && y >= H/6 + oy && y < H/6 + oy + H/5) v = 700;
        if (x >= W/2 + ox && x < W/2 + ox + W/6 && y >= H/2 + oy && y < H/2 + oy + H/4) v = 600;
        if (x >= W/5 + ox && x < W/5 + ox + W/8 && y >= 2*H/3 + oy && y < 2*H/3 + oy + H/8) v = 450;
        v += gnoise(sd);
        if (v < 0) v = 0;
        if (v > 1023) v = 1023;
        img[y][x] = v;
      end
  endfunction

  function automatic void ref_filter(input int slot, input int c);
    for (int y = 0; y < H; y++)
      for (int x = 0; x < W; x++) begin
        ref_f[slot][y][x] = 0;
        if (x >= 3 && x < W - 3 && y >= 3 && y < H - 3) begin
          int s;
          s = 0;
          for (int i = 0; i < 7; i++)
            for (int j = 0; j < 7; j++) s += img[y-3+i][x-3+j] * kern[c][i][j];
          s = (s + 2048) >>> 12;
          ref_f[slot][y][x] = (s > 1023) ? 1023 : s;
        end
      end
  endfunction

  function automatic real ref_sigma();
    real acc;
    acc = 0.0;
    for (int y = 1; y < H - 1; y++)
      for (int x = 1; x < W - 1; x++) begin
        int v;
        v = img[y-1][x-1] + img[y-1][x+1] + img[y+1][x-1] + img[y+1][x+1]
          - 2 * (img[y-1][x] + img[y][x-1] + img[y][x+1] + img[y+1][x]) + 4 * img[y][x];
        acc += real'((v < 0) ? -v : v);
      end
    return acc * $sqrt(3.14159265358979 / 2.0) / (6.0 * real'(W - 2) * real'(H - 2));
  endfunction

  function automatic int cfg_of(input real sigma);
    real v;
    v = sigma * sigma;
    if (v < 100.0) return 0;
    if (v < 200.0) return 1;
    if (v < 300.0) return 2;
    if (v < 600.0) return 3;
    return 4;
  endfunction

  // ---------------- monitors ----------------
  int fx [$], fy [$], fr [$];        // features of the current frame
  int kx [2][$], ky [2][$];          // kept features by frame parity
  int fvalid_cnt = 0;
  longint last_fvalid_cyc = 0;
  int sigma_seen = -1;
  int matches_ok = 0, matches_bad = 0, acc_seen = 0;
  int upd_done_cnt = 0;

  always @(posedge clk) if (rst_n) begin
    if (g_dut.dut.h_valid && g_dut.dut.h_feat) begin
      fx.push_back(int'(g_dut.dut.h_x));
      fy.push_back(int'(g_dut.dut.h_y));
      fr.push_back(int'(signed'(g_dut.dut.h_r)));
    end
    if (g_dut.dut.f_valid) begin
      fvalid_cnt++;
      last_fvalid_cyc = cyc;
    end
    if (g_dut.dut.sigma_valid) sigma_seen = int'(sigma_q4);
    if (g_dut.dut.h_upd_done) upd_done_cnt++;
  end

  int cur_slot_tb = 0;
  always @(posedge clk) if (rst_n && m_valid) begin
    longint cc;
    int ps, cs;
    cs = cur_slot_tb;
    ps = 1 - cur_slot_tb;
    cc = 0;
    for (int v = -5; v <= 5; v++)
      for (int u = -5; u <= 5; u++)
        cc += longint'(ref_f[ps][int'(m_y1)+v][int'(m_x1)+u]) * longint'(ref_f[cs][int'(m_y2)+v][int'(m_x2)+u]);
    acc_seen++;
    check(longint'(m_cc) == cc, $sformatf("match (%0d,%0d)-(%0d,%0d) cc %0d expected %0d",
          m_x1, m_y1, m_x2, m_y2, m_cc, cc));
    check(longint'(m_cc) < longint'(CC_TH_T) || FULL, "match above the correlation threshold");
    check((int'(m_x1) - int'(m_x2) <= 17) && (int'(m_x2) - int'(m_x1) <= 17) &&
          (int'(m_y1) - int'(m_y2) <= 17) && (int'(m_y2) - int'(m_y1) <= 17), "match too far apart");
  end

  // reference NMS of the collected features
  function automatic void ref_nms(input int par);
    kx[par].delete();
    ky[par].delete();
    for (int i = 0; i < fx.size(); i++) begin
      bit keep;
      keep = 1'b1;
      for (int j = 0; j < fx.size(); j++) begin
        if (j == i) continue;
        if (fx[j] - fx[i] <= 1 && fx[i] - fx[j] <= 1 && fy[j] - fy[i] <= 1 && fy[i] - fy[j] <= 1)
          if ((j < i && fr[j] >= fr[i]) || (j > i && fr[j] > fr[i])) keep = 1'b0;
      end
      if (keep) begin
        kx[par].push_back(fx[i]);
        ky[par].push_back(fy[i]);
      end
    end
  endfunction

  // ---------------- stimulus ----------------
  int n_reconf = 0, n_skip = 0, n_suppr = 0, n_far = 0, n_cc_acc = 0, n_cc_rej = 0;

  initial begin
    automatic real noise_sd [4] = '{2.0, 20.0, 20.0, 12.0};
    automatic int  cfg_now = 4;
    automatic int  exp_reconf = 0;
    automatic longint t0;
    automatic int  cand_prev = 0, match_prev = 0;
    make_kernels();
    // filter bitstreams: configuration c at BSBASE + 64*c, word t = K(t/7, t%7)
    for (int c = 0; c < 5; c++)
      for (int t = 0; t < 49; t++) u_mem.mem[BSBASE + 64 * c + t] = 32'(kern[c][t/7][t%7]);
    repeat (5) @(posedge clk);
    rst_n = 1'b1;
    repeat (5) @(posedge clk);
    for (int f = 0; f < NFRAMES; f++) begin
      automatic int slot = f % 2;
      automatic real sg;
      automatic int ncfg;
      cur_slot_tb = slot;
      make_frame(f, noise_sd[f % 4]);
      ref_filter(slot, cfg_now);
      sg = ref_sigma();
      ncfg = cfg_of(sg);
      fx.delete(); fy.delete(); fr.delete();
      fvalid_cnt = 0;
      sigma_seen = -1;
      while (!ready) @(posedge clk);
      t0 = cyc;
      for (int y = 0; y < H; y++)
        for (int x = 0; x < W; x++) begin
          pix_valid <= 1'b1;
          pix_word  <= 32'(img[y][x]);
          @(posedge clk);
        end
      pix_valid <= 1'b0;
      while (!frame_done) @(posedge clk);
      @(posedge clk);
      // filter output and rate
      check(fvalid_cnt == (W - 6) * (H - 6), $sformatf("frame %0d: %0d filtered pixels", f, fvalid_cnt));
      check(last_fvalid_cyc - t0 <= longint'(W * H + 16),
            $sformatf("frame %0d: filtering took %0d cycles", f, last_fvalid_cyc - t0));
      for (int y = 3; y < H - 3; y++)
        for (int x = 3; x < W - 3; x++)
          check(int'(u_mem.mem[slot * SLOT + y * W + x]) == ref_f[slot][y][x],
                $sformatf("frame %0d filtered (%0d,%0d) = %0d expected %0d", f, x, y,
                          u_mem.mem[slot * SLOT + y * W + x], ref_f[slot][y][x]));
      // noise estimate
      check(sigma_seen >= 0, "no noise estimate");
      check(sigma_seen - int'($floor(sg * 16.0)) <= 1 && int'($floor(sg * 16.0)) - sigma_seen <= 1,
            $sformatf("frame %0d sigma_q4 %0d expected %f", f, sigma_seen, sg * 16.0));
      // reconfiguration
      while (reconfig_busy) @(posedge clk);
      if (ncfg != cfg_now) begin
        exp_reconf++;
        n_reconf++;
      end else begin
        n_skip++;
      end
      cfg_now = ncfg;
      check(int'(filter_cfg) == ncfg, $sformatf("frame %0d cfg %0d expected %0d", f, filter_cfg, ncfg));
      check(int'(reconfig_count) == exp_reconf, "reconfiguration count");
      for (int c = 0; c < 49; c++)
        check(int'(g_dut.dut.u_rf.u_gf.u_rm.coef[c]) == kern[ncfg][c/7][c%7], "loaded kernel");
      // NMS
      ref_nms(f % 2);
      check(int'(nms_count) == kx[f % 2].size(),
            $sformatf("frame %0d NMS kept %0d expected %0d (of %0d)", f, nms_count, kx[f%2].size(), fx.size()));
      n_suppr += fx.size() - kx[f % 2].size();
      // candidates and matches
      if (f > 0) begin
        automatic int ncand = 0, nacc = 0;
        for (int a = 0; a < kx[1 - f % 2].size(); a++)
          for (int b = 0; b < kx[f % 2].size(); b++) begin
            automatic int dx = kx[1 - f % 2][a] - kx[f % 2][b];
            automatic int dy = ky[1 - f % 2][a] - ky[f % 2][b];
            if (dx <= 17 && dx >= -17 && dy <= 17 && dy >= -17) ncand++;
            else n_far++;
          end
        check(int'(cand_count) - cand_prev == ncand,
              $sformatf("frame %0d candidates %0d expected %0d", f, int'(cand_count) - cand_prev, ncand));
        nacc = int'(match_count) - match_prev;
        n_cc_acc += nacc;
        n_cc_rej += ncand - nacc;
      end
      cand_prev  = int'(cand_count);
      match_prev = int'(match_count);
      $display("frame %0d: sigma %f cfg->%0d features %0d kept %0d cand %0d matches %0d curr_ef %0d lowth %0d",
               f, sg, ncfg, fx.size(), kx[f%2].size(), cand_count, match_count, curr_ef, lowth_events);
    end
    check(int'(match_count) == acc_seen, "matching points output");
    check(cfg_err_count == 0 && feat_drop == 0 && nms_drop == 0, "no overflow / bitstream error");
    if (!FULL) begin
      check(n_reconf > 0, "mechanism: reconfiguration never happened");
      check(n_skip > 0, "mechanism: skipped reconfiguration never happened");
      check(upd_done_cnt > 0, "mechanism: threshold update never happened");
      check(n_suppr > 0, "mechanism: NMS suppression never happened");
      check(lowth_events > 0, "mechanism: threshold lower bound never reached");
      check(n_far > 0, "mechanism: distance rejection never happened");
      check(n_cc_acc > 0, "mechanism: correlation acceptance never happened");
      check(n_cc_rej > 0, "mechanism: correlation rejection never happened");
    end
    $display("mechanisms: reconfig=%0d skip=%0d th_update=%0d nms_suppressed=%0d far=%0d cc_acc=%0d cc_rej=%0d mem_conflicts=%0d",
             n_reconf, n_skip, upd_done_cnt, n_suppr, n_far, n_cc_acc, n_cc_rej, mem_conflicts);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (MAXCYC) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

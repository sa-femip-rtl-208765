// tb_reconfigurable_filter: the self-adaptive filter on 32x32 frames. Four
// frames with noise levels low, high, high, medium are streamed with random
// gaps; after each frame idle_slot is raised until the reconfiguration is
// over. A memory model holds the five coefficient bitstreams and answers
// reads with random grants and a two-cycle latency. Checks: every filtered
// pixel against a 7x7 convolution with the kernel that was loaded for that
// frame, sigma_q4 against the noise estimate computed in the testbench (+-1),
// the configuration chosen, the reconfiguration count (a reconfiguration for
// each change, none when the configuration stays), the loaded coefficients
// and that no bitstream word was rejected.
module tb_reconfigurable_filter;
  import femip_pkg::*;
  localparam int W = 32, H = 32;
  localparam logic [23:0] BSB = 24'h1000;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic in_valid = 0, out_valid, frame_done, idle_slot = 0;
  logic [9:0] in_x = 0, in_y = 0, out_x, out_y, in_pix = 0, out_pix;
  logic rd_req, rd_gnt, rd_rvalid, sigma_valid, reconfig_busy;
  logic [23:0] rd_addr;
  logic [31:0] rd_rdata;
  logic [15:0] sigma_q4, reconfig_count;
  logic [2:0] cur_cfg;
  logic [7:0] cfg_err_count;
  int checks = 0, failures = 0, sigma_seen = -1, nout = 0;
  int img [H][W], kern [5][49], cfg_now = 4;
  real noise_sd [4] = '{1.5, 40.0, 40.0, 15.0};

  reconfigurable_filter #(.IMG_W(W), .IMG_H(H), .COORD_W(10), .BS_BASE(BSB), .BS_STRIDE(64)) dut (.*);

  task automatic check(input bit ok, input string s);
    checks++; if (!ok) begin failures++; if (failures < 10) $display("FAIL %s", s); end
  endtask

  // bitstream memory: random grant, two-cycle latency
  logic [1:0] pv; logic [23:0] pa [2];
  always @(negedge clk) rd_gnt <= ($urandom % 3 != 0);
  assign rd_rvalid = pv[1];
  assign rd_rdata  = (pa[1] >= BSB && pa[1] < BSB + 24'(5 * 64) && (pa[1] - BSB) % 64 < 49)
                   ? 32'(kern[(pa[1] - BSB) / 64][(pa[1] - BSB) % 64]) : 32'hBAD0_BAD0;
  initial pv = 0;
  always @(posedge clk) begin pv <= {pv[0], rd_req && rd_gnt}; pa[1] <= pa[0]; pa[0] <= rd_addr; end

  always @(negedge clk) begin
    if (sigma_valid) sigma_seen = int'(sigma_q4);
    if (out_valid) begin
      int s, x, y;
      x = int'(out_x); y = int'(out_y); nout++;
      s = 0;
      for (int i = 0; i < 7; i++)
        for (int j = 0; j < 7; j++) s += img[y-3+i][x-3+j] * kern[cfg_now][i*7+j];
      s = (s + 2048) >>> 12;
      if (s > 1023) s = 1023;
      check(int'(out_pix) == s, $sformatf("pixel (%0d,%0d) %0d expected %0d", x, y, out_pix, s));
      check(frame_done == (x == W - 4 && y == H - 4), "frame_done");
    end
  end

  function automatic int gnoise(input real sd);
    real acc;
    acc = 0.0;
    for (int k = 0; k < 12; k++) acc += real'($urandom % 65536) / 65536.0;
    return int'($floor((acc - 6.0) * sd + 0.5));
  endfunction

  initial begin
    int nreconf = 0, ncfg, v; real acc, sg;
    for (int c = 0; c < 5; c++)
      for (int t = 0; t < 49; t++) kern[c][t] = int'(gauss_coef(t / 7, t % 7, cfg_sigma2(c)));
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int f = 0; f < 4; f++) begin
      for (int y = 0; y < H; y++)
        for (int x = 0; x < W; x++) begin
          v = 500 + gnoise(noise_sd[f]);
          img[y][x] = (v < 0) ? 0 : (v > 1023) ? 1023 : v;
        end
      acc = 0.0;
      for (int y = 1; y < H - 1; y++)
        for (int x = 1; x < W - 1; x++) begin
          v = img[y-1][x-1] + img[y-1][x+1] + img[y+1][x-1] + img[y+1][x+1]
            - 2 * (img[y-1][x] + img[y][x-1] + img[y][x+1] + img[y+1][x]) + 4 * img[y][x];
          acc += real'((v < 0) ? -v : v);
        end
      sg = acc * $sqrt(3.14159265358979 / 2.0) / (6.0 * real'(W - 2) * real'(H - 2));
      ncfg = (sg * sg < 100.0) ? 0 : (sg * sg < 200.0) ? 1 : (sg * sg < 300.0) ? 2 : (sg * sg < 600.0) ? 3 : 4;
      sigma_seen = -1; nout = 0;
      for (int y = 0; y < H; y++)
        for (int x = 0; x < W; x++) begin
          @(negedge clk);
          while ($urandom % 5 == 0) begin in_valid = 0; @(negedge clk); end
          in_valid = 1; in_x = 10'(x); in_y = 10'(y); in_pix = 10'(img[y][x]);
        end
      @(negedge clk) in_valid = 0;
      repeat (10) @(negedge clk);
      check(nout == (W - 6) * (H - 6), "filtered pixel count");
      check(sigma_seen >= 0 && sigma_seen - int'($floor(sg * 16.0)) <= 1 && int'($floor(sg * 16.0)) - sigma_seen <= 1,
            $sformatf("frame %0d sigma_q4 %0d expected %f", f, sigma_seen, sg * 16.0));
      $display("frame %0d sigma %f cfg %0d busy %0d t=%0t", f, sg, ncfg, reconfig_busy, $time);
      idle_slot = 1;
      @(negedge clk);
      while (reconfig_busy) @(negedge clk);
      idle_slot = 0;
      if (ncfg != cfg_now) nreconf++;
      cfg_now = ncfg;
      check(int'(cur_cfg) == ncfg, $sformatf("frame %0d configuration %0d expected %0d", f, cur_cfg, ncfg));
      check(int'(reconfig_count) == nreconf, "reconfiguration count");
      for (int t = 0; t < 49; t++) check(int'(dut.u_gf.u_rm.coef[t]) == kern[ncfg][t], "loaded coefficient");
    end
    check(nreconf >= 2 && nreconf < 4 && cfg_err_count == 0, "reconfigured and skipped, no bitstream error");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin repeat (100000) @(posedge clk); failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule

// tb_reconfig_manager: sends noise estimates across all five variance
// ranges (and the same range twice). For each it checks the chosen
// configuration, that no memory read starts before idle_slot, the read
// addresses (table base + 64*cfg + n), the words forwarded to the
// configuration port in order, cur_cfg and the load count, and that a
// repeated configuration is not reloaded. Reads go through an external
// memory model with a grant that is withheld at random.
module tb_reconfig_manager;
  import femip_pkg::*;
  localparam logic [23:0] BASE = 24'd1000;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic sigma_valid = 0, idle_slot = 0;
  logic [15:0] sigma_q4 = 0;
  logic rd_req, rd_gnt, rd_rvalid, cp_start, cp_valid, busy;
  logic [23:0] rd_addr;
  logic [31:0] rd_rdata, cp_data;
  logic [2:0] cur_cfg;
  logic [15:0] reconfig_count;
  logic gnt_en = 0;
  int checks = 0, failures = 0;

  reconfig_manager #(.SIGMA_W(16), .BS_BASE(BASE), .BS_STRIDE(64)) dut (.*);
  assign rd_gnt = rd_req && gnt_en;
  ext_mem_model #(.DEPTH(2048), .ADDR_W(24), .LAT(2)) u_mem (
    .clk, .en(rd_gnt), .we(1'b0), .addr(rd_addr), .wdata(32'd0), .rvalid(rd_rvalid), .rdata(rd_rdata));

  always @(posedge clk) gnt_en <= ($urandom % 4) != 0;

  task automatic check(input bit ok, input string s);
    checks++; if (!ok) begin failures++; if (failures < 10) $display("FAIL %s", s); end
  endtask

  int words [$];
  int reads [$];
  always @(posedge clk) if (rst_n) begin
    if (cp_valid) words.push_back(int'(cp_data));
    if (rd_gnt) reads.push_back(int'(rd_addr));
    if (rd_req) check(busy, "read only while busy");
  end

  task automatic one(input int sig, input int exp_cfg, input bit expect_load);
    int cnt0;
    cnt0 = int'(reconfig_count);
    words.delete(); reads.delete();
    sigma_q4 = 16'(sig); sigma_valid = 1; @(posedge clk); #1 sigma_valid = 0;
    repeat (20) begin
      @(posedge clk); #1;
      check(!rd_req, "no read before the idle slot");
    end
    idle_slot = 1;
    repeat (3) @(posedge clk);
    #1 idle_slot = 0;
    for (int t = 0; t < 400 && busy; t++) @(posedge clk);
    #1;
    check(!busy, "load finished");
    check(int'(cur_cfg) == exp_cfg, $sformatf("sigma %0d: cfg %0d expected %0d", sig, cur_cfg, exp_cfg));
    check(int'(reconfig_count) == cnt0 + (expect_load ? 1 : 0), "load count");
    check(words.size() == (expect_load ? 49 : 0), $sformatf("%0d words forwarded", words.size()));
    for (int n = 0; n < words.size(); n++) begin
      check(reads[n] == int'(BASE) + 64 * exp_cfg + n, "read address");
      check(words[n] == 7000 + 64 * exp_cfg + n, "forwarded word");
    end
  endtask

  initial begin
    for (int a = 0; a < 2048; a++) u_mem.mem[a] = 32'(6000 + a);
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(posedge clk);
    one(50, 0, 1);     // sigma 3.1  -> variance < 100
    one(200, 1, 1);    // sigma 12.5 -> 156
    one(250, 2, 1);    // sigma 15.6 -> 244
    one(300, 3, 1);    // sigma 18.8 -> 352
    one(320, 3, 0);    // same configuration: no reload
    one(500, 4, 1);    // sigma 31   -> 977
    one(159, 0, 1);    // just below sqrt(100)
    one(160, 1, 1);    // at sqrt(100)
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin repeat (20000) @(posedge clk); failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule

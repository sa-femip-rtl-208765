// tb_ext_mem_if: random traffic from the write client and both read
// clients against a memory model. Checks that writes are never delayed and
// land in memory, that a read is granted only when no write and no
// higher-priority read is present, and that every read response reaches the
// client that issued it, in order, with the right data.
module tb_ext_mem_if;
  import femip_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic wr_valid = 0, a_req = 0, b_req = 0;
  logic [23:0] wr_addr = 0, a_addr = 0, b_addr = 0;
  logic [31:0] wr_data = 0;
  logic a_gnt, a_rvalid, b_gnt, b_rvalid, mem_en, mem_we, mem_rvalid;
  logic [31:0] a_rdata, b_rdata, mem_wdata, mem_rdata, conflict_count;
  logic [23:0] mem_addr;
  int checks = 0, failures = 0, na = 0, nb = 0;
  int qa [$], qb [$];

  ext_mem_if #(.TAG_DEPTH(8)) dut (.*);
  ext_mem_model #(.DEPTH(1024), .ADDR_W(24), .LAT(4)) u_mem (
    .clk, .en(mem_en), .we(mem_we), .addr(mem_addr), .wdata(mem_wdata), .rvalid(mem_rvalid), .rdata(mem_rdata));

  task automatic check(input bit ok, input string s);
    checks++; if (!ok) begin failures++; if (failures < 10) $display("FAIL %s", s); end
  endtask

  always @(posedge clk) if (rst_n) begin
    if (wr_valid) check(mem_en && mem_we && mem_addr == wr_addr && mem_wdata == wr_data, "write passes at once");
    if (a_gnt) begin check(!wr_valid, "a granted during write"); qa.push_back(int'(a_addr)); end
    if (b_gnt) begin check(!wr_valid && !a_req, "b granted over write or a"); qb.push_back(int'(b_addr)); end
    if (a_rvalid) begin
      check(qa.size() > 0 && a_rdata == 32'(qa[0] * 3 + 1), "a data");
      if (qa.size() > 0) void'(qa.pop_front());
      na++;
    end
    if (b_rvalid) begin
      check(qb.size() > 0 && b_rdata == 32'(qb[0] * 3 + 1), "b data");
      if (qb.size() > 0) void'(qb.pop_front());
      nb++;
    end
    check(!(a_rvalid && b_rvalid), "one response per cycle");
  end

  initial begin
    for (int i = 0; i < 1024; i++) u_mem.mem[i] = 32'(i * 3 + 1);
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < 2000; t++) begin
      // requests change only when accepted (or not pending)
      if (!a_req || a_gnt) begin a_req <= ($urandom % 3 == 0); a_addr <= 24'($urandom % 512); end
      if (!b_req || b_gnt) begin b_req <= ($urandom % 2 == 0); b_addr <= 24'($urandom % 512); end
      wr_valid <= ($urandom % 4 == 0);
      wr_addr  <= 24'(512 + $urandom % 512);
      wr_data  <= 32'($urandom);
      @(posedge clk);
      if (wr_valid) u_mem.mem[wr_addr] = wr_data;   // keep reads of 0..511 unaffected
    end
    a_req <= 0; b_req <= 0; wr_valid <= 0;
    repeat (20) @(posedge clk);
    check(qa.size() == 0 && qb.size() == 0, "all responses returned");
    check(na > 100 && nb > 100, "both read clients served");
    check(conflict_count > 0, "conflicts counted");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin repeat (20000) @(posedge clk); failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule

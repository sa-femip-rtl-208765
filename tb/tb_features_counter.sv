// tb_features_counter: drives random corner responses against random
// thresholds (including negative responses and the largest threshold),
// random cell ends and a random stored count nf_out. Checks val_feat
// (R > TH, signed) and nf_in: the stored count plus the feature at the first
// response of a cell, the running count plus the feature afterwards,
// saturating at the largest count.
module tb_features_counter;
  import femip_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic r_valid = 0, cell_end = 0, val_feat;
  logic signed [31:0] r = 0;
  logic [31:0] th = 0;
  logic [15:0] nf_out = 0, nf_in;
  int checks = 0, failures = 0, nfeat = 0;

  features_counter dut (.*);

  task automatic check(input bit ok, input string s);
    checks++; if (!ok) begin failures++; if (failures < 10) $display("FAIL %s", s); end
  endtask

  initial begin
    int acc; bit first, feat;
    repeat (3) @(posedge clk);
    rst_n = 1;
    first = 1; acc = 0;
    for (int i = 0; i < 3000; i++) begin
      @(negedge clk);
      r_valid = ($urandom % 4 != 0);
      r = (i % 3 == 0) ? -32'sd1 * ($urandom % 1000) : 32'($urandom % 5000);
      th = (i % 97 == 0) ? 32'h7FFF_FFFF : 32'($urandom % 4000);
      cell_end = ($urandom % 6 == 0);
      nf_out = (i > 2000 && i < 2100) ? 16'hFFFE + 16'($urandom % 2) : 16'($urandom % 100);
      #1;
      feat = r_valid && (longint'(r) > longint'(th));
      check(val_feat == feat, "val_feat");
      if (r_valid) begin
        int base;
        base = first ? int'(nf_out) : acc;
        acc = (feat && base != 65535) ? base + 1 : base;
        check(int'(nf_in) == acc, $sformatf("nf_in %0d expected %0d", nf_in, acc));
        first = cell_end;
        nfeat += feat;
      end
    end
    check(nfeat > 100, "features seen");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin repeat (10000) @(posedge clk); failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule

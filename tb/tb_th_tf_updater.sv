// tb_th_tf_updater: runs several update rounds with random feature counts
// and thresholds (some cells far below target with small thresholds so the
// lower bound is hit, some far above). In pass A it checks each new
// threshold, in pass B each new target, and TF_slack and Curr_EF, all
// against the reference algorithm in tb_alg1_pkg.
module tb_th_tf_updater;
  import femip_pkg::*;
  import tb_alg1_pkg::*;
  localparam int OTF = 3000;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic start = 0, step = 0, pass_b = 0;
  logic [31:0] th_cur = 0, new_th;
  logic [15:0] nf_cur = 0, tf_head, lowth_events;
  logic [23:0] tf_slack, curr_ef;
  int checks = 0, failures = 0, nlow_total = 0;

  th_tf_updater #(.N_CELL(64), .DELTA(15), .LOW_TH(15), .OTF(OTF), .TF_INIT(48)) dut (.*);

  task automatic check(input bit ok, input string s);
    checks++; if (!ok) begin failures++; if (failures < 10) $display("FAIL %s", s); end
  endtask

  initial begin
    cellarr_t nf, th, tf, th2, tf2;
    longint slack, cef;
    int nlow;
    for (int k = 0; k < 64; k++) tf[k] = 48;
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(posedge clk); #1;
    for (int round = 0; round < 6; round++) begin
      for (int k = 0; k < 64; k++) begin
        case ($urandom % 4)
          0: begin nf[k] = 0;                 th[k] = 15 + $urandom % 20; end   // lower bound
          1: begin nf[k] = tf[k] + 16 + $urandom % 200; th[k] = $urandom % 100000; end
          2: begin nf[k] = tf[k] + int'($urandom % 31) - 15; th[k] = $urandom % 100000; if (nf[k] < 0) nf[k] = 0; end
          default: begin nf[k] = $urandom % 10; th[k] = (round == 0) ? 64'h7FFF_FFFF : $urandom % 2000000; end
        endcase
        if (round == 3 && k % 2 == 0) nf[k] = 200;   // Curr_EF above OTF
      end
      alg1(nf, th, tf, OTF, th2, tf2, slack, cef, nlow);
      nlow_total += nlow;
      start = 1; @(posedge clk); #1 start = 0;
      for (int k = 0; k < 64; k++) begin
        step = 1; pass_b = 0; th_cur = 32'(th[k]); nf_cur = 16'(nf[k]);
        #1 check(longint'(new_th) == th2[k], $sformatf("round %0d cell %0d TH %0d expected %0d (nf %0d tf %0d th %0d hw tf %0d)", round, k, new_th, th2[k], nf[k], tf[k], th[k], tf_head));
        @(posedge clk); #1;
      end
      step = 0;
      check(longint'(tf_slack) == slack, $sformatf("TF_slack %0d expected %0d", tf_slack, slack));
      check(longint'(curr_ef) == cef, "Curr_EF");
      @(posedge clk); #1;
      for (int k = 0; k < 64; k++) begin
        step = 1; pass_b = 1; nf_cur = 16'(nf[k]);
        @(posedge clk); #1;
      end
      step = 0;
      for (int k = 0; k < 64; k++) begin
        check(longint'(dut.tf[k]) == tf2[k], $sformatf("round %0d cell %0d TF %0d expected %0d", round, k, dut.tf[k], tf2[k]));
        tf[k] = tf2[k];
      end
      check(tf_head == 16'(tf2[0]), "tf_head");
    end
    check(int'(lowth_events) == nlow_total && nlow_total > 0, "lower-bound events");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin repeat (10000) @(posedge clk); failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule

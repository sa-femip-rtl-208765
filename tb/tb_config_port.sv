// tb_config_port: streams a 49-word bitstream (with idle gaps) into the
// configuration port and checks each coefficient write (address, data),
// the done pulse with the last word, that extra words are refused and
// counted, and that start rewinds the word counter.
module tb_config_port;
  import femip_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic start = 0, in_valid = 0;
  logic [31:0] in_data = 0;
  logic cfg_we, done;
  logic [5:0] cfg_addr;
  logic [11:0] cfg_data;
  logic [7:0] err_count;
  int checks = 0, failures = 0;

  config_port dut (.*);

  task automatic check(input bit ok, input string s);
    checks++; if (!ok) begin failures++; if (failures < 10) $display("FAIL %s", s); end
  endtask

  task automatic stream(input int n, input int seed);
    for (int w = 0; w < n; w++) begin
      in_valid = 1; in_data = 32'((w * 37 + seed) % 4096) | 32'hABC0_0000;
      #1;
      check(cfg_we == (w < 49), $sformatf("write enable word %0d", w));
      if (w < 49) check(int'(cfg_addr) == w && int'(cfg_data) == (w * 37 + seed) % 4096, "address / data");
      @(posedge clk); #1;
      in_valid = 0;
      check(done == (w == 48), $sformatf("done after word %0d", w));
      if ($urandom % 3 == 0) begin @(posedge clk); #1; end
    end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(posedge clk); #1;
    start = 1; @(posedge clk); #1; start = 0;
    stream(52, 5);
    check(err_count == 3, "extra words counted");
    start = 1; @(posedge clk); #1; start = 0;
    stream(49, 11);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin repeat (10000) @(posedge clk); failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule

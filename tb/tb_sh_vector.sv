// tb_sh_vector: loads all 64 positions through data_in (th_phase = 0),
// then rotates each shifter (th_phase = 1) and checks that data_out walks
// the stored row in order and that eight shifts restore it; checks the
// reset value, that an unselected shifter is untouched, and clear.
module tb_sh_vector;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic en = 0, th_phase = 0, clear = 0;
  logic [2:0] sel = 0;
  logic [15:0] data_in = 0, data_out;
  int checks = 0, failures = 0;
  int val [8][8];

  sh_vector #(.ROWS(8), .COLS(8), .WIDTH(16), .RESET_VAL(16'h1234)) dut (.*);

  task automatic check(input bit ok, input string s);
    checks++; if (!ok) begin failures++; if (failures < 10) $display("FAIL %s", s); end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    #1;
    for (int r = 0; r < 8; r++) begin sel = 3'(r); #1 check(data_out == 16'h1234, "reset value"); end
    for (int r = 0; r < 8; r++)
      for (int c = 0; c < 8; c++) begin
        val[r][c] = $urandom % 65536;
        sel = 3'(r); en = 1; th_phase = 0; data_in = 16'(val[r][c]);
        @(posedge clk); #1;
      end
    en = 0;
    for (int pass = 0; pass < 2; pass++)
      for (int r = 7; r >= 0; r--)
        for (int c = 0; c < 8; c++) begin
          sel = 3'(r); th_phase = 1; en = 1;
          #1 check(int'(data_out) == val[r][c], $sformatf("row %0d cell %0d", r, c));
          @(posedge clk); #1;
        end
    en = 0;
    // shifting row 2 must not disturb row 5
    sel = 3'd2; en = 1; th_phase = 1; @(posedge clk); #1; en = 0;
    sel = 3'd5; #1 check(int'(data_out) == val[5][0], "other row untouched");
    sel = 3'd2; #1 check(int'(data_out) == val[2][1], "row 2 advanced");
    clear = 1; @(posedge clk); #1 clear = 0;
    for (int r = 0; r < 8; r++) begin sel = 3'(r); #1 check(data_out == 0, "cleared"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin repeat (10000) @(posedge clk); failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule

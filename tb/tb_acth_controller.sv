// tb_acth_controller: streams the corner-response coordinates of a 64x64
// frame (5..58, 8-pixel cells) twice and checks, per response, cell_end at
// each cell's last column and the row-select sel = y / 8 with en_th/en_nf on
// cell ends; then checks the update sequence: one start cycle, 64 pass-A
// steps (sel = step / 8, TH written from the updater, NF rotated), a gap,
// 64 pass-B steps, the NF clear, update_done, and busy throughout.
module tb_acth_controller;
  localparam int W = 64, XL = W - 6;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic r_valid = 0;
  logic [9:0] r_x = 0, r_y = 0;
  logic cell_end, en_th, en_nf, th_phase_th, th_phase_nf, nf_clear;
  logic upd_start, upd_step, upd_pass_b, busy, update_done;
  logic [2:0] sel;
  int checks = 0, failures = 0;

  acth_controller #(.COORD_W(10), .CELL_LOG2(3), .X_LAST(XL), .Y_LAST(XL), .ROWS(8), .COLS(8)) dut (.*);

  task automatic check(input bit ok, input string s);
    checks++; if (!ok) begin failures++; if (failures < 10) $display("FAIL %s", s); end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int f = 0; f < 2; f++) begin
      for (int y = 5; y <= XL; y++)
        for (int x = 5; x <= XL; x++) begin
          @(negedge clk);
          if ($urandom % 5 == 0) begin r_valid = 0; #1 check(!cell_end && !en_th, "idle"); @(negedge clk); end
          r_valid = 1; r_x = 10'(x); r_y = 10'(y);
          #1;
          check(cell_end == (x % 8 == 7 || x == XL), $sformatf("cell_end at (%0d,%0d)", x, y));
          check(en_th == cell_end && en_nf == cell_end && th_phase_th && !th_phase_nf, "threshold-phase enables");
          check(int'(sel) == y / 8, $sformatf("sel %0d at row %0d", sel, y));
          check(!busy, "not busy while thresholding");
        end
      @(negedge clk) r_valid = 0;
      #1 check(busy && upd_start, "start cycle");
      for (int s = 0; s < 64; s++) begin
        @(negedge clk); #1;
        check(upd_step && !upd_pass_b && en_th && en_nf && !th_phase_th && th_phase_nf && int'(sel) == s / 8,
              $sformatf("pass A step %0d", s));
      end
      @(negedge clk); #1 check(busy && !upd_step && !en_th && !en_nf, "gap");
      for (int s = 0; s < 64; s++) begin
        @(negedge clk); #1;
        check(upd_step && upd_pass_b && !en_th && en_nf && th_phase_nf && int'(sel) == s / 8,
              $sformatf("pass B step %0d", s));
      end
      @(negedge clk); #1 check(nf_clear && busy, "clear");
      @(negedge clk); #1 check(update_done && !busy && int'(sel) == 0, "done");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin repeat (100000) @(posedge clk); failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule

// acth_controller: control of the adaptive cell-based thresholding.
//
// Thresholding phase: from the coordinates of each corner response it marks
// the last pixel of a cell within a pixel row (x mod CELL = CELL-1, or the
// last column): both shifter vectors shift once there, so the value of the
// next cell comes to their output. At the end of a row of cells (last pixel
// of the last pixel row of a cell row) sel moves to the next shifter. In
// this phase the TH vector rotates (th_phase = 1) and the NF vector takes
// the running counts (its multiplexer at input 0).
// After the last pixel of a frame the update runs: a start cycle; pass A,
// 64 steps visiting the cells row by row (sel = step/8, shifting every
// cycle) while the TH vector loads the new thresholds and the NF vector
// rotates; one idle cycle; pass B, 64 more steps rotating the NF vector for
// the target update; and a cycle that clears the NF vector (local reset).
// update_done pulses then and busy falls. The cell walk and the phases
// follow the design description; giving the two vectors separate enables and
// multiplexer selects, and the step timing, are this implementation's.
module acth_controller
  import femip_pkg::*;
#(
  parameter int unsigned COORD_W   = femip_pkg::COORD_W,
  parameter int unsigned CELL_LOG2 = 7,
  parameter int unsigned X_LAST    = 1018,
  parameter int unsigned Y_LAST    = 1018,
  parameter int unsigned ROWS      = 8,
  parameter int unsigned COLS      = 8
) (
  input  logic                       clk,
  input  logic                       rst_n,
  input  logic                       r_valid,
  input  logic [COORD_W-1:0]         r_x,
  input  logic [COORD_W-1:0]         r_y,
  output logic                       cell_end,
  output logic [$clog2(ROWS)-1:0]    sel,
  output logic                       en_th,
  output logic                       en_nf,
  output logic                       th_phase_th,
  output logic                       th_phase_nf,
  output logic                       nf_clear,
  output logic                       upd_start,
  output logic                       upd_step,
  output logic                       upd_pass_b,
  output logic                       busy,
  output logic                       update_done
);
  localparam int unsigned SW = $clog2(ROWS);
  localparam int unsigned NSTEP = ROWS * COLS;

  typedef enum logic [2:0] {P_THRESH, P_START, P_PASS_A, P_GAP, P_PASS_B, P_CLEAR} phase_e;

  phase_e          phase;
  logic [SW-1:0]   sel_q;
  logic [$clog2(NSTEP)-1:0] stp;
  logic            row_end, cellrow_end, frame_end;

  assign row_end     = (int'(r_x) == X_LAST);
  assign cellrow_end = row_end && ((r_y[CELL_LOG2-1:0] == '1) || (int'(r_y) == Y_LAST));
  assign frame_end   = row_end && (int'(r_y) == Y_LAST);
  assign cell_end    = (phase == P_THRESH) && r_valid && ((r_x[CELL_LOG2-1:0] == '1) || row_end);

  always_comb begin
    sel         = sel_q;
    en_th       = 1'b0;
    en_nf       = 1'b0;
    th_phase_th = 1'b1;
    th_phase_nf = 1'b0;
    nf_clear    = 1'b0;
    upd_start   = 1'b0;
    upd_step    = 1'b0;
    upd_pass_b  = 1'b0;
    case (phase)
      P_THRESH: begin
        en_th = cell_end;
        en_nf = cell_end;
      end
      P_START: upd_start = 1'b1;
      P_PASS_A: begin
        sel         = SW'(stp / COLS);
        en_th       = 1'b1;
        en_nf       = 1'b1;
        th_phase_th = 1'b0;
        th_phase_nf = 1'b1;
        upd_step    = 1'b1;
      end
      P_PASS_B: begin
        sel         = SW'(stp / COLS);
        en_nf       = 1'b1;
        th_phase_nf = 1'b1;
        upd_step    = 1'b1;
        upd_pass_b  = 1'b1;
      end
      P_CLEAR: nf_clear = 1'b1;
      default: ;
    endcase
  end

  assign busy = (phase != P_THRESH);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      phase       <= P_THRESH;
      sel_q       <= '0;
      stp         <= '0;
      update_done <= 1'b0;
    end else begin
      update_done <= 1'b0;
      case (phase)
        P_THRESH: begin
          if (r_valid && cellrow_end) sel_q <= (int'(sel_q) == ROWS - 1) ? '0 : sel_q + 1'b1;
          if (r_valid && frame_end) begin
            sel_q <= '0;
            phase <= P_START;
          end
        end
        P_START: begin
          stp   <= '0;
          phase <= P_PASS_A;
        end
        P_PASS_A: begin
          stp <= stp + 1'b1;
          if (int'(stp) == NSTEP - 1) phase <= P_GAP;
        end
        P_GAP: begin
          stp   <= '0;
          phase <= P_PASS_B;
        end
        P_PASS_B: begin
          stp <= stp + 1'b1;
          if (int'(stp) == NSTEP - 1) phase <= P_CLEAR;
        end
        P_CLEAR: begin
          phase       <= P_THRESH;
          update_done <= 1'b1;
        end
        default: phase <= P_THRESH;
      endcase
    end
  end

  // Corner responses must not arrive while the thresholds are being updated.
  assert property (@(posedge clk) disable iff (!rst_n) busy |-> !r_valid)
    else $error("acth_controller: corner response during threshold update");
endmodule

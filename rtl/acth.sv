// acth: adaptive cell-based thresholding of the Harris corner responses.
//
// The frame is divided into 8x8 cells of 2**CELL_LOG2 pixels square, each
// with its own threshold TH, target feature count TF and measured feature
// count NF. During a frame the features counter compares every R with the
// threshold of its cell (TH shifter vector) and counts features per cell
// (NF shifter vector); after the frame the updater computes the thresholds
// and targets for the next frame. Thresholds start at TH_INIT, by default the largest value.
// The four modules and the controller follow the design description.
// Interface: corner-response stream in (valid, x, y, R); the same stream out
// one cycle later with val_feat; busy while the update runs; update_done
// pulses when the new thresholds are in place; Curr_EF and TF_slack of the
// last update and a count of lower-bound events for observation.
module acth
  import femip_pkg::*;
#(
  parameter int unsigned COORD_W   = femip_pkg::COORD_W,
  parameter int unsigned CELL_LOG2 = 7,
  parameter int unsigned X_LAST    = 1018,
  parameter int unsigned Y_LAST    = 1018,
  parameter int unsigned OTF       = 3000,
  parameter int unsigned TF_INIT   = 48,
  parameter logic [TH_W-1:0] TH_INIT = {1'b0, {(TH_W-1){1'b1}}}
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    r_valid,
  input  logic [COORD_W-1:0]      r_x,
  input  logic [COORD_W-1:0]      r_y,
  input  logic signed [R_W-1:0]   r,
  output logic                    out_valid,
  output logic [COORD_W-1:0]      out_x,
  output logic [COORD_W-1:0]      out_y,
  output logic signed [R_W-1:0]   out_r,
  output logic                    val_feat,
  output logic                    busy,
  output logic                    update_done,
  output logic [23:0]             curr_ef,
  output logic [23:0]             tf_slack,
  output logic [15:0]             lowth_events
);
  logic                 cell_end, en_th, en_nf, ph_th, ph_nf, nf_clear;
  logic                 upd_start, upd_step, upd_pass_b;
  logic [2:0]           sel;
  logic [TH_W-1:0]      th_out, new_th;
  logic [NF_W-1:0]      nf_out, nf_in, nf_data_in;
  logic                 feat;
  logic [TF_W-1:0]      tf_head;

  acth_controller #(.COORD_W(COORD_W), .CELL_LOG2(CELL_LOG2), .X_LAST(X_LAST), .Y_LAST(Y_LAST),
                    .ROWS(N_CELL_ROWS), .COLS(N_CELL_COLS)) u_ctrl (
    .clk, .rst_n, .r_valid, .r_x, .r_y,
    .cell_end, .sel, .en_th, .en_nf, .th_phase_th(ph_th), .th_phase_nf(ph_nf),
    .nf_clear, .upd_start, .upd_step, .upd_pass_b, .busy, .update_done
  );

  sh_vector #(.ROWS(N_CELL_ROWS), .COLS(N_CELL_COLS), .WIDTH(TH_W), .RESET_VAL(TH_INIT)) u_th_vec (
    .clk, .rst_n, .en(en_th), .sel, .th_phase(ph_th), .data_in(new_th), .clear(1'b0),
    .data_out(th_out)
  );

  assign nf_data_in = nf_in;

  sh_vector #(.ROWS(N_CELL_ROWS), .COLS(N_CELL_COLS), .WIDTH(NF_W), .RESET_VAL('0)) u_nf_vec (
    .clk, .rst_n, .en(en_nf), .sel, .th_phase(ph_nf), .data_in(nf_data_in), .clear(nf_clear),
    .data_out(nf_out)
  );

  features_counter u_cnt (
    .clk, .rst_n, .r_valid(r_valid && !busy), .r, .th(th_out), .cell_end,
    .nf_out, .val_feat(feat), .nf_in
  );

  th_tf_updater #(.N_CELL(N_CELL_ROWS * N_CELL_COLS), .OTF(OTF), .TF_INIT(TF_INIT)) u_upd (
    .clk, .rst_n, .start(upd_start), .step(upd_step), .pass_b(upd_pass_b),
    .th_cur(th_out), .nf_cur(nf_out), .new_th, .tf_head, .tf_slack, .curr_ef, .lowth_events
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      out_x     <= '0;
      out_y     <= '0;
      out_r     <= '0;
      val_feat  <= 1'b0;
    end else begin
      out_valid <= r_valid;
      val_feat  <= feat;
      if (r_valid) begin
        out_x <= r_x;
        out_y <= r_y;
        out_r <= r;
      end
    end
  end
endmodule

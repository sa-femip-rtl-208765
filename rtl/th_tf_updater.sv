// th_tf_updater: per-cell threshold and target-feature update between frames.
//
// Implements the adaptive cell thresholding algorithm, one image cell per
// step, cells visited in row-major order in two passes.
// Pass A (pass_b = 0), for each cell: Disp = NF - TF and
// Step = Disp * (0.5/OTF) * TH. If Disp < -DELTA the threshold becomes
// TH + Step, unless that falls below LOW_TH: then TH is kept, the cell is
// flagged as having reached the lower bound and |Disp| is added to TF_slack.
// If Disp > +DELTA the threshold becomes TH + Step (saturated to the largest
// threshold); otherwise it is kept. new_th is the value shifted into the TH
// vector in that step. The overall feature count Curr_EF = sum NF is
// accumulated as well.
// Pass B (pass_b = 1), only if TF_slack > 0: TF_slack_cell = max(1,
// floor(TF_slack / N_CELL)); if Curr_EF <= OTF an unflagged cell's target
// grows by TF_slack_cell and a flagged cell's target becomes its NF;
// otherwise every non-zero target drops by one.
// The algorithm, its constants and the initial target of 48 follow the
// design description (the TF decrease is applied inside the TF_slack > 0
// test, as the algorithm listing nests it). 0.5/OTF is the fixed-point
// constant round(2**32 * 0.5 / OTF); targets and flags live in 64-entry
// rotating registers. start clears TF_slack and Curr_EF before pass A.
module th_tf_updater
  import femip_pkg::*;
#(
  parameter int unsigned N_CELL  = 64,
  parameter int unsigned DELTA   = 15,
  parameter int unsigned LOW_TH  = 15,
  parameter int unsigned OTF     = 3000,
  parameter int unsigned TF_INIT = 48
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               start,
  input  logic               step,
  input  logic               pass_b,
  input  logic [TH_W-1:0]    th_cur,
  input  logic [NF_W-1:0]    nf_cur,
  output logic [TH_W-1:0]    new_th,
  output logic [TF_W-1:0]    tf_head,
  output logic [23:0]        tf_slack,
  output logic [23:0]        curr_ef,
  output logic [15:0]        lowth_events
);
  localparam longint unsigned C_STEP = longint'((2.0 ** 32) * 0.5 / real'(OTF) + 0.5);
  localparam logic [TH_W-1:0] TH_MAX = {1'b0, {(TH_W-1){1'b1}}};
  localparam int unsigned PW = 80;

  logic [TF_W-1:0] tf   [N_CELL];
  logic            low  [N_CELL];

  logic signed [NF_W+1:0] disp;
  logic [NF_W:0]          disp_abs;
  logic signed [PW-1:0]   prod;
  logic signed [TH_W+1:0] cand;
  logic                   flag;
  logic [23:0]            slack_cell;
  logic [TF_W-1:0]        new_tf;

  localparam logic signed [NF_W+1:0] DELTA_S = (NF_W+2)'(DELTA);

  assign tf_head  = tf[0];
  assign disp     = (NF_W+2)'(nf_cur) - (NF_W+2)'(tf[0]);
  assign disp_abs = disp[NF_W+1] ? (NF_W+1)'(-disp) : (NF_W+1)'(disp);
  assign prod     = (PW'(disp) * PW'({1'b0, th_cur}) * PW'(C_STEP)) >>> 32;
  assign cand     = (TH_W+2)'({1'b0, th_cur}) + (TH_W+2)'(prod);

  // Pass A: new threshold of the cell.
  always_comb begin
    new_th = th_cur;
    flag   = 1'b0;
    if (disp < -DELTA_S) begin
      if (cand < (TH_W+2)'(LOW_TH)) flag = 1'b1;
      else                          new_th = TH_W'(cand);
    end else if (disp > DELTA_S) begin
      new_th = (cand > (TH_W+2)'(TH_MAX)) ? TH_MAX : TH_W'(cand);
    end
  end

  // Pass B: new target of the cell.
  always_comb begin
    slack_cell = (tf_slack < 24'(N_CELL)) ? 24'd1 : tf_slack / 24'(N_CELL);
    new_tf     = tf[0];
    if (tf_slack != '0) begin
      if (curr_ef <= 24'(OTF)) begin
        if (!low[0]) new_tf = (24'(tf[0]) + slack_cell > 24'({TF_W{1'b1}})) ? '1
                                                                            : tf[0] + TF_W'(slack_cell);
        else         new_tf = TF_W'(nf_cur);
      end else begin
        new_tf = (tf[0] == '0) ? tf[0] : tf[0] - 1'b1;
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int c = 0; c < N_CELL; c++) begin
        tf[c]  <= TF_W'(TF_INIT);
        low[c] <= 1'b0;
      end
      tf_slack     <= '0;
      curr_ef      <= '0;
      lowth_events <= '0;
    end else if (start) begin
      tf_slack <= '0;
      curr_ef  <= '0;
    end else if (step) begin
      for (int c = 0; c + 1 < N_CELL; c++) begin
        tf[c]  <= tf[c+1];
        low[c] <= low[c+1];
      end
      if (!pass_b) begin
        tf[N_CELL-1]  <= tf[0];
        low[N_CELL-1] <= flag;
        curr_ef       <= curr_ef + 24'(nf_cur);
        if (flag) begin
          tf_slack     <= tf_slack + 24'(disp_abs);
          lowth_events <= lowth_events + 1'b1;
        end
      end else begin
        tf[N_CELL-1]  <= new_tf;
        low[N_CELL-1] <= low[0];
      end
    end
  end
endmodule

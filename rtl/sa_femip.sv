// sa_femip: self-adaptive feature extraction and matching core (top level).
//
// A camera streams grey-scale frames (one 10-bit pixel per 32-bit word, in
// raster order) into the core. The reconfigurable Gaussian filter smooths
// each frame and writes the filtered pixels to external memory, while it
// also estimates the noise level to pick the filter variance of the next
// frame. The adaptive Harris feature extractor computes the corner response
// of every filtered pixel and thresholds it per image cell. After the frame
// the feature matcher suppresses non-maxima (during which the external
// memory is idle and the filter is reconfigured) and then matches the
// frame's features against those of the previous frame, reading 11x11
// windows of both filtered frames back from external memory.
// Frames alternate between two frame slots of the external memory; the
// filter bitstreams sit at BS_BASE. A frame may start only while ready is
// high: ready falls after the last pixel of a frame and rises again when
// matching of that frame is done (frame_done) and no filter reconfiguration
// is in progress, as in the design's filter/extract - NMS - matching
// schedule.
// Interface: pix_valid/pix_word input stream; m_* matching points; a
// single external memory port (mem_*; read data returns in order with
// mem_rvalid); status outputs for observation.
module sa_femip
  import femip_pkg::*;
#(
  parameter int unsigned IMG_W      = 1024,
  parameter int unsigned IMG_H      = 1024,
  parameter int unsigned COORD_W    = femip_pkg::COORD_W,
  parameter int unsigned CELL_LOG2  = $clog2(IMG_W / N_CELL_COLS),
  parameter int unsigned R_SHIFT    = 24,
  parameter int unsigned OTF        = 3000,
  parameter int unsigned TF_INIT    = 48,
  parameter logic [TH_W-1:0] TH_INIT = {1'b0, {(TH_W-1){1'b1}}},
  parameter int unsigned FEAT_DEPTH = 4096,
  parameter int unsigned NMS_SUB    = 500,
  parameter logic [31:0] CC_TH      = 32'hFFFF_FFFF,
  parameter logic [ADDR_W-1:0] BS_BASE = ADDR_W'(2 * IMG_W * IMG_H),
  parameter int unsigned BS_STRIDE  = 64
) (
  input  logic                    clk,
  input  logic                    rst_n,
  // camera stream
  input  logic                    pix_valid,
  input  logic [WORD_W-1:0]       pix_word,
  output logic                    ready,
  // matching points
  output logic                    m_valid,
  output logic [COORD_W-1:0]      m_x1,
  output logic [COORD_W-1:0]      m_y1,
  output logic [COORD_W-1:0]      m_x2,
  output logic [COORD_W-1:0]      m_y2,
  output logic [31:0]             m_cc,
  output logic                    frame_done,
  // external memory
  output logic                    mem_en,
  output logic                    mem_we,
  output logic [ADDR_W-1:0]       mem_addr,
  output logic [WORD_W-1:0]       mem_wdata,
  input  logic                    mem_rvalid,
  input  logic [WORD_W-1:0]       mem_rdata,
  // status
  output logic                    feat_valid,
  output logic [COORD_W-1:0]      feat_x,
  output logic [COORD_W-1:0]      feat_y,
  output logic [15:0]             sigma_q4,
  output logic [2:0]              filter_cfg,
  output logic                    reconfig_busy,
  output logic [15:0]             reconfig_count,
  output logic                    nms_phase,
  output logic [23:0]             curr_ef,
  output logic [23:0]             tf_slack,
  output logic [15:0]             lowth_events,
  output logic [15:0]             feat_count,
  output logic [15:0]             nms_count,
  output logic [15:0]             feat_drop,
  output logic [15:0]             nms_drop,
  output logic [7:0]              cfg_err_count,
  output logic [31:0]             cand_count,
  output logic [31:0]             match_count,
  output logic [31:0]             mem_conflicts
);
  // ---------------- raster coordinates of the input ----------------
  logic [COORD_W-1:0] in_x, in_y;
  logic               last_px, waiting, cur_slot;

  assign last_px = (int'(in_x) == IMG_W - 1) && (int'(in_y) == IMG_H - 1);
  assign ready   = !waiting && !reconfig_busy;

  // ---------------- blocks ----------------
  logic                 f_valid, f_done;
  logic [COORD_W-1:0]   f_x, f_y;
  logic [PIX_W-1:0]     f_pix;
  logic                 rf_req, rf_gnt, rf_rvalid;
  logic [ADDR_W-1:0]    rf_addr;
  logic [WORD_W-1:0]    rf_rdata;
  logic                 sigma_valid;

  logic                 h_valid, h_feat, h_done, h_busy, h_upd_done;
  logic [COORD_W-1:0]   h_x, h_y;
  logic signed [R_W-1:0] h_r;

  logic                 fm_req, fm_gnt, fm_rvalid, fm_busy;
  logic [ADDR_W-1:0]    fm_addr;
  logic [WORD_W-1:0]    fm_rdata;

  logic                 wr_valid;
  logic [ADDR_W-1:0]    wr_addr;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      in_x     <= '0;
      in_y     <= '0;
      waiting  <= 1'b0;
      cur_slot <= 1'b0;
    end else begin
      if (pix_valid) begin
        if (int'(in_x) == IMG_W - 1) begin
          in_x <= '0;
          in_y <= last_px ? '0 : in_y + 1'b1;
        end else begin
          in_x <= in_x + 1'b1;
        end
        if (last_px) waiting <= 1'b1;
      end
      if (frame_done) begin
        waiting  <= 1'b0;
        cur_slot <= !cur_slot;
      end
    end
  end

  reconfigurable_filter #(.IMG_W(IMG_W), .IMG_H(IMG_H), .COORD_W(COORD_W),
                          .BS_BASE(BS_BASE), .BS_STRIDE(BS_STRIDE)) u_rf (
    .clk, .rst_n,
    .in_valid(pix_valid), .in_x, .in_y, .in_pix(pix_word[PIX_W-1:0]),
    .out_valid(f_valid), .out_x(f_x), .out_y(f_y), .out_pix(f_pix), .frame_done(f_done),
    .idle_slot(nms_phase),
    .rd_req(rf_req), .rd_addr(rf_addr), .rd_gnt(rf_gnt), .rd_rvalid(rf_rvalid), .rd_rdata(rf_rdata),
    .sigma_valid, .sigma_q4, .cur_cfg(filter_cfg), .reconfig_busy, .reconfig_count, .cfg_err_count
  );

  // filtered pixels go to the current frame slot of the external memory
  assign wr_valid = f_valid;
  assign wr_addr  = (cur_slot ? ADDR_W'(IMG_W * IMG_H) : '0)
                  + ADDR_W'(f_y) * ADDR_W'(IMG_W) + ADDR_W'(f_x);

  ahfe #(.IMG_W(IMG_W), .IMG_H(IMG_H), .COORD_W(COORD_W), .CELL_LOG2(CELL_LOG2),
         .R_SHIFT(R_SHIFT), .OTF(OTF), .TF_INIT(TF_INIT), .TH_INIT(TH_INIT)) u_ahfe (
    .clk, .rst_n,
    .in_valid(f_valid), .in_x(f_x), .in_y(f_y), .in_pix(f_pix),
    .out_valid(h_valid), .out_x(h_x), .out_y(h_y), .out_r(h_r), .val_feat(h_feat),
    .frame_done(h_done), .busy(h_busy), .update_done(h_upd_done),
    .curr_ef, .tf_slack, .lowth_events
  );

  assign feat_valid = h_valid && h_feat;
  assign feat_x     = h_x;
  assign feat_y     = h_y;

  feature_matcher #(.IMG_W(IMG_W), .IMG_H(IMG_H), .COORD_W(COORD_W), .FEAT_DEPTH(FEAT_DEPTH),
                    .NMS_SUB(NMS_SUB), .CC_TH(CC_TH)) u_fm (
    .clk, .rst_n,
    .f_valid(feat_valid), .f_x(h_x), .f_y(h_y), .f_r(h_r), .frame_end(h_done), .cur_slot,
    .rd_req(fm_req), .rd_addr(fm_addr), .rd_gnt(fm_gnt), .rd_rvalid(fm_rvalid), .rd_rdata(fm_rdata),
    .m_valid, .m_x1, .m_y1, .m_x2, .m_y2, .m_cc,
    .nms_phase, .busy(fm_busy), .done(frame_done),
    .feat_count, .nms_count, .feat_drop, .nms_drop, .cand_count, .match_count
  );

  ext_mem_if u_mem (
    .clk, .rst_n,
    .wr_valid, .wr_addr, .wr_data(WORD_W'(f_pix)),
    .a_req(rf_req), .a_addr(rf_addr), .a_gnt(rf_gnt), .a_rvalid(rf_rvalid), .a_rdata(rf_rdata),
    .b_req(fm_req), .b_addr(fm_addr), .b_gnt(fm_gnt), .b_rvalid(fm_rvalid), .b_rdata(fm_rdata),
    .mem_en, .mem_we, .mem_addr, .mem_wdata, .mem_rvalid, .mem_rdata,
    .conflict_count(mem_conflicts)
  );

  // The camera must wait for the previous frame to be matched.
  assert property (@(posedge clk) disable iff (!rst_n) pix_valid |-> ready)
    else $error("sa_femip: pixel received while the previous frame is still processed");
endmodule

// reconfigurable_filter: Gaussian filter whose variance adapts frame by frame.
//
// While the 7x7 Gaussian filter smooths the incoming frame, the noise
// estimator measures sigma_n of the same frame. At the end of the frame the
// reconfiguration manager chooses the filter variance for the next frame and,
// during the next idle slot of the external memory, streams the chosen
// bitstream through the configuration port into the filter's multiplier
// constants. The structure (estimator, manager, configuration port, filter
// with a reconfigurable multiplier module) follows the design description.
// Interface: raw pixel stream in, filtered pixel stream out (3-pixel border
// dropped), a read port towards the external memory interface, idle_slot
// from the matcher, and status (sigma_n, loaded configuration, activity).
module reconfigurable_filter
  import femip_pkg::*;
#(
  parameter int unsigned IMG_W   = 1024,
  parameter int unsigned IMG_H   = 1024,
  parameter int unsigned COORD_W = femip_pkg::COORD_W,
  parameter logic [ADDR_W-1:0] BS_BASE = ADDR_W'(2 * 1024 * 1024),
  parameter int unsigned BS_STRIDE = 64
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 in_valid,
  input  logic [COORD_W-1:0]   in_x,
  input  logic [COORD_W-1:0]   in_y,
  input  logic [PIX_W-1:0]     in_pix,
  output logic                 out_valid,
  output logic [COORD_W-1:0]   out_x,
  output logic [COORD_W-1:0]   out_y,
  output logic [PIX_W-1:0]     out_pix,
  output logic                 frame_done,
  input  logic                 idle_slot,
  output logic                 rd_req,
  output logic [ADDR_W-1:0]    rd_addr,
  input  logic                 rd_gnt,
  input  logic                 rd_rvalid,
  input  logic [WORD_W-1:0]    rd_rdata,
  output logic                 sigma_valid,
  output logic [15:0]          sigma_q4,
  output logic [2:0]           cur_cfg,
  output logic                 reconfig_busy,
  output logic [15:0]          reconfig_count,
  output logic [7:0]           cfg_err_count
);
  logic                cp_start, cp_valid;
  logic [WORD_W-1:0]   cp_data;
  logic                cfg_we;
  logic [5:0]          cfg_addr;
  logic [COEF_W-1:0]   cfg_data;
  logic                cp_done;

  nve #(.IMG_W(IMG_W), .IMG_H(IMG_H), .COORD_W(COORD_W), .SIGMA_W(16)) u_nve (
    .clk, .rst_n, .in_valid, .in_x, .in_y, .in_pix,
    .sigma_valid, .sigma_q4
  );

  reconfig_manager #(.SIGMA_W(16), .BS_BASE(BS_BASE), .BS_STRIDE(BS_STRIDE)) u_mgr (
    .clk, .rst_n, .sigma_valid, .sigma_q4, .idle_slot,
    .rd_req, .rd_addr, .rd_gnt, .rd_rvalid, .rd_rdata,
    .cp_start, .cp_valid, .cp_data,
    .cur_cfg, .busy(reconfig_busy), .reconfig_count
  );

  config_port u_cp (
    .clk, .rst_n, .start(cp_start), .in_valid(cp_valid), .in_data(cp_data),
    .cfg_we, .cfg_addr, .cfg_data, .done(cp_done), .err_count(cfg_err_count)
  );

  gaussian_filter #(.IMG_W(IMG_W), .IMG_H(IMG_H), .COORD_W(COORD_W)) u_gf (
    .clk, .rst_n, .in_valid, .in_x, .in_y, .in_pix,
    .cfg_we, .cfg_addr, .cfg_data,
    .out_valid, .out_x, .out_y, .out_pix, .frame_done
  );
endmodule

// reconfig_manager: picks the filter configuration for the next frame and
// loads its bitstream from external memory through the configuration port.
//
// When the noise estimator reports sigma_n (sigma_valid) the manager looks
// up the configuration index: five filter variances sigma_f^2 = 0.5, 0.75,
// 1, 1.5, 2 serve the noise variance ranges [0,100), [100,200), [200,300),
// [300,600) and [600,...), compared here on sigma_n against the square roots
// 10, 14.14, 17.32 and 24.49 (the ranges and variances follow the design
// description). The bitstream address table gives configuration c the base
// BS_BASE + c*BS_STRIDE and length BS_LEN words. If the index differs from
// the loaded one, the manager waits for idle_slot (the phase in which no
// other block uses the external memory), then issues BS_LEN reads
// (rd_req/rd_addr, accepted by rd_gnt) and forwards each returned word
// (rd_rvalid/rd_rdata) to the configuration port. A request for the
// configuration already loaded is skipped; that shortcut, the table layout
// and the handshake are this implementation's choices.
// Status: cur_cfg is the loaded configuration, busy is high from the
// decision to the last word, reconfig_count counts completed loads.
module reconfig_manager
  import femip_pkg::*;
#(
  parameter int unsigned SIGMA_W   = 16,
  parameter logic [ADDR_W-1:0] BS_BASE = ADDR_W'(2 * 1024 * 1024),
  parameter int unsigned BS_STRIDE = 64,
  parameter int unsigned BS_LEN    = GK * GK,
  // sigma_n thresholds in 1/16 units: sqrt(100), sqrt(200), sqrt(300), sqrt(600)
  parameter int unsigned TH0 = 160,
  parameter int unsigned TH1 = 226,
  parameter int unsigned TH2 = 277,
  parameter int unsigned TH3 = 392
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 sigma_valid,
  input  logic [SIGMA_W-1:0]   sigma_q4,
  input  logic                 idle_slot,
  // external memory read port
  output logic                 rd_req,
  output logic [ADDR_W-1:0]    rd_addr,
  input  logic                 rd_gnt,
  input  logic                 rd_rvalid,
  input  logic [WORD_W-1:0]    rd_rdata,
  // towards the configuration port
  output logic                 cp_start,
  output logic                 cp_valid,
  output logic [WORD_W-1:0]    cp_data,
  // status
  output logic [2:0]           cur_cfg,
  output logic                 busy,
  output logic [15:0]          reconfig_count
);
  typedef enum logic [1:0] {S_IDLE, S_PENDING, S_FETCH} state_e;

  state_e      state;
  logic [2:0]  want_cfg, new_cfg;
  logic [7:0]  issued, received;

  always_comb begin
    if      (int'(sigma_q4) < TH0) new_cfg = 3'd0;
    else if (int'(sigma_q4) < TH1) new_cfg = 3'd1;
    else if (int'(sigma_q4) < TH2) new_cfg = 3'd2;
    else if (int'(sigma_q4) < TH3) new_cfg = 3'd3;
    else                           new_cfg = 3'd4;
  end

  assign rd_req   = (state == S_FETCH) && (int'(issued) < BS_LEN);
  assign rd_addr  = BS_BASE + ADDR_W'(int'(want_cfg) * BS_STRIDE) + ADDR_W'(issued);
  assign cp_valid = (state == S_FETCH) && rd_rvalid;
  assign cp_data  = rd_rdata;
  assign busy     = (state != S_IDLE);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state          <= S_IDLE;
      want_cfg       <= 3'(N_CFG - 1);
      cur_cfg        <= 3'(N_CFG - 1);   // reset kernel is sigma_f^2 = 2
      issued         <= '0;
      received       <= '0;
      cp_start       <= 1'b0;
      reconfig_count <= '0;
    end else begin
      cp_start <= 1'b0;
      case (state)
        S_IDLE: begin
          if (sigma_valid && new_cfg != cur_cfg) begin
            want_cfg <= new_cfg;
            state    <= S_PENDING;
          end
        end
        S_PENDING: begin
          if (idle_slot) begin
            issued   <= '0;
            received <= '0;
            cp_start <= 1'b1;
            state    <= S_FETCH;
          end
        end
        S_FETCH: begin
          if (rd_req && rd_gnt) issued <= issued + 1'b1;
          if (rd_rvalid) begin
            received <= received + 1'b1;
            if (int'(received) == BS_LEN - 1) begin
              cur_cfg        <= want_cfg;
              reconfig_count <= reconfig_count + 1'b1;
              state          <= S_IDLE;
            end
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end
endmodule

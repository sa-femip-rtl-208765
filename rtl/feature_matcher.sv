// feature_matcher: non-maxima suppression and matching of features between
// two consecutive frames.
//
// Collect: every feature of the frame (coordinates and corner response) is
// stored in the feature buffer (FEAT_DEPTH entries, extra features dropped
// and counted).
// NMS: after the frame, each stored feature is kept only if no other feature
// in its 3x3 neighbourhood is stronger (on equal responses the earlier one
// in raster order wins). Because features arrive in raster order, only the
// entries of the rows y-1 .. y+1 around it are scanned. Kept coordinates go
// to the NMS buffer, two halves of NMS_SUB entries used alternately for the
// features of the current frame and of the previous one. nms_phase is high
// during this phase: nothing here uses the external memory then.
// Matching: every previous-frame feature is compared with every
// current-frame feature; a pair whose coordinates differ by at most
// MAX_DISP in x and in y (a 35x35 neighbourhood) is a candidate. For a
// candidate the un-normalised cross-correlation sum p1*p2 over the two
// 11x11 windows around the features is computed from filtered pixels read
// from the external memory (frame slot prev_slot for the previous frame,
// cur_slot for the current one, pixel (x,y) at slot*IMG_W*IMG_H + y*IMG_W
// + x). A candidate whose correlation is less than CC_TH is output as a
// matching point. done pulses when the frame is finished; nms_count then holds the number
// of features the frame kept after NMS.
// The phases, buffer sizes (1,000 NMS entries in two halves), the 17-pixel
// displacement, the 11x11 windows and the "less than the threshold" test
// follow the design description. The feature buffer depth, the tie rule,
// the scan order, CC_TH and the read interface are this implementation's
// choices; reads use the req/gnt, in-order rvalid port of ext_mem_if.
module feature_matcher
  import femip_pkg::*;
#(
  parameter int unsigned IMG_W      = 1024,
  parameter int unsigned IMG_H      = 1024,
  parameter int unsigned COORD_W    = femip_pkg::COORD_W,
  parameter int unsigned FEAT_DEPTH = 4096,
  parameter int unsigned NMS_SUB    = 500,
  parameter int unsigned MAX_DISP   = 17,
  parameter int unsigned CC_WIN     = 11,
  parameter logic [31:0] CC_TH      = 32'hFFFF_FFFF
) (
  input  logic                    clk,
  input  logic                    rst_n,
  // feature stream
  input  logic                    f_valid,
  input  logic [COORD_W-1:0]      f_x,
  input  logic [COORD_W-1:0]      f_y,
  input  logic signed [R_W-1:0]   f_r,
  input  logic                    frame_end,
  input  logic                    cur_slot,
  // external memory read port
  output logic                    rd_req,
  output logic [ADDR_W-1:0]       rd_addr,
  input  logic                    rd_gnt,
  input  logic                    rd_rvalid,
  input  logic [WORD_W-1:0]       rd_rdata,
  // matching points
  output logic                    m_valid,
  output logic [COORD_W-1:0]      m_x1,
  output logic [COORD_W-1:0]      m_y1,
  output logic [COORD_W-1:0]      m_x2,
  output logic [COORD_W-1:0]      m_y2,
  output logic [31:0]             m_cc,
  // status
  output logic                    nms_phase,
  output logic                    busy,
  output logic                    done,
  output logic [15:0]             feat_count,
  output logic [15:0]             nms_count,
  output logic [15:0]             feat_drop,
  output logic [15:0]             nms_drop,
  output logic [31:0]             cand_count,
  output logic [31:0]             match_count
);
  localparam int unsigned FW   = $clog2(FEAT_DEPTH);
  localparam int unsigned NW   = $clog2(NMS_SUB);
  localparam int unsigned HALF = (CC_WIN - 1) / 2;
  localparam int unsigned NRD  = 2 * CC_WIN * CC_WIN;
  localparam logic [ADDR_W-1:0] SLOT_SIZE = ADDR_W'(IMG_W * IMG_H);

  typedef enum logic [3:0] {
    S_COLLECT, S_NMS_LOAD, S_NMS_BACK, S_NMS_FWD, S_NMS_STORE,
    S_M_START, S_M_OUTER, S_M_INNER, S_CC_RUN, S_CC_DONE, S_FINISH
  } state_e;

  state_e state;

  // feature buffer
  logic [COORD_W-1:0]   fbx [FEAT_DEPTH];
  logic [COORD_W-1:0]   fby [FEAT_DEPTH];
  logic signed [R_W-1:0] fbr [FEAT_DEPTH];
  logic [FW:0]          n_feat;

  // NMS buffer: two halves
  logic [COORD_W-1:0]   nbx [2][NMS_SUB];
  logic [COORD_W-1:0]   nby [2][NMS_SUB];
  logic [NW:0]          n_nms [2];
  logic                 cur_sub, prev_valid;

  // NMS scan
  logic [FW:0]          i, j;
  logic [COORD_W-1:0]   xi, yi;
  logic signed [R_W-1:0] ri;
  logic                 supp;
  logic                 nb, stronger;

  // matching
  logic [NW:0]          a, b;
  logic [COORD_W-1:0]   x1, y1, x2, y2;
  logic [$clog2(NRD+1)-1:0] issued, received;
  logic [3:0]           iu, iv;
  logic                 ifr;
  logic [PIX_W-1:0]     p_prev;
  logic [31:0]          cc;

  // neighbour / strength test of entry j against entry i
  always_comb begin
    nb = (int'(fbx[j[FW-1:0]]) - int'(xi) <= 1) && (int'(xi) - int'(fbx[j[FW-1:0]]) <= 1)
      && (int'(fby[j[FW-1:0]]) - int'(yi) <= 1) && (int'(yi) - int'(fby[j[FW-1:0]]) <= 1);
    stronger = (j < i) ? (fbr[j[FW-1:0]] >= ri) : (fbr[j[FW-1:0]] > ri);
  end

  // candidate test of current entry b against previous entry a
  logic                 close;
  logic [COORD_W-1:0]   bx, by;
  assign bx    = nbx[cur_sub][b[NW-1:0]];
  assign by    = nby[cur_sub][b[NW-1:0]];
  assign close = (int'(bx) - int'(x1) <= int'(MAX_DISP)) && (int'(x1) - int'(bx) <= int'(MAX_DISP))
              && (int'(by) - int'(y1) <= int'(MAX_DISP)) && (int'(y1) - int'(by) <= int'(MAX_DISP));

  // read address of the next window pixel
  logic [COORD_W:0] px, py;
  always_comb begin
    px = ifr ? (COORD_W+1)'(x2) : (COORD_W+1)'(x1);
    py = ifr ? (COORD_W+1)'(y2) : (COORD_W+1)'(y1);
    px = px + (COORD_W+1)'(iu) - (COORD_W+1)'(HALF);
    py = py + (COORD_W+1)'(iv) - (COORD_W+1)'(HALF);
    rd_addr = ((ifr ? cur_slot : !cur_slot) ? SLOT_SIZE : '0)
            + ADDR_W'(py) * ADDR_W'(IMG_W) + ADDR_W'(px);
  end
  assign rd_req = (state == S_CC_RUN) && (int'(issued) < NRD);

  assign nms_phase  = (state == S_NMS_LOAD) || (state == S_NMS_BACK) ||
                      (state == S_NMS_FWD)  || (state == S_NMS_STORE);
  assign busy       = (state != S_COLLECT);
  assign feat_count = 16'(n_feat);

  always_ff @(posedge clk) begin
    if (state == S_COLLECT && f_valid && int'(n_feat) < FEAT_DEPTH) begin
      fbx[n_feat[FW-1:0]] <= f_x;
      fby[n_feat[FW-1:0]] <= f_y;
      fbr[n_feat[FW-1:0]] <= f_r;
    end
    if (state == S_NMS_STORE && !supp && int'(n_nms[cur_sub]) < NMS_SUB) begin
      nbx[cur_sub][n_nms[cur_sub][NW-1:0]] <= xi;
      nby[cur_sub][n_nms[cur_sub][NW-1:0]] <= yi;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state       <= S_COLLECT;
      n_feat      <= '0;
      n_nms[0]    <= '0;
      n_nms[1]    <= '0;
      cur_sub     <= 1'b0;
      prev_valid  <= 1'b0;
      i <= '0; j <= '0; xi <= '0; yi <= '0; ri <= '0; supp <= 1'b0;
      a <= '0; b <= '0; x1 <= '0; y1 <= '0; x2 <= '0; y2 <= '0;
      issued <= '0; received <= '0; iu <= '0; iv <= '0; ifr <= 1'b0;
      p_prev <= '0; cc <= '0;
      m_valid <= 1'b0; m_x1 <= '0; m_y1 <= '0; m_x2 <= '0; m_y2 <= '0; m_cc <= '0;
      done <= 1'b0;
      feat_drop <= '0; nms_drop <= '0; nms_count <= '0; cand_count <= '0; match_count <= '0;
    end else begin
      m_valid <= 1'b0;
      done    <= 1'b0;
      case (state)
        S_COLLECT: begin
          if (f_valid) begin
            if (int'(n_feat) < FEAT_DEPTH) n_feat <= n_feat + 1'b1;
            else if (feat_drop != '1)      feat_drop <= feat_drop + 1'b1;
          end
          if (frame_end) begin
            i              <= '0;
            n_nms[cur_sub] <= '0;
            state          <= S_NMS_LOAD;
          end
        end
        S_NMS_LOAD: begin
          if (i == n_feat) begin
            nms_count <= 16'(n_nms[cur_sub]);
            state     <= S_M_START;
          end else begin
            xi   <= fbx[i[FW-1:0]];
            yi   <= fby[i[FW-1:0]];
            ri   <= fbr[i[FW-1:0]];
            supp <= 1'b0;
            if (i != '0) begin
              j     <= i - 1'b1;
              state <= S_NMS_BACK;
            end else begin
              j     <= i + 1'b1;
              state <= S_NMS_FWD;
            end
          end
        end
        S_NMS_BACK: begin
          if (int'(fby[j[FW-1:0]]) + 1 < int'(yi)) begin
            j     <= i + 1'b1;
            state <= S_NMS_FWD;
          end else if (nb && stronger) begin
            supp  <= 1'b1;
            state <= S_NMS_STORE;
          end else if (j == '0) begin
            j     <= i + 1'b1;
            state <= S_NMS_FWD;
          end else begin
            j <= j - 1'b1;
          end
        end
        S_NMS_FWD: begin
          if (j >= n_feat || int'(fby[j[FW-1:0]]) > int'(yi) + 1) begin
            state <= S_NMS_STORE;
          end else if (nb && stronger) begin
            supp  <= 1'b1;
            state <= S_NMS_STORE;
          end else begin
            j <= j + 1'b1;
          end
        end
        S_NMS_STORE: begin
          if (!supp) begin
            if (int'(n_nms[cur_sub]) < NMS_SUB) n_nms[cur_sub] <= n_nms[cur_sub] + 1'b1;
            else if (nms_drop != '1)            nms_drop <= nms_drop + 1'b1;
          end
          i     <= i + 1'b1;
          state <= S_NMS_LOAD;
        end
        S_M_START: begin
          a     <= '0;
          state <= prev_valid ? S_M_OUTER : S_FINISH;
        end
        S_M_OUTER: begin
          if (a == n_nms[!cur_sub]) begin
            state <= S_FINISH;
          end else begin
            x1    <= nbx[!cur_sub][a[NW-1:0]];
            y1    <= nby[!cur_sub][a[NW-1:0]];
            b     <= '0;
            state <= S_M_INNER;
          end
        end
        S_M_INNER: begin
          if (b == n_nms[cur_sub]) begin
            a     <= a + 1'b1;
            state <= S_M_OUTER;
          end else if (close) begin
            x2         <= bx;
            y2         <= by;
            issued     <= '0;
            received   <= '0;
            iu         <= '0;
            iv         <= '0;
            ifr        <= 1'b0;
            cc         <= '0;
            cand_count <= cand_count + 1;
            state      <= S_CC_RUN;
          end else begin
            b <= b + 1'b1;
          end
        end
        S_CC_RUN: begin
          if (rd_req && rd_gnt) begin
            issued <= issued + 1'b1;
            ifr    <= !ifr;
            if (ifr) begin
              if (int'(iu) == CC_WIN - 1) begin
                iu <= '0;
                iv <= iv + 1'b1;
              end else begin
                iu <= iu + 1'b1;
              end
            end
          end
          if (rd_rvalid) begin
            received <= received + 1'b1;
            if (!received[0]) p_prev <= rd_rdata[PIX_W-1:0];
            else              cc <= cc + 32'(p_prev) * 32'(rd_rdata[PIX_W-1:0]);
            if (int'(received) == NRD - 1) state <= S_CC_DONE;
          end
        end
        S_CC_DONE: begin
          if (cc < CC_TH) begin
            m_valid     <= 1'b1;
            m_x1        <= x1;
            m_y1        <= y1;
            m_x2        <= x2;
            m_y2        <= y2;
            m_cc        <= cc;
            match_count <= match_count + 1;
          end
          b     <= b + 1'b1;
          state <= S_M_INNER;
        end
        S_FINISH: begin
          cur_sub    <= !cur_sub;
          prev_valid <= 1'b1;
          n_feat     <= '0;
          done       <= 1'b1;
          state      <= S_COLLECT;
        end
        default: state <= S_COLLECT;
      endcase
    end
  end
endmodule

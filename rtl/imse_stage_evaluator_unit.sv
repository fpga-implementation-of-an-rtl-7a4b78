// imse_stage_evaluator_unit: evaluates one Viola-Jones search window.
//
// After a start pulse the unit works through one window on its own:
//  1. Window check: the window (Coordinates_XY, Search_Window_dimension) must
//     lie inside the image (Image_Dimension), otherwise it ends with error.
//  2. Variance normalisation: the window sum S1 and square sum S2 are read from
//     the integral images (four corners each) and the adjusted deviation
//       sigma_adj = sqrt(W*H*S2 - S1*S1)
//     is computed with the shared multiplier and the 16-stage square root.
//     sigma_adj equals W*H times the pixel standard deviation, so feature sums
//     need not be divided by the window area and feature weights need not be
//     rescaled. A sigma_adj of 0 is taken as 1.
//  3. Cascade: from Start_Node_and_Stage on, each stage's header (feature count,
//     stage threshold) and features are read from shared memory. For each
//     feature the rectangles are scaled and addressed by haar_feature_scaler,
//     their corners fetched over AHB, their areas taken by
//     haar_feature_rect_calc and weighted by the multiplier:
//       F = sum(area_i * weight_i)
//     F is compared with the normalised threshold T = (thr * sigma_adj) >>> 12:
//     the stage sum gains Weight2 if F >= T and Weight1 otherwise. A stage is
//     passed if its sum is at least its threshold. Failing a stage ends with
//     "no face"; passing End_Stage_number ends with "face".
//  4. result_valid pulses with face, error and the last stage evaluated.
//
// Two state machines run side by side: the main sequencer above and a corner
// fetch machine that issues the four (or eight, for 64-bit square-sum entries)
// AHB word reads of a rectangle and waits for each, so any memory latency is
// absorbed. The algorithm, the adjusted variance, eq. (4)/(5) of the method and
// the sub-units are the design's. The memory formats (see imse_pkg), the
// Q16.16/Q.12 fixed point, the ">=" tie rule and the use of the whole window
// for the variance are this implementation's choices.
//
// Memory formats: integral image entries are 32-bit words, square-sum entries
// 64-bit (high word at the lower address). In shared memory a stage is a
// two-word header {n_features} and {stage threshold, signed Q.12}, followed by
// n_features records of six words: three haar_rect_t, feature threshold
// (signed Q.12), Weight1 and Weight2 (signed Q.12).
module imse_stage_evaluator_unit
  import imse_pkg::*;
#(
  parameter int unsigned SM_ADDR_W = 14   // shared memory word address width
) (
  input  logic                      clk,
  input  logic                      rst_n,
  input  logic                      start,
  input  win_cfg_t                  cfg,
  output logic                      busy,
  output logic                      result_valid,
  output eval_result_t              result,
  // shared memory read port
  output logic                      sm_en,
  output logic [SM_ADDR_W-1:0]      sm_addr,
  input  logic [31:0]               sm_rdata,
  // DMA master
  output logic                      dma_req,
  output logic [31:0]               dma_addr,
  input  logic                      dma_req_ready,
  input  logic                      dma_rsp_valid,
  input  logic [31:0]               dma_rsp_data,
  input  logic                      dma_rsp_err,
  // shared multiplier (latency set by the multiplier, handshaked by valid)
  output logic                      mul_valid,
  output logic signed [MUL_AW-1:0]  mul_a,
  output logic signed [MUL_BW-1:0]  mul_b,
  input  logic                      mul_out_valid,
  input  logic signed [MUL_PW-1:0]  mul_p
);

  typedef enum logic [4:0] {
    E_IDLE, E_CHECK, E_SCALE_ISSUE, E_SCALE_WAIT, E_FETCH_WAIT, E_AREA_WAIT,
    E_VMUL1, E_VMUL1_WAIT, E_VMUL2, E_VMUL2_WAIT, E_SQRT, E_SQRT_WAIT,
    E_SM_READ, E_RECT_SEL, E_WMUL, E_WMUL_WAIT, E_TMUL, E_TMUL_WAIT,
    E_STAGE_END, E_DONE
  } ev_state_e;

  typedef enum logic [1:0] {PH_VARSUM, PH_VARSQ, PH_FEAT} phase_e;
  typedef enum logic {RD_HDR, RD_FEAT} smrd_e;

  ev_state_e state;
  phase_e    phase;
  smrd_e     rd_kind;
  win_cfg_t  c;

  // ---------------------------------------------------------------- datapath regs
  logic [31:0]        sum_x;
  logic [63:0]        sum_x2;
  logic signed [63:0] p1;
  logic [31:0]        sigma;
  logic [SM_ADDR_W-1:0] ptr;
  logic [2:0]         rd_cnt;
  logic [31:0]        buf_w [FEAT_WORDS];
  logic [15:0]        n_feat, feat_idx;
  logic signed [31:0] stage_thr;
  logic signed [31:0] stage_sum;
  logic signed [63:0] feat_sum;
  logic [1:0]         rect_i;
  logic [7:0]         stage;
  logic               face_q, err_q;

  haar_rect_t cur_rect;
  stage_hdr_t hdr;
  assign cur_rect = haar_rect_t'(buf_w[{1'b0, rect_i}]);
  assign hdr      = stage_hdr_t'(buf_w[0]);

  // ---------------------------------------------------------------- scaler
  logic        sc_valid;
  logic [31:0] sc_a1, sc_a2, sc_a3, sc_a4;
  logic [COORD_W-1:0] sc_x, sc_y, sc_w, sc_h;
  logic        sc_scale_en, sc_wide;
  logic [31:0] sc_base;

  always_comb begin
    if (phase == PH_FEAT) begin
      sc_x = COORD_W'(cur_rect.x);
      sc_y = COORD_W'(cur_rect.y);
      sc_w = COORD_W'(cur_rect.w);
      sc_h = COORD_W'(cur_rect.h);
    end else begin
      sc_x = '0;
      sc_y = '0;
      sc_w = c.win_w;
      sc_h = c.win_h;
    end
    sc_scale_en = (phase == PH_FEAT);
    sc_wide     = (phase == PH_VARSQ);
    sc_base     = (phase == PH_VARSQ) ? c.addr_sqsum : c.addr_sum;
  end

  haar_feature_scaler u_scaler (
    .clk(clk), .rst_n(rst_n), .in_valid(state == E_SCALE_ISSUE),
    .x(sc_x), .y(sc_y), .w(sc_w), .h(sc_h),
    .scale_en(sc_scale_en), .scale(c.scale),
    .win_x(c.win_x), .win_y(c.win_y), .stride(c.stride),
    .base(sc_base), .wide(sc_wide),
    .out_valid(sc_valid), .addr1(sc_a1), .addr2(sc_a2), .addr3(sc_a3), .addr4(sc_a4)
  );

  // ---------------------------------------------------------------- corner fetch FSM
  typedef enum logic [1:0] {F_IDLE, F_REQ, F_WAIT} fetch_state_e;
  fetch_state_e fstate;
  logic [31:0]  f_addr [4];
  logic [63:0]  corner [4];
  logic [2:0]   f_cnt;          // word counter: corner = f_cnt >> wide
  logic         f_wide;
  logic         fetch_go, fetch_done, fetch_err;
  logic [1:0]   f_corner;

  assign fetch_go = (state == E_SCALE_WAIT) && sc_valid;
  assign f_corner = f_wide ? f_cnt[2:1] : f_cnt[1:0];
  assign dma_req  = (fstate == F_REQ);
  assign dma_addr = f_addr[f_corner] + ((f_wide && f_cnt[0]) ? 32'd4 : 32'd0);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      fstate     <= F_IDLE;
      f_cnt      <= '0;
      f_wide     <= 1'b0;
      fetch_done <= 1'b0;
      fetch_err  <= 1'b0;
    end else begin
      fetch_done <= 1'b0;
      unique case (fstate)
        F_IDLE: if (fetch_go) begin
          f_addr[0] <= sc_a1;
          f_addr[1] <= sc_a2;
          f_addr[2] <= sc_a3;
          f_addr[3] <= sc_a4;
          f_wide    <= sc_wide;
          f_cnt     <= '0;
          fetch_err <= 1'b0;
          for (int i = 0; i < 4; i++) corner[i] <= '0;
          fstate    <= F_REQ;
        end
        F_REQ: if (dma_req_ready) fstate <= F_WAIT;
        F_WAIT: if (dma_rsp_valid) begin
          if (f_wide && !f_cnt[0]) corner[f_corner][63:32] <= dma_rsp_data;
          else                     corner[f_corner][31:0]  <= dma_rsp_data;
          if (dma_rsp_err) fetch_err <= 1'b1;
          if (f_cnt == (f_wide ? 3'd7 : 3'd3)) begin
            fetch_done <= 1'b1;
            fstate     <= F_IDLE;
          end else begin
            f_cnt  <= f_cnt + 3'd1;
            fstate <= F_REQ;
          end
        end
        default: fstate <= F_IDLE;
      endcase
    end
  end

  // ---------------------------------------------------------------- rectangle area
  logic        rc_valid;
  logic [63:0] rc_area;

  haar_feature_rect_calc #(.WIDTH(64)) u_rect (
    .clk(clk), .rst_n(rst_n), .in_valid(fetch_done),
    .ii1(corner[0]), .ii2(corner[1]), .ii3(corner[2]), .ii4(corner[3]),
    .out_valid(rc_valid), .area(rc_area)
  );

  // ---------------------------------------------------------------- square root
  logic        sq_valid;
  logic [31:0] sq_root;
  logic [63:0] variance;

  sqrt64_array_pipe16 u_sqrt (
    .clk(clk), .rst_n(rst_n), .in_valid(state == E_SQRT), .radicand(variance),
    .out_valid(sq_valid), .root(sq_root)
  );

  // ---------------------------------------------------------------- multiplier requests
  always_comb begin
    mul_valid = 1'b0;
    mul_a     = '0;
    mul_b     = '0;
    unique case (state)
      E_VMUL1: begin
        mul_valid = 1'b1;
        mul_a     = MUL_AW'(sum_x2);
        mul_b     = MUL_BW'(c.win_wh);
      end
      E_VMUL2: begin
        mul_valid = 1'b1;
        mul_a     = MUL_AW'(sum_x);
        mul_b     = MUL_BW'(sum_x);
      end
      E_WMUL: begin
        mul_valid = 1'b1;
        mul_a     = MUL_AW'(rc_area[31:0]);
        mul_b     = MUL_BW'(cur_rect.weight);
      end
      E_TMUL: begin
        mul_valid = 1'b1;
        mul_a     = MUL_AW'(sigma);
        mul_b     = MUL_BW'($signed(buf_w[3]));
      end
      default: ;
    endcase
  end

  logic signed [MUL_PW-1:0] thr_norm;
  assign thr_norm = mul_p >>> THR_FB;

  // ---------------------------------------------------------------- shared memory reads
  logic [2:0] rd_len;
  assign rd_len  = (rd_kind == RD_HDR) ? 3'd2 : 3'(FEAT_WORDS);
  assign sm_en   = (state == E_SM_READ) && (rd_cnt < rd_len);
  assign sm_addr = ptr + SM_ADDR_W'(rd_cnt);

  // ---------------------------------------------------------------- main sequencer
  logic in_image;
  assign in_image = (32'(cfg.win_x) + 32'(cfg.win_w) <= 32'(cfg.img_w)) &&
                    (32'(cfg.win_y) + 32'(cfg.win_h) <= 32'(cfg.img_h));

  logic signed [63:0] var_s;
  assign var_s = p1 - 64'(mul_p);

  assign busy = (state != E_IDLE);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state        <= E_IDLE;
      phase        <= PH_VARSUM;
      rd_kind      <= RD_HDR;
      result_valid <= 1'b0;
      result       <= '0;
      face_q       <= 1'b0;
      err_q        <= 1'b0;
      stage        <= '0;
      rd_cnt       <= '0;
      variance     <= '0;
    end else begin
      result_valid <= 1'b0;
      unique case (state)
        E_IDLE: if (start) begin
          c      <= cfg;
          face_q <= 1'b0;
          err_q  <= 1'b0;
          stage  <= cfg.start_stage;
          ptr    <= SM_ADDR_W'(cfg.start_node[15:2]);
          state  <= in_image ? E_CHECK : E_DONE;
          err_q  <= !in_image;
        end
        E_CHECK: begin
          phase <= PH_VARSUM;
          state <= E_SCALE_ISSUE;
        end
        // ---- rectangle sum subroutine
        E_SCALE_ISSUE: state <= E_SCALE_WAIT;
        E_SCALE_WAIT:  if (sc_valid) state <= E_FETCH_WAIT;
        E_FETCH_WAIT:  if (fetch_done) begin
          if (fetch_err) begin
            err_q <= 1'b1;
            state <= E_DONE;
          end else begin
            state <= E_AREA_WAIT;
          end
        end
        E_AREA_WAIT: if (rc_valid) begin
          unique case (phase)
            PH_VARSUM: begin
              sum_x <= rc_area[31:0];
              phase <= PH_VARSQ;
              state <= E_SCALE_ISSUE;
            end
            PH_VARSQ: begin
              sum_x2 <= rc_area;
              state  <= E_VMUL1;
            end
            default: state <= E_WMUL;
          endcase
        end
        // ---- variance and standard deviation
        E_VMUL1: state <= E_VMUL1_WAIT;
        E_VMUL1_WAIT: if (mul_out_valid) begin
          p1    <= 64'(mul_p);
          state <= E_VMUL2;
        end
        E_VMUL2: state <= E_VMUL2_WAIT;
        E_VMUL2_WAIT: if (mul_out_valid) begin
          variance <= var_s[63] ? 64'd0 : var_s;
          state    <= E_SQRT;
        end
        E_SQRT: state <= E_SQRT_WAIT;
        E_SQRT_WAIT: if (sq_valid) begin
          sigma   <= (sq_root == 32'd0) ? 32'd1 : sq_root;
          rd_kind <= RD_HDR;
          rd_cnt  <= '0;
          state   <= E_SM_READ;
        end
        // ---- shared memory: stage header or feature record
        E_SM_READ: begin
          rd_cnt <= rd_cnt + 3'd1;
          if (rd_cnt != 3'd0) buf_w[rd_cnt - 3'd1] <= sm_rdata;
          if (rd_cnt == rd_len) begin
            ptr    <= ptr + SM_ADDR_W'(rd_len);
            rd_cnt <= '0;
            if (rd_kind == RD_HDR) begin
              n_feat    <= hdr.n_features;
              stage_thr <= $signed(sm_rdata);
              stage_sum <= '0;
              feat_idx  <= '0;
              if (hdr.n_features == 16'd0) begin
                state <= E_STAGE_END;
              end else begin
                rd_kind <= RD_FEAT;
              end
            end else begin
              feat_sum <= '0;
              rect_i   <= '0;
              phase    <= PH_FEAT;
              state    <= E_RECT_SEL;
            end
          end
        end
        // ---- features
        E_RECT_SEL: begin
          if (rect_i == 2'(MAX_RECTS))        state <= E_TMUL;
          else if (cur_rect.weight == 8'sd0)  rect_i <= rect_i + 2'd1;
          else                                state <= E_SCALE_ISSUE;
        end
        E_WMUL: state <= E_WMUL_WAIT;
        E_WMUL_WAIT: if (mul_out_valid) begin
          feat_sum <= feat_sum + 64'(mul_p);
          rect_i   <= rect_i + 2'd1;
          state    <= E_RECT_SEL;
        end
        E_TMUL: state <= E_TMUL_WAIT;
        E_TMUL_WAIT: if (mul_out_valid) begin
          stage_sum <= stage_sum + ((feat_sum >= 64'(thr_norm)) ? $signed(buf_w[5])
                                                                : $signed(buf_w[4]));
          feat_idx  <= feat_idx + 16'd1;
          if (feat_idx + 16'd1 == n_feat) begin
            state <= E_STAGE_END;
          end else begin
            rd_kind <= RD_FEAT;
            state   <= E_SM_READ;
          end
        end
        E_STAGE_END: begin
          if (stage_sum < stage_thr) begin
            face_q <= 1'b0;
            state  <= E_DONE;
          end else if (stage == c.end_stage) begin
            face_q <= 1'b1;
            state  <= E_DONE;
          end else begin
            stage   <= stage + 8'd1;
            rd_kind <= RD_HDR;
            state   <= E_SM_READ;
          end
        end
        E_DONE: begin
          result_valid <= 1'b1;
          result.face  <= face_q && !err_q;
          result.error <= err_q;
          result.stage <= stage;
          state        <= E_IDLE;
        end
        default: state <= E_IDLE;
      endcase
    end
  end

  a_one_fetch: assert property (@(posedge clk) disable iff (!rst_n)
                                fetch_go |-> (fstate == F_IDLE));

endmodule

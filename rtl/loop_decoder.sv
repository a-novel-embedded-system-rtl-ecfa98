// loop_decoder: unrolls the detector's main loop into parallel memory
// queries.
//
// The detection loop visits every scale, every position of the scanning
// window at that scale, every tree of the forest and every feature of a
// tree. For one feature it needs four box sums of the integral image
// (the left, right, top and bottom halves of a feature box), each box
// sum needing its four corners A, B, C, D: 16 memory addresses, emitted
// together as one batch per feature.
//
// The feature box is placed inside the window by four coefficient tables
// (x offset, y offset, width, height, as Q0.8 fractions of the window
// size), each followed by a pipelined multiplier that scales the fraction
// to the current window:
//   x = wx + (cx*ww)>>8,  y = wy + (cy*wh)>>8,
//   hw = max(1, ((cw*ww)>>8)/2),  hh = max(1, ((ch*wh)>>8)/2)
// The box is (x, y, 2*hw, 2*hh); its halves are
//   left (x, y, hw, 2hh), right (x+hw, y, hw, 2hh),
//   top (x, y, 2hw, hh), bottom (x, y+hh, 2hw, hh).
// A box (x, y, w, h) is read at A=(x+w-1, y+h-1), B=(x-1, y+h-1),
// C=(x+w-1, y-1), D=(x-1, y-1), address = y*IMG_W + x, and its sum is
// A - B - C + D. Query q = 4*rect + corner.
//
// Windows start at (1,1) and keep one pixel clear of every frame edge, so
// the corners at x-1, y-1 exist; a scale whose window is larger is
// clamped to the frame. The host must keep cx+cw <= 256 and cy+ch <= 256
// so boxes stay inside their window.
//
// Control is a finite state machine (idle, read scale, set scale, run,
// drain, done). In the run state the loop counters advance by one feature
// per cycle into a pipeline: coefficient read (1 cycle), multipliers
// (MUL_STAGES), address generation (1 cycle) and the output register.
// The whole pipeline holds while the output is valid and not accepted
// (q_valid/q_ready), so at most one batch per cycle is produced. Each
// batch carries a tag marking the last feature of a tree, the last tree
// of a window and the last window of the frame.
//
// The document specifies the loop contents (sliding window, scale change,
// tree traversal, randomized sampling), four coefficient tables with four
// multipliers and 16 queries per iteration. Everything else here (loop
// order, coefficient format, the half-box features, margins, the state
// machine's states) is this design's choice.
module loop_decoder
  import tld_pkg::*;
#(
  parameter int unsigned IMG_W      = TLD_IMG_W,
  parameter int unsigned IMG_H      = TLD_IMG_H,
  parameter int unsigned MAX_TREES  = TLD_MAX_TREES,
  parameter int unsigned NFEAT      = TLD_NFEAT,
  parameter int unsigned MAX_SCALES = TLD_MAX_SCALES,
  parameter int unsigned MUL_STAGES = 2,
  localparam int unsigned NQ     = TLD_NQ,
  localparam int unsigned ADDR_W = $clog2(IMG_W * IMG_H),
  localparam int unsigned CDEPTH = MAX_TREES * NFEAT,
  localparam int unsigned CA_W   = $clog2(CDEPTH),
  localparam int unsigned SA_W   = $clog2(MAX_SCALES),
  localparam int unsigned T_W    = $clog2(MAX_TREES + 1),
  localparam int unsigned F_W    = $clog2(NFEAT + 1)
) (
  input  logic                      clk,
  input  logic                      rst_n,
  // coefficient tables: sel 0=x, 1=y, 2=w, 3=h
  input  logic                      coef_we,
  input  logic [1:0]                coef_sel,
  input  logic [CA_W-1:0]           coef_addr,   // tree*NFEAT + feature
  input  logic [COEF_W-1:0]         coef_wdata,
  // scale table
  input  logic                      scale_we,
  input  logic [SA_W-1:0]           scale_addr,
  input  scale_t                    scale_wdata,
  // run configuration (hold stable while busy)
  input  logic [SA_W:0]             cfg_nscales,  // 1..MAX_SCALES
  input  logic [T_W-1:0]            cfg_ntrees,   // 1..MAX_TREES
  input  logic                      start,
  output logic                      busy,
  output logic                      done,         // one-cycle pulse
  // query batches
  output logic                      q_valid,
  input  logic                      q_ready,
  output logic [NQ-1:0][ADDR_W-1:0] q_addr,
  output batch_tag_t                q_tag
);

  localparam int unsigned P_W = COORD_W;

  typedef enum logic [2:0] {
    S_IDLE, S_SCALE_RD, S_SCALE_SET, S_RUN, S_DRAIN, S_DONE
  } state_e;
  state_e state;

  scale_t scale_tab [MAX_SCALES];
  scale_t cur_scale;

  logic [SA_W:0]    s_idx;
  logic [P_W-1:0]   wx, wy, ww, wh;
  logic [T_W-1:0]   t_idx;
  logic [F_W-1:0]   f_idx;
  logic             en;
  logic             pipe_busy;     // a batch is inside the pipeline

  // ---------------- scale table ----------------
  always_ff @(posedge clk) begin
    if (scale_we) scale_tab[scale_addr] <= scale_wdata;
  end

  // ---------------- loop counters (stage 0) ----------------
  logic last_f, last_t, last_x, last_y, last_s, issue;
  assign last_f = (f_idx == F_W'(NFEAT - 1));
  assign last_t = (t_idx == cfg_ntrees - 1'b1);
  assign last_x = (32'(wx) + 32'(cur_scale.sx) + 32'(ww) + 1 > IMG_W);
  assign last_y = (32'(wy) + 32'(cur_scale.sy) + 32'(wh) + 1 > IMG_H);
  assign last_s = (s_idx == cfg_nscales - 1'b1);
  assign issue  = (state == S_RUN) && en;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state     <= S_IDLE;
      s_idx     <= '0;
      wx        <= '0;
      wy        <= '0;
      ww        <= '0;
      wh        <= '0;
      t_idx     <= '0;
      f_idx     <= '0;
      cur_scale <= '0;
    end else begin
      unique case (state)
        S_IDLE: if (start) begin
          s_idx <= '0;
          state <= S_SCALE_RD;
        end
        S_SCALE_RD: begin
          cur_scale <= scale_tab[s_idx[SA_W-1:0]];
          state     <= S_SCALE_SET;
        end
        S_SCALE_SET: begin
          // clamp the window so a one-pixel margin remains on every side
          ww    <= (32'(cur_scale.ww) > IMG_W - 2) ? P_W'(IMG_W - 2) :
                   (cur_scale.ww == '0) ? P_W'(1) : cur_scale.ww;
          wh    <= (32'(cur_scale.wh) > IMG_H - 2) ? P_W'(IMG_H - 2) :
                   (cur_scale.wh == '0) ? P_W'(1) : cur_scale.wh;
          if (cur_scale.sx == '0) cur_scale.sx <= 8'd1;
          if (cur_scale.sy == '0) cur_scale.sy <= 8'd1;
          wx    <= P_W'(1);
          wy    <= P_W'(1);
          t_idx <= '0;
          f_idx <= '0;
          state <= S_RUN;
        end
        S_RUN: if (en) begin
          if (!last_f) f_idx <= f_idx + 1'b1;
          else begin
            f_idx <= '0;
            if (!last_t) t_idx <= t_idx + 1'b1;
            else begin
              t_idx <= '0;
              if (!last_x) wx <= wx + P_W'(cur_scale.sx);
              else begin
                wx <= P_W'(1);
                if (!last_y) wy <= wy + P_W'(cur_scale.sy);
                else if (!last_s) begin
                  s_idx <= s_idx + 1'b1;
                  state <= S_SCALE_RD;
                end else state <= S_DRAIN;
              end
            end
          end
        end
        S_DRAIN: if (!pipe_busy) state <= S_DONE;
        S_DONE:  state <= S_IDLE;
        default: state <= S_IDLE;
      endcase
    end
  end

  assign busy = (state != S_IDLE);
  assign done = (state == S_DONE);

  // ---------------- stage 1: coefficient tables ----------------
  logic [CA_W-1:0]   c_addr;
  logic [COEF_W-1:0] cx, cy, cw, ch;
  logic [COEF_W-1:0] coef_rd [4];
  assign c_addr = CA_W'(32'(t_idx) * NFEAT + 32'(f_idx));

  for (genvar k = 0; k < 4; k++) begin : g_lut
    coeff_lut #(.DEPTH(CDEPTH), .W(COEF_W)) u_lut (
      .clk, .we(coef_we && coef_sel == 2'(k)), .waddr(coef_addr), .wdata(coef_wdata),
      .en, .raddr(c_addr), .rdata(coef_rd[k]));
  end
  assign cx = coef_rd[0];
  assign cy = coef_rd[1];
  assign cw = coef_rd[2];
  assign ch = coef_rd[3];

  // Side information travelling with the pipeline: window and tag.
  typedef struct packed {
    logic             v;
    logic [P_W-1:0]   wx, wy;
    batch_tag_t       tag;
  } side_t;

  localparam int unsigned NSIDE = 1 + MUL_STAGES;   // stages 1 .. 1+MUL_STAGES
  side_t side [NSIDE];
  logic [P_W-1:0] s1_ww, s1_wh;
  side_t s0;

  always_comb begin
    s0.v   = issue;
    s0.wx  = wx;
    s0.wy  = wy;
    s0.tag.last_feat = last_f;
    s0.tag.last_tree = last_f && last_t;
    s0.tag.last_win  = last_f && last_t && last_x && last_y && last_s;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < int'(NSIDE); i++) side[i] <= '0;
      s1_ww <= '0;
      s1_wh <= '0;
    end else if (en) begin
      side[0] <= s0;
      s1_ww   <= ww;
      s1_wh   <= wh;
      for (int i = 1; i < int'(NSIDE); i++) side[i] <= side[i-1];
    end
  end

  // ---------------- stages 2 .. 1+MUL_STAGES: multipliers ----------------
  logic [P_W+COEF_W-COEF_W-1:0] fx, fy, fw, fh;
  fxp_mult #(.A_W(COEF_W), .B_W(P_W), .FRAC(COEF_W), .STAGES(MUL_STAGES))
    u_mx (.clk, .en, .a(cx), .b(s1_ww), .p(fx));
  fxp_mult #(.A_W(COEF_W), .B_W(P_W), .FRAC(COEF_W), .STAGES(MUL_STAGES))
    u_my (.clk, .en, .a(cy), .b(s1_wh), .p(fy));
  fxp_mult #(.A_W(COEF_W), .B_W(P_W), .FRAC(COEF_W), .STAGES(MUL_STAGES))
    u_mw (.clk, .en, .a(cw), .b(s1_ww), .p(fw));
  fxp_mult #(.A_W(COEF_W), .B_W(P_W), .FRAC(COEF_W), .STAGES(MUL_STAGES))
    u_mh (.clk, .en, .a(ch), .b(s1_wh), .p(fh));

  // ---------------- address generation ----------------
  side_t            sm;
  logic [P_W-1:0]   bx, by, hw, hh;
  logic [P_W-1:0]   col [3];     // x-1, x+hw-1, x+2hw-1
  logic [ADDR_W-1:0] rowb [3];   // (y-1)*W, (y+hh-1)*W, (y+2hh-1)*W
  logic [NQ-1:0][ADDR_W-1:0] addr_n;

  assign sm = side[NSIDE-1];

  always_comb begin
    bx = sm.wx + fx;
    by = sm.wy + fy;
    hw = (fw[P_W-1:1] == '0) ? P_W'(1) : P_W'(fw[P_W-1:1]);
    hh = (fh[P_W-1:1] == '0) ? P_W'(1) : P_W'(fh[P_W-1:1]);
    col[0]  = bx - 1'b1;
    col[1]  = bx + hw - 1'b1;
    col[2]  = bx + (hw << 1) - 1'b1;
    rowb[0] = ADDR_W'((32'(by) - 1) * IMG_W);
    rowb[1] = ADDR_W'((32'(by) + 32'(hh) - 1) * IMG_W);
    rowb[2] = ADDR_W'((32'(by) + 2 * 32'(hh) - 1) * IMG_W);
    // left  (x, y, hw, 2hh): A=(c1,r2) B=(c0,r2) C=(c1,r0) D=(c0,r0)
    addr_n[4*R_LEFT   + CORNER_A] = rowb[2] + ADDR_W'(col[1]);
    addr_n[4*R_LEFT   + CORNER_B] = rowb[2] + ADDR_W'(col[0]);
    addr_n[4*R_LEFT   + CORNER_C] = rowb[0] + ADDR_W'(col[1]);
    addr_n[4*R_LEFT   + CORNER_D] = rowb[0] + ADDR_W'(col[0]);
    // right (x+hw, y, hw, 2hh): A=(c2,r2) B=(c1,r2) C=(c2,r0) D=(c1,r0)
    addr_n[4*R_RIGHT  + CORNER_A] = rowb[2] + ADDR_W'(col[2]);
    addr_n[4*R_RIGHT  + CORNER_B] = rowb[2] + ADDR_W'(col[1]);
    addr_n[4*R_RIGHT  + CORNER_C] = rowb[0] + ADDR_W'(col[2]);
    addr_n[4*R_RIGHT  + CORNER_D] = rowb[0] + ADDR_W'(col[1]);
    // top   (x, y, 2hw, hh): A=(c2,r1) B=(c0,r1) C=(c2,r0) D=(c0,r0)
    addr_n[4*R_TOP    + CORNER_A] = rowb[1] + ADDR_W'(col[2]);
    addr_n[4*R_TOP    + CORNER_B] = rowb[1] + ADDR_W'(col[0]);
    addr_n[4*R_TOP    + CORNER_C] = rowb[0] + ADDR_W'(col[2]);
    addr_n[4*R_TOP    + CORNER_D] = rowb[0] + ADDR_W'(col[0]);
    // bottom (x, y+hh, 2hw, hh): A=(c2,r2) B=(c0,r2) C=(c2,r1) D=(c0,r1)
    addr_n[4*R_BOTTOM + CORNER_A] = rowb[2] + ADDR_W'(col[2]);
    addr_n[4*R_BOTTOM + CORNER_B] = rowb[2] + ADDR_W'(col[0]);
    addr_n[4*R_BOTTOM + CORNER_C] = rowb[1] + ADDR_W'(col[2]);
    addr_n[4*R_BOTTOM + CORNER_D] = rowb[1] + ADDR_W'(col[0]);
  end

  // ---------------- output register ----------------
  assign en = !q_valid || q_ready;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      q_valid <= 1'b0;
      q_addr  <= '0;
      q_tag   <= '0;
    end else if (en) begin
      q_valid <= sm.v;
      q_addr  <= addr_n;
      q_tag   <= sm.tag;
    end
  end

  always_comb begin
    pipe_busy = q_valid;
    for (int i = 0; i < int'(NSIDE); i++) pipe_busy |= side[i].v;
  end

  // A batch that is offered must stay unchanged until it is taken.
  assert property (@(posedge clk) disable iff (!rst_n)
                   q_valid && !q_ready |=> q_valid && $stable(q_addr) && $stable(q_tag))
    else $error("loop_decoder: batch changed before it was accepted");

endmodule

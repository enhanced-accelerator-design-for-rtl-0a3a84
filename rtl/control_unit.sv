// Control unit: the whole convolution loop nest in hardware, in the
// scratchpad clock domain.
//
// For every tile it queues commands for the PE side (array_ctrl) and, through
// one round-robin arbiter on the single scratchpad port, streams the data
// those commands consume into the edge FIFOs; then it collects the drained
// sums from the north output buffers, runs them through post_proc and writes
// them back. One convolution (up to 1024 channels) needs a single start.
//
// TRS (temporal RS): PE row y = output channel m_base+y, PE column x =
// output row p_base+x, all rows of a column share one input row.
//   for m1, p1, q1:  CLEAR
//     for c1:  LOADW  R*S*cn weights per row (all filter rows kept in the PE)
//       for r: LOADI  (qn+S-1)*cn iacts of row p+r on each south feed
//              COMP   woff = r*S*cn
//     for y:   DRAIN row y, write O[p,q,m_base+y]
// SRS (spatial RS): G = Y/R filters at a time; group g holds filter
// m_base+g, its row j works on filter row r = R-1-j. Feed f carries input
// row pb+R-Y+f along one diagonal, so group g computes output rows
// pb+x-g*R; the pass base pb steps by X until every group has covered P.
//   for m1, q1, pass:  CLEAR
//     for c1:  LOADW S*cn per row, LOADI (qn+S-1)*cn per feed, COMP woff 0
//     for g:   DRAIN row g*R+R-1 with the accumulate chain, write back
// Rows outside the input are fed zeros without a scratchpad read; results
// outside the output (or for m >= M) are popped and dropped.
//
// The spad read has one cycle of latency, so a FIFO is served again in the
// next cycle only if it has at least two free slots.
// Scratchpad layout (byte addresses, one byte per element): I[(h*W+w)*C+c]
// at i_base, W[((m*R+r)*S+s)*C+c] at w_base, 32-bit bias[m] at b_base+4m
// (b_base word aligned), O[(p*Q+q)*M+m] at o_base as bytes, or as 32-bit
// words at o_base+4*((p*Q+q)*M+m) in raw mode (o_base word aligned).
// With accum set (raw mode only) every in-range result is written as the sum
// of the stored word and the new result: the word is read in one cycle, and
// the add and write happen in the next. This lets the host split a layer
// over input channels.
// The loop nests, the mappings onto PE rows and columns and the round-robin
// distribution follow the document; command queue, layouts, the c1-outside-r
// order of TRS and the SRS pass scheme are this design's own.
module control_unit
  import rs_pkg::*;
#(
  parameter int unsigned X = 7,
  parameter int unsigned Y = 10,
  localparam int unsigned NF = X + Y - 1,
  localparam int unsigned FW = $clog2(NF)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  cfg_t          cfg,
  input  logic          start,
  output logic          busy,
  output logic          done,
  // scratchpad port
  output logic          sp_en,
  output logic          sp_we,
  output logic [3:0]    sp_be,
  output logic [SPAD_WAW-1:0] sp_addr,
  output logic [31:0]   sp_wdata,
  input  logic [31:0]   sp_rdata,
  // command queue
  output logic          cmd_push,
  output cmd_t          cmd_data,
  input  logic          cmd_full,
  // weight FIFOs (write side)
  output logic [Y-1:0]  wf_push,
  input  logic [Y-1:0]  wf_full,
  input  logic [Y-1:0]  wf_afull,
  // iact FIFOs (write side)
  output logic [NF-1:0] if_push,
  input  logic [NF-1:0] if_full,
  input  logic [NF-1:0] if_afull,
  output data_t         fifo_wdata,
  // output buffers (read side)
  input  psum_t         of_rdata [X],
  input  logic [X-1:0]  of_empty,
  output logic [X-1:0]  of_pop,
  // statistics
  output logic [31:0]   zero_feeds,
  output logic [31:0]   dropped,
  output logic [31:0]   written
);

  typedef enum logic [3:0] {
    S_IDLE, S_TILE, S_CHUNK, S_WLOAD, S_ICMD, S_ILOAD, S_CCMD,
    S_DCMD, S_BIAS, S_BIAS2, S_WB, S_WBA, S_NEXT
  } state_e;

  state_e state;
  wire logic trs = (cfg.mode == DF_TRS);
  // raw sums added to the words already in the output area
  wire logic accum = cfg.raw && cfg.accum;

  // ---------------------------------------------------------------- sizes
  int unsigned P, Q, G, C, M, R, S, H, W;
  always_comb begin
    H = int'(cfg.h); W = int'(cfg.w); C = int'(cfg.c); M = int'(cfg.m);
    R = int'(cfg.r); S = int'(cfg.s);
    P = H - R + 1;
    Q = W - S + 1;
    G = trs ? Y : Y / R;
  end

  // ---------------------------------------------------------------- loops
  int unsigned m_base, q_base, c_base, p_base, r_idx, e_idx;
  int          pb;            // SRS pass base (output row of PE(0,0) in group 0)
  int unsigned qn, cn, kq, kx;
  psum_t       bias_q;

  always_comb begin
    qn = (Q - q_base < int'(cfg.q0)) ? Q - q_base : int'(cfg.q0);
    cn = (C - c_base < int'(cfg.c0)) ? C - c_base : int'(cfg.c0);
  end

  // ---------------------------------------------------------------- feeds
  logic          load_w;                // current load engine target
  logic [9:0]    rem  [NF];
  logic [7:0]    ca   [NF];             // c0 counter
  logic [7:0]    cb   [NF];             // s (weights) or w offset (iacts)
  logic [3:0]    cc   [NF];             // r (TRS weights)
  logic [NF-1:0] active;
  logic          infl, infl_zero;
  logic [1:0]    infl_lane;
  logic [FW-1:0] infl_idx;
  logic [NF-1:0] req, can_push;
  logic [NF-1:0] gnt;
  logic [FW-1:0] gidx;
  logic          gvalid, eng_run, eng_done;

  assign eng_run = (state == S_WLOAD) || (state == S_ILOAD);

  always_comb begin
    for (int f = 0; f < NF; f++) begin
      logic full, af;
      if (load_w) begin
        full = (f < Y) ? wf_full[f]  : 1'b1;
        af   = (f < Y) ? wf_afull[f] : 1'b1;
      end else begin
        full = if_full[f];
        af   = if_afull[f];
      end
      can_push[f] = !full && (!af || !(infl && infl_idx == FW'(f)));
      req[f]      = eng_run && active[f] && (rem[f] != 0) && can_push[f];
    end
  end

  iact_arbiter #(.N(NF)) u_arb (
    .clk, .rst_n, .req, .advance(1'b1),
    .grant(gnt), .grant_idx(gidx), .grant_valid(gvalid)
  );

  // Address and validity of the granted feed's next item.
  logic               g_ok;
  logic [SPAD_AW-1:0] g_addr;
  always_comb begin
    int f, a, b, c, m, r, h;
    m = 0; r = 0; h = 0;
    f = int'(gidx);
    a = int'(ca[gidx]); b = int'(cb[gidx]); c = int'(cc[gidx]);
    g_ok = 1'b0; g_addr = '0;
    if (load_w) begin
      if (trs) begin
        m = int'(m_base) + f; r = c;
        g_ok = (m < int'(M));
      end else begin
        m = int'(m_base) + f / int'(R); r = int'(R) - 1 - f % int'(R);
        g_ok = (f < int'(G * R)) && (m < int'(M));
      end
      g_addr = SPAD_AW'(int'(cfg.w_base) + ((m * int'(R) + r) * int'(S) + b) * int'(C) + int'(c_base) + a);
    end else begin
      if (trs) h = int'(p_base) + (f - (int'(Y) - 1)) + int'(r_idx);
      else     h = pb + int'(R) - int'(Y) + f;
      g_ok   = (h >= 0) && (h < int'(H));
      g_addr = SPAD_AW'(int'(cfg.i_base) + (h * int'(W) + int'(q_base) + b) * int'(C) + int'(c_base) + a);
    end
  end

  // The engine has finished when no active feed has items left and the
  // last read has been pushed.
  always_comb begin
    eng_done = eng_run && !infl;
    for (int f = 0; f < NF; f++)
      if (active[f] && rem[f] != 0) eng_done = 1'b0;
  end

  // FIFO write side: one cycle after the read.
  always_comb begin
    wf_push = '0;
    if_push = '0;
    fifo_wdata = infl_zero ? '0 : data_t'(sp_rdata[8*infl_lane +: 8]);
    if (infl) begin
      if (load_w) wf_push[infl_idx[$clog2(Y)-1:0]] = 1'b1;
      else        if_push[infl_idx] = 1'b1;
    end
  end

  // ---------------------------------------------------------------- writeback
  psum_t        of_head;
  logic [31:0]  pp_y;
  logic         wb_ok;
  logic [SPAD_AW-1:0] wb_addr;
  int unsigned  wb_m;
  always_comb begin
    int p;
    p = 0;
    of_head = of_rdata[kx];
    if (trs) begin
      p    = int'(p_base) + int'(kx);
      wb_m = m_base + e_idx;
    end else begin
      p    = pb + int'(kx) - int'(e_idx * R);
      wb_m = m_base + e_idx;
    end
    wb_ok   = (p >= 0) && (p < int'(P)) && (wb_m < M);
    // 8-bit outputs take one byte each, raw 32-bit sums one word each
    wb_addr = SPAD_AW'(int'(cfg.o_base) + ((p * int'(Q) + int'(q_base + kq)) * int'(M) + int'(wb_m)) * (cfg.raw ? 4 : 1));
  end

  post_proc u_pp (
    .acc(of_head), .bias(bias_q), .scale_mant(cfg.scale_mant), .scale_shift(cfg.scale_shift),
    .relu(cfg.relu), .raw(cfg.raw), .y(pp_y)
  );

  // ---------------------------------------------------------------- outputs
  always_comb begin
    sp_en = 1'b0; sp_we = 1'b0; sp_be = 4'hF; sp_addr = '0; sp_wdata = '0;
    cmd_push = 1'b0; cmd_data = '0; of_pop = '0;
    cmd_data.mode = cfg.mode;
    cmd_data.sn   = cfg.s;
    cmd_data.qn   = 8'(qn);
    cmd_data.cn   = 8'(cn);
    cmd_data.rn   = cfg.r;
    unique case (state)
      S_TILE:  begin cmd_data.op = CMD_CLEAR; cmd_push = !cmd_full; end
      S_CHUNK: begin
        cmd_data.op = CMD_LOADW;
        cmd_data.n  = trs ? 10'(R * S * cn) : 10'(S * cn);
        cmd_push    = !cmd_full;
      end
      S_ICMD:  begin cmd_data.op = CMD_LOADI; cmd_data.n = 10'((qn + S - 1) * cn); cmd_push = !cmd_full; end
      S_CCMD:  begin
        cmd_data.op   = CMD_COMP;
        cmd_data.woff = trs ? 10'(r_idx * S * cn) : 10'd0;
        cmd_push      = !cmd_full;
      end
      S_DCMD:  begin
        cmd_data.op  = CMD_DRAIN;
        cmd_data.row = trs ? 5'(e_idx) : 5'(e_idx * R + R - 1);
        cmd_data.acc = !trs;
        cmd_push     = !cmd_full;
      end
      S_BIAS:  begin sp_en = 1'b1; sp_addr = SPAD_WAW'((int'(cfg.b_base) + 4 * int'(wb_m)) >> 2); end
      S_WB: if (!of_empty[kx]) begin
        sp_en   = wb_ok;
        sp_addr = wb_addr[SPAD_AW-1:2];
        if (wb_ok && accum) begin
          sp_we = 1'b0;                  // read the stored sum first
        end else begin
          of_pop[kx] = 1'b1;
          sp_we      = wb_ok;
          sp_be      = cfg.raw ? 4'hF : 4'(1 << wb_addr[1:0]);
          sp_wdata   = cfg.raw ? pp_y : {4{pp_y[7:0]}};
        end
      end
      S_WBA: begin                       // stored sum arrives: add and write
        of_pop[kx] = 1'b1;
        sp_en      = 1'b1;
        sp_we      = 1'b1;
        sp_addr    = wb_addr[SPAD_AW-1:2];
        sp_wdata   = pp_y + sp_rdata;
      end
      default: ;
    endcase
    if (eng_run && gvalid) begin
      sp_en   = g_ok;
      sp_we   = 1'b0;
      sp_addr = g_addr[SPAD_AW-1:2];
    end
  end

  assign busy = (state != S_IDLE);

  // A result leaves the output buffer now: directly, or in the second cycle
  // of an accumulate (read, then add and write).
  logic wb_step;
  assign wb_step = (state == S_WBA) || (state == S_WB && !of_empty[kx] && !(wb_ok && accum));

  // Engine start: set counts of every active feed.
  task automatic eng_init(input logic w);
    load_w <= w;
    for (int f = 0; f < NF; f++) begin
      logic act;
      if (w) act = (f < Y);
      else   act = !trs || (f >= Y - 1);
      active[f] <= act;
      rem[f]    <= !act ? 10'd0 :
                   w ? (trs ? 10'(R * S * cn) : 10'(S * cn)) : 10'((qn + S - 1) * cn);
      ca[f] <= '0; cb[f] <= '0; cc[f] <= '0;
    end
  endtask

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= S_IDLE; done <= 1'b0;
      m_base <= 0; q_base <= 0; c_base <= 0; p_base <= 0; r_idx <= 0; e_idx <= 0;
      pb <= 0; kq <= 0; kx <= 0; bias_q <= '0;
      load_w <= 1'b0; active <= '0; infl <= 1'b0; infl_zero <= 1'b0; infl_idx <= '0; infl_lane <= '0;
      for (int f = 0; f < NF; f++) begin rem[f] <= '0; ca[f] <= '0; cb[f] <= '0; cc[f] <= '0; end
      zero_feeds <= '0; dropped <= '0; written <= '0;
    end else begin
      // load engine
      infl <= 1'b0;
      if (eng_run && gvalid) begin
        infl      <= 1'b1;
        infl_idx  <= gidx;
        infl_zero <= !g_ok;
        infl_lane <= g_addr[1:0];
        if (!g_ok) zero_feeds <= zero_feeds + 1;
        rem[gidx] <= rem[gidx] - 1'b1;
        if (ca[gidx] != 8'(cn - 1)) ca[gidx] <= ca[gidx] + 1'b1;
        else begin
          ca[gidx] <= '0;
          if (load_w && cb[gidx] == 8'(S - 1)) begin
            cb[gidx] <= '0;
            cc[gidx] <= cc[gidx] + 1'b1;
          end else cb[gidx] <= cb[gidx] + 1'b1;
        end
      end

      unique case (state)
        S_IDLE: if (start) begin
          state <= S_TILE; done <= 1'b0;
          m_base <= 0; q_base <= 0; p_base <= 0; pb <= 0;
        end
        S_TILE: if (!cmd_full) begin
          c_base <= 0;
          state  <= S_CHUNK;
        end
        S_CHUNK: if (!cmd_full) begin
          r_idx <= 0;
          eng_init(1'b1);
          state <= S_WLOAD;
        end
        S_WLOAD: if (eng_done) state <= S_ICMD;
        S_ICMD: if (!cmd_full) begin
          eng_init(1'b0);
          state <= S_ILOAD;
        end
        S_ILOAD: if (eng_done) state <= S_CCMD;
        S_CCMD: if (!cmd_full) begin
          if (trs && r_idx + 1 < R) begin
            r_idx <= r_idx + 1;
            state <= S_ICMD;
          end else if (c_base + int'(cfg.c0) < C) begin
            c_base <= c_base + int'(cfg.c0);
            state  <= S_CHUNK;
          end else begin
            e_idx <= 0;
            state <= S_DCMD;
          end
        end
        S_DCMD: if (!cmd_full) state <= S_BIAS;
        S_BIAS: state <= S_BIAS2;
        S_BIAS2: begin
          bias_q <= (wb_m < M) ? psum_t'(sp_rdata) : '0;
          kq <= 0; kx <= 0;
          state <= S_WB;
        end
        S_WB, S_WBA: begin
          if (wb_step) begin
            // count the popped result and move to the next one
            if (wb_ok) written <= written + 1;
            else       dropped <= dropped + 1;
            state <= S_WB;
            if (kx + 1 < X) kx <= kx + 1;
            else begin
              kx <= 0;
              if (kq + 1 < qn) kq <= kq + 1;
              else if (e_idx + 1 < G) begin
                e_idx <= e_idx + 1;
                state <= S_DCMD;
              end else state <= S_NEXT;
            end
          end else if (state == S_WB && !of_empty[kx] && wb_ok && accum) state <= S_WBA;
        end
        S_NEXT: begin
          state <= S_TILE;
          if (trs) begin
            if (q_base + int'(cfg.q0) < Q) q_base <= q_base + int'(cfg.q0);
            else begin
              q_base <= 0;
              if (p_base + X < P) p_base <= p_base + X;
              else begin
                p_base <= 0;
                if (m_base + Y < M) m_base <= m_base + Y;
                else begin state <= S_IDLE; done <= 1'b1; end
              end
            end
          end else begin
            if (pb + int'(X) < int'(P + (G - 1) * R)) pb <= pb + int'(X);
            else begin
              pb <= 0;
              if (q_base + int'(cfg.q0) < Q) q_base <= q_base + int'(cfg.q0);
              else begin
                q_base <= 0;
                if (m_base + G < M) m_base <= m_base + G;
                else begin state <= S_IDLE; done <= 1'b1; end
              end
            end
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end

endmodule

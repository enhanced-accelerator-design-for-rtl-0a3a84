// Unit test of the control unit (2 columns x 2 rows) with models around it:
// a one-cycle-latency byte-addressed scratchpad whose byte a holds a fixed
// hash of a, edge
// FIFOs of depth 4 drained by random consumers (pushing into a full one is an
// error), a command queue, and output buffers that the model fills with
// tagged values whenever a DRAIN command is issued.
// For one small layer (H=W=4, C=3, M=3, 2x2 filter, C0=2, Q0=2, raw output) in
// TRS and then SRS mode, the loop nests are worked out here and compared with
// the DUT: the full command sequence, the value stream of every weight and
// iact FIFO (zeros where the row lies outside the image or the filter beyond
// M), and the address and data of every scratchpad write. A third run repeats
// TRS in accumulate mode, where every write must carry the new sum plus the
// word read back from that address.
`timescale 1ns/1ps
module tb_control_unit;
  import rs_pkg::*;
  localparam int X = 2, Y = 2, NF = X + Y - 1;
  localparam int H = 4, W = 4, C = 3, M = 3, R = 2, S = 2, C0 = 2, Q0 = 2;
  localparam int P = H - R + 1, Q = W - S + 1;
  localparam int IB = 1, WB = 150, BB = 400, OB = 600;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  cfg_t cfg;
  logic start = 0, busy, done;
  logic sp_en, sp_we; logic [3:0] sp_be; logic [SPAD_WAW-1:0] sp_addr; logic [31:0] sp_wdata, sp_rdata = 0;
  logic cmd_push, cmd_full; cmd_t cmd_data;
  logic [Y-1:0] wf_push, wf_full, wf_afull;
  logic [NF-1:0] if_push, if_full, if_afull;
  data_t fifo_wdata;
  psum_t of_rdata [X]; logic [X-1:0] of_empty, of_pop;
  logic [31:0] zf, dr, wr;

  control_unit #(.X(X), .Y(Y)) dut (
    .clk, .rst_n, .cfg, .start, .busy, .done, .sp_en, .sp_we, .sp_be, .sp_addr, .sp_wdata, .sp_rdata,
    .cmd_push, .cmd_data, .cmd_full, .wf_push, .wf_full, .wf_afull,
    .if_push, .if_full, .if_afull, .fifo_wdata, .of_rdata, .of_empty, .of_pop,
    .zero_feeds(zf), .dropped(dr), .written(wr));

  function automatic data_t memv(input int a);
    return data_t'((a * 37 + 11) % 251 - 125);
  endfunction

  // ---------------- models
  int wocc [Y], iocc [NF];
  int checks = 0, failures = 0;
  cmd_t  got_cmd [$];
  data_t got_w [Y][$];
  data_t got_i [NF][$];
  int    got_wr_a [$], got_wr_d [$];
  psum_t oq [X][$];
  int    tag = 0;

  always_comb begin
    for (int y = 0; y < Y; y++) begin wf_full[y] = wocc[y] >= 4; wf_afull[y] = wocc[y] >= 3; end
    for (int f = 0; f < NF; f++) begin if_full[f] = iocc[f] >= 4; if_afull[f] = iocc[f] >= 3; end
    for (int x = 0; x < X; x++) begin of_empty[x] = oq[x].size() == 0; of_rdata[x] = of_empty[x] ? '0 : oq[x][0]; end
  end
  assign cmd_full = 1'b0;

  always @(posedge clk) begin
    if (sp_en && !sp_we)
      for (int b = 0; b < 4; b++) sp_rdata[8*b +: 8] <= memv(4 * int'(sp_addr) + b);
    if (sp_en && sp_we) begin
      if (sp_be != 4'hF) begin failures++; $display("FAIL: raw write without all byte enables"); end
      got_wr_a.push_back(4 * int'(sp_addr)); got_wr_d.push_back(int'(sp_wdata));
    end
    for (int y = 0; y < Y; y++) begin
      if (wf_push[y]) begin
        if (wocc[y] >= 4) begin failures++; $display("FAIL: push into full weight FIFO"); end
        got_w[y].push_back(fifo_wdata);
      end
      wocc[y] = wocc[y] + int'(wf_push[y]) - int'(wocc[y] > 0 && $urandom_range(0, 2) == 0);
    end
    for (int f = 0; f < NF; f++) begin
      if (if_push[f]) begin
        if (iocc[f] >= 4) begin failures++; $display("FAIL: push into full iact FIFO"); end
        got_i[f].push_back(fifo_wdata);
      end
      iocc[f] = iocc[f] + int'(if_push[f]) - int'(iocc[f] > 0 && $urandom_range(0, 2) == 0);
    end
    for (int x = 0; x < X; x++) if (of_pop[x]) void'(oq[x].pop_front());
    if (cmd_push) begin
      got_cmd.push_back(cmd_data);
      if (cmd_data.op == CMD_DRAIN)
        for (int k = 0; k < int'(cmd_data.qn); k++)
          for (int x = 0; x < X; x++) oq[x].push_back(psum_t'(tag * 1000 + k * 10 + x));
      if (cmd_data.op == CMD_DRAIN) tag++;
    end
  end

  // ---------------- expected streams
  cmd_op_e exp_cmd [$];
  int      exp_cmd_arg [$];
  data_t   exp_w [Y][$];
  data_t   exp_i [NF][$];
  int      exp_wr_a [$], exp_wr_d [$];

  // accumulate mode: the word the scratchpad model returns for byte address a
  function automatic int stored(input int a);
    return int'({memv(a + 3), memv(a + 2), memv(a + 1), memv(a)});
  endfunction

  function automatic void expect_run(input bit trs);
    int G, etag;
    G = trs ? Y : Y / R;
    etag = 0;
    // tile order: TRS m1, p1, q1 (Algorithm 2); SRS m1, q1, pass
    for (int mb = 0; mb < M; mb += G)
      for (int t = 0; t < ((P + (trs ? 0 : (G - 1) * R) + X - 1) / X) * ((Q + Q0 - 1) / Q0); t++) begin
        int nq, qb, qn, pbase;
        nq = (Q + Q0 - 1) / Q0;
        if (trs) begin
          pbase = (t / nq) * X; qb = (t % nq) * Q0;
        end else begin
          int np;
          np = (P + (G - 1) * R + X - 1) / X;
          qb = (t / np) * Q0; pbase = (t % np) * X;
        end
        qn = (Q - qb < Q0) ? Q - qb : Q0;
        begin
          exp_cmd.push_back(CMD_CLEAR); exp_cmd_arg.push_back(0);
          for (int cb = 0; cb < C; cb += C0) begin
            int cn;
            cn = (C - cb < C0) ? C - cb : C0;
            exp_cmd.push_back(CMD_LOADW); exp_cmd_arg.push_back(trs ? R * S * cn : S * cn);
            for (int y = 0; y < Y; y++) begin
              int m, r0, r1;
              m  = trs ? mb + y : mb + y / R;
              r0 = trs ? 0 : R - 1 - y % R;
              r1 = trs ? R - 1 : r0;
              for (int r = r0; r <= r1; r++)
                for (int s = 0; s < S; s++)
                  for (int c = 0; c < cn; c++)
                    exp_w[y].push_back((m < M && (trs || y < G * R)) ? memv(WB + ((m * R + r) * S + s) * C + cb + c) : '0);
            end
            for (int r = 0; r < (trs ? R : 1); r++) begin
              exp_cmd.push_back(CMD_LOADI); exp_cmd_arg.push_back((qn + S - 1) * cn);
              for (int f = 0; f < NF; f++) begin
                int h;
                if (trs && f < Y - 1) continue;
                h = trs ? pbase + (f - (Y - 1)) + r : pbase + R - Y + f;
                for (int w = 0; w < qn + S - 1; w++)
                  for (int c = 0; c < cn; c++)
                    exp_i[f].push_back((h >= 0 && h < H) ? memv(IB + (h * W + qb + w) * C + cb + c) : '0);
              end
              exp_cmd.push_back(CMD_COMP); exp_cmd_arg.push_back(trs ? r * S * cn : 0);
            end
          end
          for (int e = 0; e < G; e++) begin
            exp_cmd.push_back(CMD_DRAIN); exp_cmd_arg.push_back(trs ? e : e * R + R - 1);
            for (int k = 0; k < qn; k++)
              for (int x = 0; x < X; x++) begin
                int p, m;
                p = trs ? pbase + x : pbase + x - e * R;
                m = mb + e;
                if (p >= 0 && p < P && m < M) begin
                  exp_wr_a.push_back(OB + 4 * ((p * Q + qb + k) * M + m));
                  exp_wr_d.push_back(etag * 1000 + k * 10 + x + (cfg.accum ? stored(exp_wr_a[$]) : 0));
                end
              end
            etag++;
          end
        end
      end
  endfunction

  task automatic run(input bit trs);
    for (int y = 0; y < Y; y++) begin got_w[y].delete(); exp_w[y].delete(); end
    for (int f = 0; f < NF; f++) begin got_i[f].delete(); exp_i[f].delete(); end
    got_cmd.delete(); exp_cmd.delete(); exp_cmd_arg.delete();
    got_wr_a.delete(); got_wr_d.delete(); exp_wr_a.delete(); exp_wr_d.delete();
    tag = 0;
    cfg.mode = trs ? DF_TRS : DF_SRS;
    expect_run(trs);
    @(negedge clk); start = 1; @(negedge clk); start = 0;
    while (!done) @(posedge clk);
    repeat (3) @(posedge clk);
    checks++;
    if (got_cmd.size() != exp_cmd.size()) begin failures++; $display("FAIL: %0d commands, expected %0d", got_cmd.size(), exp_cmd.size()); end
    for (int i = 0; i < got_cmd.size() && i < exp_cmd.size(); i++) begin
      int arg;
      arg = (exp_cmd[i] == CMD_LOADW || exp_cmd[i] == CMD_LOADI) ? int'(got_cmd[i].n) :
            (exp_cmd[i] == CMD_COMP) ? int'(got_cmd[i].woff) : (exp_cmd[i] == CMD_DRAIN) ? int'(got_cmd[i].row) : 0;
      checks++;
      if (got_cmd[i].op != exp_cmd[i] || arg != exp_cmd_arg[i] || got_cmd[i].mode != cfg.mode) begin
        failures++; $display("FAIL: cmd %0d op %0d arg %0d, expected op %0d arg %0d", i, got_cmd[i].op, arg, exp_cmd[i], exp_cmd_arg[i]);
      end
    end
    for (int y = 0; y < Y; y++) begin
      checks++;
      if (got_w[y] != exp_w[y]) begin failures++; $display("FAIL: weight stream row %0d (%0d vs %0d items)", y, got_w[y].size(), exp_w[y].size()); end
    end
    for (int f = 0; f < NF; f++) begin
      checks++;
      if (got_i[f] != exp_i[f]) begin failures++; $display("FAIL: iact stream feed %0d (%0d vs %0d items)", f, got_i[f].size(), exp_i[f].size()); end
    end
    checks++;
    if (got_wr_a != exp_wr_a || got_wr_d != exp_wr_d) begin
      failures++; $display("FAIL: writes (%0d vs %0d)", got_wr_a.size(), exp_wr_a.size());
    end
    $display("%s: %0d commands, %0d writes", trs ? "TRS" : "SRS", got_cmd.size(), got_wr_a.size());
  endtask

  initial begin
    for (int y = 0; y < Y; y++) wocc[y] = 0;
    for (int f = 0; f < NF; f++) iocc[f] = 0;
    cfg = '0;
    cfg.h = H; cfg.w = W; cfg.c = C; cfg.m = M; cfg.r = R; cfg.s = S; cfg.c0 = C0; cfg.q0 = Q0;
    cfg.i_base = IB; cfg.w_base = WB; cfg.b_base = BB; cfg.o_base = OB; cfg.raw = 1; cfg.scale_mant = 1;
    repeat (3) @(posedge clk);
    rst_n = 1;
    run(1'b1);
    run(1'b0);
    cfg.accum = 1;   // raw sums added onto the stored words
    run(1'b1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

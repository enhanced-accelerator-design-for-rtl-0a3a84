// Unit test of the PE-side sequencer driving a real 2-column x 3-row array.
// The FIFOs are modelled here as first-word-fall-through queues. Each pass
// queues CLEAR, LOADW, LOADI, COMP and DRAIN commands, supplies random
// weights and iacts, and compares the drained sums with the expected 1-D
// convolutions (TRS: every row drained alone; SRS: the top row drained with
// the accumulate chain over all three rows). Data are held back for a while
// to force input stalls and the output buffers report full for a while to
// force output stalls; both counters, the mode-switch counter and the number
// of drained words are checked.
`timescale 1ns/1ps
module tb_array_ctrl;
  import rs_pkg::*;
  localparam int X = 2, Y = 3, NF = X + Y - 1, PD = 8;
  localparam int QN = 3, SN = 2, CN = 2;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  cmd_t cmd_q [$];
  data_t wq [Y][$];
  data_t iq [NF][$];
  psum_t oq [X][$];
  bit hold_in = 0, hold_out = 0;

  cmd_t cmd; logic cmd_empty, cmd_pop;
  data_t wf_data [Y]; logic [Y-1:0] wf_empty, wf_pop;
  data_t if_data [NF]; logic [NF-1:0] if_empty, if_pop;
  psum_t of_data [X]; logic [X-1:0] of_full; logic of_push;
  dataflow_e mode;
  logic [Y-1:0] w_valid; data_t w_data [Y];
  logic [NF-1:0] i_valid; data_t i_data [NF];
  logic ld_w_start, ld_i_start, psum_clear, comp_start, arr_busy, acc, idle;
  logic [9:0] woff; logic [7:0] qn, cn; logic [3:0] sn, rn;
  logic [2:0] rd_idx; logic [4:0] row_sel;
  psum_t col_psum [X];
  logic [31:0] stall, ostall, msw;

  always_comb begin
    cmd_empty = (cmd_q.size() == 0);
    cmd = cmd_empty ? '0 : cmd_q[0];
    for (int y = 0; y < Y; y++) begin
      wf_empty[y] = hold_in || wq[y].size() == 0;
      wf_data[y] = (wq[y].size() == 0) ? '0 : wq[y][0];
    end
    for (int f = 0; f < NF; f++) begin
      if_empty[f] = hold_in || iq[f].size() == 0;
      if_data[f] = (iq[f].size() == 0) ? '0 : iq[f][0];
    end
    for (int x = 0; x < X; x++) of_full[x] = hold_out;
  end

  always @(posedge clk) begin
    if (cmd_pop) void'(cmd_q.pop_front());
    for (int y = 0; y < Y; y++) if (wf_pop[y]) void'(wq[y].pop_front());
    for (int f = 0; f < NF; f++) if (if_pop[f]) void'(iq[f].pop_front());
    if (of_push) for (int x = 0; x < X; x++) oq[x].push_back(of_data[x]);
  end

  array_ctrl #(.X(X), .Y(Y), .P_DEPTH(PD)) dut (
    .clk, .rst_n, .cmd, .cmd_empty, .cmd_pop, .wf_data, .wf_empty, .wf_pop,
    .if_data, .if_empty, .if_pop, .of_data, .of_full, .of_push,
    .mode, .w_valid, .w_data, .i_valid, .i_data, .ld_w_start, .ld_i_start, .psum_clear,
    .comp_start, .woff, .qn, .sn, .cn, .arr_busy, .rd_idx, .row_sel, .acc, .rn, .col_psum,
    .stall_cycles(stall), .out_stall_cycles(ostall), .mode_switches(msw), .idle);

  pe_array #(.X(X), .Y(Y), .W_DEPTH(16), .I_DEPTH(16), .P_DEPTH(PD)) u_arr (
    .clk, .rst_n, .mode, .w_valid, .w_data, .i_valid, .i_data,
    .ld_w_start, .ld_i_start, .psum_clear, .comp_start, .woff, .qn, .sn, .cn, .busy(arr_busy),
    .rd_idx, .row_sel, .acc, .rn, .col_psum);

  int checks = 0, failures = 0;
  int wv [Y][SN*CN];
  int iv [NF][(QN+SN-1)*CN];

  function automatic cmd_t mk(input cmd_op_e op, input dataflow_e md);
    cmd_t c = '0;
    c.op = op; c.mode = md; c.qn = QN; c.sn = SN; c.cn = CN; c.rn = 4'(Y);
    return c;
  endfunction

  function automatic int conv(input int y, input int f, input int k);
    int a = 0;
    for (int s = 0; s < SN; s++)
      for (int c = 0; c < CN; c++)
        a += wv[y][s * CN + c] * iv[f][(k + s) * CN + c];
    return a;
  endfunction

  task automatic pass(input dataflow_e md);
    cmd_t c;
    int nrows;
    cmd_q.push_back(mk(CMD_CLEAR, md));
    c = mk(CMD_LOADW, md); c.n = SN * CN; cmd_q.push_back(c);
    c = mk(CMD_LOADI, md); c.n = (QN + SN - 1) * CN; cmd_q.push_back(c);
    cmd_q.push_back(mk(CMD_COMP, md));
    if (md == DF_TRS) begin
      for (int y = 0; y < Y; y++) begin c = mk(CMD_DRAIN, md); c.row = 5'(y); cmd_q.push_back(c); end
      nrows = Y;
    end else begin
      c = mk(CMD_DRAIN, md); c.row = 5'(Y - 1); c.acc = 1; cmd_q.push_back(c);
      nrows = 1;
    end
    hold_in = 1;
    for (int y = 0; y < Y; y++)
      for (int i = 0; i < SN * CN; i++) begin
        wv[y][i] = int'($urandom_range(0, 255)) - 128; wq[y].push_back(data_t'(wv[y][i]));
      end
    for (int f = 0; f < NF; f++)
      for (int i = 0; i < (QN + SN - 1) * CN; i++) begin
        iv[f][i] = int'($urandom_range(0, 255)) - 128;
        if (md == DF_SRS || f >= Y - 1) iq[f].push_back(data_t'(iv[f][i]));
      end
    repeat (6) @(posedge clk);
    hold_in = 0;
    hold_out = 1;
    repeat (60) @(posedge clk);
    hold_out = 0;
    while (!idle) @(posedge clk);
    checks++;
    if (oq[0].size() != nrows * QN) begin failures++; $display("FAIL: drained %0d words", oq[0].size()); end
    for (int e = 0; e < nrows; e++)
      for (int k = 0; k < QN; k++)
        for (int x = 0; x < X; x++) begin
          int exp_v = 0;
          if (md == DF_TRS) exp_v = conv(e, Y - 1 + x, k);
          else for (int y = 0; y < Y; y++) exp_v += conv(y, x - y + Y - 1, k);
          checks++;
          if (oq[x].size() == 0 || oq[x][0] != exp_v) begin
            failures++; $display("FAIL: %s row %0d k %0d col %0d exp %0d", md == DF_TRS ? "TRS" : "SRS", e, k, x, exp_v);
          end
          if (oq[x].size() != 0) void'(oq[x].pop_front());
        end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    pass(DF_TRS);
    pass(DF_SRS);
    checks++; if (stall == 0)  begin failures++; $display("FAIL: no input stall counted"); end
    checks++; if (ostall == 0) begin failures++; $display("FAIL: no output stall counted"); end
    checks++; if (msw != 1)    begin failures++; $display("FAIL: mode switches %0d", msw); end
    $display("stall=%0d out_stall=%0d switches=%0d", stall, ostall, msw);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

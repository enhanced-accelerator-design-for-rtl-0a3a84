// Unit test of one PE (buffers 32/32/8). Streams filter weights and an input
// row in, runs the MAC loop and compares every psum with a 1-D convolution
// computed here, for SRS (diagonal input) and TRS (vertical input, weight
// offset per filter row). Also checks: the busy time is qn*sn*cn cycles,
// weights and iacts are forwarded one cycle later, psums accumulate over two
// computations, and psum_out adds psum_below only when acc_en is set.
`timescale 1ns/1ps
module tb_pe;
  import rs_pkg::*;
  localparam int WD = 32, ID = 32, PD = 8;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  dataflow_e mode = DF_SRS;
  logic  w_in_valid = 0, dv = 0, vv = 0;
  data_t w_in_data = 0, dd = 0, vd = 0;
  logic  w_out_valid, iact_out_valid, busy;
  data_t w_out_data, iact_out_data;
  logic  ld_w_start = 0, ld_i_start = 0, psum_clear = 0, comp_start = 0, acc_en = 0;
  logic [9:0] woff = 0;
  logic [7:0] qn = 0, cn = 0;
  logic [3:0] sn = 0;
  logic [2:0] rd_idx = 0;
  psum_t psum_below = 0, psum_out;

  pe #(.W_DEPTH(WD), .I_DEPTH(ID), .P_DEPTH(PD)) dut (
    .clk, .rst_n, .mode, .w_in_valid, .w_in_data, .w_out_valid, .w_out_data,
    .iact_diag_valid(dv), .iact_diag_data(dd), .iact_vert_valid(vv), .iact_vert_data(vd),
    .iact_out_valid, .iact_out_data, .ld_w_start, .ld_i_start, .psum_clear, .comp_start,
    .woff, .qn, .sn, .cn, .busy, .rd_idx, .acc_en, .psum_below, .psum_out);

  int checks = 0, failures = 0;
  int wv [WD];
  int iv [ID];
  int exp_ps [PD];

  task automatic chk(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  task automatic load_w(input int n);
    @(posedge clk); ld_w_start <= 1; @(posedge clk); ld_w_start <= 0;
    for (int i = 0; i < n; i++) begin
      wv[i] = int'($urandom_range(0, 255)) - 128;
      w_in_valid <= 1; w_in_data <= data_t'(wv[i]);
      @(posedge clk);
      #1 chk(w_out_valid && w_out_data == data_t'(wv[i]), "weight forwarded one cycle later");
    end
    w_in_valid <= 0;
  endtask

  task automatic load_i(input int n, input logic vert);
    @(posedge clk); ld_i_start <= 1; @(posedge clk); ld_i_start <= 0;
    for (int i = 0; i < n; i++) begin
      iv[i] = int'($urandom_range(0, 255)) - 128;
      // the unused path carries garbage that must be ignored
      if (vert) begin vv <= 1; vd <= data_t'(iv[i]); dv <= 1; dd <= 8'sd55; end
      else      begin dv <= 1; dd <= data_t'(iv[i]); vv <= 1; vd <= 8'sd77; end
      @(posedge clk);
      #1 chk(iact_out_valid && iact_out_data == data_t'(iv[i]), "iact forwarded one cycle later");
    end
    dv <= 0; vv <= 0;
  endtask

  task automatic compute(input int q, input int s, input int c, input int wo);
    int cyc = 0;
    qn <= 8'(q); sn <= 4'(s); cn <= 8'(c); woff <= 10'(wo);
    comp_start <= 1; @(posedge clk); comp_start <= 0;
    #1;
    while (busy) begin cyc++; @(posedge clk); #1; end
    chk(cyc == q * s * c, $sformatf("busy %0d cycles, expected %0d", cyc, q * s * c));
    for (int k = 0; k < q; k++)
      for (int ss = 0; ss < s; ss++)
        for (int cc = 0; cc < c; cc++)
          exp_ps[k] += wv[wo + ss * c + cc] * iv[(k + ss) * c + cc];
  endtask

  task automatic check_psums(input int q);
    for (int k = 0; k < q; k++) begin
      rd_idx = 3'(k); acc_en = 0; #1;
      chk(psum_out == exp_ps[k], $sformatf("psum[%0d]=%0d exp %0d", k, psum_out, exp_ps[k]));
    end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    // SRS: S=3, C0=2, Q0=5
    mode = DF_SRS;
    @(posedge clk); psum_clear <= 1; @(posedge clk); psum_clear <= 0;
    for (int k = 0; k < PD; k++) exp_ps[k] = 0;
    load_w(3 * 2);
    load_i((5 + 3 - 1) * 2, 1'b0);
    compute(5, 3, 2, 0);
    check_psums(5);
    // second channel chunk accumulates on top
    load_w(3 * 2);
    load_i((5 + 3 - 1) * 2, 1'b0);
    compute(5, 3, 2, 0);
    check_psums(5);
    // psum_below added only with acc_en
    rd_idx = 3'd2; psum_below = 32'sd1000; acc_en = 1; #1;
    chk(psum_out == exp_ps[2] + 1000, "accumulate from below");
    acc_en = 0; #1;
    chk(psum_out == exp_ps[2], "no accumulate without acc_en");
    // TRS: R=2, S=2, C0=3 weights all kept; two filter rows with offsets
    mode = DF_TRS;
    @(posedge clk); psum_clear <= 1; @(posedge clk); psum_clear <= 0;
    for (int k = 0; k < PD; k++) exp_ps[k] = 0;
    load_w(2 * 2 * 3);
    load_i((4 + 2 - 1) * 3, 1'b1);
    compute(4, 2, 3, 0);
    load_i((4 + 2 - 1) * 3, 1'b1);
    compute(4, 2, 3, 2 * 3);
    check_psums(4);
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

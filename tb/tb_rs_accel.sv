// End-to-end test of the accelerator at its default size (7 columns x 10 rows,
// 128 kB scratchpad, 16-word FIFOs), with the three clocks at AXI 6 ns,
// scratchpad 2 ns, PE 10 ns (scratchpad:PE = 5:1).
// Over AXI4-Lite it reads the hardware-parameter register, loads random
// activations, weights and biases, then runs the same layer twice:
//   1. TRS dataflow, ReLU and scaling on (8-bit outputs)
//   2. SRS dataflow, raw 32-bit sums
//   3. TRS dataflow, raw sums accumulated onto those of run 2 (each must double)
// The layer (H=10, W=9, C=5, M=12, 3x3, C0=2, Q0=4) needs several output-
// channel, output-row, output-column and channel tiles in both dataflows.
// Every output is read back and compared with a convolution computed here.
// It also requires that each mechanism happened at least once: array stall on
// an empty input FIFO, a dataflow switch, zero-fed rows outside the image,
// dropped out-of-range results, ReLU clipping, channel-chunk accumulation,
// accumulation onto stored sums.
`timescale 1ns/1ps
module tb_rs_accel;
  import rs_pkg::*;

  localparam int H = 10, W = 9, C = 5, M = 12, R = 3, S = 3, C0 = 2, Q0 = 4;
  localparam int P = H - R + 1, Q = W - S + 1;
  // byte addresses; I and W packed four elements per word
  localparam int IB = 0, WB = 1000, BB = 2000, OB = 3000;
  localparam int MANT = 3, SHIFT = 4;

  logic clk_axi = 0, clk_spad = 0, clk_pe = 0, rst_n = 0;
  always #3 clk_axi  = ~clk_axi;
  always #1 clk_spad = ~clk_spad;
  always #5 clk_pe   = ~clk_pe;

  logic        awvalid = 0, wvalid = 0, bready = 0, arvalid = 0, rready = 0;
  logic        awready, wready, bvalid, arready, rvalid, irq;
  logic [17:0] awaddr = 0, araddr = 0;
  logic [31:0] wdata = 0, rdata;
  logic [1:0]  bresp, rresp;
  logic [31:0] st_stall, st_ostall, st_mode, st_zero, st_drop, st_wr;

  rs_accel dut (
    .clk_axi, .clk_spad, .clk_pe, .rst_n,
    .s_axi_awvalid(awvalid), .s_axi_awready(awready), .s_axi_awaddr(awaddr),
    .s_axi_wvalid(wvalid), .s_axi_wready(wready), .s_axi_wdata(wdata),
    .s_axi_bvalid(bvalid), .s_axi_bready(bready), .s_axi_bresp(bresp),
    .s_axi_arvalid(arvalid), .s_axi_arready(arready), .s_axi_araddr(araddr),
    .s_axi_rvalid(rvalid), .s_axi_rready(rready), .s_axi_rdata(rdata), .s_axi_rresp(rresp),
    .irq, .stat_stall(st_stall), .stat_out_stall(st_ostall), .stat_mode_switch(st_mode),
    .stat_zero_feed(st_zero), .stat_dropped(st_drop), .stat_written(st_wr)
  );

  int checks = 0, failures = 0;
  int iact [H][W][C];
  int wgt  [M][R][S][C];
  int bias [M];
  int relu_clips = 0;
  int accum_hits = 0;

  task automatic axi_write(input logic [17:0] a, input logic [31:0] d);
    @(posedge clk_axi);
    awaddr <= a; wdata <= d; awvalid <= 1; wvalid <= 1;
    do @(posedge clk_axi); while (!(awready && wready));
    awvalid <= 0; wvalid <= 0; bready <= 1;
    do @(posedge clk_axi); while (!bvalid);
    bready <= 0;
  endtask

  task automatic axi_read(input logic [17:0] a, output logic [31:0] d);
    @(posedge clk_axi);
    araddr <= a; arvalid <= 1;
    do @(posedge clk_axi); while (!arready);
    arvalid <= 0; rready <= 1;
    do @(posedge clk_axi); while (!rvalid);
    d = rdata;
    rready <= 0;
  endtask

  function automatic logic [17:0] sp(input int byte_addr);
    return 18'h20000 | 18'(byte_addr & ~3);
  endfunction

  logic [7:0] img [4096];
  task automatic put_byte(input int a, input int v);
    img[a] = 8'(v);
  endtask
  task automatic flush_img(input int lo, input int hi);
    for (int a = lo & ~3; a < hi; a += 4)
      axi_write(sp(a), {img[a+3], img[a+2], img[a+1], img[a]});
  endtask

  function automatic int ref_acc(input int p, input int q, input int m);
    int acc = 0;
    for (int r = 0; r < R; r++)
      for (int s = 0; s < S; s++)
        for (int c = 0; c < C; c++)
          acc += iact[p+r][q+s][c] * wgt[m][r][s][c];
    return acc;
  endfunction

  function automatic int post(input int acc, input int b);
    longint t = (longint'(acc) + b) * MANT;
    t = (t + (1 << (SHIFT - 1))) >>> SHIFT;
    if (t < 0) t = 0;
    if (t > 127) t = 127;
    return int'(t);
  endfunction

  task automatic run_layer(input logic trs, input logic raw, input logic accum = 1'b0);
    logic [31:0] v;
    axi_write(18'h00, {27'd0, accum, raw, ~raw, trs, 1'b1});
    do axi_read(18'h04, v); while (v[0] == 1'b0 && v[1] == 1'b0);
    do axi_read(18'h04, v); while (v[0]);
    checks++;
    if (!v[1] || !irq) begin failures++; $display("FAIL: done flag not set"); end
    for (int p = 0; p < P; p++)
      for (int q = 0; q < Q; q++)
        for (int m = 0; m < M; m++) begin
          int acc, exp_v;
          acc = ref_acc(p, q, m);
          exp_v = raw ? (accum ? 2 * acc : acc) : post(acc, bias[m]);
          if (!raw && (longint'(acc) + bias[m]) < 0) relu_clips++;
          if (raw) axi_read(sp(OB + 4 * ((p * Q + q) * M + m)), v);
          else begin
            int a;
            a = OB + (p * Q + q) * M + m;
            axi_read(sp(a), v);
            v = {{24{v[8*(a%4)+7]}}, v[8*(a%4) +: 8]};
          end
          if (accum && $signed(v) == exp_v && acc != 0) accum_hits++;
          checks++;
          if ($signed(v) != exp_v) begin
            failures++;
            if (failures < 10) $display("FAIL %s p=%0d q=%0d m=%0d got %0d exp %0d",
                                         trs ? "TRS" : "SRS", p, q, m, $signed(v), exp_v);
          end
        end
  endtask

  initial begin
    logic [31:0] v;
    int cyc0;
    repeat (5) @(posedge clk_axi);
    rst_n = 1;
    repeat (5) @(posedge clk_axi);

    axi_read(18'h3C, v);
    checks++;
    if (v[7:0] != 8'd7 || v[15:8] != 8'd10) begin failures++; $display("FAIL: HWINFO %h", v); end

    for (int h = 0; h < H; h++)
      for (int w = 0; w < W; w++)
        for (int c = 0; c < C; c++) begin
          iact[h][w][c] = int'($urandom_range(0, 255)) - 128;
          put_byte(IB + (h * W + w) * C + c, iact[h][w][c]);
        end
    for (int m = 0; m < M; m++)
      for (int r = 0; r < R; r++)
        for (int s = 0; s < S; s++)
          for (int c = 0; c < C; c++) begin
            wgt[m][r][s][c] = int'($urandom_range(0, 255)) - 128;
            put_byte(WB + ((m * R + r) * S + s) * C + c, wgt[m][r][s][c]);
          end
    flush_img(IB, IB + H * W * C);
    flush_img(WB, WB + M * R * S * C);
    for (int m = 0; m < M; m++) begin
      bias[m] = int'($urandom_range(0, 4000)) - 2000;
      axi_write(sp(BB + 4 * m), 32'(bias[m]));
    end
    // readback of one word
    axi_read(sp(WB + 4), v);
    checks++;
    if (v != {img[WB+7], img[WB+6], img[WB+5], img[WB+4]}) begin failures++; $display("FAIL: spad readback"); end

    axi_write(18'h08, H); axi_write(18'h0C, W); axi_write(18'h10, C); axi_write(18'h14, M);
    axi_write(18'h18, R); axi_write(18'h1C, S); axi_write(18'h20, C0); axi_write(18'h24, Q0);
    axi_write(18'h28, IB); axi_write(18'h2C, WB); axi_write(18'h30, OB); axi_write(18'h34, BB);
    axi_write(18'h38, {10'd0, 6'(SHIFT), 16'(MANT)});

    run_layer(1'b1, 1'b0);
    $display("TRS: stall=%0d out_stall=%0d zero_feed=%0d dropped=%0d written=%0d",
             st_stall, st_ostall, st_zero, st_drop, st_wr);
    run_layer(1'b0, 1'b1);
    $display("SRS: stall=%0d out_stall=%0d zero_feed=%0d dropped=%0d written=%0d switches=%0d",
             st_stall, st_ostall, st_zero, st_drop, st_wr, st_mode);
    run_layer(1'b1, 1'b1, 1'b1);
    $display("TRS accumulate: written=%0d switches=%0d", st_wr, st_mode);

    // mechanisms
    checks++; if (st_stall == 0)  begin failures++; $display("FAIL: no input-FIFO stall"); end
    checks++; if (st_mode == 0)   begin failures++; $display("FAIL: no dataflow switch"); end
    checks++; if (st_zero == 0)   begin failures++; $display("FAIL: no zero-fed row"); end
    checks++; if (st_drop == 0)   begin failures++; $display("FAIL: no dropped result"); end
    checks++; if (relu_clips == 0) begin failures++; $display("FAIL: no ReLU clip"); end
    checks++; if (accum_hits == 0) begin failures++; $display("FAIL: no accumulated sum"); end
    checks++; if (st_wr != 32'(3 * P * Q * M)) begin failures++; $display("FAIL: written %0d", st_wr); end
    $display("mechanisms: stall=%0d mode_switch=%0d zero_feed=%0d dropped=%0d relu_clip=%0d accumulated=%0d c_chunks=%0d",
             st_stall, st_mode, st_zero, st_drop, relu_clips, accum_hits, (C + C0 - 1) / C0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3000000) @(posedge clk_pe);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// Layer test after the PE-utilization comparison of the two dataflows on
// ResNet-50, GoogLeNet and MobileNetV3 layers, at the default size (7 columns x
// 10 rows, 128 kB). Each layer keeps its image size, filter size and channel
// count, with two exceptions. It computes M=10 output channels, one TRS tile
// of rows. Its input channels are cut where the whole layer would not fit the
// scratchpad; a full layer is many such pieces. Each layer runs in SRS and
// then in TRS, with the scratchpad clock at 10x the PE clock. Every output
// byte is compared with a reference convolution. Reported per run: PE cycles,
// the ideal count (MACs / 70) and utilization.
// Check: on every layer TRS needs no more than 5 % more cycles than SRS.
`timescale 1ns/1ps
module tb_layers_table2;
  import rs_pkg::*;

  localparam int XA = 7, YA = 10, WDEP = 128, IDEP = 128, PDEP = 32;
  localparam int MAXB = 131072;

  logic clk_axi = 0, clk_spad = 0, clk_pe = 0, rst_n = 0;
  always #3 clk_axi  = ~clk_axi;
  always #1 clk_spad = ~clk_spad;
  int pe_half = 10;  // PE half period; the scratchpad half period is 1
  always #(pe_half) clk_pe = ~clk_pe;

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
  logic [7:0] img [MAXB];
  int unsigned pe_cycles = 0;
  always @(posedge clk_pe) pe_cycles++;

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

  function automatic logic [17:0] sp(input int a);
    return 18'h20000 | 18'(a & ~3);
  endfunction

  function automatic int align4(input int a);
    return (a + 3) & ~3;
  endfunction

  real last_util;
  int unsigned last_cycles;

  task automatic run_layer(input string name, input int H, input int W, input int C, input int M,
                           input int R, input int S, input bit trs);
    int P, Q, IB, WB, BB, OB, c0, q0, best, mism;
    int unsigned t0, cyc;
    real ideal, util;
    logic [31:0] v, st0;
    int bias [];
    P = H - R + 1; Q = W - S + 1;
    IB = 0; WB = align4(IB + H * W * C); BB = align4(WB + M * R * S * C); OB = BB + 4 * M;
    if (OB + P * Q * M > MAXB) begin failures++; $display("FAIL: %s does not fit", name); return; end
    // mapping: largest c0*q0 that fits the line buffers
    best = 0; c0 = 1; q0 = 1;
    for (int c = 1; c <= C; c++)
      for (int q = 1; q <= Q && q <= PDEP; q++)
        if ((trs ? R * S * c : S * c) <= WDEP && (q + S - 1) * c <= IDEP && c * q > best) begin
          best = c * q; c0 = c; q0 = q;
        end
    for (int a = IB; a < OB; a++) img[a] = 8'($urandom_range(0, 255));
    bias = new[M];
    for (int m = 0; m < M; m++) begin
      bias[m] = int'($urandom_range(0, 20000)) - 10000;
      {img[BB+4*m+3], img[BB+4*m+2], img[BB+4*m+1], img[BB+4*m]} = 32'(bias[m]);
    end
    for (int a = IB; a < OB; a += 4) axi_write(sp(a), {img[a+3], img[a+2], img[a+1], img[a]});
    axi_write(18'h08, H); axi_write(18'h0C, W); axi_write(18'h10, C); axi_write(18'h14, M);
    axi_write(18'h18, R); axi_write(18'h1C, S); axi_write(18'h20, c0); axi_write(18'h24, q0);
    axi_write(18'h28, IB); axi_write(18'h2C, WB); axi_write(18'h30, OB); axi_write(18'h34, BB);
    axi_write(18'h38, {10'd0, 6'd10, 16'd1});
    st0 = st_stall;
    @(posedge clk_pe);
    t0 = pe_cycles;
    axi_write(18'h00, {28'd0, 1'b0, 1'b1, trs, 1'b1});
    wait (dut.ctrl_busy);
    wait (!dut.ctrl_busy);
    cyc = pe_cycles - t0;
    ideal = real'(P) * Q * M * C * R * S / (XA * YA);
    util = ideal / cyc;
    // compare
    mism = 0;
    for (int a = OB & ~3; a < OB + P * Q * M; a += 4) begin
      axi_read(sp(a), v);
      for (int b = 0; b < 4; b++) begin
        int idx, p, q, m, acc;
        longint t;
        idx = a + b - OB;
        if (idx < 0 || idx >= P * Q * M) continue;
        m = idx % M; q = (idx / M) % Q; p = idx / (M * Q);
        acc = 0;
        for (int r = 0; r < R; r++)
          for (int s = 0; s < S; s++)
            for (int c = 0; c < C; c++)
              acc += int'($signed(img[IB + ((p + r) * W + q + s) * C + c])) *
                     int'($signed(img[WB + ((m * R + r) * S + s) * C + c]));
        t = ((longint'(acc) + bias[m]) + 512) >>> 10;
        if (t < 0) t = 0;
        if (t > 127) t = 127;
        checks++;
        if (v[8*b +: 8] != 8'(t)) begin
          failures++; mism++;
          if (mism < 5) $display("FAIL %s p=%0d q=%0d m=%0d got %0d exp %0d", name, p, q, m, v[8*b +: 8], t);
        end
      end
    end
    last_util = util;
    last_cycles = cyc;
    $display("%-24s %s ratio %0d:1 C0=%0d Q0=%0d cycles=%0d ideal=%0.0f util=%0.1f%% stalls=%0d mismatches=%0d",
             name, trs ? "TRS" : "SRS", pe_half, c0, q0, cyc, ideal, 100.0 * util, st_stall - st0, mism);
  endtask

  task automatic layer(input string name, input int HW, input int K, input int C);
    real u_srs;
    int unsigned c_srs;
    run_layer(name, HW, HW, C, 10, K, K, 1'b0);
    u_srs = last_util; c_srs = last_cycles;
    run_layer(name, HW, HW, C, 10, K, K, 1'b1);
    checks++;
    if (real'(last_cycles) > 1.05 * real'(c_srs)) begin
      failures++;
      $display("FAIL: %s TRS %0d cycles, SRS %0d", name, last_cycles, c_srs);
    end
    $display("%s: utilization SRS %0.1f%%, TRS %0.1f%%", name, 100.0 * u_srs, 100.0 * last_util);
  endtask

  initial begin
    repeat (5) @(posedge clk_axi);
    rst_n = 1;
    repeat (5) @(posedge clk_axi);
    // name, H=W, R=S, C (cut to fit where noted)
    layer("R50 2nd last, 28x28 3x3 C256->128", 28, 3, 128);
    layer("R50 2nd last, 14x14 3x3 C1024->448", 14, 3, 448);
    layer("R50 last, 7x7 3x3 C512", 7, 3, 512);
    layer("GN 3rd last, 14x14 1x1 C528", 14, 1, 528);
    layer("GN last, 7x7 1x1 C832", 7, 1, 832);
    layer("MN IR 7, 28x28 5x5 C120", 28, 5, 120);
    layer("MN IR 8, 14x14 3x3 C240", 14, 3, 240);
    layer("MN IR 15, 7x7 5x5 C960->432", 7, 5, 432);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000000) @(posedge clk_pe);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

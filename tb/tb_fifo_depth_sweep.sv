// Input-FIFO depth study at the default array size (7 columns x 10 rows,
// 128 kB scratchpad). Four copies of the accelerator run side by side, built
// with FIFO depths of 4, 8, 16 and 32 words. The scratchpad clock runs at
// 5x the PE clock. At 10x, one scratchpad port refills the 7 feeds faster than
// the array empties them, and no depth stalls at all. Each copy runs the same TRS layer: a 32x32 image with
// 40 channels, 40 filters of 3x3 and C0=4, Q0=30. Every copy gets the same
// random data over its own AXI4-Lite port, and every output byte is compared
// with a reference convolution.
// Checks: all outputs are correct. The PE-cycle count never rises as the FIFOs
// grow. The stall count falls strictly with every doubling of the depth. The
// FIFOs use Gray-code pointers, so only powers of two are tried.
`timescale 1ns/1ps
module tb_fifo_depth_sweep;
  import rs_pkg::*;

  localparam int ND = 4;
  localparam int DEPTHS [ND] = '{4, 8, 16, 32};
  localparam int H = 32, W = 32, C = 40, M = 40, R = 3, S = 3, C0 = 4, Q0 = 30;
  localparam int P = H - R + 1, Q = W - S + 1;
  localparam int IB = 0, WB = H * W * C, BB = WB + M * R * S * C, OB = BB + 4 * M;
  localparam int NB = OB + P * Q * M;

  logic clk_axi = 0, clk_spad = 0, clk_pe = 0, rst_n = 0;
  always #3  clk_axi  = ~clk_axi;
  always #1  clk_spad = ~clk_spad;
  always #5  clk_pe   = ~clk_pe;

  int checks = 0, failures = 0;
  logic [7:0] img [NB];
  int bias [M];
  logic [7:0] expv [P * Q * M];
  int unsigned cycles [ND];
  int unsigned stalls [ND];
  bit data_ready = 0;
  bit finished [ND];
  int unsigned pe_cycles = 0;
  always @(posedge clk_pe) pe_cycles++;

  for (genvar d = 0; d < ND; d++) begin : g_dut
    logic        awvalid = 0, wvalid = 0, bready = 0, arvalid = 0, rready = 0;
    logic        awready, wready, bvalid, arready, rvalid, irq;
    logic [17:0] awaddr = 0, araddr = 0;
    logic [31:0] wdata = 0, rdata;
    logic [1:0]  bresp, rresp;
    logic [31:0] st_stall, st_ostall, st_mode, st_zero, st_drop, st_wr;

    rs_accel #(.FIFO_DEPTH(DEPTHS[d])) dut (
      .clk_axi, .clk_spad, .clk_pe, .rst_n,
      .s_axi_awvalid(awvalid), .s_axi_awready(awready), .s_axi_awaddr(awaddr),
      .s_axi_wvalid(wvalid), .s_axi_wready(wready), .s_axi_wdata(wdata),
      .s_axi_bvalid(bvalid), .s_axi_bready(bready), .s_axi_bresp(bresp),
      .s_axi_arvalid(arvalid), .s_axi_arready(arready), .s_axi_araddr(araddr),
      .s_axi_rvalid(rvalid), .s_axi_rready(rready), .s_axi_rdata(rdata), .s_axi_rresp(rresp),
      .irq, .stat_stall(st_stall), .stat_out_stall(st_ostall), .stat_mode_switch(st_mode),
      .stat_zero_feed(st_zero), .stat_dropped(st_drop), .stat_written(st_wr)
    );

    task automatic axi_write(input logic [17:0] a, input logic [31:0] v);
      @(posedge clk_axi);
      awaddr <= a; wdata <= v; awvalid <= 1; wvalid <= 1;
      do @(posedge clk_axi); while (!(awready && wready));
      awvalid <= 0; wvalid <= 0; bready <= 1;
      do @(posedge clk_axi); while (!bvalid);
      bready <= 0;
    endtask

    task automatic axi_read(input logic [17:0] a, output logic [31:0] v);
      @(posedge clk_axi);
      araddr <= a; arvalid <= 1;
      do @(posedge clk_axi); while (!arready);
      arvalid <= 0; rready <= 1;
      do @(posedge clk_axi); while (!rvalid);
      v = rdata;
      rready <= 0;
    endtask

    initial begin
      int unsigned t0;
      logic [31:0] v;
      int mism;
      wait (data_ready);
      for (int a = 0; a < OB; a += 4)
        axi_write(18'h20000 | 18'(a), {img[a+3], img[a+2], img[a+1], img[a]});
      axi_write(18'h08, H);  axi_write(18'h0C, W);  axi_write(18'h10, C);  axi_write(18'h14, M);
      axi_write(18'h18, R);  axi_write(18'h1C, S);  axi_write(18'h20, C0); axi_write(18'h24, Q0);
      axi_write(18'h28, IB); axi_write(18'h2C, WB); axi_write(18'h30, OB); axi_write(18'h34, BB);
      axi_write(18'h38, {10'd0, 6'd10, 16'd1});
      @(posedge clk_pe);
      t0 = pe_cycles;
      axi_write(18'h00, 32'b0111);  // start, TRS, ReLU
      wait (dut.ctrl_busy);
      wait (!dut.ctrl_busy);
      cycles[d] = pe_cycles - t0;
      stalls[d] = st_stall;
      mism = 0;
      for (int a = OB; a < NB; a += 4) begin
        axi_read(18'h20000 | 18'(a), v);
        for (int b = 0; b < 4; b++) begin
          if (a + b >= NB) continue;
          checks++;
          if (v[8*b +: 8] != expv[a + b - OB]) begin
            failures++; mism++;
            if (mism < 4) $display("FAIL depth %0d: output %0d got %0d exp %0d",
                                   DEPTHS[d], a + b - OB, v[8*b +: 8], expv[a + b - OB]);
          end
        end
      end
      finished[d] = 1'b1;
    end
  end

  initial begin
    // shared data and reference (stride 1, no padding, bias, x/1024 rounded, ReLU, int8)
    for (int a = 0; a < OB; a++) img[a] = 8'($urandom_range(0, 255));
    for (int m = 0; m < M; m++) begin
      bias[m] = int'($urandom_range(0, 20000)) - 10000;
      {img[BB+4*m+3], img[BB+4*m+2], img[BB+4*m+1], img[BB+4*m]} = 32'(bias[m]);
    end
    for (int idx = 0; idx < P * Q * M; idx++) begin
      int p, q, m, acc;
      longint t;
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
      expv[idx] = 8'(t);
    end
    repeat (5) @(posedge clk_axi);
    rst_n = 1;
    repeat (5) @(posedge clk_axi);
    data_ready = 1;
    wait (finished[0] && finished[1] && finished[2] && finished[3]);
    for (int d = 0; d < ND; d++)
      $display("FIFO depth %2d: cycles=%0d ideal=%0d util=%0.1f%% stalls=%0d", DEPTHS[d], cycles[d],
               P * Q * M * C * R * S / 70, 100.0 * real'(P * Q * M * C * R * S) / 70.0 / real'(cycles[d]),
               stalls[d]);
    for (int d = 1; d < ND; d++) begin
      checks++;
      if (cycles[d] > cycles[d-1]) begin
        failures++;
        $display("FAIL: depth %0d slower than depth %0d", DEPTHS[d], DEPTHS[d-1]);
      end
    end
    for (int d = 1; d < ND; d++) begin
      checks++;
      if (stalls[d] >= stalls[d-1]) begin
        failures++;
        $display("FAIL: depth %0d stalls %0d times, depth %0d %0d times", DEPTHS[d], stalls[d],
                 DEPTHS[d-1], stalls[d-1]);
      end
    end
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

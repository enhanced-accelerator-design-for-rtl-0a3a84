// Unit test of the AXI4-Lite slave. A small model stands in for the
// scratchpad domain: it answers each request toggle after a few clocks with a
// memory access and an acknowledge toggle. Checked: every configuration
// register reads back what was written (and reaches the cfg output), the
// hardware-parameter register, status bits, that writing CTRL[0] toggles start,
// scratchpad writes and reads through the window, and that B and R stay valid
// while the master holds ready low.
`timescale 1ns/1ps
module tb_axi_lite_if;
  import rs_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic        awvalid = 0, wvalid = 0, bready = 0, arvalid = 0, rready = 0;
  logic        awready, wready, bvalid, arready, rvalid;
  logic [17:0] awaddr = 0, araddr = 0;
  logic [31:0] wdata = 0, rdata;
  logic [1:0]  bresp, rresp;
  cfg_t        cfg;
  logic        start_tgl, busy_s = 0, done_s = 0, sp_req_tgl, sp_we, ack = 0;
  logic [SPAD_AW-1:0] sp_addr;
  logic [31:0] sp_wdata, sp_rdata = 0;

  axi_lite_if #(.ADDR_W(18), .X(7), .Y(10)) dut (
    .clk, .rst_n, .awvalid, .awready, .awaddr, .wvalid, .wready, .wdata,
    .bvalid, .bready, .bresp, .arvalid, .arready, .araddr, .rvalid, .rready, .rdata, .rresp,
    .cfg, .start_tgl, .busy_s, .done_s, .sp_req_tgl, .sp_we, .sp_addr, .sp_wdata,
    .sp_ack_tgl_s(ack), .sp_rdata);

  int checks = 0, failures = 0;
  logic [31:0] mem [64];

  // scratchpad-domain model
  initial forever begin
    @(posedge clk);
    if (sp_req_tgl != ack) begin
      repeat (4) @(posedge clk);
      if (sp_we) mem[sp_addr[5:0]] = sp_wdata;
      else       sp_rdata = mem[sp_addr[5:0]];
      ack = sp_req_tgl;
    end
  end

  task automatic chk(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  task automatic axi_write(input logic [17:0] a, input logic [31:0] d);
    @(negedge clk);
    awaddr = a; wdata = d; awvalid = 1; wvalid = 1;
    do @(posedge clk); while (!(awready && wready));
    @(negedge clk);
    awvalid = 0; wvalid = 0;
    while (!bvalid) @(negedge clk);
    repeat (2) @(negedge clk);
    chk(bvalid && bresp == 2'b00, "B held valid until ready");
    bready = 1;
    @(negedge clk);
    bready = 0;
  endtask

  task automatic axi_read(input logic [17:0] a, output logic [31:0] d);
    @(negedge clk);
    araddr = a; arvalid = 1;
    do @(posedge clk); while (!arready);
    @(negedge clk);
    arvalid = 0;
    while (!rvalid) @(negedge clk);
    d = rdata;
    repeat (2) @(negedge clk);
    chk(rvalid && rdata == d, "R held valid and stable until ready");
    rready = 1;
    @(negedge clk);
    rready = 0;
  endtask

  initial begin
    logic [31:0] v, vals [16];
    logic t0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    // configuration registers
    vals[2] = 11'd57; vals[3] = 11'd33; vals[4] = 11'd1024; vals[5] = 11'd300;
    vals[6] = 3; vals[7] = 5; vals[8] = 17; vals[9] = 9;
    vals[10] = 15'h1234; vals[11] = 15'h2345; vals[12] = 15'h3456; vals[13] = 15'h0fed;
    vals[14] = {10'd0, 6'd13, 16'hbeef};
    for (int i = 2; i <= 14; i++) axi_write(18'(i * 4), vals[i]);
    for (int i = 2; i <= 14; i++) begin
      axi_read(18'(i * 4), v);
      chk(v == vals[i], $sformatf("reg %h read %h exp %h", i * 4, v, vals[i]));
    end
    chk(cfg.h == 57 && cfg.w == 33 && cfg.c == 1024 && cfg.m == 300 && cfg.r == 3 && cfg.s == 5, "cfg dims");
    chk(cfg.c0 == 17 && cfg.q0 == 9 && cfg.scale_mant == 16'hbeef && cfg.scale_shift == 13, "cfg tiles/scale");
    chk(cfg.i_base == 15'h1234 && cfg.o_base == 15'h3456 && cfg.b_base == 15'h0fed, "cfg bases");
    axi_read(18'h3C, v);
    chk(v == 32'h0000_0A07, "HWINFO");
    // control: mode TRS, relu, no start
    t0 = start_tgl;
    axi_write(18'h00, 32'h6);
    chk(cfg.mode == DF_TRS && cfg.relu && !cfg.raw && start_tgl == t0, "ctrl without start");
    axi_write(18'h00, 32'h9);
    chk(cfg.mode == DF_SRS && cfg.raw && start_tgl != t0, "start toggles");
    chk(!cfg.accum, "accumulate off");
    axi_read(18'h00, v); chk(v == 32'h8, "CTRL readback");
    axi_write(18'h00, 32'h18);
    chk(cfg.raw && cfg.accum && cfg.mode == DF_SRS, "accumulate on");
    axi_read(18'h00, v); chk(v == 32'h18, "CTRL readback accumulate");
    axi_write(18'h00, 32'h8);
    busy_s = 1; done_s = 0;
    axi_read(18'h04, v); chk(v == 32'h1, "status busy");
    busy_s = 0; done_s = 1;
    axi_read(18'h04, v); chk(v == 32'h2, "status done");
    // scratchpad window
    for (int i = 0; i < 8; i++) axi_write(18'h20000 | 18'(i * 4), 32'hA500_0000 + 32'(i));
    for (int i = 7; i >= 0; i--) begin
      axi_read(18'h20000 | 18'(i * 4), v);
      chk(v == 32'hA500_0000 + 32'(i), $sformatf("spad word %0d got %h", i, v));
    end
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

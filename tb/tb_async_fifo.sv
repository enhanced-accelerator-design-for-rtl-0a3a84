// Unit test of the dual-clock FIFO (depth 16) with unrelated write (7 ns) and
// read (3 ns) clocks. Phase 1 fills it with the reader stopped: full must
// rise after exactly 16 writes and almost-full after 15. Phase 2 runs random
// pushes and pops honouring the flags and checks the data order against a
// queue model; it ends empty.
`timescale 1ns/1ps
module tb_async_fifo;
  logic wclk = 0, rclk = 0, rst_n = 0;
  always #3.5 wclk = ~wclk;
  always #1.5 rclk = ~rclk;

  logic wr_en = 0, rd_en = 0, wfull, wafull, rempty;
  logic [7:0] wdata = 0, rdata;

  async_fifo #(.WIDTH(8), .DEPTH(16)) dut (
    .wclk, .wrst_n(rst_n), .wr_en, .wdata, .wfull, .walmost_full(wafull),
    .rclk, .rrst_n(rst_n), .rd_en, .rdata, .rempty);

  int checks = 0, failures = 0;
  logic [7:0] model [$];
  int wrote = 0, nread = 0;
  bit writer_done = 0;

  initial begin
    repeat (3) @(posedge wclk);
    rst_n = 1;
    repeat (3) @(posedge wclk);
    for (int i = 0; i < 16; i++) begin
      @(negedge wclk);
      checks++;
      if (wfull) begin failures++; $display("FAIL: full after %0d writes", i); end
      checks++;
      if (wafull != (i >= 15)) begin failures++; $display("FAIL: almost full wrong at %0d", i); end
      if (!wfull) begin wr_en = 1; wdata = 8'(i); model.push_back(8'(i)); end
      else wr_en = 0;
    end
    @(negedge wclk);
    wr_en = 0;
    checks++;
    if (!wfull) begin failures++; $display("FAIL: not full after 16 writes"); end
    // random phase
    for (int i = 0; i < 400; i++) begin
      @(negedge wclk);
      if (!wfull && $urandom_range(0, 2) != 0) begin
        wr_en = 1; wdata = 8'($urandom); model.push_back(wdata);
      end else wr_en = 0;
    end
    @(negedge wclk);
    wr_en = 0;
    writer_done = 1;
  end

  initial begin
    wait (rst_n);
    repeat (60) @(posedge rclk);
    forever begin
      @(negedge rclk);
      rd_en = 0;
      if (!rempty && $urandom_range(0, 3) != 0) begin
        checks++;
        if (model.size() == 0) begin failures++; $display("FAIL: read from empty model"); end
        else begin
          logic [7:0] e;
          e = model.pop_front();
          if (rdata != e) begin failures++; $display("FAIL: got %h exp %h", rdata, e); end
        end
        rd_en = 1;
        nread++;
      end
      if (writer_done && rempty && model.size() == 0) begin
        repeat (10) @(posedge rclk);
        checks++;
        if (!rempty) begin failures++; $display("FAIL: not empty at end"); end
        $display("read %0d words", nread);
        $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
        $finish;
      end
    end
  end

  initial begin
    repeat (20000) @(posedge rclk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

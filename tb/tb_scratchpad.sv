// Unit test of the single-port scratchpad (256 words for speed): writes a
// random word to every address, overwrites random bytes of random words with
// byte enables, then reads every word back in random order and checks each
// result one clock after the read, and that a cycle without enable leaves
// rdata unchanged.
`timescale 1ns/1ps
module tb_scratchpad;
  localparam int WORDS = 256;
  logic clk = 0;
  always #5 clk = ~clk;
  logic en = 0, we = 0;
  logic [3:0] be = 4'hF;
  logic [7:0] addr = 0;
  logic [31:0] wdata = 0, rdata;
  scratchpad #(.WORDS(WORDS), .WIDTH(32)) dut (.clk, .en, .we, .be, .addr, .wdata, .rdata);

  int checks = 0, failures = 0;
  logic [31:0] model [WORDS];

  initial begin
    for (int a = 0; a < WORDS; a++) begin
      @(negedge clk);
      model[a] = $urandom;
      en = 1; we = 1; be = 4'hF; addr = 8'(a); wdata = model[a];
    end
    for (int i = 0; i < 300; i++) begin
      int a;
      a = $urandom_range(0, WORDS - 1);
      @(negedge clk);
      en = 1; we = 1; be = 4'($urandom); addr = 8'(a); wdata = $urandom;
      for (int b = 0; b < 4; b++) if (be[b]) model[a][8*b +: 8] = wdata[8*b +: 8];
    end
    for (int i = 0; i < 500; i++) begin
      int a;
      a = $urandom_range(0, WORDS - 1);
      @(negedge clk);
      en = 1; we = 0; addr = 8'(a);
      @(negedge clk);
      en = 0;
      checks++;
      if (rdata != model[a]) begin failures++; $display("FAIL: addr %0d got %h exp %h", a, rdata, model[a]); end
      @(negedge clk);
      checks++;
      if (rdata != model[a]) begin failures++; $display("FAIL: rdata changed without enable"); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

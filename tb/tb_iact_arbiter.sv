// Unit test of the round-robin arbiter with 5 requesters. Random request
// vectors and random advance; a model pointer predicts the grant (first
// requester at or after the pointer) and moves past it on advance. A second
// phase keeps all requests high and checks that the grants rotate 0,1,2,3,4,0.
`timescale 1ns/1ps
module tb_iact_arbiter;
  localparam int N = 5;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic [N-1:0] req = '0, grant;
  logic [2:0]   grant_idx;
  logic         advance = 0, grant_valid;

  iact_arbiter #(.N(N)) dut (.clk, .rst_n, .req, .advance, .grant, .grant_idx, .grant_valid);

  int checks = 0, failures = 0;
  int ptr = 0;

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < 300; i++) begin
      int exp_idx;
      @(negedge clk);
      req = N'($urandom);
      advance = $urandom_range(0, 3) != 0;
      #1;
      exp_idx = -1;
      for (int k = 0; k < N; k++)
        if (exp_idx < 0 && req[(ptr + k) % N]) exp_idx = (ptr + k) % N;
      checks++;
      if (grant_valid != (exp_idx >= 0) || (exp_idx >= 0 && (int'(grant_idx) != exp_idx || grant != N'(1 << exp_idx)))) begin
        failures++;
        $display("FAIL: req=%b ptr=%0d grant=%0d exp %0d", req, ptr, grant_idx, exp_idx);
      end
      @(posedge clk);
      if (advance && exp_idx >= 0) ptr = (exp_idx + 1) % N;
    end
    @(negedge clk);
    advance = 0; req = '1;
    for (int i = 0; i < 2 * N; i++) begin
      @(negedge clk);
      advance = 1;
      checks++;
      if (int'(grant_idx) != ptr) begin failures++; $display("FAIL: rotation got %0d exp %0d", grant_idx, ptr); end
      ptr = (ptr + 1) % N;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

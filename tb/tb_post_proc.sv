// Unit test of the output stage: random sums, biases, mantissas and shifts,
// with and without ReLU and in raw mode, compared with
// sat8(relu(round((acc + bias) * mant / 2^shift))) computed here in 64 bits.
// Directed cases cover saturation at +127 and -128 and rounding of halves.
`timescale 1ns/1ps
module tb_post_proc;
  import rs_pkg::*;
  psum_t acc, bias;
  logic [15:0] mant;
  logic [5:0]  shift;
  logic        relu, raw;
  logic [31:0] y;
  post_proc dut (.acc, .bias, .scale_mant(mant), .scale_shift(shift), .relu, .raw, .y);

  int checks = 0, failures = 0;

  function automatic int model(input int a, input int b, input int m, input int s, input bit rl, input bit rw);
    longint t;
    if (rw) return a;
    t = (longint'(a) + longint'(b)) * longint'(m);
    if (s > 0) t = t + (longint'(1) << (s - 1));
    t = t >>> s;
    if (rl && t < 0) t = 0;
    if (t > 127) t = 127;
    if (t < -128) t = -128;
    return int'(t);
  endfunction

  task automatic one(input int a, input int b, input int m, input int s, input bit rl, input bit rw);
    acc = a; bias = b; mant = 16'(m); shift = 6'(s); relu = rl; raw = rw;
    #1;
    checks++;
    if ($signed(y) != model(a, b, m, s, rl, rw)) begin
      failures++;
      $display("FAIL: acc=%0d bias=%0d m=%0d s=%0d relu=%0d raw=%0d y=%0d exp %0d", a, b, m, s, rl, rw, $signed(y), model(a, b, m, s, rl, rw));
    end
  endtask

  initial begin
    one(1000, 0, 1, 0, 0, 0);          // +127 saturation
    one(-1000, 0, 1, 0, 0, 0);         // -128 saturation
    one(-1000, 0, 1, 0, 1, 0);         // relu
    one(3, 0, 1, 1, 0, 0);             // 1.5 rounds to 2
    one(-3, 0, 1, 1, 0, 0);            // -1.5 rounds to -1
    one(123456, -7, 5, 3, 0, 1);       // raw
    for (int i = 0; i < 2000; i++)
      one(int'($urandom) >>> $urandom_range(0, 31), int'($urandom) >>> $urandom_range(8, 31),
          int'($urandom_range(0, 65535)), int'($urandom_range(0, 40)), 1'($urandom), 1'($urandom_range(0, 7) == 0));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

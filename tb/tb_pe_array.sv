// Unit test of a 3-column x 4-row PE array. Each row gets one weight
// (row y: y+1) and each iact feed one value (feed f: f+1); a 1x1x1 MAC then
// leaves weight x iact in every PE, which shows where every stream went:
//   SRS: PE(y,x) must hold (y+1) * (x-y+Y-1 + 1)   (diagonal feed)
//   TRS: PE(y,x) must hold (y+1) * (Y-1+x + 1)     (vertical, south feed)
// Every row is read through row_sel; with acc set and groups of rn=2 rows the
// upper row of each group must return the sum of the group.
`timescale 1ns/1ps
module tb_pe_array;
  import rs_pkg::*;
  localparam int X = 3, Y = 4, NF = X + Y - 1;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  dataflow_e mode = DF_SRS;
  logic [Y-1:0]  w_valid = '0;
  data_t         w_data [Y];
  logic [NF-1:0] i_valid = '0;
  data_t         i_data [NF];
  logic ld_w_start = 0, ld_i_start = 0, psum_clear = 0, comp_start = 0, busy, acc = 0;
  logic [9:0] woff = 0;
  logic [7:0] qn = 1, cn = 1;
  logic [3:0] sn = 1, rn = 2;
  logic [2:0] rd_idx = 0;
  logic [4:0] row_sel = 0;
  psum_t col_psum [X];

  pe_array #(.X(X), .Y(Y), .W_DEPTH(16), .I_DEPTH(16), .P_DEPTH(8)) dut (
    .clk, .rst_n, .mode, .w_valid, .w_data, .i_valid, .i_data,
    .ld_w_start, .ld_i_start, .psum_clear, .comp_start, .woff, .qn, .sn, .cn, .busy,
    .rd_idx, .row_sel, .acc, .rn, .col_psum);

  int checks = 0, failures = 0;

  function automatic int val(input int y, input int x, input logic trs);
    return (y + 1) * ((trs ? (Y - 1 + x) : (x - y + Y - 1)) + 1);
  endfunction

  task automatic run(input logic trs);
    mode = trs ? DF_TRS : DF_SRS;
    @(posedge clk); psum_clear <= 1; ld_w_start <= 1; ld_i_start <= 1;
    @(posedge clk); psum_clear <= 0; ld_w_start <= 0; ld_i_start <= 0;
    for (int y = 0; y < Y; y++) w_data[y] = data_t'(y + 1);
    for (int f = 0; f < NF; f++) i_data[f] = data_t'(f + 1);
    w_valid <= '1; i_valid <= '1;
    @(posedge clk);
    w_valid <= '0; i_valid <= '0;
    repeat (X + Y + 2) @(posedge clk);
    comp_start <= 1; @(posedge clk); comp_start <= 0;
    @(posedge clk); #1;
    checks++;
    if (busy) begin failures++; $display("FAIL: busy after 1 MAC"); end
    acc = 0;
    for (int y = 0; y < Y; y++) begin
      row_sel = 5'(y); #1;
      for (int x = 0; x < X; x++) begin
        checks++;
        if (col_psum[x] != val(y, x, trs)) begin
          failures++;
          $display("FAIL %s PE(%0d,%0d)=%0d exp %0d", trs ? "TRS" : "SRS", y, x, col_psum[x], val(y, x, trs));
        end
      end
    end
    acc = 1;
    for (int y = 1; y < Y; y += 2) begin
      row_sel = 5'(y); #1;
      for (int x = 0; x < X; x++) begin
        checks++;
        if (col_psum[x] != val(y, x, trs) + val(y - 1, x, trs)) begin
          failures++; $display("FAIL group sum row %0d col %0d", y, x);
        end
      end
    end
    acc = 0;
  endtask

  initial begin
    for (int y = 0; y < Y; y++) w_data[y] = '0;
    for (int f = 0; f < NF; f++) i_data[f] = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    run(1'b0);
    run(1'b1);
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

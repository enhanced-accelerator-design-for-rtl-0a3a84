// X-by-Y systolic array of PEs.
//
// Row y = 0 is the bottom row, column x = 0 the west column. Weights enter
// each row at the west edge and travel east. Input activations enter through
// X+Y-1 feeds: feed f < Y-1 drives the west edge of row Y-1-f, feed
// f >= Y-1 drives the south edge of column f-(Y-1). In SRS mode a PE takes its
// iact from the bottom-left neighbour, so feed f reaches every PE with
// x - y = f - (Y-1) (one diagonal); in TRS mode it takes it from the PE below,
// so only the south feeds are used and a whole column sees the same row.
// Partial sums flow upward: during a drain the selected row's value of each
// column appears on col_psum, summed with the rows below it inside its group of
// rn rows when acc is set (SRS filter-row reduction).
// All loading is one PE hop per clock; the drain path is combinational.
// The PE grid, its three flows and the dataflow multiplexer follow the
// document; the feed numbering and the drain row select are this design's own.
module pe_array
  import rs_pkg::*;
#(
  parameter int unsigned X       = 7,
  parameter int unsigned Y       = 10,
  parameter int unsigned W_DEPTH = 128,
  parameter int unsigned I_DEPTH = 128,
  parameter int unsigned P_DEPTH = 32,
  localparam int unsigned NF     = X + Y - 1
) (
  input  logic       clk,
  input  logic       rst_n,
  input  dataflow_e  mode,
  input  logic [Y-1:0]  w_valid,
  input  data_t         w_data [Y],
  input  logic [NF-1:0] i_valid,
  input  data_t         i_data [NF],
  input  logic       ld_w_start,
  input  logic       ld_i_start,
  input  logic       psum_clear,
  input  logic       comp_start,
  input  logic [9:0] woff,
  input  logic [7:0] qn,
  input  logic [3:0] sn,
  input  logic [7:0] cn,
  output logic       busy,
  input  logic [$clog2(P_DEPTH)-1:0] rd_idx,
  input  logic [4:0] row_sel,
  input  logic       acc,
  input  logic [3:0] rn,
  output psum_t      col_psum [X]
);

  logic  wv   [Y][X+1];
  data_t wd   [Y][X+1];
  logic  iv   [Y][X];
  data_t id   [Y][X];
  psum_t ps   [Y][X];
  logic  bz   [Y][X];
  logic [Y-1:0] acc_en;

  always_comb begin
    for (int y = 0; y < Y; y++)
      acc_en[y] = acc && (rn != 0) && ((y % int'(rn)) != 0);
  end

  for (genvar y = 0; y < Y; y++) begin : g_row
    assign wv[y][0] = w_valid[y];
    assign wd[y][0] = w_data[y];
    for (genvar x = 0; x < X; x++) begin : g_col
      logic  dv, vv;
      data_t dd, vd;
      psum_t below;
      psum_t ps_o;
      // diagonal source
      if (y == 0) begin : g_ds
        assign dv = i_valid[Y-1+x];
        assign dd = i_data[Y-1+x];
      end else if (x == 0) begin : g_dw
        assign dv = i_valid[Y-1-y];
        assign dd = i_data[Y-1-y];
      end else begin : g_dn
        assign dv = iv[y-1][x-1];
        assign dd = id[y-1][x-1];
      end
      // vertical source
      if (y == 0) begin : g_vs
        assign vv = i_valid[Y-1+x];
        assign vd = i_data[Y-1+x];
        assign below = '0;
      end else begin : g_vn
        assign vv = iv[y-1][x];
        assign vd = id[y-1][x];
        assign below = g_row[y-1].g_col[x].ps_o;
      end

      pe #(.W_DEPTH(W_DEPTH), .I_DEPTH(I_DEPTH), .P_DEPTH(P_DEPTH)) u_pe (
        .clk, .rst_n, .mode,
        .w_in_valid (wv[y][x]),   .w_in_data (wd[y][x]),
        .w_out_valid(wv[y][x+1]), .w_out_data(wd[y][x+1]),
        .iact_diag_valid(dv), .iact_diag_data(dd),
        .iact_vert_valid(vv), .iact_vert_data(vd),
        .iact_out_valid(iv[y][x]), .iact_out_data(id[y][x]),
        .ld_w_start, .ld_i_start, .psum_clear, .comp_start,
        .woff, .qn, .sn, .cn,
        .busy(bz[y][x]),
        .rd_idx, .acc_en(acc_en[y]), .psum_below(below), .psum_out(ps_o)
      );
      assign ps[y][x] = ps_o;
    end
  end

  always_comb begin
    busy = 1'b0;
    for (int y = 0; y < Y; y++)
      for (int x = 0; x < X; x++)
        busy |= bz[y][x];
    for (int x = 0; x < X; x++) begin
      col_psum[x] = '0;
      for (int y = 0; y < Y; y++)
        if (row_sel == 5'(y)) col_psum[x] = ps[y][x];
    end
  end

endmodule

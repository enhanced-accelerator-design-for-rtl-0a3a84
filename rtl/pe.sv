// Processing element of the row-stationary array.
//
// Each PE holds three line buffers: filter weights, one input-activation row
// segment and the partial sums of one output-row segment. After a COMPUTE
// start it runs, one multiply-accumulate per cycle,
//     for q0 < qn: for s < sn: for c0 < cn:
//        psum[q0] += w[woff + s*cn + c0] * iact[(q0+s)*cn + c0]
// i.e. the 1-D convolution of one filter row with one input row over a chunk
// of cn channels (qn*sn*cn cycles, busy high meanwhile).
//
// Loading is systolic: a valid weight from the west is written at the next
// weight-buffer position and forwarded east one cycle later; an input
// activation is taken from the PE to the bottom-left (SRS mode) or from the
// PE below (TRS mode), written and forwarded to both upper neighbours one
// cycle later. ld_w_start / ld_i_start rewind the write pointers.
//
// Draining is combinational: psum_out = psum[rd_idx] + (acc_en ? psum_below : 0),
// so a column of PEs adds the rows of one filter bottom-to-top.
//
// Follows the document: the three line buffers, the diagonal/vertical iact
// multiplexer, weights moving right and sums moving up, the R*S weight
// buffer of the temporal dataflow (woff selects the filter row). Own choices:
// buffer depths, data widths, the combinational drain chain.
module pe
  import rs_pkg::*;
#(
  parameter int unsigned W_DEPTH = 128,
  parameter int unsigned I_DEPTH = 128,
  parameter int unsigned P_DEPTH = 32
) (
  input  logic       clk,
  input  logic       rst_n,
  input  dataflow_e  mode,
  // weight stream (west in, east out)
  input  logic       w_in_valid,
  input  data_t      w_in_data,
  output logic       w_out_valid,
  output data_t      w_out_data,
  // iact streams
  input  logic       iact_diag_valid,
  input  data_t      iact_diag_data,
  input  logic       iact_vert_valid,
  input  data_t      iact_vert_data,
  output logic       iact_out_valid,
  output data_t      iact_out_data,
  // control
  input  logic       ld_w_start,
  input  logic       ld_i_start,
  input  logic       psum_clear,
  input  logic       comp_start,
  input  logic [9:0] woff,
  input  logic [7:0] qn,
  input  logic [3:0] sn,
  input  logic [7:0] cn,
  output logic       busy,
  // drain
  input  logic [$clog2(P_DEPTH)-1:0] rd_idx,
  input  logic       acc_en,
  input  psum_t      psum_below,
  output psum_t      psum_out
);

  localparam int unsigned WAW = $clog2(W_DEPTH);
  localparam int unsigned IAW = $clog2(I_DEPTH);
  localparam int unsigned PAW = $clog2(P_DEPTH);

  data_t w_buf [W_DEPTH];
  data_t i_buf [I_DEPTH];
  psum_t p_buf [P_DEPTH];

  logic [WAW-1:0] w_wr;
  logic [IAW-1:0] i_wr;

  // Input multiplexer: diagonal path for SRS, vertical path for TRS.
  logic  i_valid;
  data_t i_data;
  always_comb begin
    if (mode == DF_TRS) begin
      i_valid = iact_vert_valid;
      i_data  = iact_vert_data;
    end else begin
      i_valid = iact_diag_valid;
      i_data  = iact_diag_data;
    end
  end

  // Loading and forwarding.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      w_out_valid    <= 1'b0;
      w_out_data     <= '0;
      iact_out_valid <= 1'b0;
      iact_out_data  <= '0;
      w_wr           <= '0;
      i_wr           <= '0;
    end else begin
      w_out_valid    <= w_in_valid;
      w_out_data     <= w_in_data;
      iact_out_valid <= i_valid;
      iact_out_data  <= i_data;
      if (ld_w_start)      w_wr <= '0;
      else if (w_in_valid) w_wr <= w_wr + 1'b1;
      if (ld_i_start)      i_wr <= '0;
      else if (i_valid)    i_wr <= i_wr + 1'b1;
    end
  end

  always_ff @(posedge clk) begin
    if (w_in_valid && !ld_w_start) w_buf[w_wr] <= w_in_data;
    if (i_valid && !ld_i_start)    i_buf[i_wr] <= i_data;
  end

  // MAC loop counters.
  logic [7:0]     q_cnt, c_cnt;
  logic [3:0]     s_cnt;
  logic [WAW-1:0] w_idx;      // woff + s*cn + c
  logic [IAW-1:0] q_off;      // q*cn
  logic [IAW-1:0] sc_off;     // s*cn + c
  logic [9:0]     woff_q;

  wire logic last_c = (c_cnt == cn - 8'd1);
  wire logic last_s = (s_cnt == sn - 4'd1);
  wire logic last_q = (q_cnt == qn - 8'd1);

  psum_t prod;
  assign prod = psum_t'(w_buf[w_idx]) * psum_t'(i_buf[IAW'(q_off + sc_off)]);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy   <= 1'b0;
      q_cnt  <= '0;
      s_cnt  <= '0;
      c_cnt  <= '0;
      w_idx  <= '0;
      q_off  <= '0;
      sc_off <= '0;
      woff_q <= '0;
    end else if (comp_start) begin
      busy   <= (qn != 0) && (sn != 0) && (cn != 0);
      q_cnt  <= '0;
      s_cnt  <= '0;
      c_cnt  <= '0;
      w_idx  <= WAW'(woff);
      woff_q <= woff;
      q_off  <= '0;
      sc_off <= '0;
    end else if (busy) begin
      if (!last_c) begin
        c_cnt  <= c_cnt + 8'd1;
        w_idx  <= w_idx + 1'b1;
        sc_off <= sc_off + 1'b1;
      end else begin
        c_cnt <= '0;
        if (!last_s) begin
          s_cnt  <= s_cnt + 4'd1;
          w_idx  <= w_idx + 1'b1;
          sc_off <= sc_off + 1'b1;
        end else begin
          s_cnt  <= '0;
          w_idx  <= WAW'(woff_q);
          sc_off <= '0;
          q_off  <= q_off + IAW'(cn);
          if (!last_q) q_cnt <= q_cnt + 8'd1;
          else         busy  <= 1'b0;
        end
      end
    end
  end

  always_ff @(posedge clk) begin
    if (psum_clear) begin
      for (int k = 0; k < P_DEPTH; k++) p_buf[k] <= '0;
    end else if (busy) begin
      p_buf[PAW'(q_cnt)] <= p_buf[PAW'(q_cnt)] + prod;
    end
  end

  assign psum_out = p_buf[rd_idx] + (acc_en ? psum_below : '0);

  // A new computation must not start while one is running.
  assert property (@(posedge clk) disable iff (!rst_n) comp_start |-> !busy);

endmodule

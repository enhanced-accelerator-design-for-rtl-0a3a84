// PE-clock-domain sequencer of the array.
//
// It takes one command at a time from the command queue (filled by the
// control unit in the scratchpad domain) and drives the PE array:
//   CLEAR  one cycle of psum_clear.
//   LOADW  rewinds the weight pointers, then moves n weights from every west
//          weight FIFO into the array; all Y FIFOs are popped together and the
//          whole array waits (stall) in any cycle where one of them is empty.
//          Afterwards it waits X cycles until the last weight has reached the
//          east column.
//   LOADI  the same for the iact FIFOs: the X south feeds in TRS mode, all
//          X+Y-1 feeds in SRS mode; X+Y cycles of flush.
//   COMP   pulses comp_start and waits until no PE is busy.
//   DRAIN  for k = 0..qn-1 pushes psum k of row 'row' of every column into
//          the X north output buffers (all together, waiting while any is
//          full), with the in-group accumulate chain when acc is set.
// Stall cycles, output-stall cycles and dataflow-mode switches are counted.
// The stall on an empty input FIFO follows the document; the command set is
// this design's own.
module array_ctrl
  import rs_pkg::*;
#(
  parameter int unsigned X       = 7,
  parameter int unsigned Y       = 10,
  parameter int unsigned P_DEPTH = 32,
  localparam int unsigned NF     = X + Y - 1
) (
  input  logic          clk,
  input  logic          rst_n,
  // command queue
  input  cmd_t          cmd,
  input  logic          cmd_empty,
  output logic          cmd_pop,
  // weight FIFOs
  input  data_t         wf_data [Y],
  input  logic [Y-1:0]  wf_empty,
  output logic [Y-1:0]  wf_pop,
  // iact FIFOs
  input  data_t         if_data [NF],
  input  logic [NF-1:0] if_empty,
  output logic [NF-1:0] if_pop,
  // output buffers
  output psum_t         of_data [X],
  input  logic [X-1:0]  of_full,
  output logic          of_push,
  // PE array
  output dataflow_e     mode,
  output logic [Y-1:0]  w_valid,
  output data_t         w_data [Y],
  output logic [NF-1:0] i_valid,
  output data_t         i_data [NF],
  output logic          ld_w_start,
  output logic          ld_i_start,
  output logic          psum_clear,
  output logic          comp_start,
  output logic [9:0]    woff,
  output logic [7:0]    qn,
  output logic [3:0]    sn,
  output logic [7:0]    cn,
  input  logic          arr_busy,
  output logic [$clog2(P_DEPTH)-1:0] rd_idx,
  output logic [4:0]    row_sel,
  output logic          acc,
  output logic [3:0]    rn,
  input  psum_t         col_psum [X],
  // statistics
  output logic [31:0]   stall_cycles,
  output logic [31:0]   out_stall_cycles,
  output logic [31:0]   mode_switches,
  output logic          idle
);

  typedef enum logic [3:0] {
    S_IDLE, S_CLEAR, S_LW_START, S_LW_RUN, S_LI_START, S_LI_RUN,
    S_FLUSH, S_COMP, S_COMP_WAIT, S_DRAIN
  } state_e;

  state_e      state;
  cmd_t        cur;
  logic [9:0]  cnt;
  logic [5:0]  flush;
  logic        mode_seen;

  logic [NF-1:0] if_mask;
  always_comb begin
    for (int f = 0; f < NF; f++)
      if_mask[f] = (cur.mode == DF_SRS) || (f >= int'(Y) - 1);
  end

  wire logic w_ready = (wf_empty == '0);
  wire logic i_ready = ((if_empty & if_mask) == '0);
  wire logic o_ready = (of_full == '0);

  assign mode    = cur.mode;
  assign woff    = cur.woff;
  assign qn      = cur.qn;
  assign sn      = cur.sn;
  assign cn      = cur.cn;
  assign row_sel = cur.row;
  assign acc     = cur.acc;
  assign rn      = cur.rn;
  assign rd_idx  = $clog2(P_DEPTH)'(cnt);
  assign idle    = (state == S_IDLE) && cmd_empty;

  always_comb begin
    cmd_pop    = (state == S_IDLE) && !cmd_empty;
    ld_w_start = (state == S_LW_START);
    ld_i_start = (state == S_LI_START);
    psum_clear = (state == S_CLEAR);
    comp_start = (state == S_COMP);
    wf_pop     = '0;
    if_pop     = '0;
    of_push    = 1'b0;
    if (state == S_LW_RUN && w_ready) wf_pop = '1;
    if (state == S_LI_RUN && i_ready) if_pop = if_mask;
    if (state == S_DRAIN && o_ready)  of_push = 1'b1;
    w_valid = wf_pop;
    i_valid = if_pop;
    for (int y = 0; y < Y; y++)  w_data[y] = wf_data[y];
    for (int f = 0; f < NF; f++) i_data[f] = if_data[f];
    for (int x = 0; x < X; x++)  of_data[x] = col_psum[x];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state            <= S_IDLE;
      cur              <= '0;
      cnt              <= '0;
      flush            <= '0;
      mode_seen        <= 1'b0;
      stall_cycles     <= '0;
      out_stall_cycles <= '0;
      mode_switches    <= '0;
    end else begin
      unique case (state)
        S_IDLE: if (!cmd_empty) begin
          cur       <= cmd;
          cnt       <= '0;
          mode_seen <= 1'b1;
          if (mode_seen && cmd.mode != cur.mode) mode_switches <= mode_switches + 1;
          unique case (cmd.op)
            CMD_CLEAR: state <= S_CLEAR;
            CMD_LOADW: state <= S_LW_START;
            CMD_LOADI: state <= S_LI_START;
            CMD_COMP:  state <= S_COMP;
            CMD_DRAIN: state <= S_DRAIN;
            default:   state <= S_IDLE;
          endcase
        end
        S_CLEAR:    state <= S_IDLE;
        S_LW_START: state <= (cur.n == 0) ? S_IDLE : S_LW_RUN;
        S_LW_RUN: begin
          if (w_ready) begin
            cnt <= cnt + 1'b1;
            if (cnt == cur.n - 1'b1) begin
              state <= S_FLUSH;
              flush <= 6'(X);
            end
          end else stall_cycles <= stall_cycles + 1;
        end
        S_LI_START: state <= (cur.n == 0) ? S_IDLE : S_LI_RUN;
        S_LI_RUN: begin
          if (i_ready) begin
            cnt <= cnt + 1'b1;
            if (cnt == cur.n - 1'b1) begin
              state <= S_FLUSH;
              flush <= 6'(X + Y);
            end
          end else stall_cycles <= stall_cycles + 1;
        end
        S_FLUSH: begin
          if (flush == 0) state <= S_IDLE;
          else            flush <= flush - 1'b1;
        end
        S_COMP:      state <= S_COMP_WAIT;
        S_COMP_WAIT: if (!arr_busy) state <= S_IDLE;
        S_DRAIN: begin
          if (cur.qn == 0) state <= S_IDLE;
          else if (o_ready) begin
            cnt <= cnt + 1'b1;
            if (cnt == 10'(cur.qn) - 1'b1) state <= S_IDLE;
          end else out_stall_cycles <= out_stall_cycles + 1;
        end
        default: state <= S_IDLE;
      endcase
    end
  end

endmodule

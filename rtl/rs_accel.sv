// Row-stationary CNN accelerator, top level.
//
// A host loads input activations, weights and biases into the scratchpad
// over AXI4-Lite, writes the layer shape and the dataflow (SRS or TRS), and
// starts; the control unit then runs the whole convolution and writes the
// scaled, biased and activated outputs back into the scratchpad (or raw
// 32-bit sums, optionally added onto the sums already stored there).
//
// Three clock domains:
//   clk_axi  - axi_lite_if (registers, scratchpad window)
//   clk_spad - host_port, control_unit (loop nest, address generation,
//              round-robin arbiter, post_proc), scratchpad (one port)
//   clk_pe   - array_ctrl and the X-by-Y pe_array
// The domains meet only in dual-clock FIFOs (Y west weight FIFOs, X+Y-1
// west/south iact FIFOs, X north output buffers, one command queue) and in
// toggle handshakes between AXI and scratchpad. The scratchpad port belongs to
// the control unit while it is busy and to the host otherwise.
// rst_n is asynchronous and must be released synchronously to every clock.
// The statistics outputs count PE-array stalls, output-buffer stalls,
// dataflow switches, zero-fed iacts, dropped and written results.
// Structure and default sizes (10 rows x 7 columns, 128 kB, 16-word FIFOs)
// follow the document; line-buffer depths, widths, the register map and the
// command queue are this design's own.
module rs_accel
  import rs_pkg::*;
#(
  parameter int unsigned X          = 7,
  parameter int unsigned Y          = 10,
  parameter int unsigned SPAD_WORDS = 32768,
  parameter int unsigned FIFO_DEPTH = 16,
  parameter int unsigned W_DEPTH    = 128,
  parameter int unsigned I_DEPTH    = 128,
  parameter int unsigned P_DEPTH    = 32,
  localparam int unsigned NF        = X + Y - 1
) (
  input  logic        clk_axi,
  input  logic        clk_spad,
  input  logic        clk_pe,
  input  logic        rst_n,
  input  logic        s_axi_awvalid,
  output logic        s_axi_awready,
  input  logic [17:0] s_axi_awaddr,
  input  logic        s_axi_wvalid,
  output logic        s_axi_wready,
  input  logic [31:0] s_axi_wdata,
  output logic        s_axi_bvalid,
  input  logic        s_axi_bready,
  output logic [1:0]  s_axi_bresp,
  input  logic        s_axi_arvalid,
  output logic        s_axi_arready,
  input  logic [17:0] s_axi_araddr,
  output logic        s_axi_rvalid,
  input  logic        s_axi_rready,
  output logic [31:0] s_axi_rdata,
  output logic [1:0]  s_axi_rresp,
  output logic        irq,
  output logic [31:0] stat_stall,
  output logic [31:0] stat_out_stall,
  output logic [31:0] stat_mode_switch,
  output logic [31:0] stat_zero_feed,
  output logic [31:0] stat_dropped,
  output logic [31:0] stat_written
);

  // ------------------------------------------------------------ AXI domain
  cfg_t               cfg;
  logic               start_tgl, busy_s, done_s, sp_req_tgl, h_we, ack_tgl_s, ack_tgl;
  logic [SPAD_WAW-1:0] h_addr;
  logic [31:0]        h_wdata, h_rdata;
  logic               ctrl_busy, ctrl_done;

  axi_lite_if #(.ADDR_W(18), .X(X), .Y(Y)) u_axi (
    .clk(clk_axi), .rst_n,
    .awvalid(s_axi_awvalid), .awready(s_axi_awready), .awaddr(s_axi_awaddr),
    .wvalid(s_axi_wvalid), .wready(s_axi_wready), .wdata(s_axi_wdata),
    .bvalid(s_axi_bvalid), .bready(s_axi_bready), .bresp(s_axi_bresp),
    .arvalid(s_axi_arvalid), .arready(s_axi_arready), .araddr(s_axi_araddr),
    .rvalid(s_axi_rvalid), .rready(s_axi_rready), .rdata(s_axi_rdata), .rresp(s_axi_rresp),
    .cfg, .start_tgl, .busy_s, .done_s,
    .sp_req_tgl, .sp_we(h_we), .sp_addr(h_addr), .sp_wdata(h_wdata),
    .sp_ack_tgl_s(ack_tgl_s), .sp_rdata(h_rdata)
  );

  cdc_sync #(.WIDTH(3)) u_sync_axi (
    .clk(clk_axi), .rst_n, .d({ctrl_busy, ctrl_done, ack_tgl}), .q({busy_s, done_s, ack_tgl_s})
  );
  assign irq = done_s;

  // ------------------------------------------------------------ scratchpad domain
  logic req_tgl_s, start_tgl_s, start;
  cdc_sync #(.WIDTH(2)) u_sync_spad (
    .clk(clk_spad), .rst_n, .d({sp_req_tgl, start_tgl}), .q({req_tgl_s, start_tgl_s})
  );

  logic               hp_en, hp_we;
  logic [SPAD_WAW-1:0] hp_addr;
  logic [31:0]        hp_wdata;
  logic               cu_en, cu_we;
  logic [3:0]         cu_be, sp_be;
  logic [SPAD_WAW-1:0] cu_addr;
  logic [31:0]        cu_wdata;
  logic               sp_en, sp_we;
  logic [SPAD_WAW-1:0] sp_addr;
  logic [31:0]        sp_wdata, sp_rdata;

  host_port u_host (
    .clk(clk_spad), .rst_n, .req_tgl_s, .we(h_we), .addr(h_addr), .wdata(h_wdata),
    .ack_tgl, .rdata_q(h_rdata), .start_tgl_s, .start, .ctrl_busy,
    .sp_en(hp_en), .sp_we(hp_we), .sp_addr(hp_addr), .sp_wdata(hp_wdata), .sp_rdata
  );

  always_comb begin
    if (ctrl_busy) begin
      sp_en = cu_en; sp_we = cu_we; sp_be = cu_be; sp_addr = cu_addr; sp_wdata = cu_wdata;
    end else begin
      sp_en = hp_en; sp_we = hp_we; sp_be = 4'hF; sp_addr = hp_addr; sp_wdata = hp_wdata;
    end
  end

  scratchpad #(.WORDS(SPAD_WORDS), .WIDTH(32)) u_spad (
    .clk(clk_spad), .en(sp_en), .we(sp_we), .be(sp_be), .addr(sp_addr[$clog2(SPAD_WORDS)-1:0]),
    .wdata(sp_wdata), .rdata(sp_rdata)
  );

  // FIFO interfaces
  logic          cmd_push, cmd_full, cmd_afull, cmd_empty, cmd_pop;
  cmd_t          cmd_w, cmd_r;
  logic [Y-1:0]  wf_push, wf_full, wf_afull, wf_empty, wf_pop;
  logic [NF-1:0] if_push, if_full, if_afull, if_empty, if_pop;
  data_t         fifo_wdata;
  data_t         wf_data [Y];
  data_t         if_data [NF];
  psum_t         of_wdata [X];
  psum_t         of_rdata [X];
  logic [X-1:0]  of_full, of_afull, of_empty, of_pop;
  logic          of_push;

  control_unit #(.X(X), .Y(Y)) u_ctrl (
    .clk(clk_spad), .rst_n, .cfg, .start, .busy(ctrl_busy), .done(ctrl_done),
    .sp_en(cu_en), .sp_we(cu_we), .sp_be(cu_be), .sp_addr(cu_addr), .sp_wdata(cu_wdata), .sp_rdata,
    .cmd_push, .cmd_data(cmd_w), .cmd_full,
    .wf_push, .wf_full, .wf_afull,
    .if_push, .if_full, .if_afull, .fifo_wdata,
    .of_rdata, .of_empty, .of_pop,
    .zero_feeds(stat_zero_feed), .dropped(stat_dropped), .written(stat_written)
  );

  async_fifo #(.WIDTH($bits(cmd_t)), .DEPTH(FIFO_DEPTH)) u_cmdq (
    .wclk(clk_spad), .wrst_n(rst_n), .wr_en(cmd_push), .wdata(cmd_w), .wfull(cmd_full), .walmost_full(cmd_afull),
    .rclk(clk_pe), .rrst_n(rst_n), .rd_en(cmd_pop), .rdata(cmd_r), .rempty(cmd_empty)
  );

  for (genvar y = 0; y < Y; y++) begin : g_wf
    async_fifo #(.WIDTH(DATA_W), .DEPTH(FIFO_DEPTH)) u_wf (
      .wclk(clk_spad), .wrst_n(rst_n), .wr_en(wf_push[y]), .wdata(fifo_wdata),
      .wfull(wf_full[y]), .walmost_full(wf_afull[y]),
      .rclk(clk_pe), .rrst_n(rst_n), .rd_en(wf_pop[y]), .rdata(wf_data[y]), .rempty(wf_empty[y])
    );
  end

  for (genvar f = 0; f < NF; f++) begin : g_if
    async_fifo #(.WIDTH(DATA_W), .DEPTH(FIFO_DEPTH)) u_if (
      .wclk(clk_spad), .wrst_n(rst_n), .wr_en(if_push[f]), .wdata(fifo_wdata),
      .wfull(if_full[f]), .walmost_full(if_afull[f]),
      .rclk(clk_pe), .rrst_n(rst_n), .rd_en(if_pop[f]), .rdata(if_data[f]), .rempty(if_empty[f])
    );
  end

  for (genvar x = 0; x < X; x++) begin : g_of
    async_fifo #(.WIDTH(PSUM_W), .DEPTH(FIFO_DEPTH)) u_of (
      .wclk(clk_pe), .wrst_n(rst_n), .wr_en(of_push), .wdata(of_wdata[x]),
      .wfull(of_full[x]), .walmost_full(of_afull[x]),
      .rclk(clk_spad), .rrst_n(rst_n), .rd_en(of_pop[x]), .rdata(of_rdata[x]), .rempty(of_empty[x])
    );
  end

  // ------------------------------------------------------------ PE domain
  dataflow_e     mode;
  logic [Y-1:0]  w_valid;
  data_t         w_data [Y];
  logic [NF-1:0] i_valid;
  data_t         i_data [NF];
  logic          ld_w_start, ld_i_start, psum_clear, comp_start, arr_busy, acc, pe_idle;
  logic [9:0]    woff;
  logic [7:0]    qn, cn;
  logic [3:0]    sn, rn;
  logic [$clog2(P_DEPTH)-1:0] rd_idx;
  logic [4:0]    row_sel;
  psum_t         col_psum [X];

  array_ctrl #(.X(X), .Y(Y), .P_DEPTH(P_DEPTH)) u_actl (
    .clk(clk_pe), .rst_n,
    .cmd(cmd_r), .cmd_empty, .cmd_pop,
    .wf_data, .wf_empty, .wf_pop,
    .if_data, .if_empty, .if_pop,
    .of_data(of_wdata), .of_full, .of_push,
    .mode, .w_valid, .w_data, .i_valid, .i_data,
    .ld_w_start, .ld_i_start, .psum_clear, .comp_start, .woff, .qn, .sn, .cn,
    .arr_busy, .rd_idx, .row_sel, .acc, .rn, .col_psum,
    .stall_cycles(stat_stall), .out_stall_cycles(stat_out_stall),
    .mode_switches(stat_mode_switch), .idle(pe_idle)
  );

  pe_array #(.X(X), .Y(Y), .W_DEPTH(W_DEPTH), .I_DEPTH(I_DEPTH), .P_DEPTH(P_DEPTH)) u_arr (
    .clk(clk_pe), .rst_n, .mode,
    .w_valid, .w_data, .i_valid, .i_data,
    .ld_w_start, .ld_i_start, .psum_clear, .comp_start, .woff, .qn, .sn, .cn,
    .busy(arr_busy), .rd_idx, .row_sel, .acc, .rn, .col_psum
  );

endmodule

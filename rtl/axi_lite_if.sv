// AXI4-Lite slave of the accelerator (32-bit data, AXI clock domain).
//
// Address map (byte addresses):
//   0x00 CTRL    [0] start (write 1), [1] dataflow (0 SRS, 1 TRS), [2] ReLU, [3] raw sums,
//                [4] accumulate raw sums onto the words already at O_BASE
//   0x04 STATUS  [0] busy, [1] done                          (read only)
//   0x08 H  0x0C W  0x10 C  0x14 M  0x18 R  0x1C S  0x20 C0  0x24 Q0
//   0x28 I_BASE  0x2C W_BASE  0x30 O_BASE  0x34 B_BASE       (scratchpad byte addresses)
//   0x38 SCALE   [15:0] mantissa, [21:16] right shift
//   0x3C HWINFO  [7:0] X, [15:8] Y                           (read only)
//   bit 17 set: scratchpad window, word = addr[16:2]
// A write needs AW and W together and answers on B; a read answers on R.
// Scratchpad accesses are handed to the scratchpad clock domain by a toggle
// request and wait for the toggle acknowledge (the address, data and
// direction lines are held stable meanwhile), so each one takes a few clocks of
// both domains. Start is also a toggle; busy and done come back through
// synchronisers. The configuration lines are quasi-static: the host must not
// write them while busy. The document names an AXI interface and a host
// driver that configures, starts and queries the accelerator; this
// register map and the handshakes are this design's own.
module axi_lite_if
  import rs_pkg::*;
#(
  parameter int unsigned ADDR_W = 18,
  parameter int unsigned X      = 7,
  parameter int unsigned Y      = 10
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              awvalid,
  output logic              awready,
  input  logic [ADDR_W-1:0] awaddr,
  input  logic              wvalid,
  output logic              wready,
  input  logic [31:0]       wdata,
  output logic              bvalid,
  input  logic              bready,
  output logic [1:0]        bresp,
  input  logic              arvalid,
  output logic              arready,
  input  logic [ADDR_W-1:0] araddr,
  output logic              rvalid,
  input  logic              rready,
  output logic [31:0]       rdata,
  output logic [1:0]        rresp,
  // to the scratchpad domain
  output cfg_t              cfg,
  output logic              start_tgl,
  input  logic              busy_s,      // synchronised
  input  logic              done_s,      // synchronised
  output logic              sp_req_tgl,
  output logic              sp_we,
  output logic [SPAD_WAW-1:0] sp_addr,
  output logic [31:0]       sp_wdata,
  input  logic              sp_ack_tgl_s, // synchronised
  input  logic [31:0]       sp_rdata      // stable when the ack toggles
);

  typedef enum logic [2:0] {A_IDLE, A_WSP, A_B, A_RSP, A_R} astate_e;
  astate_e st;

  assign bresp = 2'b00;
  assign rresp = 2'b00;

  wire logic wr_go = (st == A_IDLE) && awvalid && wvalid;
  wire logic rd_go = (st == A_IDLE) && !wr_go && arvalid;
  assign awready = wr_go;
  assign wready  = wr_go;
  assign arready = rd_go;
  assign bvalid  = (st == A_B);
  assign rvalid  = (st == A_R);

  function automatic logic [31:0] reg_read(input logic [7:0] a);
    unique case (a)
      8'h00: return {27'd0, cfg.accum, cfg.raw, cfg.relu, cfg.mode, 1'b0};
      8'h04: return {30'd0, done_s, busy_s};
      8'h08: return 32'(cfg.h);
      8'h0C: return 32'(cfg.w);
      8'h10: return 32'(cfg.c);
      8'h14: return 32'(cfg.m);
      8'h18: return 32'(cfg.r);
      8'h1C: return 32'(cfg.s);
      8'h20: return 32'(cfg.c0);
      8'h24: return 32'(cfg.q0);
      8'h28: return 32'(cfg.i_base);
      8'h2C: return 32'(cfg.w_base);
      8'h30: return 32'(cfg.o_base);
      8'h34: return 32'(cfg.b_base);
      8'h38: return {10'd0, cfg.scale_shift, cfg.scale_mant};
      8'h3C: return {16'd0, 8'(Y), 8'(X)};
      default: return 32'd0;
    endcase
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st <= A_IDLE;
      cfg <= '0;
      cfg.r <= 4'd1; cfg.s <= 4'd1; cfg.c0 <= 8'd1; cfg.q0 <= 8'd1; cfg.scale_mant <= 16'd1;
      start_tgl <= 1'b0; sp_req_tgl <= 1'b0; sp_we <= 1'b0; sp_addr <= '0; sp_wdata <= '0;
      rdata <= '0;
    end else begin
      unique case (st)
        A_IDLE: begin
          if (wr_go) begin
            if (awaddr[17]) begin
              sp_we      <= 1'b1;
              sp_addr    <= awaddr[16:2];
              sp_wdata   <= wdata;
              sp_req_tgl <= ~sp_req_tgl;
              st         <= A_WSP;
            end else begin
              st <= A_B;
              unique case (awaddr[7:0])
                8'h00: begin
                  cfg.mode <= dataflow_e'(wdata[1]);
                  cfg.relu <= wdata[2];
                  cfg.raw  <= wdata[3];
                  cfg.accum <= wdata[4];
                  if (wdata[0]) start_tgl <= ~start_tgl;
                end
                8'h08: cfg.h  <= DIM_W'(wdata);
                8'h0C: cfg.w  <= DIM_W'(wdata);
                8'h10: cfg.c  <= DIM_W'(wdata);
                8'h14: cfg.m  <= DIM_W'(wdata);
                8'h18: cfg.r  <= 4'(wdata);
                8'h1C: cfg.s  <= 4'(wdata);
                8'h20: cfg.c0 <= 8'(wdata);
                8'h24: cfg.q0 <= 8'(wdata);
                8'h28: cfg.i_base <= SPAD_AW'(wdata);
                8'h2C: cfg.w_base <= SPAD_AW'(wdata);
                8'h30: cfg.o_base <= SPAD_AW'(wdata);
                8'h34: cfg.b_base <= SPAD_AW'(wdata);
                8'h38: begin cfg.scale_mant <= wdata[15:0]; cfg.scale_shift <= wdata[21:16]; end
                default: ;
              endcase
            end
          end else if (rd_go) begin
            if (araddr[17]) begin
              sp_we      <= 1'b0;
              sp_addr    <= araddr[16:2];
              sp_req_tgl <= ~sp_req_tgl;
              st         <= A_RSP;
            end else begin
              rdata <= reg_read(araddr[7:0]);
              st    <= A_R;
            end
          end
        end
        A_WSP: if (sp_ack_tgl_s == sp_req_tgl) st <= A_B;
        A_RSP: if (sp_ack_tgl_s == sp_req_tgl) begin
          rdata <= sp_rdata;
          st    <= A_R;
        end
        A_B: if (bready) st <= A_IDLE;
        A_R: if (rready) st <= A_IDLE;
        default: st <= A_IDLE;
      endcase
    end
  end

  // AXI rule: a response stays valid until accepted.
  assert property (@(posedge clk) disable iff (!rst_n) bvalid && !bready |=> bvalid);
  assert property (@(posedge clk) disable iff (!rst_n) rvalid && !rready |=> rvalid && $stable(rdata));

endmodule

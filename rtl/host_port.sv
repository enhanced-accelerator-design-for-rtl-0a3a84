// Scratchpad-domain end of the host interface. A change of the synchronised
// request toggle starts one scratchpad access with the (stable) address,
// data and direction from the AXI domain; it waits while the control unit
// owns the port (busy). One clock after the access the read word is captured
// and the acknowledge toggle flips. A change of the synchronised start toggle
// becomes a one-clock start pulse for the control unit. Own design: the
// document states only that the AXI and scratchpad clocks are separated.
module host_port
  import rs_pkg::*;
(
  input  logic               clk,
  input  logic               rst_n,
  input  logic               req_tgl_s,
  input  logic               we,
  input  logic [SPAD_WAW-1:0] addr,
  input  logic [31:0]        wdata,
  output logic               ack_tgl,
  output logic [31:0]        rdata_q,
  input  logic               start_tgl_s,
  output logic               start,
  input  logic               ctrl_busy,
  // scratchpad request (used while the control unit is idle)
  output logic               sp_en,
  output logic               sp_we,
  output logic [SPAD_WAW-1:0] sp_addr,
  output logic [31:0]        sp_wdata,
  input  logic [31:0]        sp_rdata
);

  logic seen_req, seen_start, pend;

  assign start    = (start_tgl_s != seen_start);
  assign sp_en    = (req_tgl_s != seen_req) && !ctrl_busy && !pend;
  assign sp_we    = we;
  assign sp_addr  = addr;
  assign sp_wdata = wdata;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      seen_req <= 1'b0; seen_start <= 1'b0; pend <= 1'b0; ack_tgl <= 1'b0; rdata_q <= '0;
    end else begin
      seen_start <= start_tgl_s;
      if (sp_en) begin
        seen_req <= req_tgl_s;
        pend     <= 1'b1;
      end else if (pend) begin
        pend    <= 1'b0;
        rdata_q <= sp_rdata;
        ack_tgl <= seen_req;
      end
    end
  end

endmodule

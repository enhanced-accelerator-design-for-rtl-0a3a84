// Dual-clock FIFO used for every buffer between the scratchpad domain and the
// PE domain: the west/south input-activation FIFOs, the west weight FIFOs,
// the north output buffers and the command queue.
// Binary pointers are kept per side and exchanged in Gray code through
// two-flop synchronisers, so full and empty are conservative but never
// wrong. Read data is first-word-fall-through (rdata shows the head while
// rempty is low; rd_en pops it). walmost_full is high when at most one slot
// is free, letting a writer with one write in flight stop in time.
// Depth must be a power of two. The document places clock-domain crossing in
// these buffers and sweeps their depth (16 chosen); the Gray-code scheme is
// this design's own.
module async_fifo #(
  parameter int unsigned WIDTH = 8,
  parameter int unsigned DEPTH = 16
) (
  input  logic             wclk,
  input  logic             wrst_n,
  input  logic             wr_en,
  input  logic [WIDTH-1:0] wdata,
  output logic             wfull,
  output logic             walmost_full,
  input  logic             rclk,
  input  logic             rrst_n,
  input  logic             rd_en,
  output logic [WIDTH-1:0] rdata,
  output logic             rempty
);

  localparam int unsigned AW = $clog2(DEPTH);

  logic [WIDTH-1:0] mem [DEPTH];
  logic [AW:0] wbin, rbin, wgray, rgray;
  logic [AW:0] rgray_w1, rgray_w2, wgray_r1, wgray_r2;
  logic [AW:0] rbin_w, wbin_r;

  function automatic logic [AW:0] g2b(input logic [AW:0] g);
    logic [AW:0] b;
    b[AW] = g[AW];
    for (int i = AW - 1; i >= 0; i--) b[i] = b[i+1] ^ g[i];
    return b;
  endfunction

  // write side
  wire logic [AW:0] wbin_nxt = wbin + (AW+1)'(wr_en && !wfull);
  always_ff @(posedge wclk or negedge wrst_n) begin
    if (!wrst_n) begin
      wbin <= '0; wgray <= '0; rgray_w1 <= '0; rgray_w2 <= '0;
    end else begin
      wbin     <= wbin_nxt;
      wgray    <= wbin_nxt ^ (wbin_nxt >> 1);
      rgray_w1 <= rgray;
      rgray_w2 <= rgray_w1;
    end
  end
  always_ff @(posedge wclk) if (wr_en && !wfull) mem[wbin[AW-1:0]] <= wdata;

  assign rbin_w = g2b(rgray_w2);
  wire logic [AW:0] wused = wbin - rbin_w;
  assign wfull        = (wused == (AW+1)'(DEPTH));
  assign walmost_full = (wused >= (AW+1)'(DEPTH - 1));

  // read side
  wire logic [AW:0] rbin_nxt = rbin + (AW+1)'(rd_en && !rempty);
  always_ff @(posedge rclk or negedge rrst_n) begin
    if (!rrst_n) begin
      rbin <= '0; rgray <= '0; wgray_r1 <= '0; wgray_r2 <= '0;
    end else begin
      rbin     <= rbin_nxt;
      rgray    <= rbin_nxt ^ (rbin_nxt >> 1);
      wgray_r1 <= wgray;
      wgray_r2 <= wgray_r1;
    end
  end
  assign wbin_r = g2b(wgray_r2);
  assign rempty = (wbin_r == rbin);
  assign rdata  = mem[rbin[AW-1:0]];

  // Writers and readers must respect the flags.
  assert property (@(posedge wclk) disable iff (!wrst_n) wr_en |-> !wfull);
  assert property (@(posedge rclk) disable iff (!rrst_n) rd_en |-> !rempty);

endmodule

// Single-port scratchpad SRAM (128 kB: 32768 words of 32 bits by default).
// One access per clock: a write stores the bytes of wdata selected by the
// byte enables be at word addr; a read returns the word on rdata one clock
// later. Written as an array so that synthesis maps it to a memory macro or
// block RAM. The document uses one port so that a monolithic SRAM block can
// serve as scratchpad, and gives its size; the 32-bit word with byte enables
// is this design's own.
module scratchpad #(
  parameter int unsigned WORDS = 32768,
  parameter int unsigned WIDTH = 32,
  localparam int unsigned AW   = $clog2(WORDS),
  localparam int unsigned NB   = WIDTH / 8
) (
  input  logic             clk,
  input  logic             en,
  input  logic             we,
  input  logic [NB-1:0]    be,
  input  logic [AW-1:0]    addr,
  input  logic [WIDTH-1:0] wdata,
  output logic [WIDTH-1:0] rdata
);

  logic [WIDTH-1:0] mem [WORDS];

  always_ff @(posedge clk) begin
    if (en) begin
      if (we) begin
        for (int b = 0; b < NB; b++)
          if (be[b]) mem[addr][8*b +: 8] <= wdata[8*b +: 8];
      end else begin
        rdata <= mem[addr];
      end
    end
  end

endmodule

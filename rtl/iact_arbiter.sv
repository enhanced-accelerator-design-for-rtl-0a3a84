// Round-robin arbiter that decides which input FIFO the single scratchpad
// port serves next. Among the requesting inputs it grants the first one at or
// after the pointer; when 'advance' is high the pointer moves just past the
// granted index, so every requester is served in turn. Combinational grant,
// pointer updated on the clock edge. The document distributes input
// activations round-robin from one scratchpad port; the search order is
// this design's own.
module iact_arbiter #(
  parameter int unsigned N = 16,
  localparam int unsigned IW = (N > 1) ? $clog2(N) : 1
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic [N-1:0]  req,
  input  logic          advance,
  output logic [N-1:0]  grant,
  output logic [IW-1:0] grant_idx,
  output logic          grant_valid
);

  logic [IW-1:0] ptr;

  always_comb begin
    grant       = '0;
    grant_idx   = '0;
    grant_valid = 1'b0;
    for (int k = 0; k < N; k++) begin
      int unsigned idx;
      idx = (int'(ptr) + k) % N;
      if (!grant_valid && req[idx]) begin
        grant_valid = 1'b1;
        grant_idx   = IW'(idx);
      end
    end
    if (grant_valid) grant[grant_idx] = 1'b1;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) ptr <= '0;
    else if (advance && grant_valid)
      ptr <= (grant_idx == IW'(N - 1)) ? '0 : grant_idx + 1'b1;
  end

endmodule

// cache_ctrl: replacement controller of the suffix cache.
//
// Chooses which suffix cache entry a new S_TCAM entry replaces. An empty entry
// is used first (lowest index); once the cache is full the victim is picked at
// random, the policy chosen for the suffix cache because it costs almost no
// area and behaves like LRU at large associativity. The random number comes
// from a 16-bit maximal-length LFSR (x^16+x^14+x^13+x^11+1) that advances
// every clock; it is mapped onto 0..DEPTH-1 by taking the upper 16 bits of
// lfsr*DEPTH, so DEPTH need not be a power of two. The LFSR and the mapping
// are this design's choices.
//
// Interface: valid_vec is the cache's entry valid bits; victim is
// combinational and is the entry written when the cache fills.
// Only the upper half of the 32-bit product lfsr*DEPTH is the index, so the
// lower 16 bits of scaled are unused by design.
module cache_ctrl #(
  parameter int unsigned DEPTH = 40
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic [DEPTH-1:0]         valid_vec,
  output logic [$clog2(DEPTH)-1:0] victim
);
  localparam int unsigned VW = $clog2(DEPTH);

  logic [15:0] lfsr;
  logic [31:0] scaled;

  always_ff @(posedge clk) begin
    if (!rst_n) lfsr <= 16'hACE1;
    else        lfsr <= {lfsr[14:0], lfsr[15] ^ lfsr[13] ^ lfsr[12] ^ lfsr[10]};
  end

  assign scaled = 32'(lfsr) * 32'(DEPTH);

  always_comb begin
    victim = VW'(scaled[31:16]);
    for (int i = DEPTH - 1; i >= 0; i--) begin
      if (!valid_vec[i]) victim = VW'(i);
    end
  end

endmodule

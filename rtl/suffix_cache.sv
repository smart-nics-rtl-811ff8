// suffix_cache: small associative cache of recently used S_TCAM entries.
//
// After an intermediate hit the next suffix search goes to this cache first;
// only on a miss is the large S_TCAM searched (one cycle later). Each entry
// keeps the w-byte pattern, the S_TCAM address it came from (the address that
// goes into the candidate signature address permutation) and its pattern bits.
// Only S_TCAM entries without don't-care bits are cached, so a cached pattern
// can never shadow a more specific S_TCAM entry (mutual inclusion); therefore
// an entry compares exactly and needs no mask. The cache controller picks the
// entry to replace (empty first, then random).
//
// Interface: lookup_en/key search (combinational result: hit, hit_saddr,
// hit_flags). fill_en writes fill_key/fill_saddr/fill_flags over the victim
// entry at the clock edge. flush empties the cache (used when the S_TCAM is
// rewritten, so the cache never disagrees with it; that rule is this design's
// choice). DEPTH defaults to 40 entries, the small end of the 40 to 60 entry
// range found sufficient for the suffix cache.
module suffix_cache
  import snic_pkg::*;
#(
  parameter int unsigned KEY_W = 32,
  parameter int unsigned DEPTH = 40,
  parameter int unsigned SAW   = 21
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             lookup_en,
  input  logic [KEY_W-1:0] key,
  output logic             hit,
  output logic [SAW-1:0]   hit_saddr,
  output pat_flags_t       hit_flags,
  input  logic             fill_en,
  input  logic [KEY_W-1:0] fill_key,
  input  logic [SAW-1:0]   fill_saddr,
  input  pat_flags_t       fill_flags,
  input  logic             flush
);
  localparam int unsigned VW = $clog2(DEPTH);

  logic [KEY_W-1:0] tag   [DEPTH];
  logic [SAW-1:0]   saddr [DEPTH];
  pat_flags_t       flags [DEPTH];
  logic [DEPTH-1:0] valid;
  logic [VW-1:0]    victim;
  logic [VW-1:0]    hit_idx;

  cache_ctrl #(.DEPTH(DEPTH)) u_ctrl (
    .clk, .rst_n, .valid_vec(valid), .victim);

  always_ff @(posedge clk) begin
    if (fill_en) begin
      tag[victim]   <= fill_key;
      saddr[victim] <= fill_saddr;
      flags[victim] <= fill_flags;
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n || flush) valid <= '0;
    else if (fill_en)    valid[victim] <= 1'b1;
  end

  always_comb begin
    hit     = 1'b0;
    hit_idx = '0;
    if (lookup_en) begin
      for (int i = DEPTH - 1; i >= 0; i--) begin
        if (valid[i] && tag[i] == key) begin
          hit     = 1'b1;
          hit_idx = VW'(i);
        end
      end
    end
  end

  assign hit_saddr = hit ? saddr[hit_idx] : '0;
  assign hit_flags = hit ? flags[hit_idx] : '0;

endmodule

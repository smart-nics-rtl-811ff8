// contention_resolution: builds the retirement buffer entry of each window.
//
// Inputs are the P_TCAM result and the suffix result (suffix cache or S_TCAM)
// of the current window, each with its pattern bits. The entry pushed is:
//   * an intermediate P_TCAM hit: the P_TCAM address with descriptor "11".
//     This also covers alias addresses (a pattern that is both a prefix and a
//     suffix): when both stores report intermediate hits the P_TCAM address
//     wins, since it may be the start of a signature;
//   * otherwise a suffix hit, intermediate or concluding: the S_TCAM address
//     with descriptor "01";
//   * otherwise NULL (address 0) with descriptor "00".
// A concluding P_TCAM hit is a short pattern, a complete signature on its own:
// it is reported at once on short_match and needs no final matching, so when
// it is not also intermediate it leaves a NULL entry.
// Pushing concluding suffix hits (they end a permutation) and letting an
// intermediate P_TCAM hit win over any suffix hit are this design's reading.
// Purely combinational; valid qualifies everything.
// The suffix concluding bit (s_flags.conc) is not needed here: a concluding
// suffix is pushed exactly like an intermediate one.
module contention_resolution
  import snic_pkg::*;
#(
  parameter int unsigned AW = 21,
  parameter int unsigned PAW = 12,
  parameter int unsigned SAW = 21
) (
  input  logic           valid,
  input  logic           p_hit,
  input  pat_flags_t     p_flags,
  input  logic [PAW-1:0] p_addr,
  input  logic           s_hit,
  input  pat_flags_t     s_flags,
  input  logic [SAW-1:0] s_addr,
  output logic [AW-1:0]  rb_addr,
  output logic [1:0]     rb_desc,
  output logic           short_match,
  output logic           alias_hit,
  output logic           p_inter_hit,
  output logic           s_inter_hit
);
  assign p_inter_hit = valid && p_hit && p_flags.inter;
  assign s_inter_hit = valid && s_hit && s_flags.inter;
  assign short_match = valid && p_hit && p_flags.conc;
  assign alias_hit   = p_inter_hit && s_inter_hit;

  always_comb begin
    rb_addr = '0;
    rb_desc = RB_NULL;
    if (p_inter_hit) begin
      rb_addr = AW'(p_addr);
      rb_desc = RB_PREFIX;
    end else if (valid && s_hit) begin
      rb_addr = AW'(s_addr);
      rb_desc = RB_SUFFIX;
    end
  end

endmodule

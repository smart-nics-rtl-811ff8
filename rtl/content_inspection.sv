// content_inspection: partitioned TCAM content inspection system.
//
// Signatures are cut into w-byte partitions. The first partition of every
// signature (the prefix, or the whole signature if it is short) is stored in
// the small P_TCAM; all later partitions (suffixes) in the large S_TCAM. The
// payload is shifted byte by byte through a w-byte inspection window and the
// P_TCAM is searched for every window. Suffixes only matter w bytes after a
// prefix or intermediate hit, so the S_TCAM stays idle except then: the
// activator/enable buffer delays the hit by w windows, the enabler then
// searches the small suffix cache and, only on a cache miss, the S_TCAM one
// cycle later (one stall cycle, pause). Contention resolution turns each
// window's hits into one retirement buffer entry; the retirement logic pulls
// candidate signature address permutations out of the buffer for the final
// signature matching stage, which sits outside this block. A short pattern
// (concluding P_TCAM hit) is reported directly on short_match.
//
// Interface: payload byte stream (valid/ready, in_last on the last byte of a
// reassembled payload). p_wr_*/s_wr_* load one TCAM entry per cycle; writing
// the S_TCAM empties the suffix cache. Outputs: short_match (P_TCAM address),
// cand_* (permutation of TCAM addresses), stats (activity counters).
// Timing: one window per cycle plus one cycle per suffix cache miss; W pad
// windows separate two payloads. Defaults: w = 4 bytes and a 40-entry suffix
// cache as in the evaluated configuration, and a 2^21-entry S_TCAM (a 40-entry
// cache is quoted as 0.002% of the suffix entries, about two million). The
// P_TCAM depth (4096) and the maximum signature length L (128 bytes) are this
// design's choices.
module content_inspection
  import snic_pkg::*;
#(
  parameter int unsigned W           = 4,
  parameter int unsigned P_DEPTH     = 4096,
  parameter int unsigned S_DEPTH     = 2097152,
  parameter int unsigned C_DEPTH     = 40,
  parameter int unsigned MAX_SIG_LEN = 128,
  // derived
  parameter int unsigned KEY_W    = 8 * W,
  parameter int unsigned PAW      = $clog2(P_DEPTH),
  parameter int unsigned SAW      = $clog2(S_DEPTH),
  parameter int unsigned AW       = (PAW > SAW) ? PAW : SAW,
  parameter int unsigned MAX_SEG  = MAX_SIG_LEN / W,
  parameter int unsigned RB_DEPTH = 1 + W * (MAX_SEG - 1)
) (
  input  logic             clk,
  input  logic             rst_n,
  // reassembled payload stream
  input  logic [7:0]       in_data,
  input  logic             in_valid,
  input  logic             in_last,
  output logic             in_ready,
  // P_TCAM loading
  input  logic             p_wr_en,
  input  logic [PAW-1:0]   p_wr_addr,
  input  logic [KEY_W-1:0] p_wr_value,
  input  logic [KEY_W-1:0] p_wr_mask,
  input  pat_flags_t       p_wr_flags,
  input  logic             p_wr_valid,
  // S_TCAM loading
  input  logic             s_wr_en,
  input  logic [SAW-1:0]   s_wr_addr,
  input  logic [KEY_W-1:0] s_wr_value,
  input  logic [KEY_W-1:0] s_wr_mask,
  input  pat_flags_t       s_wr_flags,
  input  logic             s_wr_valid,
  // results
  output logic             short_match_valid,
  output logic [PAW-1:0]   short_match_addr,
  output logic             cand_valid,
  output logic [$clog2(MAX_SEG+1)-1:0] cand_len,
  output logic [AW-1:0]    cand_addr [MAX_SEG],
  output logic [1:0]       cand_desc [MAX_SEG],
  output ci_stats_t        stats
);
  // ------------------------------------------------------ inspection window
  logic             pause, can_step, step, win_valid, win_last;
  logic [KEY_W-1:0] window;

  inspection_window #(.W(W)) u_window (
    .clk, .rst_n, .in_data, .in_valid, .in_last, .in_ready,
    .pause, .can_step, .step, .window, .win_valid, .win_last);

  // ------------------------------------------------------ enabler
  logic ebuf_out, p_en, cache_en, stcam_en, hold_p, s_phase, c_hit;

  enabler u_enabler (
    .clk, .rst_n, .win_valid, .can_step, .ebuf_out, .cache_hit(c_hit),
    .p_en, .cache_en, .stcam_en, .pause, .hold_p, .s_phase);

  // ------------------------------------------------------ signature stores
  logic           p_hit, st_hit, st_exact, p_exact_unused;
  logic [PAW-1:0] p_addr;
  logic [SAW-1:0] st_addr, c_saddr;
  pat_flags_t     p_flags, st_flags, c_flags;

  tcam #(.KEY_W(KEY_W), .DEPTH(P_DEPTH)) u_p_tcam (
    .clk, .rst_n,
    .wr_en(p_wr_en), .wr_addr(p_wr_addr), .wr_value(p_wr_value),
    .wr_mask(p_wr_mask), .wr_flags(p_wr_flags), .wr_valid(p_wr_valid),
    .search_en(p_en), .key(window),
    .hit(p_hit), .hit_addr(p_addr), .hit_flags(p_flags), .hit_exact(p_exact_unused));

  suffix_cache #(.KEY_W(KEY_W), .DEPTH(C_DEPTH), .SAW(SAW)) u_cache (
    .clk, .rst_n,
    .lookup_en(cache_en), .key(window),
    .hit(c_hit), .hit_saddr(c_saddr), .hit_flags(c_flags),
    .fill_en(stcam_en && st_hit && st_exact), .fill_key(window),
    .fill_saddr(st_addr), .fill_flags(st_flags),
    .flush(s_wr_en));

  tcam #(.KEY_W(KEY_W), .DEPTH(S_DEPTH)) u_s_tcam (
    .clk, .rst_n,
    .wr_en(s_wr_en), .wr_addr(s_wr_addr), .wr_value(s_wr_value),
    .wr_mask(s_wr_mask), .wr_flags(s_wr_flags), .wr_valid(s_wr_valid),
    .search_en(stcam_en), .key(window),
    .hit(st_hit), .hit_addr(st_addr), .hit_flags(st_flags), .hit_exact(st_exact));

  // P_TCAM result held across the pause, so the P_TCAM is not searched twice.
  logic           p_hit_q;
  logic [PAW-1:0] p_addr_q;
  pat_flags_t     p_flags_q;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      p_hit_q   <= 1'b0;
      p_addr_q  <= '0;
      p_flags_q <= '0;
    end else if (hold_p) begin
      p_hit_q   <= p_hit;
      p_addr_q  <= p_addr;
      p_flags_q <= p_flags;
    end
  end

  logic           p_hit_u, s_hit_u;
  logic [PAW-1:0] p_addr_u;
  logic [SAW-1:0] s_addr_u;
  pat_flags_t     p_flags_u, s_flags_u;

  always_comb begin
    if (s_phase) begin
      p_hit_u   = p_hit_q;
      p_addr_u  = p_addr_q;
      p_flags_u = p_flags_q;
      s_hit_u   = st_hit;
      s_addr_u  = st_addr;
      s_flags_u = st_flags;
    end else begin
      p_hit_u   = p_hit;
      p_addr_u  = p_addr;
      p_flags_u = p_flags;
      s_hit_u   = c_hit;
      s_addr_u  = c_saddr;
      s_flags_u = c_flags;
    end
  end

  // ------------------------------------------------------ contention resolution
  logic          cr_valid, short_hit, alias_hit, p_inter_hit, s_inter_hit;
  logic [AW-1:0] rb_push_addr;
  logic [1:0]    rb_push_desc;

  assign cr_valid = step && win_valid;

  contention_resolution #(.AW(AW), .PAW(PAW), .SAW(SAW)) u_cr (
    .valid(cr_valid),
    .p_hit(p_hit_u), .p_flags(p_flags_u), .p_addr(p_addr_u),
    .s_hit(s_hit_u), .s_flags(s_flags_u), .s_addr(s_addr_u),
    .rb_addr(rb_push_addr), .rb_desc(rb_push_desc),
    .short_match(short_hit), .alias_hit,
    .p_inter_hit, .s_inter_hit);

  enable_buffer #(.W(W)) u_ebuf (
    .clk, .rst_n, .step, .p_inter_hit, .s_inter_hit, .ebuf_out);

  // ------------------------------------------------------ retirement
  logic [AW-1:0] rb_addr [RB_DEPTH];
  logic [1:0]    rb_desc [RB_DEPTH];

  retirement_buffer #(.DEPTH(RB_DEPTH), .AW(AW)) u_rbuf (
    .clk, .rst_n, .step, .push_addr(rb_push_addr), .push_desc(rb_push_desc),
    .addr(rb_addr), .desc(rb_desc));

  retirement_logic #(.W(W), .DEPTH(RB_DEPTH), .AW(AW), .MAX_SEG(MAX_SEG)) u_rlogic (
    .clk, .rst_n, .step, .addr(rb_addr), .desc(rb_desc),
    .cand_valid, .cand_len, .cand_addr, .cand_desc);

  // ------------------------------------------------------ short matches, counters
  always_ff @(posedge clk) begin
    if (!rst_n) begin
      short_match_valid <= 1'b0;
      short_match_addr  <= '0;
      stats             <= '0;
    end else begin
      short_match_valid <= short_hit;
      if (short_hit) short_match_addr <= p_addr_u;
      if (p_en)                 stats.p_access    <= stats.p_access + 1;
      if (cache_en)             stats.c_access    <= stats.c_access + 1;
      if (cache_en && c_hit)    stats.c_hit       <= stats.c_hit + 1;
      if (stcam_en)             stats.s_access    <= stats.s_access + 1;
      if (pause)                stats.pause       <= stats.pause + 1;
      if (cr_valid && alias_hit) stats.alias_hit  <= stats.alias_hit + 1;
      if (short_hit)            stats.short_match <= stats.short_match + 1;
      if (cand_valid)           stats.cand        <= stats.cand + 1;
    end
  end

  // win_last marks payload ends; it is kept for observation in simulation.
  logic unused_ok;
  assign unused_ok = &{1'b0, win_last, p_exact_unused};

endmodule

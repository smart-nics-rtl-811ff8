// tb_content_inspection: self-checking test of the partitioned TCAM content
// inspection system at its default size (w = 4, 4096-entry P_TCAM,
// 2M-entry S_TCAM, 40-entry suffix cache, signatures up to 128 bytes).
//
// The testbench partitions a small signature set itself (short patterns with
// and without don't-care padding, long patterns sharing a prefix and a
// suffix, an alias pattern that is a prefix of one signature and a suffix of
// another, a padded final partition that can never be cached, and a
// 128-byte signature of 32 partitions), loads the P_TCAM and S_TCAM, and
// streams random payloads with signatures planted in them. An independent
// window-by-window model predicts every short-pattern match, every
// candidate signature address permutation, the cache hits and misses (fewer
// than 40 exact suffixes, so nothing is evicted) and all activity counters.
// The S_TCAM is rewritten half way, which must empty the cache. The rate is
// checked too: one byte per cycle, one stall per cache miss and W pad steps
// between payloads.
module tb_content_inspection;
  import snic_pkg::*;

  localparam int W = 4, P_DEPTH = 4096, S_DEPTH = 2097152, C_DEPTH = 40, L = 128;
  localparam int KEY_W = 8 * W, PAW = $clog2(P_DEPTH), SAW = $clog2(S_DEPTH);
  localparam int AW = (PAW > SAW) ? PAW : SAW, MAX_SEG = L / W;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic [7:0] in_data = '0;
  logic in_valid = 1'b0, in_last = 1'b0, in_ready;
  logic p_wr_en = 1'b0, p_wr_valid = 1'b0, s_wr_en = 1'b0, s_wr_valid = 1'b0;
  logic [PAW-1:0] p_wr_addr = '0;
  logic [SAW-1:0] s_wr_addr = '0;
  logic [KEY_W-1:0] p_wr_value = '0, p_wr_mask = '0, s_wr_value = '0, s_wr_mask = '0;
  pat_flags_t p_wr_flags = '0, s_wr_flags = '0;
  logic short_match_valid, cand_valid;
  logic [PAW-1:0] short_match_addr;
  logic [$clog2(MAX_SEG+1)-1:0] cand_len;
  logic [AW-1:0] cand_addr [MAX_SEG];
  logic [1:0] cand_desc [MAX_SEG];
  ci_stats_t stats;

  content_inspection dut (.*);

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL: %s", what);
    end
  endtask

  // ------------------------------------------------------------ signatures
  typedef struct {
    logic [KEY_W-1:0] v, m;
    bit conc, inter;
    int addr;
  } ent_t;
  ent_t P[$], S[$];

  function automatic int find(ref ent_t q[$], input logic [KEY_W-1:0] key);
    foreach (q[i]) if (((key ^ q[i].v) & q[i].m) == '0) return i;
    return -1;
  endfunction

  function automatic int find_exact(ref ent_t q[$], input logic [KEY_W-1:0] v,
                                    input logic [KEY_W-1:0] m);
    foreach (q[i]) if (q[i].v == v && q[i].m == m) return i;
    return -1;
  endfunction

  typedef logic [7:0] bytes_t[$];
  bytes_t sigs[$];

  function automatic bytes_t str2b(input string s);
    bytes_t b;
    for (int i = 0; i < s.len(); i++) b.push_back(s[i]);
    return b;
  endfunction

  task automatic add_sig(input bytes_t b);
    int n = (b.size() + W - 1) / W;
    sigs.push_back(b);
    for (int j = 0; j < n; j++) begin
      logic [KEY_W-1:0] v = '0, m = '0;
      int k;
      for (int i = 0; i < W; i++) begin
        if (j * W + i < b.size()) begin
          v[(W-1-i)*8 +: 8] = b[j*W+i];
          m[(W-1-i)*8 +: 8] = 8'hFF;
        end
      end
      if (j == 0) begin
        k = find_exact(P, v, m);
        if (k < 0) begin P.push_back('{v: v, m: m, conc: 0, inter: 0, addr: 5 + P.size() * 61}); k = P.size() - 1; end
        if (n == 1) P[k].conc = 1; else P[k].inter = 1;
      end else begin
        k = find_exact(S, v, m);
        if (k < 0) begin S.push_back('{v: v, m: m, conc: 0, inter: 0, addr: 3 + S.size() * 251}); k = S.size() - 1; end
        if (j == n - 1) S[k].conc = 1; else S[k].inter = 1;
      end
    end
  endtask

  task automatic write_p(input int i);
    @(negedge clk);
    p_wr_en = 1; p_wr_addr = PAW'(P[i].addr); p_wr_value = P[i].v; p_wr_mask = P[i].m;
    p_wr_flags = '{conc: P[i].conc, inter: P[i].inter}; p_wr_valid = 1;
    @(negedge clk);
    p_wr_en = 0;
  endtask

  task automatic write_s(input int i);
    @(negedge clk);
    s_wr_en = 1; s_wr_addr = SAW'(S[i].addr); s_wr_value = S[i].v; s_wr_mask = S[i].m;
    s_wr_flags = '{conc: S[i].conc, inter: S[i].inter}; s_wr_valid = 1;
    @(negedge clk);
    s_wr_en = 0;
  endtask

  // ------------------------------------------------------------ model
  typedef struct { int len; int addr[MAX_SEG]; logic [1:0] desc[MAX_SEG]; } cand_t;
  int      short_q[$];
  cand_t   cand_q[$];
  logic [KEY_W-1:0] cache_set[$];
  int m_c_access = 0, m_c_hit = 0, m_s_access = 0, m_pause = 0, m_alias = 0;
  int m_short = 0, m_cand = 0, m_bytes = 0, m_pause_counted = 0;

  function automatic void model_payload(input bytes_t b, input bit last_payload);
    int X = b.size();
    bit act[];
    int e_addr[];
    logic [1:0] e_desc[];
    act = new[X]; e_addr = new[X]; e_desc = new[X];
    m_bytes += X;
    for (int k = 0; k < X; k++) begin
      logic [KEY_W-1:0] win = '0;
      int pi, si = -1;
      bit sen, ph, pint;
      for (int i = 0; i < W; i++) if (k + i < X) win[(W-1-i)*8 +: 8] = b[k+i];
      pi = find(P, win);
      ph = pi >= 0;
      pint = ph && P[pi].inter;
      sen = (k >= W) && act[k-W];
      if (sen) begin
        bit in_cache = 0;
        foreach (cache_set[c]) if (cache_set[c] == win) in_cache = 1;
        si = find(S, win);
        m_c_access++;
        if (in_cache) m_c_hit++;
        else begin
          m_s_access++; m_pause++;
          if (!last_payload || k <= X - 1 - W) m_pause_counted++;
          if (si >= 0 && S[si].m == '1) cache_set.push_back(win);
        end
      end
      act[k] = pint || (si >= 0 && S[si].inter);
      if (pint && si >= 0 && S[si].inter) m_alias++;
      if (pint) begin e_addr[k] = P[pi].addr; e_desc[k] = RB_PREFIX; end
      else if (si >= 0) begin e_addr[k] = S[si].addr; e_desc[k] = RB_SUFFIX; end
      else begin e_addr[k] = 0; e_desc[k] = RB_NULL; end
      if (ph && P[pi].conc) begin short_q.push_back(P[pi].addr); m_short++; end
    end
    for (int k = 0; k < X; k++) begin
      if (e_desc[k] == RB_PREFIX) begin
        cand_t c;
        c.len = 0;
        for (int j = 0; j < MAX_SEG; j++) begin
          int pos = k + j * W;
          if (pos < X && e_desc[pos] != RB_NULL) begin
            c.addr[j] = e_addr[pos]; c.desc[j] = e_desc[pos]; c.len++;
          end else break;
        end
        if (c.len >= 2) begin cand_q.push_back(c); m_cand++; end
      end
    end
  endfunction

  // ------------------------------------------------------------ monitors
  int got_short = 0, got_cand = 0, sp_i;
  cand_t ce;
  always @(negedge clk) begin
    if (rst_n && short_match_valid) begin
      got_short++;
      if (short_q.size() == 0) check(0, "unexpected short match");
      else begin
        sp_i = short_q.pop_front();
        check(int'(short_match_addr) == sp_i,
              $sformatf("short match addr %0d expected %0d", short_match_addr, sp_i));
      end
    end
    if (rst_n && cand_valid) begin
      got_cand++;
      if (cand_q.size() == 0) check(0, "unexpected candidate");
      else begin
        ce = cand_q.pop_front();
        check(int'(cand_len) == ce.len, $sformatf("candidate %0d len %0d expected %0d", got_cand, cand_len, ce.len));
        for (int j = 0; j < ce.len && j < MAX_SEG; j++)
          check(int'(cand_addr[j]) == ce.addr[j] && cand_desc[j] == ce.desc[j],
                $sformatf("candidate %0d element %0d: %0d/%b expected %0d/%b", got_cand, j,
                          cand_addr[j], cand_desc[j], ce.addr[j], ce.desc[j]));
      end
    end
  end

  // first and last accepted byte, for the rate check
  longint cyc = 0, first_take = -1, last_take = -1, idle_ready = 0, idle_at_last = 0;
  always @(posedge clk) begin
    cyc <= cyc + 1;
    // cycles the block could have taken a byte but the testbench offered none
    if (first_take >= 0 && in_ready && !in_valid) idle_ready <= idle_ready + 1;
    if (in_valid && in_ready) begin
      if (first_take < 0) first_take <= cyc;
      last_take <= cyc;
      idle_at_last <= idle_ready;
    end
  end

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ------------------------------------------------------------ stimulus
  bytes_t pl;
  int npay = 0;

  task automatic send(input bytes_t b, input bit last_payload);
    model_payload(b, last_payload);
    npay++;
    for (int i = 0; i < b.size(); i++) begin
      in_data = b[i]; in_valid = 1; in_last = (i == b.size() - 1);
      do @(posedge clk); while (!in_ready);
      @(negedge clk);
    end
    in_valid = 0; in_last = 0;
  endtask

  function automatic bytes_t make_payload(input int len, input int nplant);
    bytes_t b;
    for (int i = 0; i < len; i++) b.push_back(8'($urandom_range(0, 255)));
    for (int n = 0; n < nplant; n++) begin
      int s = $urandom_range(0, sigs.size() - 1);
      int at;
      if (sigs[s].size() >= len) continue;
      at = $urandom_range(0, len - sigs[s].size());
      foreach (sigs[s][i]) b[at + i] = sigs[s][i];
    end
    return b;
  endfunction

  initial begin
    bytes_t big;
    add_sig(str2b("AB"));
    add_sig(str2b("WXYZ"));
    add_sig(str2b("ABCDEFGHIJ"));
    add_sig(str2b("ABCDEFGHKLMN"));
    add_sig(str2b("QRSTABCDUVWX"));
    add_sig(str2b("abcdefghijklmnopqrstuvwxyz0123456789!@#$"));
    add_sig(str2b("MNOPQ"));
    for (int i = 0; i < L; i++) big.push_back(8'h80 + 8'(i % 64));
    add_sig(big);
    $display("P entries %0d, S entries %0d", P.size(), S.size());

    repeat (3) @(negedge clk);
    rst_n = 1;
    foreach (P[i]) write_p(i);
    foreach (S[i]) write_s(i);
    repeat (2) @(negedge clk);

    // Directed payloads: each signature alone, then everything twice (cache hits).
    for (int r = 0; r < 2; r++)
      foreach (sigs[s]) begin
        pl = sigs[s];
        pl.push_front(8'h11); pl.push_back(8'h22); pl.push_back(8'h33);
        send(pl, 0);
      end
    // Random payloads with planted signatures.
    for (int n = 0; n < 40; n++) send(make_payload($urandom_range(20, 400), $urandom_range(0, 4)), 0);

    // Rewrite an S_TCAM entry with the same contents: the cache must empty.
    repeat (2 * W + 2) @(negedge clk);
    write_s(0);
    cache_set.delete();
    for (int n = 0; n < 20; n++) send(make_payload($urandom_range(20, 300), $urandom_range(1, 4)), 0);
    pl = sigs[7]; pl.push_back(8'h00); pl.push_back(8'h01); pl.push_back(8'h02); pl.push_back(8'h03);
    send(pl, 1);

    repeat (L + 20) @(negedge clk);
    check(short_q.size() == 0, $sformatf("%0d short matches missing", short_q.size()));
    check(cand_q.size() == 0, $sformatf("%0d candidates missing", cand_q.size()));
    check(stats.p_access == 32'(m_bytes), $sformatf("P_TCAM accesses %0d expected %0d (one per byte)", stats.p_access, m_bytes));
    check(stats.c_access == 32'(m_c_access), $sformatf("cache accesses %0d expected %0d", stats.c_access, m_c_access));
    check(stats.c_hit == 32'(m_c_hit), $sformatf("cache hits %0d expected %0d", stats.c_hit, m_c_hit));
    check(stats.s_access == 32'(m_s_access), $sformatf("S_TCAM accesses %0d expected %0d", stats.s_access, m_s_access));
    check(stats.pause == 32'(m_pause), $sformatf("pauses %0d expected %0d", stats.pause, m_pause));
    check(stats.alias_hit == 32'(m_alias), $sformatf("alias hits %0d expected %0d", stats.alias_hit, m_alias));
    check(stats.short_match == 32'(m_short), "short match counter");
    check(stats.cand == 32'(m_cand), "candidate counter");
    check(last_take - first_take + 1 - idle_at_last == longint'(m_bytes + W * (npay - 1) + m_pause_counted),
          $sformatf("rate: %0d busy cycles from first to last byte, expected %0d",
                    last_take - first_take + 1 - idle_at_last, m_bytes + W * (npay - 1) + m_pause_counted));
    check(m_c_hit > 0 && m_pause > 0 && m_alias > 0 && m_short > 0 && m_cand > 0,
          "every mechanism exercised");
    $display("bytes=%0d payloads=%0d short=%0d cand=%0d cache_access=%0d cache_hit=%0d pauses=%0d alias=%0d",
             m_bytes, npay, m_short, m_cand, m_c_access, m_c_hit, m_pause, m_alias);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_snic_top: end-to-end test of the SNIC inspection datapath with every
// parameter at its default (100 rules, 2048-byte Rx/Tx FIFOs, 16-entry
// descriptor FIFO, w = 4, 4096-entry P and 2M-entry S TCAMs, 40-entry suffix cache,
// 128-byte signatures).
//
// The testbench plays the MAC and the proxy handler firmware. It loads rules,
// the host address and a few signatures, then sends frames of every class.
// For each frame it waits for the descriptor, checks it, reads the frame back
// out of the Rx FIFO, and for a proxied TCP/UDP frame streams the payload into
// content inspection and checks the short-pattern matches and candidate
// permutations worked out by hand for the planted signatures. ARP requests
// get a reply through the Tx FIFO, which must reach the MAC side unchanged.
// Finally it stops reading the FIFOs and sends a burst of frames to overflow
// the Rx FIFO and the descriptor FIFO.
// Every mechanism is counted and must happen at least once: each packet class
// and action, the early stop of the TCP search, a multiple match, suffix
// cache hits and misses (pauses), an alias hit, a cache flush, short and long
// signature matches, Tx traffic, Rx FIFO drops and descriptor FIFO overflow.
module tb_snic_top;
  import snic_pkg::*;

  localparam int MAX_SEG = 32, AW = 21;
  localparam logic [31:0] HOST = 32'hC0A8_000A;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic [7:0]  rx_data = '0;
  logic        rx_valid = 0, rx_last = 0, rx_drop;
  logic        rxf_rd_en = 0, rxf_empty;
  logic [8:0]  rxf_rd_data;
  logic        txf_wr_en = 0, txf_full, tx_ready = 0, tx_valid, tx_last;
  logic [8:0]  txf_wr_data = '0;
  logic [7:0]  tx_data;
  logic        rule_wr_en = 0;
  logic [6:0]  rule_wr_addr = '0;
  rule_kind_e  rule_wr_kind = RULE_NONE;
  logic [31:0] rule_wr_src_ip = '0;
  logic [15:0] rule_wr_sport = '0, rule_wr_dport = '0;
  logic        host_ip_wr = 0;
  logic [31:0] host_ip_wr_data = '0;
  logic        desc_rd_en = 0, desc_empty, desc_overflow, wake_irq;
  pkt_desc_t   desc_rd_data;
  logic [7:0]  pl_data = '0;
  logic        pl_valid = 0, pl_last = 0, pl_ready;
  logic        p_wr_en = 0, p_wr_valid = 0, s_wr_en = 0, s_wr_valid = 0;
  logic [11:0] p_wr_addr = '0;
  logic [20:0] s_wr_addr = '0;
  logic [31:0] p_wr_value = '0, p_wr_mask = '0, s_wr_value = '0, s_wr_mask = '0;
  pat_flags_t  p_wr_flags = '0, s_wr_flags = '0;
  logic        short_match_valid, cand_valid;
  logic [11:0] short_match_addr;
  logic [5:0]  cand_len;
  logic [AW-1:0] cand_addr [MAX_SEG];
  logic [1:0]  cand_desc [MAX_SEG];
  ci_stats_t   ci_stats;

  snic_top dut (.*);

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++; if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask
  initial begin
    repeat (300000) @(posedge clk);
    failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  // ------------------------------------------------------------ mechanism counters
  int n_arp = 0, n_icmp = 0, n_tcp_hit = 0, n_udp_hit = 0, n_wake = 0, n_drop = 0;
  int n_multi = 0, n_early = 0, n_tx = 0, n_rxdrop = 0, n_flush = 0, n_wake_irq = 0;
  always @(posedge clk) begin
    if (rx_drop) n_rxdrop++;
    if (wake_irq) n_wake_irq++;
    if (tx_valid && tx_ready) n_tx++;
    if (dut.u_hc.u_hpu.state == dut.u_hc.u_hpu.S_SA && !dut.u_hc.mau_hit) n_early++;
  end

  // ------------------------------------------------------------ content results
  int short_got[$];
  typedef struct { int len; int a[MAX_SEG]; logic [1:0] d[MAX_SEG]; } cand_t;
  cand_t cand_got[$];
  cand_t cg;
  always @(negedge clk) begin
    if (short_match_valid) short_got.push_back(int'(short_match_addr));
    if (cand_valid) begin
      cg.len = int'(cand_len);
      for (int j = 0; j < MAX_SEG; j++) begin cg.a[j] = int'(cand_addr[j]); cg.d[j] = cand_desc[j]; end
      cand_got.push_back(cg);
    end
  end

  // ------------------------------------------------------------ helpers
  task automatic load_rule(input int a, input rule_kind_e k, input logic [31:0] sa,
                           input logic [15:0] sp, input logic [15:0] dp);
    @(negedge clk);
    rule_wr_en = 1; rule_wr_addr = 7'(a); rule_wr_kind = k;
    rule_wr_src_ip = sa; rule_wr_sport = sp; rule_wr_dport = dp;
    @(negedge clk);
    rule_wr_en = 0;
  endtask

  function automatic logic [31:0] pat(input string s);
    logic [31:0] v = '0;
    for (int i = 0; i < 4; i++) v[(3-i)*8 +: 8] = (i < s.len()) ? s[i] : 8'h00;
    return v;
  endfunction
  function automatic logic [31:0] msk(input int n);
    logic [31:0] m = '0;
    for (int i = 0; i < n; i++) m[(3-i)*8 +: 8] = 8'hFF;
    return m;
  endfunction

  task automatic load_p(input int a, input string s, input bit conc, input bit inter);
    @(negedge clk);
    p_wr_en = 1; p_wr_addr = 12'(a); p_wr_value = pat(s); p_wr_mask = msk(s.len());
    p_wr_flags = '{conc: conc, inter: inter}; p_wr_valid = 1;
    @(negedge clk);
    p_wr_en = 0;
  endtask
  task automatic load_s(input int a, input string s, input bit conc, input bit inter);
    @(negedge clk);
    s_wr_en = 1; s_wr_addr = 21'(a); s_wr_value = pat(s); s_wr_mask = msk(s.len());
    s_wr_flags = '{conc: conc, inter: inter}; s_wr_valid = 1;
    @(negedge clk);
    s_wr_en = 0;
    n_flush++;
  endtask

  typedef logic [7:0] bytes_t[$];

  function automatic bytes_t ip_frame(input logic [7:0] proto, input logic [31:0] sa,
                                      input logic [31:0] da, input logic [15:0] sp,
                                      input logic [15:0] dp, input string payload);
    bytes_t f;
    int hl = (proto == IPPROTO_UDP) ? 8 : 20;
    for (int i = 0; i < 14 + 20 + hl; i++) f.push_back(8'(i + 1));
    f[12] = 8'h08; f[13] = 8'h00; f[14] = 8'h45; f[23] = proto;
    {f[26], f[27], f[28], f[29]} = sa; {f[30], f[31], f[32], f[33]} = da;
    {f[34], f[35]} = sp; {f[36], f[37]} = dp;
    for (int i = 0; i < payload.len(); i++) f.push_back(payload[i]);
    while (f.size() < 64) f.push_back(8'h2E);
    return f;
  endfunction

  function automatic bytes_t eth_frame(input logic [15:0] et);
    bytes_t f;
    for (int i = 0; i < 64; i++) f.push_back(8'(i * 3));
    {f[12], f[13]} = et;
    return f;
  endfunction

  task automatic mac_send(input bytes_t f);
    foreach (f[i]) begin
      rx_data = f[i]; rx_valid = 1; rx_last = (i == f.size() - 1);
      @(negedge clk);
    end
    rx_valid = 0; rx_last = 0;
  endtask

  task automatic read_desc(output pkt_desc_t d);
    int t = 0;
    while (desc_empty && t < 200) begin @(negedge clk); t++; end
    check(!desc_empty, "descriptor arrived");
    d = desc_rd_data;
    desc_rd_en = 1; @(negedge clk); desc_rd_en = 0;
  endtask

  task automatic read_rx(input bytes_t f);
    bit ok = 1;
    int n = 0;
    bit done = 0;
    while (!done && n < 4000) begin
      if (!rxf_empty) begin
        if (n >= f.size() || rxf_rd_data[7:0] != f[n] || rxf_rd_data[8] != (n == f.size() - 1)) ok = 0;
        done = rxf_rd_data[8];
        rxf_rd_en = 1; @(negedge clk); rxf_rd_en = 0;
        n++;
      end else @(negedge clk);
    end
    check(ok && n == f.size(), "frame read back from the Rx FIFO unchanged");
  endtask

  task automatic inspect(input bytes_t f, input int start);
    for (int i = start; i < f.size(); i++) begin
      pl_data = f[i]; pl_valid = 1; pl_last = (i == f.size() - 1);
      do @(posedge clk); while (!pl_ready);
      @(negedge clk);
    end
    pl_valid = 0; pl_last = 0;
    repeat (140) @(negedge clk);   // let the retirement buffer drain
  endtask

  function automatic cand_t C(input int n, input int a[5], input logic [1:0] d[5]);
    cand_t c;
    c.len = n;
    for (int j = 0; j < MAX_SEG; j++) begin c.a[j] = (j < n) ? a[j] : 0; c.d[j] = (j < n) ? d[j] : 2'b00; end
    return c;
  endfunction

  task automatic expect_results(input int shorts[$], input cand_t cands[$], input string what);
    check(short_got.size() == shorts.size(), $sformatf("%s: %0d short matches, expected %0d", what, short_got.size(), shorts.size()));
    foreach (shorts[i]) if (i < short_got.size()) check(short_got[i] == shorts[i], $sformatf("%s: short match address", what));
    check(cand_got.size() == cands.size(), $sformatf("%s: %0d candidates, expected %0d", what, cand_got.size(), cands.size()));
    foreach (cands[i]) if (i < cand_got.size()) begin
      check(cand_got[i].len == cands[i].len, $sformatf("%s: candidate %0d length %0d expected %0d", what, i, cand_got[i].len, cands[i].len));
      for (int j = 0; j < cands[i].len; j++)
        check(cand_got[i].a[j] == cands[i].a[j] && cand_got[i].d[j] == cands[i].d[j],
              $sformatf("%s: candidate %0d element %0d = %0d/%b expected %0d/%b", what, i, j,
                        cand_got[i].a[j], cand_got[i].d[j], cands[i].a[j], cands[i].d[j]));
    end
    short_got.delete();
    cand_got.delete();
  endtask

  // One complete operation: frame in, descriptor, Rx FIFO, proxy action.
  task automatic handle(input bytes_t f, input pkt_desc_t exp_d, input string what);
    pkt_desc_t d;
    fork
      mac_send(f);
      begin read_desc(d); end
    join
    check(d == exp_d, $sformatf("%s: descriptor %p expected %p", what, d, exp_d));
    case (d.action)
      ACT_PROXY: if (d.cls == CLS_ARP) n_arp++; else if (d.cls == CLS_ICMP) n_icmp++;
                 else if (d.cls == CLS_TCP) n_tcp_hit++; else if (d.cls == CLS_UDP) n_udp_hit++;
      ACT_WAKE:  n_wake++;
      default:   n_drop++;
    endcase
    if (d.multi_match) n_multi++;
    read_rx(f);
  endtask

  function automatic pkt_desc_t D(input pkt_class_e c, input pkt_action_e a, input bit h,
                                  input bit m, input int r);
    return '{cls: c, action: a, rule_hit: h, multi_match: m, rule_addr: 8'(r)};
  endfunction

  // ------------------------------------------------------------ test
  bytes_t f, reply;
  int      pause0, hit0, wake0;
  int      no_short[$], one_short[$];
  cand_t   no_cand[$], cands[$];
  int      a4[5], a5[5];
  logic [1:0] d4[5], d5[5];

  initial begin
    a4 = '{20, 100, 200, 300, 0};      d4 = '{2'b11, 2'b01, 2'b01, 2'b01, 2'b00};
    a5 = '{30, 20, 100, 200, 300};     d5 = '{2'b11, 2'b11, 2'b01, 2'b01, 2'b01};
    repeat (3) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    host_ip_wr = 1; host_ip_wr_data = HOST; @(negedge clk); host_ip_wr = 0;
    load_rule(0, RULE_TCP, 32'h0A00_0001, 16'd4000, 16'd80);
    load_rule(1, RULE_UDP, 32'h0, 16'd0, 16'd137);
    load_rule(2, RULE_TCP, 32'h0A00_0002, 16'd5000, 16'd8080);
    load_rule(3, RULE_TCP, 32'h0A00_0002, 16'd5000, 16'd8080);
    load_rule(99, RULE_TCP, 32'h0A00_0003, 16'd6000, 16'd443);
    // signatures: "PING" (short); "GET /index.html" = GET_ /ind ex.h tml*;
    // "XYZWGET /index.html" whose second partition "GET " is also a prefix (alias)
    load_p(10, "PING", 1, 0);
    load_p(20, "GET ", 0, 1);
    load_p(30, "XYZW", 0, 1);
    load_s(100, "/ind", 0, 1);
    load_s(200, "ex.h", 0, 1);
    load_s(300, "tml", 1, 0);
    load_s(400, "GET ", 0, 1);
    load_s(16383, "ZZZZ", 1, 0);
    repeat (4) @(negedge clk);

    // ARP request: proxied; the handler replies through the Tx FIFO.
    f = eth_frame(ETHERTYPE_ARP);
    handle(f, D(CLS_ARP, ACT_PROXY, 0, 0, 0), "ARP");
    reply = eth_frame(ETHERTYPE_ARP);
    foreach (reply[i]) begin
      @(negedge clk); txf_wr_en = 1; txf_wr_data = {i == reply.size() - 1, reply[i]};
    end
    @(negedge clk); txf_wr_en = 0;
    begin
      automatic int n = 0;
      automatic bit ok = 1;
      tx_ready = 1;
      while (n < reply.size()) begin
        @(posedge clk);
        if (tx_valid) begin
          if (tx_data != reply[n] || tx_last != (n == reply.size() - 1)) ok = 0;
          n++;
        end
      end
      @(negedge clk); tx_ready = 0;
      check(ok, "ARP reply leaves the Tx FIFO unchanged");
    end

    handle(ip_frame(IPPROTO_ICMP, 32'h0A00_0009, HOST, 0, 0, ""), D(CLS_ICMP, ACT_PROXY, 0, 0, 0), "ICMP");
    handle(eth_frame(16'h86DD), D(CLS_OTHER, ACT_WAKE, 0, 0, 0), "IPv6");
    handle(ip_frame(IPPROTO_TCP, 32'h0A00_0001, HOST + 1, 4000, 80, ""), D(CLS_TCP, ACT_DROP, 0, 0, 0), "TCP to another host");
    handle(ip_frame(IPPROTO_TCP, 32'h0A00_0077, HOST, 4000, 80, ""), D(CLS_TCP, ACT_WAKE, 0, 0, 0), "TCP unknown source");
    handle(ip_frame(IPPROTO_TCP, 32'h0A00_0002, HOST, 5000, 8080, ""), D(CLS_TCP, ACT_PROXY, 1, 1, 2), "TCP multiple match");
    handle(ip_frame(IPPROTO_TCP, 32'h0A00_0003, HOST, 6000, 443, ""), D(CLS_TCP, ACT_PROXY, 1, 0, 99), "TCP rule 99");

    // Proxied TCP with a long signature: three cache misses the first time.
    pause0 = ci_stats.pause; hit0 = ci_stats.c_hit;
    f = ip_frame(IPPROTO_TCP, 32'h0A00_0001, HOST, 4000, 80, "......GET /index.html......");
    handle(f, D(CLS_TCP, ACT_PROXY, 1, 0, 0), "TCP rule 0");
    inspect(f, 54);
    cands = '{C(4, a4, d4)};
    expect_results(no_short, cands, "long signature");
    check(ci_stats.pause - pause0 == 3 && ci_stats.c_hit == hit0, "first pass: three suffix cache misses");
    // Same again: the two exact suffixes now hit the cache; "tml*" is padded and never cached.
    pause0 = ci_stats.pause; hit0 = ci_stats.c_hit;
    handle(f, D(CLS_TCP, ACT_PROXY, 1, 0, 0), "TCP rule 0 again");
    inspect(f, 54);
    expect_results(no_short, cands, "long signature, cached");
    check(ci_stats.pause - pause0 == 1 && ci_stats.c_hit - hit0 == 2, "second pass: two cache hits, one miss");

    // UDP with the short signature.
    f = ip_frame(IPPROTO_UDP, 32'h0B0B_0B0B, HOST, 999, 137, "..PING..");
    handle(f, D(CLS_UDP, ACT_PROXY, 1, 0, 1), "UDP rule 1");
    inspect(f, 42);
    one_short = '{10};
    expect_results(one_short, no_cand, "short signature");

    // Alias: "GET " is both the prefix of one signature and a suffix of another.
    f = ip_frame(IPPROTO_TCP, 32'h0A00_0001, HOST, 4000, 80, "..XYZWGET /index.html..");
    handle(f, D(CLS_TCP, ACT_PROXY, 1, 0, 0), "TCP alias payload");
    inspect(f, 54);
    cands = '{C(5, a5, d5), C(4, a4, d4)};
    expect_results(no_short, cands, "alias signature");
    check(ci_stats.alias_hit == 1, "one alias hit");

    // Rewriting the S_TCAM empties the cache: all three suffixes miss again.
    load_s(100, "/ind", 0, 1);
    pause0 = ci_stats.pause; hit0 = ci_stats.c_hit;
    f = ip_frame(IPPROTO_TCP, 32'h0A00_0001, HOST, 4000, 80, "GET /index.html");
    handle(f, D(CLS_TCP, ACT_PROXY, 1, 0, 0), "TCP after S_TCAM rewrite");
    inspect(f, 54);
    cands = '{C(4, a4, d4)};
    expect_results(no_short, cands, "after flush");
    check(ci_stats.pause - pause0 == 3 && ci_stats.c_hit == hit0, "cache emptied by the S_TCAM write");

    // Overflow: nobody reads the FIFOs while 40 minimum-size frames arrive.
    wake0 = n_wake_irq;
    for (int n = 0; n < 40; n++) mac_send(ip_frame(IPPROTO_TCP, 32'h0A00_0077, HOST, 1, 2, ""));
    repeat (10) @(negedge clk);
    check(n_rxdrop == 40 * 64 - 2048, $sformatf("Rx FIFO dropped %0d bytes, expected %0d", n_rxdrop, 40 * 64 - 2048));
    check(desc_overflow, "descriptor FIFO overflow flagged");
    check(n_wake_irq - wake0 == 40, "a wake interrupt for every unmatched frame");
    begin
      automatic int nd = 0;
      while (!desc_empty) begin desc_rd_en = 1; @(negedge clk); desc_rd_en = 0; nd++; end
      check(nd == 16, $sformatf("descriptor FIFO held %0d, expected 16", nd));
      while (!rxf_empty) begin rxf_rd_en = 1; @(negedge clk); rxf_rd_en = 0; end
    end

    check(ci_stats.p_access > 0 && ci_stats.s_access > 0 && ci_stats.c_access > 0, "all stores searched");
    check(n_arp > 0 && n_icmp > 0 && n_tcp_hit > 0 && n_udp_hit > 0 && n_wake > 0 && n_drop > 0,
          "every class and action");
    check(n_multi > 0 && n_early > 0 && n_tx > 0 && n_flush > 0 && ci_stats.pause > 0 &&
          ci_stats.c_hit > 0 && ci_stats.alias_hit > 0 && ci_stats.short_match > 0 && ci_stats.cand > 0,
          "every mechanism");
    $display("arp=%0d icmp=%0d tcp_hit=%0d udp_hit=%0d wake=%0d drop=%0d multi=%0d early_stop=%0d",
             n_arp, n_icmp, n_tcp_hit, n_udp_hit, n_wake, n_drop, n_multi, n_early);
    $display("tx_bytes=%0d rx_drops=%0d s_writes=%0d pauses=%0d cache_hits=%0d alias=%0d short=%0d cand=%0d",
             n_tx, n_rxdrop, n_flush, ci_stats.pause, ci_stats.c_hit, ci_stats.alias_hit,
             ci_stats.short_match, ci_stats.cand);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

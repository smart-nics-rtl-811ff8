// tb_header_classifier: self-checking test of the CAM header classifier.
//
// Loads a rule set (TCP three-field rules, UDP destination-port rules, two
// rules sharing one flow to provoke a multiple match, one rule in the last
// CAM row), then streams Ethernet frames one byte per clock, back to back:
// directed frames of every class (ARP, non-IP, ICMP, TCP/UDP hit and miss,
// wrong destination, other IP protocol, IP options, runt) followed by random
// TCP/UDP frames. A reference model in the testbench predicts each
// descriptor and the cycle it must appear (1 cycle after the Ethernet type
// byte for ARP/non-IP, 1 after the destination address for drop/ICMP/other,
// 2/3/4 after the destination port for a TCP miss in the first/second CAM or
// a full TCP lookup, 2 for UDP). It also counts CAM searches to check that a
// TCP miss stops the sequential search early, and checks wake pulses.
module tb_header_classifier;
  import snic_pkg::*;

  localparam int unsigned NUM_RULES = 100;
  localparam int unsigned RAW = $clog2(NUM_RULES);
  localparam logic [31:0] HOST = 32'hC0A8_0164;   // 192.168.1.100

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic [7:0]  rx_data = '0;
  logic        rx_valid = 1'b0, rx_last = 1'b0;
  logic        rule_wr_en = 1'b0;
  logic [RAW-1:0] rule_wr_addr = '0;
  rule_kind_e  rule_wr_kind = RULE_NONE;
  logic [31:0] rule_wr_src_ip = '0;
  logic [15:0] rule_wr_sport = '0, rule_wr_dport = '0;
  logic        host_ip_wr = 1'b0;
  logic [31:0] host_ip_wr_data = '0;
  logic        desc_valid, wake;
  pkt_desc_t   desc;

  header_classifier #(.NUM_RULES(NUM_RULES)) dut (.*);

  int checks = 0, failures = 0;
  int unsigned cyc = 0;
  always @(negedge clk) cyc <= cyc + 1;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  // ------------------------------------------------------------ rule model
  rule_kind_e  r_kind [NUM_RULES];
  logic [31:0] r_sa   [NUM_RULES];
  logic [15:0] r_sp   [NUM_RULES];
  logic [15:0] r_dp   [NUM_RULES];

  task automatic load_rule(input int a, input rule_kind_e k, input logic [31:0] sa,
                           input logic [15:0] sp, input logic [15:0] dp);
    @(negedge clk);
    rule_wr_en = 1'b1; rule_wr_addr = RAW'(a); rule_wr_kind = k;
    rule_wr_src_ip = sa; rule_wr_sport = sp; rule_wr_dport = dp;
    r_kind[a] = k; r_sa[a] = sa; r_sp[a] = sp; r_dp[a] = dp;
    @(negedge clk);
    rule_wr_en = 1'b0;
  endtask

  typedef struct {
    pkt_desc_t d;
    int unsigned when;   // negedge count at which desc_valid must be seen
  } exp_t;
  exp_t expq[$];

  int n_wake_exp = 0, n_wake_seen = 0;
  int n_tcp_full = 0, n_tcp_early = 0, n_multi = 0, n_udp = 0;

  // Reference classification; returns the decision byte index and latency.
  function automatic void ref_model(input logic [7:0] f[], output pkt_desc_t d,
                                    output int dec_byte, output int lat);
    logic [15:0] et;
    logic [7:0]  pr;
    logic [31:0] sa, da;
    logic [15:0] sp, dp;
    int l4, nm, first;
    d = '{cls: CLS_OTHER, action: ACT_DROP, rule_hit: 1'b0, multi_match: 1'b0, rule_addr: '0};
    lat = 1;
    if (f.size() < 14) begin dec_byte = f.size() - 1; return; end
    et = {f[12], f[13]};
    dec_byte = 13;
    if (et == ETHERTYPE_ARP) begin d.cls = CLS_ARP; d.action = ACT_PROXY; return; end
    if (et != ETHERTYPE_IPV4) begin d.action = ACT_WAKE; return; end
    if (f.size() < 34) begin dec_byte = f.size() - 1; return; end
    pr = f[23];
    sa = {f[26], f[27], f[28], f[29]};
    da = {f[30], f[31], f[32], f[33]};
    dec_byte = 33;
    d.cls = (pr == IPPROTO_ICMP) ? CLS_ICMP : (pr == IPPROTO_TCP) ? CLS_TCP :
            (pr == IPPROTO_UDP) ? CLS_UDP : CLS_OTHER;
    if (da != HOST) begin d.action = ACT_DROP; return; end
    if (pr == IPPROTO_ICMP) begin d.action = ACT_PROXY; return; end
    if (pr != IPPROTO_TCP && pr != IPPROTO_UDP) begin d.action = ACT_WAKE; return; end
    l4 = 14 + 4 * ((f[14][3:0] < 5) ? 5 : f[14][3:0]);
    if (f.size() < l4 + 4) begin
      d.cls = CLS_OTHER; d.action = ACT_DROP; dec_byte = f.size() - 1; return;
    end
    sp = {f[l4], f[l4+1]};
    dp = {f[l4+2], f[l4+3]};
    dec_byte = l4 + 3;
    nm = 0; first = -1;
    if (pr == IPPROTO_TCP) begin
      bit any_sa = 0, any_sp = 0;
      for (int i = 0; i < NUM_RULES; i++)
        if (r_kind[i] == RULE_TCP && r_sa[i] == sa) any_sa = 1;
      for (int i = 0; i < NUM_RULES; i++)
        if (r_kind[i] == RULE_TCP && r_sa[i] == sa && r_sp[i] == sp) any_sp = 1;
      for (int i = 0; i < NUM_RULES; i++)
        if (r_kind[i] == RULE_TCP && r_sa[i] == sa && r_sp[i] == sp && r_dp[i] == dp) begin
          nm++; if (first < 0) first = i;
        end
      lat = !any_sa ? 2 : !any_sp ? 3 : 4;
    end else begin
      for (int i = 0; i < NUM_RULES; i++)
        if (r_kind[i] == RULE_UDP && r_dp[i] == dp) begin
          nm++; if (first < 0) first = i;
        end
      lat = 2;
    end
    d.action      = (nm > 0) ? ACT_PROXY : ACT_WAKE;
    d.rule_hit    = nm > 0;
    d.multi_match = nm > 1;
    d.rule_addr   = (nm > 0) ? DESC_RULE_AW'(first) : '0;
  endfunction

  // ------------------------------------------------------------ frames
  function automatic void mk_ip(ref logic [7:0] f[], input logic [7:0] proto,
                                input logic [31:0] sa, input logic [31:0] da,
                                input logic [15:0] sp, input logic [15:0] dp,
                                input int ihl = 5, input int len = 64);
    int l4;
    f = new[len];
    foreach (f[i]) f[i] = 8'(i * 7 + 3);
    f[12] = 8'h08; f[13] = 8'h00;
    f[14] = {4'h4, 4'(ihl)};
    f[23] = proto;
    {f[26], f[27], f[28], f[29]} = sa;
    {f[30], f[31], f[32], f[33]} = da;
    l4 = 14 + 4 * ihl;
    {f[l4], f[l4+1]} = sp;
    {f[l4+2], f[l4+3]} = dp;
  endfunction

  task automatic send(input logic [7:0] f[]);
    pkt_desc_t d;
    int db, lat;
    ref_model(f, d, db, lat);
    for (int i = 0; i < f.size(); i++) begin
      rx_data = f[i]; rx_valid = 1'b1; rx_last = (i == f.size() - 1);
      if (i == db) begin
        expq.push_back('{d: d, when: cyc + lat});
        // 2.5 Mpackets/s at 125 MHz leaves 50 cycles per frame.
        if (f.size() >= 64) check(db + lat <= 50, "classified within 50 cycles of the first byte");
        if (d.action == ACT_WAKE) n_wake_exp++;
        if (d.cls == CLS_TCP && lat == 4) n_tcp_full++;
        if (d.cls == CLS_TCP && (lat == 2 || lat == 3)) n_tcp_early++;
        if (d.multi_match) n_multi++;
        if (d.cls == CLS_UDP && d.action == ACT_PROXY) n_udp++;
      end
      @(negedge clk);
    end
    rx_valid = 1'b0; rx_last = 1'b0;
  endtask

  // ------------------------------------------------------------ monitor
  int n_desc = 0;
  exp_t e;
  always @(negedge clk) begin
    if (rst_n && wake) n_wake_seen++;
    if (rst_n && desc_valid) begin
      n_desc++;
      if (expq.size() == 0) begin
        check(0, "unexpected descriptor");
      end else begin
        e = expq.pop_front();
        check(desc == e.d, $sformatf("descriptor %0d: got %p expected %p", n_desc, desc, e.d));
        check(cyc == e.when, $sformatf("descriptor %0d: at cycle %0d expected %0d", n_desc, cyc, e.when));
      end
    end
  end

  // Count CAM searches to see the early stop of the sequential search.
  int sa_searches = 0, sp_searches = 0, dp_searches = 0;
  always @(posedge clk) begin
    if (dut.sa_search) sa_searches++;
    if (dut.sp_search) sp_searches++;
    if (dut.dp_search) dp_searches++;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [7:0] f[];
  int sa0, sp0, dp0;

  initial begin
    foreach (r_kind[i]) r_kind[i] = RULE_NONE;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    host_ip_wr = 1'b1; host_ip_wr_data = HOST;
    @(negedge clk);
    host_ip_wr = 1'b0;
    load_rule(0,  RULE_TCP, 32'h0A00_0005, 16'd5000, 16'd80);
    load_rule(1,  RULE_TCP, 32'h0A00_0006, 16'd5000, 16'd80);
    load_rule(2,  RULE_UDP, 32'h0,         16'd0,    16'd5353);
    load_rule(3,  RULE_TCP, 32'h0A00_0005, 16'd6000, 16'd22);
    load_rule(5,  RULE_TCP, 32'h0A00_0008, 16'd1234, 16'd8080);
    load_rule(6,  RULE_TCP, 32'h0A00_0008, 16'd1234, 16'd8080);
    load_rule(7,  RULE_UDP, 32'h0,         16'd0,    16'd4000);
    load_rule(99, RULE_TCP, 32'h0A00_0007, 16'd7000, 16'd443);
    repeat (2) @(negedge clk);

    // ARP
    f = new[64]; foreach (f[i]) f[i] = 8'(i); f[12] = 8'h08; f[13] = 8'h06; send(f);
    // IPv6: not proxiable, wake
    f[12] = 8'h86; f[13] = 8'hDD; send(f);
    // ICMP to host
    mk_ip(f, IPPROTO_ICMP, 32'h0A00_0009, HOST, 0, 0); send(f);
    // TCP to another host: drop
    mk_ip(f, IPPROTO_TCP, 32'h0A00_0005, 32'hC0A8_0165, 5000, 80); send(f);
    // TCP rule 0
    mk_ip(f, IPPROTO_TCP, 32'h0A00_0005, HOST, 5000, 80); send(f);
    // TCP: source address miss (stop after first CAM)
    sa0 = sa_searches; sp0 = sp_searches; dp0 = dp_searches;
    mk_ip(f, IPPROTO_TCP, 32'h0A00_00FF, HOST, 5000, 80); send(f);
    repeat (6) @(negedge clk);
    check(sa_searches == sa0 + 1 && sp_searches == sp0 && dp_searches == dp0,
          "source address miss must not search the port CAMs");
    // TCP: source port miss (stop after second CAM)
    sa0 = sa_searches; sp0 = sp_searches; dp0 = dp_searches;
    mk_ip(f, IPPROTO_TCP, 32'h0A00_0005, HOST, 5001, 80); send(f);
    repeat (6) @(negedge clk);
    check(sa_searches == sa0 + 1 && sp_searches == sp0 + 1 && dp_searches == dp0,
          "source port miss must not search the destination port CAM");
    // TCP: destination port miss
    mk_ip(f, IPPROTO_TCP, 32'h0A00_0005, HOST, 5000, 81); send(f);
    // TCP rule in last row, multiple match, IP options
    mk_ip(f, IPPROTO_TCP, 32'h0A00_0007, HOST, 7000, 443); send(f);
    mk_ip(f, IPPROTO_TCP, 32'h0A00_0008, HOST, 1234, 8080); send(f);
    mk_ip(f, IPPROTO_TCP, 32'h0A00_0005, HOST, 6000, 22, 6); send(f);
    // UDP hit and miss; UDP ignores source fields
    mk_ip(f, IPPROTO_UDP, 32'h0102_0304, HOST, 999, 5353); send(f);
    mk_ip(f, IPPROTO_UDP, 32'h0102_0304, HOST, 999, 5354); send(f);
    // TCP to a UDP rule's port: no match
    mk_ip(f, IPPROTO_TCP, 32'h0A00_0005, HOST, 5000, 5353); send(f);
    // Other IP protocol to host (GRE): wake
    mk_ip(f, 8'd47, 32'h0A00_0005, HOST, 0, 0); send(f);
    // Runt frame: drop
    f = new[10]; foreach (f[i]) f[i] = 8'hAA; send(f);
    // Delete rule 0 and retry its flow: now a miss
    load_rule(0, RULE_NONE, 32'h0A00_0005, 16'd5000, 16'd80);
    mk_ip(f, IPPROTO_TCP, 32'h0A00_0005, HOST, 5000, 80); send(f);

    // Random TCP/UDP traffic, back to back.
    for (int n = 0; n < 300; n++) begin
      logic [31:0] sa;
      logic [15:0] sp, dp;
      logic [7:0]  pr;
      int k;
      k = $urandom_range(0, 3);
      sa = (k == 0) ? 32'h0A00_0005 : (k == 1) ? 32'h0A00_0006 : (k == 2) ? 32'h0A00_0008 : $urandom;
      k = $urandom_range(0, 3);
      sp = (k == 0) ? 16'd5000 : (k == 1) ? 16'd1234 : (k == 2) ? 16'd6000 : 16'($urandom);
      k = $urandom_range(0, 4);
      dp = (k == 0) ? 16'd80 : (k == 1) ? 16'd8080 : (k == 2) ? 16'd5353 : (k == 3) ? 16'd22 : 16'd4000;
      pr = $urandom_range(0, 1) ? IPPROTO_TCP : IPPROTO_UDP;
      mk_ip(f, pr, sa, ($urandom_range(0, 9) == 0) ? 32'h0A0A_0A0A : HOST, sp, dp, 5,
            $urandom_range(64, 100));
      send(f);
      if ($urandom_range(0, 3) == 0) repeat ($urandom_range(1, 5)) @(negedge clk);
    end

    repeat (10) @(negedge clk);
    check(expq.size() == 0, $sformatf("%0d descriptors missing", expq.size()));
    check(n_wake_seen == n_wake_exp, $sformatf("wake pulses %0d expected %0d", n_wake_seen, n_wake_exp));
    check(n_tcp_full > 0 && n_tcp_early > 0 && n_multi > 0 && n_udp > 0,
          "every lookup kind exercised");
    $display("descriptors=%0d tcp_full=%0d tcp_early_stop=%0d multi=%0d udp_hits=%0d wakes=%0d",
             n_desc, n_tcp_full, n_tcp_early, n_multi, n_udp, n_wake_seen);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

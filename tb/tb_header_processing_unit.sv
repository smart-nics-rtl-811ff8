// tb_header_processing_unit: the header FSM alone. The testbench stands in
// for the CAMs and the match address unit: it remembers which CAM searches
// were issued and with which key, and answers hit/miss from one TCP rule and
// one UDP rule. It checks the extracted keys, the order of the sequential
// TCP search (source address, then source port, then destination port, each
// only after a hit), the descriptor of each frame and its cycle.
module tb_header_processing_unit;
  import snic_pkg::*;
  localparam int NUM_RULES = 100;
  localparam logic [31:0] HOST = 32'h0A01_0203;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic [7:0] rx_data = '0;
  logic rx_valid = 0, rx_last = 0;
  logic [31:0] host_ip = HOST;
  logic sa_search, sp_search, dp_search, use_sa, use_sp, use_dp, tcp_rules;
  logic [31:0] sa_key;
  logic [15:0] sp_key, dp_key;
  logic mau_hit, mau_multi;
  logic [$clog2(NUM_RULES)-1:0] mau_addr;
  logic desc_valid, wake;
  pkt_desc_t desc;
  header_processing_unit #(.NUM_RULES(NUM_RULES)) dut (.*);

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++; if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask
  initial begin
    repeat (20000) @(posedge clk);
    failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  // CAM stand-in: TCP rule 9 = (10.9.9.9, 1111, 2222), UDP rule 4 = port 53
  bit sa_m = 0, sp_m = 0, dpt_m = 0, dpu_m = 0;
  string order = "";
  always @(posedge clk) begin
    if (sa_search) begin sa_m <= (sa_key == 32'h0A09_0909); order = {order, "A"}; end
    if (sp_search) begin sp_m <= (sp_key == 16'd1111);      order = {order, "P"}; end
    if (dp_search) begin dpt_m <= (dp_key == 16'd2222); dpu_m <= (dp_key == 16'd53); order = {order, "D"}; end
  end
  always_comb begin
    if (tcp_rules) mau_hit = (!use_sa || sa_m) && (!use_sp || sp_m) && (!use_dp || dpt_m) && (use_sa || use_sp || use_dp);
    else           mau_hit = use_dp && dpu_m;
    mau_multi = 1'b0;
    mau_addr  = tcp_rules ? 7'd9 : 7'd4;
  end

  int unsigned cyc = 0;
  always @(negedge clk) cyc <= cyc + 1;
  int unsigned got_at = 0;
  pkt_desc_t got;
  int n_desc = 0;
  always @(negedge clk) if (desc_valid) begin got = desc; got_at = cyc; n_desc++; end

  task automatic frame(input logic [15:0] et, input logic [7:0] pr, input logic [31:0] sa,
                       input logic [31:0] da, input logic [15:0] sp, input logic [15:0] dp,
                       input int dec_byte, input int lat, input pkt_desc_t exp_d,
                       input string exp_order);
    logic [7:0] f[64];
    int unsigned at = 0, n0;
    foreach (f[i]) f[i] = 8'(i);
    {f[12], f[13]} = et; f[14] = 8'h45; f[23] = pr;
    {f[26], f[27], f[28], f[29]} = sa; {f[30], f[31], f[32], f[33]} = da;
    {f[34], f[35]} = sp; {f[36], f[37]} = dp;
    order = ""; n0 = n_desc;
    for (int i = 0; i < 64; i++) begin
      rx_data = f[i]; rx_valid = 1; rx_last = (i == 63);
      if (i == dec_byte) at = cyc + lat;
      @(negedge clk);
    end
    rx_valid = 0; rx_last = 0;
    repeat (2) @(negedge clk);
    check(n_desc == n0 + 1, "one descriptor per frame");
    check(got == exp_d, $sformatf("descriptor %p expected %p", got, exp_d));
    check(got_at == at, $sformatf("descriptor at %0d expected %0d", got_at, at));
    check(order == exp_order, $sformatf("CAM search order %s expected %s", order, exp_order));
  endtask

  function automatic pkt_desc_t D(input pkt_class_e c, input pkt_action_e a, input bit h, input int r);
    return '{cls: c, action: a, rule_hit: h, multi_match: 1'b0, rule_addr: DESC_RULE_AW'(r)};
  endfunction

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    frame(ETHERTYPE_ARP, 0, 0, 0, 0, 0, 13, 1, D(CLS_ARP, ACT_PROXY, 0, 0), "");
    frame(16'h88CC, 0, 0, 0, 0, 0, 13, 1, D(CLS_OTHER, ACT_WAKE, 0, 0), "");
    frame(ETHERTYPE_IPV4, IPPROTO_ICMP, 1, HOST, 0, 0, 33, 1, D(CLS_ICMP, ACT_PROXY, 0, 0), "");
    frame(ETHERTYPE_IPV4, IPPROTO_TCP, 32'h0A09_0909, HOST + 1, 1111, 2222, 33, 1, D(CLS_TCP, ACT_DROP, 0, 0), "");
    frame(ETHERTYPE_IPV4, IPPROTO_TCP, 32'h0A09_0909, HOST, 1111, 2222, 37, 4, D(CLS_TCP, ACT_PROXY, 1, 9), "APD");
    frame(ETHERTYPE_IPV4, IPPROTO_TCP, 32'h0A09_0908, HOST, 1111, 2222, 37, 2, D(CLS_TCP, ACT_WAKE, 0, 0), "A");
    frame(ETHERTYPE_IPV4, IPPROTO_TCP, 32'h0A09_0909, HOST, 1112, 2222, 37, 3, D(CLS_TCP, ACT_WAKE, 0, 0), "AP");
    frame(ETHERTYPE_IPV4, IPPROTO_TCP, 32'h0A09_0909, HOST, 1111, 2223, 37, 4, D(CLS_TCP, ACT_WAKE, 0, 0), "APD");
    frame(ETHERTYPE_IPV4, IPPROTO_UDP, 32'h0A09_0909, HOST, 7, 53, 37, 2, D(CLS_UDP, ACT_PROXY, 1, 4), "D");
    frame(ETHERTYPE_IPV4, IPPROTO_UDP, 32'h0A09_0909, HOST, 7, 54, 37, 2, D(CLS_UDP, ACT_WAKE, 0, 0), "D");
    frame(ETHERTYPE_IPV4, 8'd89, 32'h0A09_0909, HOST, 7, 54, 33, 1, D(CLS_OTHER, ACT_WAKE, 0, 0), "");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

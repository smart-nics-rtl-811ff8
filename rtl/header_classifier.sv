// header_classifier: CAM-based hardware header classifier of the SNIC.
//
// Power proxying rules are equality rules on the source address, source port
// and destination port (TCP) or on the destination port alone (UDP), for
// frames addressed to the host. The three fields are partitioned into three
// binary CAMs indexed by rule number; the host address sits in a register and
// is checked by a plain compare. The header processing unit parses the MAC
// receive stream and searches the CAMs one after another, stopping at the
// first miss; the match address unit intersects the unencoded match vectors.
// The classifier only taps the receive stream, so it adds nothing to the
// frame's path into the Rx FIFO.
//
// Interface: rule_wr_* loads rule rule_wr_addr (rule_wr_kind = RULE_NONE
// deletes it); host_ip_wr loads the host address. For every frame one
// descriptor (desc_valid pulse) gives class, action and matching rule; wake
// pulses together with a descriptor whose action is ACT_WAKE.
// Timing: see header_processing_unit (TCP decided 4 cycles after the last
// destination port byte, UDP 2 cycles). NUM_RULES defaults to the 100-rule
// set the classifier was evaluated with. Keeping a rule kind next to each row
// (to tell TCP from UDP rules) is this design's choice.
// The match address unit's combined vector (mau_vec) is not used further:
// only hit, multi and the lowest address go into the descriptor.
module header_classifier
  import snic_pkg::*;
#(
  parameter int unsigned NUM_RULES = 100
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic [7:0]  rx_data,
  input  logic        rx_valid,
  input  logic        rx_last,
  // rule and host address loading (from the host, before standby)
  input  logic        rule_wr_en,
  input  logic [$clog2(NUM_RULES)-1:0] rule_wr_addr,
  input  rule_kind_e  rule_wr_kind,
  input  logic [31:0] rule_wr_src_ip,
  input  logic [15:0] rule_wr_sport,
  input  logic [15:0] rule_wr_dport,
  input  logic        host_ip_wr,
  input  logic [31:0] host_ip_wr_data,
  // result
  output logic        desc_valid,
  output pkt_desc_t   desc,
  output logic        wake
);
  localparam int unsigned RAW = $clog2(NUM_RULES);

  initial assert (NUM_RULES <= (1 << DESC_RULE_AW))
    else $error("NUM_RULES exceeds the descriptor rule address");

  logic [31:0]          host_ip;
  rule_kind_e           kind [NUM_RULES];
  logic [NUM_RULES-1:0] tcp_mask, udp_mask;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      host_ip <= '0;
      for (int i = 0; i < NUM_RULES; i++) kind[i] <= RULE_NONE;
    end else begin
      if (host_ip_wr) host_ip <= host_ip_wr_data;
      if (rule_wr_en) kind[rule_wr_addr] <= rule_wr_kind;
    end
  end

  always_comb begin
    for (int i = 0; i < NUM_RULES; i++) begin
      tcp_mask[i] = (kind[i] == RULE_TCP);
      udp_mask[i] = (kind[i] == RULE_UDP);
    end
  end

  logic        sa_search, sp_search, dp_search;
  logic [31:0] sa_key;
  logic [15:0] sp_key, dp_key;
  logic [NUM_RULES-1:0] sa_vec, sp_vec, dp_vec, mau_vec;
  logic        use_sa, use_sp, use_dp, tcp_rules;
  logic        mau_hit, mau_multi;
  logic [RAW-1:0] mau_addr;

  cam #(.WIDTH(32), .DEPTH(NUM_RULES)) u_sa_cam (
    .clk, .rst_n,
    .wr_en(rule_wr_en), .wr_addr(rule_wr_addr), .wr_data(rule_wr_src_ip),
    .wr_valid(rule_wr_kind == RULE_TCP),
    .search_en(sa_search), .key(sa_key), .match_vec(sa_vec));

  cam #(.WIDTH(16), .DEPTH(NUM_RULES)) u_sp_cam (
    .clk, .rst_n,
    .wr_en(rule_wr_en), .wr_addr(rule_wr_addr), .wr_data(rule_wr_sport),
    .wr_valid(rule_wr_kind == RULE_TCP),
    .search_en(sp_search), .key(sp_key), .match_vec(sp_vec));

  cam #(.WIDTH(16), .DEPTH(NUM_RULES)) u_dp_cam (
    .clk, .rst_n,
    .wr_en(rule_wr_en), .wr_addr(rule_wr_addr), .wr_data(rule_wr_dport),
    .wr_valid(rule_wr_kind != RULE_NONE),
    .search_en(dp_search), .key(dp_key), .match_vec(dp_vec));

  match_address_unit #(.DEPTH(NUM_RULES)) u_mau (
    .sa_vec, .sp_vec, .dp_vec, .use_sa, .use_sp, .use_dp,
    .rule_mask(tcp_rules ? tcp_mask : udp_mask),
    .match_vec(mau_vec), .hit(mau_hit), .multi(mau_multi), .addr(mau_addr));

  header_processing_unit #(.NUM_RULES(NUM_RULES)) u_hpu (
    .clk, .rst_n, .rx_data, .rx_valid, .rx_last, .host_ip,
    .sa_search, .sa_key, .sp_search, .sp_key, .dp_search, .dp_key,
    .use_sa, .use_sp, .use_dp, .tcp_rules,
    .mau_hit, .mau_multi, .mau_addr,
    .desc_valid, .desc, .wake);

endmodule

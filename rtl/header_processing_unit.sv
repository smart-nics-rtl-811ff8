// header_processing_unit: control FSM of the hardware header classifier.
//
// It watches the frame bytes the MAC delivers (one byte per clock, starting at
// the destination MAC address, rx_last on the final byte), pulls out the
// fields a power proxying rule looks at, and classifies the frame:
//   * Ethernet type ARP: classified right after the type field, one compare.
//   * Not ARP and not IPv4: wake the host.
//   * IPv4 whose destination address is not the host's: drop.
//   * ICMP to the host: hand to the proxy handler.
//   * TCP: search the source address CAM; only on a hit search the source port
//     CAM; only on a hit search the destination port CAM. The rule matches
//     when the intersection of the three match vectors is not empty. Stopping
//     at the first miss keeps the later CAMs from switching.
//   * UDP: search the destination port CAM only.
//   * A TCP/UDP frame that no rule matches, or another IP protocol: wake.
// Frames that end before a decision could be made are dropped.
//
// Timing: a descriptor (desc_valid pulse) leaves 1 cycle after the Ethernet
// type byte for ARP and non-IP frames, 1 cycle after the last destination
// address byte for drop/ICMP/other, 2 cycles after the last destination port
// byte for UDP and 4 cycles after it for TCP (three CAM lookups of one cycle
// each). The header offsets follow IPv4 with its IHL field; field extraction,
// the drop decisions and the descriptor format are this design's choices
// where the classifier description leaves them open.
// dst_ip[31:24] is never read: the destination check at byte 33 compares the
// three stored bytes with the byte on rx_data in the same cycle.
module header_processing_unit
  import snic_pkg::*;
#(
  parameter int unsigned NUM_RULES = 100
) (
  input  logic        clk,
  input  logic        rst_n,
  // MAC client receive stream
  input  logic [7:0]  rx_data,
  input  logic        rx_valid,
  input  logic        rx_last,
  // host (PC) IPv4 address register
  input  logic [31:0] host_ip,
  // CAM search controls
  output logic        sa_search,
  output logic [31:0] sa_key,
  output logic        sp_search,
  output logic [15:0] sp_key,
  output logic        dp_search,
  output logic [15:0] dp_key,
  // match address unit
  output logic        use_sa,
  output logic        use_sp,
  output logic        use_dp,
  output logic        tcp_rules,      // 1: TCP rule mask, 0: UDP rule mask
  input  logic        mau_hit,
  input  logic        mau_multi,
  input  logic [$clog2(NUM_RULES)-1:0] mau_addr,
  // classification result
  output logic        desc_valid,
  output pkt_desc_t   desc,
  output logic        wake
);
  typedef enum logic [2:0] {
    S_IDLE, S_SA, S_SP, S_DP, S_UDP
  } search_state_e;

  search_state_e state;

  logic [15:0] idx;          // index of the byte on rx_data within its frame
  logic [7:0]  etype_hi;
  logic [3:0]  ihl;
  logic [7:0]  proto;
  logic [31:0] src_ip, dst_ip;
  logic [15:0] sport;
  logic [7:0]  dport_hi;
  logic [15:0] dport;
  logic        decided;      // this frame already has its descriptor (or search)
  logic        await_ports;  // IPv4 TCP/UDP to the host, ports not yet seen

  logic [15:0] l4_off;
  assign l4_off = 16'd14 + {10'd0, (ihl < 4'd5) ? 4'd5 : ihl, 2'b00};

  logic [15:0] etype_now;
  logic [31:0] dst_now;
  assign etype_now = {etype_hi, rx_data};
  assign dst_now   = {dst_ip[23:0], rx_data};

  logic ev_eth, ev_dst, ev_ports, ev_runt;
  assign ev_eth   = rx_valid && !decided && (idx == 16'd13);
  assign ev_dst   = rx_valid && !decided && (idx == 16'd33);
  assign ev_ports = rx_valid && await_ports && (idx == l4_off + 16'd3);
  assign ev_runt  = rx_valid && rx_last && !decided && !ev_eth && !ev_dst && !ev_ports;

  function automatic pkt_class_e class_of(input logic [7:0] p);
    case (p)
      IPPROTO_ICMP: return CLS_ICMP;
      IPPROTO_TCP:  return CLS_TCP;
      IPPROTO_UDP:  return CLS_UDP;
      default:      return CLS_OTHER;
    endcase
  endfunction

  // ------------------------------------------------------ field extraction
  always_ff @(posedge clk) begin
    if (!rst_n) begin
      idx         <= '0;
      etype_hi    <= '0;
      ihl         <= 4'd5;
      proto       <= '0;
      src_ip      <= '0;
      dst_ip      <= '0;
      sport       <= '0;
      dport_hi    <= '0;
      dport       <= '0;
      decided     <= 1'b0;
      await_ports <= 1'b0;
    end else if (rx_valid) begin
      idx <= rx_last ? 16'd0 : ((idx == 16'hFFFF) ? idx : idx + 1'b1);
      if (idx == 16'd12) etype_hi <= rx_data;
      if (idx == 16'd14) ihl      <= rx_data[3:0];
      if (idx == 16'd23) proto    <= rx_data;
      if (idx >= 16'd26 && idx <= 16'd29) src_ip <= {src_ip[23:0], rx_data};
      if (idx >= 16'd30 && idx <= 16'd33) dst_ip <= dst_now;
      if (await_ports) begin
        if (idx == l4_off)          sport[15:8] <= rx_data;
        if (idx == l4_off + 16'd1)  sport[7:0]  <= rx_data;
        if (idx == l4_off + 16'd2)  dport_hi    <= rx_data;
        if (idx == l4_off + 16'd3)  dport       <= {dport_hi, rx_data};
      end
      // decision bookkeeping
      if (ev_eth && (etype_now != ETHERTYPE_IPV4)) decided <= 1'b1;
      if (ev_dst) begin
        decided <= 1'b1;
        await_ports <= (dst_now == host_ip) &&
                       ((proto == IPPROTO_TCP) || (proto == IPPROTO_UDP));
      end
      if (ev_ports) await_ports <= 1'b0;
      if (rx_last) begin
        decided     <= 1'b0;
        await_ports <= 1'b0;
      end
    end
  end

  // ------------------------------------------------------ CAM sequencing
  assign sa_key = src_ip;
  assign sp_key = sport;
  assign dp_key = ev_ports ? {dport_hi, rx_data} : dport;

  always_comb begin
    sa_search = 1'b0;
    sp_search = 1'b0;
    dp_search = 1'b0;
    use_sa    = 1'b0;
    use_sp    = 1'b0;
    use_dp    = 1'b0;
    tcp_rules = 1'b1;
    case (state)
      S_IDLE: begin
        if (ev_ports) begin
          if (proto == IPPROTO_TCP) sa_search = 1'b1;
          else                      dp_search = 1'b1;
        end
      end
      S_SA: begin
        use_sa    = 1'b1;
        sp_search = mau_hit;
      end
      S_SP: begin
        use_sa    = 1'b1;
        use_sp    = 1'b1;
        dp_search = mau_hit;
      end
      S_DP: begin
        use_sa = 1'b1;
        use_sp = 1'b1;
        use_dp = 1'b1;
      end
      S_UDP: begin
        use_dp    = 1'b1;
        tcp_rules = 1'b0;
      end
      default: ;
    endcase
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state <= S_IDLE;
    end else begin
      case (state)
        S_IDLE: if (ev_ports) state <= (proto == IPPROTO_TCP) ? S_SA : S_UDP;
        S_SA:   state <= mau_hit ? S_SP : S_IDLE;
        S_SP:   state <= mau_hit ? S_DP : S_IDLE;
        default: state <= S_IDLE;
      endcase
    end
  end

  // ------------------------------------------------------ descriptor
  pkt_desc_t d_next;
  logic      d_fire;

  always_comb begin
    d_fire = 1'b0;
    d_next = '{cls: CLS_OTHER, action: ACT_DROP, rule_hit: 1'b0,
               multi_match: 1'b0, rule_addr: '0};
    if (state == S_SA && !mau_hit || state == S_SP && !mau_hit || state == S_DP) begin
      d_fire             = 1'b1;
      d_next.cls         = CLS_TCP;
      d_next.action      = (state == S_DP && mau_hit) ? ACT_PROXY : ACT_WAKE;
      d_next.rule_hit    = (state == S_DP) && mau_hit;
      d_next.multi_match = (state == S_DP) && mau_multi;
      d_next.rule_addr   = (state == S_DP && mau_hit) ? DESC_RULE_AW'(mau_addr) : '0;
    end else if (state == S_UDP) begin
      d_fire             = 1'b1;
      d_next.cls         = CLS_UDP;
      d_next.action      = mau_hit ? ACT_PROXY : ACT_WAKE;
      d_next.rule_hit    = mau_hit;
      d_next.multi_match = mau_multi;
      d_next.rule_addr   = mau_hit ? DESC_RULE_AW'(mau_addr) : '0;
    end else if (ev_eth) begin
      if (etype_now == ETHERTYPE_ARP) begin
        d_fire        = 1'b1;
        d_next.cls    = CLS_ARP;
        d_next.action = ACT_PROXY;
      end else if (etype_now != ETHERTYPE_IPV4) begin
        d_fire        = 1'b1;
        d_next.cls    = CLS_OTHER;
        d_next.action = ACT_WAKE;
      end
    end else if (ev_dst) begin
      d_next.cls = class_of(proto);
      if (dst_now != host_ip) begin
        d_fire        = 1'b1;
        d_next.action = ACT_DROP;
      end else if (proto == IPPROTO_ICMP) begin
        d_fire        = 1'b1;
        d_next.action = ACT_PROXY;
      end else if (proto != IPPROTO_TCP && proto != IPPROTO_UDP) begin
        d_fire        = 1'b1;
        d_next.action = ACT_WAKE;
      end
    end else if (ev_runt) begin
      d_fire        = 1'b1;
      d_next.cls    = CLS_OTHER;
      d_next.action = ACT_DROP;
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      desc_valid <= 1'b0;
      desc       <= '{cls: CLS_OTHER, action: ACT_DROP, rule_hit: 1'b0,
                      multi_match: 1'b0, rule_addr: '0};
      wake       <= 1'b0;
    end else begin
      desc_valid <= d_fire;
      wake       <= d_fire && (d_next.action == ACT_WAKE);
      if (d_fire) desc <= d_next;
    end
  end

  // A search result and a header decision of the next frame never coincide:
  // the next frame's Ethernet type arrives at least 14 bytes later.
  a_one_decision: assert property (@(posedge clk) disable iff (!rst_n)
    (state != S_IDLE) |-> !(ev_eth || ev_dst || ev_runt));

endmodule

// snic_top: packet inspection datapath of a power-proxying smart NIC.
//
// While the host PC sleeps, the NIC answers routine traffic for it. This top
// holds the two inspection engines that make that possible, plus the FIFOs
// around the MAC:
//   * Receive path: the MAC client stream (one byte per clock) is written into
//     the Rx FIFO. The header classifier taps the same stream, outside the
//     frame's path, and writes one packet descriptor per frame (class, action,
//     matching rule) into the packet descriptor FIFO; a frame that no rule
//     covers raises wake_irq for the proxy handler to wake the host.
//   * Transmit path: the proxy handler writes response frames into the Tx
//     FIFO, which the MAC drains.
//   * Content inspection: reassembled payloads of frames that need it are
//     streamed into the partitioned TCAM content inspection system, which
//     reports short-pattern matches and candidate signature address
//     permutations for final signature matching.
// The MAC core, PHY, proxy handler firmware, payload reassembly and the final
// signature matching stage are outside this RTL; their signals are ports here.
//
// FIFO words are {last, byte}. A byte offered to a full Rx FIFO is dropped and
// flagged on rx_drop; a descriptor offered to a full descriptor FIFO is
// dropped and sets the sticky desc_overflow. FIFO depths are this design's
// choices (2048 bytes holds a full-size Ethernet frame; 16 descriptors).
// The FIFOs' occupancy count outputs are left unconnected: the handshake
// uses only full/empty.
module snic_top
  import snic_pkg::*;
#(
  parameter int unsigned NUM_RULES   = 100,
  parameter int unsigned RX_DEPTH    = 2048,
  parameter int unsigned TX_DEPTH    = 2048,
  parameter int unsigned DESC_DEPTH  = 16,
  parameter int unsigned W           = 4,
  parameter int unsigned P_DEPTH     = 4096,
  parameter int unsigned S_DEPTH     = 2097152,
  parameter int unsigned C_DEPTH     = 40,
  parameter int unsigned MAX_SIG_LEN = 128,
  // derived
  parameter int unsigned KEY_W   = 8 * W,
  parameter int unsigned PAW     = $clog2(P_DEPTH),
  parameter int unsigned SAW     = $clog2(S_DEPTH),
  parameter int unsigned AW      = (PAW > SAW) ? PAW : SAW,
  parameter int unsigned MAX_SEG = MAX_SIG_LEN / W
) (
  input  logic             clk,
  input  logic             rst_n,
  // MAC client receive stream
  input  logic [7:0]       rx_data,
  input  logic             rx_valid,
  input  logic             rx_last,
  output logic             rx_drop,
  // Rx FIFO read side (NIC memory)
  input  logic             rxf_rd_en,
  output logic [8:0]       rxf_rd_data,
  output logic             rxf_empty,
  // Tx FIFO: write side (proxy handler), read side (MAC)
  input  logic             txf_wr_en,
  input  logic [8:0]       txf_wr_data,
  output logic             txf_full,
  input  logic             tx_ready,
  output logic [7:0]       tx_data,
  output logic             tx_valid,
  output logic             tx_last,
  // header rules and host address
  input  logic             rule_wr_en,
  input  logic [$clog2(NUM_RULES)-1:0] rule_wr_addr,
  input  rule_kind_e       rule_wr_kind,
  input  logic [31:0]      rule_wr_src_ip,
  input  logic [15:0]      rule_wr_sport,
  input  logic [15:0]      rule_wr_dport,
  input  logic             host_ip_wr,
  input  logic [31:0]      host_ip_wr_data,
  // packet descriptor FIFO read side and wake interrupt
  input  logic             desc_rd_en,
  output pkt_desc_t        desc_rd_data,
  output logic             desc_empty,
  output logic             desc_overflow,
  output logic             wake_irq,
  // reassembled payload stream into content inspection
  input  logic [7:0]       pl_data,
  input  logic             pl_valid,
  input  logic             pl_last,
  output logic             pl_ready,
  // signature loading
  input  logic             p_wr_en,
  input  logic [PAW-1:0]   p_wr_addr,
  input  logic [KEY_W-1:0] p_wr_value,
  input  logic [KEY_W-1:0] p_wr_mask,
  input  pat_flags_t       p_wr_flags,
  input  logic             p_wr_valid,
  input  logic             s_wr_en,
  input  logic [SAW-1:0]   s_wr_addr,
  input  logic [KEY_W-1:0] s_wr_value,
  input  logic [KEY_W-1:0] s_wr_mask,
  input  pat_flags_t       s_wr_flags,
  input  logic             s_wr_valid,
  // content inspection results (to final signature matching)
  output logic             short_match_valid,
  output logic [PAW-1:0]   short_match_addr,
  output logic             cand_valid,
  output logic [$clog2(MAX_SEG+1)-1:0] cand_len,
  output logic [AW-1:0]    cand_addr [MAX_SEG],
  output logic [1:0]       cand_desc [MAX_SEG],
  output ci_stats_t        ci_stats
);
  // ------------------------------------------------------ Rx FIFO
  logic rxf_full;

  assign rx_drop = rx_valid && rxf_full;

  sync_fifo #(.WIDTH(9), .DEPTH(RX_DEPTH)) u_rx_fifo (
    .clk, .rst_n,
    .wr_en(rx_valid && !rxf_full), .wr_data({rx_last, rx_data}), .full(rxf_full),
    .rd_en(rxf_rd_en && !rxf_empty), .rd_data(rxf_rd_data), .empty(rxf_empty),
    .count());

  // ------------------------------------------------------ Tx FIFO
  logic       txf_empty;
  logic [8:0] txf_q;

  sync_fifo #(.WIDTH(9), .DEPTH(TX_DEPTH)) u_tx_fifo (
    .clk, .rst_n,
    .wr_en(txf_wr_en && !txf_full), .wr_data(txf_wr_data), .full(txf_full),
    .rd_en(tx_ready && !txf_empty), .rd_data(txf_q), .empty(txf_empty),
    .count());

  assign tx_valid = !txf_empty;
  assign tx_data  = txf_q[7:0];
  assign tx_last  = txf_q[8];

  // ------------------------------------------------------ header classifier
  logic      hc_valid, desc_full;
  pkt_desc_t hc_desc;

  header_classifier #(.NUM_RULES(NUM_RULES)) u_hc (
    .clk, .rst_n, .rx_data, .rx_valid, .rx_last,
    .rule_wr_en, .rule_wr_addr, .rule_wr_kind,
    .rule_wr_src_ip, .rule_wr_sport, .rule_wr_dport,
    .host_ip_wr, .host_ip_wr_data,
    .desc_valid(hc_valid), .desc(hc_desc), .wake(wake_irq));

  sync_fifo #(.WIDTH($bits(pkt_desc_t)), .DEPTH(DESC_DEPTH)) u_desc_fifo (
    .clk, .rst_n,
    .wr_en(hc_valid && !desc_full), .wr_data(hc_desc), .full(desc_full),
    .rd_en(desc_rd_en && !desc_empty), .rd_data(desc_rd_data), .empty(desc_empty),
    .count());

  always_ff @(posedge clk) begin
    if (!rst_n)                     desc_overflow <= 1'b0;
    else if (hc_valid && desc_full) desc_overflow <= 1'b1;
  end

  // ------------------------------------------------------ content inspection
  content_inspection #(
    .W(W), .P_DEPTH(P_DEPTH), .S_DEPTH(S_DEPTH), .C_DEPTH(C_DEPTH),
    .MAX_SIG_LEN(MAX_SIG_LEN)
  ) u_ci (
    .clk, .rst_n,
    .in_data(pl_data), .in_valid(pl_valid), .in_last(pl_last), .in_ready(pl_ready),
    .p_wr_en, .p_wr_addr, .p_wr_value, .p_wr_mask, .p_wr_flags, .p_wr_valid,
    .s_wr_en, .s_wr_addr, .s_wr_value, .s_wr_mask, .s_wr_flags, .s_wr_valid,
    .short_match_valid, .short_match_addr,
    .cand_valid, .cand_len, .cand_addr, .cand_desc,
    .stats(ci_stats));

endmodule

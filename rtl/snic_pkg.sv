// snic_pkg: types and constants shared by the SNIC packet inspection blocks.
//
// Header side: the Ethernet/IP constants the header processing unit compares
// against, the packet class and action the header classifier reports, and the
// packet descriptor written into the packet descriptor FIFO.
// Content side: the two-bit retirement buffer descriptor codes ("11" P_TCAM
// address, "01" S_TCAM address, "00" no hit) and the two per-entry pattern
// bits (concluding / intermediate) kept with every TCAM entry.
// The descriptor layout and the enum encodings are this design's choice; the
// descriptor codes and the two pattern bits follow the partitioned TCAM scheme.
package snic_pkg;

  // ---------------------------------------------------------------- header
  localparam logic [15:0] ETHERTYPE_IPV4 = 16'h0800;
  localparam logic [15:0] ETHERTYPE_ARP  = 16'h0806;
  localparam logic [7:0]  IPPROTO_ICMP   = 8'd1;
  localparam logic [7:0]  IPPROTO_TCP    = 8'd6;
  localparam logic [7:0]  IPPROTO_UDP    = 8'd17;

  // Width of the rule address carried in a packet descriptor (up to 256 rules).
  localparam int unsigned DESC_RULE_AW = 8;

  typedef enum logic [2:0] {
    CLS_ARP   = 3'd0,
    CLS_ICMP  = 3'd1,
    CLS_TCP   = 3'd2,
    CLS_UDP   = 3'd3,
    CLS_OTHER = 3'd4    // not one of the four proxiable protocol classes
  } pkt_class_e;

  typedef enum logic [1:0] {
    ACT_PROXY = 2'd0,   // matched: handed to the power proxy handler
    ACT_WAKE  = 2'd1,   // no rule matched: wake the host
    ACT_DROP  = 2'd2    // not addressed to the host
  } pkt_action_e;

  // Rule protocol kinds held next to each CAM row.
  typedef enum logic [1:0] {
    RULE_NONE = 2'd0,
    RULE_TCP  = 2'd1,
    RULE_UDP  = 2'd2
  } rule_kind_e;

  typedef struct packed {
    pkt_class_e              cls;
    pkt_action_e             action;
    logic                    rule_hit;      // a TCP/UDP rule matched
    logic                    multi_match;   // more than one rule matched
    logic [DESC_RULE_AW-1:0] rule_addr;     // lowest matching rule
  } pkt_desc_t;

  // --------------------------------------------------------------- content
  localparam logic [1:0] RB_NULL   = 2'b00;
  localparam logic [1:0] RB_SUFFIX = 2'b01;
  localparam logic [1:0] RB_PREFIX = 2'b11;

  // Per-entry pattern bits: a partition may be concluding, intermediate or both.
  typedef struct packed {
    logic conc;    // last partition of some signature
    logic inter;   // a further partition follows
  } pat_flags_t;

  // Activity counters of the content inspection system: the inputs of the
  // energy model (accesses per store) and of the throughput loss (pauses).
  typedef struct packed {
    logic [31:0] p_access;     // P_TCAM searches (one per payload byte)
    logic [31:0] c_access;     // suffix cache searches
    logic [31:0] c_hit;        // suffix cache hits
    logic [31:0] s_access;     // S_TCAM searches (one per cache miss)
    logic [31:0] pause;        // stall cycles
    logic [31:0] alias_hit;    // windows with intermediate P and suffix hits
    logic [31:0] short_match;  // complete short-pattern matches
    logic [31:0] cand;         // candidate permutations dispatched
  } ci_stats_t;

endpackage

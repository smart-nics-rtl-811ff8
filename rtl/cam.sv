// cam: binary content addressable memory holding one header field per rule.
//
// The header classifier keeps the source address, source port and destination
// port of every power proxying rule in three such CAMs, one field each, all
// indexed by rule number. Rules only use equality, so a binary CAM (no
// don't-care bits) is enough. The search result is left unencoded: bit i of
// match_vec is set when entry i is valid and equal to the key, so several
// flows that map to one application can all be reported.
//
// Interface: wr_en writes wr_data and wr_valid into entry wr_addr (wr_valid=0
// deletes the rule). search_en with key starts a search.
// Timing: match_vec is registered and valid the cycle after search_en. When
// search_en is low the match register and the compare inputs do not change, so
// a CAM that the classifier does not need stays quiet. The CAM itself is this
// design's own plain array of registers with parallel comparators.
module cam #(
  parameter int unsigned WIDTH = 32,
  parameter int unsigned DEPTH = 100
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     wr_en,
  input  logic [$clog2(DEPTH)-1:0] wr_addr,
  input  logic [WIDTH-1:0]         wr_data,
  input  logic                     wr_valid,
  input  logic                     search_en,
  input  logic [WIDTH-1:0]         key,
  output logic [DEPTH-1:0]         match_vec
);
  logic [WIDTH-1:0] entry [DEPTH];
  logic [DEPTH-1:0] valid;
  logic [DEPTH-1:0] hit;

  always_ff @(posedge clk) begin
    if (wr_en) entry[wr_addr] <= wr_data;
  end

  always_ff @(posedge clk) begin
    if (!rst_n)     valid <= '0;
    else if (wr_en) valid[wr_addr] <= wr_valid;
  end

  always_comb begin
    for (int i = 0; i < DEPTH; i++) hit[i] = valid[i] && (entry[i] == key);
  end

  always_ff @(posedge clk) begin
    if (!rst_n)         match_vec <= '0;
    else if (search_en) match_vec <= hit;
  end

endmodule

// tcam: ternary CAM of w-byte signature partitions (used as P_TCAM and S_TCAM).
//
// Each entry holds a value, a care mask (1 = bit must match, 0 = don't care;
// short partitions are padded on the right with don't-care bytes), a valid bit
// and the two pattern bits of the partitioned scheme: concluding (the last
// partition of a signature) and intermediate (more partitions follow). A
// search compares the key with all entries at once and reports the lowest
// matching address, that entry's pattern bits, and whether the entry is exact
// (no don't-care bits), which decides if it may be copied into the suffix
// cache.
//
// Interface: wr_en writes one entry per cycle. search_en qualifies a search;
// with it low the result outputs are zero.
// Timing: the search is combinational within the cycle (the result is used in
// the same cycle by the enabler and contention resolution); writes take
// effect the next cycle. A real TCAM is a full-custom macro; this is a
// register array with parallel masked comparators and a priority encoder
// (lowest address wins), which is this design's choice.
module tcam
  import snic_pkg::*;
#(
  parameter int unsigned KEY_W = 32,
  parameter int unsigned DEPTH = 4096
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     wr_en,
  input  logic [$clog2(DEPTH)-1:0] wr_addr,
  input  logic [KEY_W-1:0]         wr_value,
  input  logic [KEY_W-1:0]         wr_mask,
  input  pat_flags_t               wr_flags,
  input  logic                     wr_valid,
  input  logic                     search_en,
  input  logic [KEY_W-1:0]         key,
  output logic                     hit,
  output logic [$clog2(DEPTH)-1:0] hit_addr,
  output pat_flags_t               hit_flags,
  output logic                     hit_exact
);
  localparam int unsigned AW = $clog2(DEPTH);

  logic [KEY_W-1:0] value [DEPTH];
  logic [KEY_W-1:0] mask  [DEPTH];
  pat_flags_t       flags [DEPTH];
  logic [DEPTH-1:0] valid;

  always_ff @(posedge clk) begin
    if (wr_en) begin
      value[wr_addr] <= wr_value;
      mask[wr_addr]  <= wr_mask;
      flags[wr_addr] <= wr_flags;
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      for (int i = 0; i < DEPTH; i++) valid[i] <= 1'b0;
    end else if (wr_en) begin
      valid[wr_addr] <= wr_valid;
    end
  end

  always_comb begin
    hit      = 1'b0;
    hit_addr = '0;
    if (search_en) begin
      for (int i = DEPTH - 1; i >= 0; i--) begin
        if (valid[i] && (((key ^ value[i]) & mask[i]) == '0)) begin
          hit      = 1'b1;
          hit_addr = AW'(i);
        end
      end
    end
  end

  assign hit_flags = hit ? flags[hit_addr] : '0;
  assign hit_exact = hit && (mask[hit_addr] == '1);

endmodule

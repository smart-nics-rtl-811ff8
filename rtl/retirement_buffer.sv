// retirement_buffer: shift register of per-window TCAM hit records.
//
// Each entry is a hit address and two descriptor bits ("11" P_TCAM address,
// "01" S_TCAM address, "00" NULL). On every window step the buffer shifts one
// place towards entry 0 (the left end, the sentry position) and the new entry
// from contention resolution enters at entry DEPTH-1. Entries that are W
// apart belong to consecutive w-byte partitions of one candidate signature.
// DEPTH is 1 + w*(L/w - 1), enough to hold a whole permutation of the longest
// signature L behind its sentry; the address is log2(max(P, S)) bits wide.
// Nothing moves during a pause, so the W spacing is kept in windows, not
// cycles (this design's reading). Reset fills the buffer with NULL entries.
module retirement_buffer #(
  parameter int unsigned DEPTH = 125,
  parameter int unsigned AW    = 21
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          step,
  input  logic [AW-1:0] push_addr,
  input  logic [1:0]    push_desc,
  output logic [AW-1:0] addr [DEPTH],
  output logic [1:0]    desc [DEPTH]
);
  always_ff @(posedge clk) begin
    if (!rst_n) begin
      for (int i = 0; i < DEPTH; i++) begin
        addr[i] <= '0;
        desc[i] <= 2'b00;
      end
    end else if (step) begin
      for (int i = 0; i < DEPTH - 1; i++) begin
        addr[i] <= addr[i+1];
        desc[i] <= desc[i+1];
      end
      addr[DEPTH-1] <= push_addr;
      desc[DEPTH-1] <= push_desc;
    end
  end

endmodule

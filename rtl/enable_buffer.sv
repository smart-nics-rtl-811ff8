// enable_buffer: activator and enable buffer of the partitioned TCAM system.
//
// Window addresses in a signature address permutation are w bytes apart, but
// the payload moves one byte per step, so a suffix search is only needed w
// steps after a prefix or intermediate hit. The activator looks at all
// signature stores: when the current window has an intermediate hit in the
// P_TCAM or in the suffix store (cache or S_TCAM) it writes '1' into bit 0 of
// the w-bit enable buffer, otherwise '0'. The buffer shifts by one position
// per window step (towards bit W-1), and the bit that leaves it (ebuf_out,
// bit W-1) tells the enabler to run a suffix search on the current window:
// that is exactly the window w bytes after the one that hit.
//
// Interface: step from the inspection window (nothing moves during a pause).
// Timing: a hit in window k sets ebuf_out during window k+W.
module enable_buffer #(
  parameter int unsigned W = 4
) (
  input  logic clk,
  input  logic rst_n,
  input  logic step,
  input  logic p_inter_hit,   // P_TCAM hit on an intermediate partition
  input  logic s_inter_hit,   // suffix hit (cache or S_TCAM) on an intermediate partition
  output logic ebuf_out
);
  logic [W-1:0] ebuf;
  logic         activate;

  initial assert (W >= 2) else $error("enable buffer needs W >= 2");

  assign activate = p_inter_hit || s_inter_hit;
  assign ebuf_out = ebuf[W-1];

  always_ff @(posedge clk) begin
    if (!rst_n)    ebuf <= '0;
    else if (step) ebuf <= {ebuf[W-2:0], activate};
  end

endmodule

// retirement_logic: extracts candidate signature address permutations.
//
// It watches the sentry (entry 0) of the retirement buffer. When the sentry
// holds a P_TCAM address (descriptor "11") as the buffer steps, it collects
// the entries at positions 0, W, 2W, ... up to the first NULL entry: these are
// the consecutive w-byte partitions that followed the prefix in the payload.
// A chain of at least two addresses is registered on the candidate outputs for
// the final signature matching stage, which compares it with the valid
// permutations. A lone prefix with no suffix cannot complete a long signature
// and is not dispatched (this design's choice).
//
// Interface: cand_valid pulses for one cycle with cand_len addresses in
// cand_addr[0..cand_len-1] and their descriptors in cand_desc.
// Timing: the candidate appears the cycle after the step on which its sentry
// leaves the buffer.
module retirement_logic #(
  parameter int unsigned W       = 4,
  parameter int unsigned DEPTH   = 125,
  parameter int unsigned AW      = 21,
  parameter int unsigned MAX_SEG = 32
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          step,
  input  logic [AW-1:0] addr [DEPTH],
  input  logic [1:0]    desc [DEPTH],
  output logic          cand_valid,
  output logic [$clog2(MAX_SEG+1)-1:0] cand_len,
  output logic [AW-1:0] cand_addr [MAX_SEG],
  output logic [1:0]    cand_desc [MAX_SEG]
);
  localparam int unsigned LW = $clog2(MAX_SEG + 1);

  logic [LW-1:0] len;
  logic          alive;

  always_comb begin
    len   = '0;
    alive = 1'b1;
    for (int k = 0; k < MAX_SEG; k++) begin
      if (k * W < DEPTH) begin
        if (alive && desc[k*W] != 2'b00) len = len + 1'b1;
        else                             alive = 1'b0;
      end
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      cand_valid <= 1'b0;
      cand_len   <= '0;
      for (int k = 0; k < MAX_SEG; k++) begin
        cand_addr[k] <= '0;
        cand_desc[k] <= 2'b00;
      end
    end else begin
      cand_valid <= step && (desc[0] == 2'b11) && (len >= LW'(2));
      if (step && desc[0] == 2'b11) begin
        cand_len <= len;
        for (int k = 0; k < MAX_SEG; k++) begin
          if (k * W < DEPTH && LW'(k) < len) begin
            cand_addr[k] <= addr[k*W];
            cand_desc[k] <= desc[k*W];
          end else begin
            cand_addr[k] <= '0;
            cand_desc[k] <= 2'b00;
          end
        end
      end
    end
  end

endmodule

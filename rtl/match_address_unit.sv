// match_address_unit: intersects the CAM match vectors of the header classifier.
//
// A TCP rule matches only when the source address, source port and destination
// port CAMs all hit at the same address; a UDP rule needs only the destination
// port CAM. The CAM results arrive as unencoded bit vectors, so the match is a
// bitwise AND of the vectors that take part (use_sa/use_sp/use_dp) and of the
// mask of rules of the packet's protocol. The unit reports whether any rule
// matched, whether more than one did (several TCP flows of one application),
// and the lowest matching rule address.
// Purely combinational. The priority towards the lowest address is this
// design's choice.
module match_address_unit #(
  parameter int unsigned DEPTH = 100
) (
  input  logic [DEPTH-1:0]         sa_vec,
  input  logic [DEPTH-1:0]         sp_vec,
  input  logic [DEPTH-1:0]         dp_vec,
  input  logic                     use_sa,
  input  logic                     use_sp,
  input  logic                     use_dp,
  input  logic [DEPTH-1:0]         rule_mask,
  output logic [DEPTH-1:0]         match_vec,
  output logic                     hit,
  output logic                     multi,
  output logic [$clog2(DEPTH)-1:0] addr
);
  always_comb begin
    match_vec = rule_mask;
    if (use_sa) match_vec &= sa_vec;
    if (use_sp) match_vec &= sp_vec;
    if (use_dp) match_vec &= dp_vec;
  end

  assign hit   = |match_vec;
  // More than one bit set: clearing the lowest set bit leaves something.
  assign multi = |(match_vec & (match_vec - 1'b1));

  always_comb begin
    addr = '0;
    for (int i = DEPTH - 1; i >= 0; i--) begin
      if (match_vec[i]) addr = ($clog2(DEPTH))'(i);
    end
  end

endmodule

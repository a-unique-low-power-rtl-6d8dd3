// cpa: carry propagate adder for the final two rows of the multiplier.
//
// A ripple-carry adder: a half adder in bit 0 and a full adder in every bit
// above it, each passing its carry to the next. s = (a + b) mod 2^W and co is
// the carry out of the top bit. The carry chain is the longest path of the
// multiplier; the ripple structure is this design's choice for the final
// adder, whose kind is left open beyond being a carry propagate adder.
//
// Ports: a, b addends (W bits); s sum; co carry out. Purely combinational.
module cpa #(
  parameter int unsigned W = 13
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  output logic [W-1:0] s,
  output logic         co
);

  // carry[i] is the carry out of bit i.
  logic [W-1:0] carry;

  half_adder u_ha0 (.a(a[0]), .b(b[0]), .s(s[0]), .co(carry[0]));

  for (genvar i = 1; i < W; i++) begin : g_bit
    full_adder u_fa (.a(a[i]), .b(b[i]), .ci(carry[i - 1]), .s(s[i]), .co(carry[i]));
  end

  assign co = carry[W-1];

endmodule

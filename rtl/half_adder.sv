// half_adder: two-input adder built from an XOR-XNOR cell and a multiplexer.
//
// a + b = s + 2*co. The XOR-XNOR cell gives s = a ^ b and its complement,
// which select a transmission-gate mux: when a and b agree the carry is a
// (1 only when both are 1), when they differ it is 0. Reusing the same two
// cells as the full adder and the 4-2 compressor is this design's choice.
//
// Ports: a, b inputs; s sum; co carry (weight 2). Purely combinational.
module half_adder (
  input  logic a,
  input  logic b,
  output logic s,
  output logic co
);

  logic s_n;

  xor_xnor u_xab (.a(a), .b(b), .x(s), .xn(s_n));
  tg_mux2  u_mc  (.d0(a), .d1(1'b0), .s(s), .s_n(s_n), .y(co));

endmodule

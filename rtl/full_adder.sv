// full_adder: 3-2 compressor built from an XOR-XNOR cell and multiplexers.
//
// a + b + ci = s + 2*co. The first XOR-XNOR cell forms p = a ^ b and ~p.
// The sum is p ^ ci, taken from a second XOR-XNOR cell. The carry comes from
// a transmission-gate mux selected by p: when a and b differ the carry equals
// ci, when they agree it equals a (both 0 or both 1). Building the full adder
// from the same two cells as the 4-2 compressor follows the design; the exact
// wiring is the common XOR/MUX full adder.
//
// Ports: a, b, ci inputs of equal weight; s sum; co carry (weight 2).
// Purely combinational.
module full_adder (
  input  logic a,
  input  logic b,
  input  logic ci,
  output logic s,
  output logic co
);

  logic p, p_n;
  logic s_n;

  xor_xnor u_xab (.a(a), .b(b), .x(p), .xn(p_n));
  xor_xnor u_xs  (.a(p), .b(ci), .x(s), .xn(s_n));
  tg_mux2  u_mc  (.d0(a), .d1(ci), .s(p), .s_n(p_n), .y(co));

endmodule

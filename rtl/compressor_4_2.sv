// compressor_4_2: 4-2 compressor made of XOR-XNOR cells and multiplexers.
//
// Adds four bits of one column and a carry-in from the column below:
//   x1 + x2 + x3 + x4 + cin = sum + 2*(carry + cout)
// cout depends only on x1..x4, never on cin, so a row of compressors chained
// cout -> cin has no rippling carry: each cin settles after one cell.
//
// Structure (two XOR levels and three muxes instead of two full adders):
//   p12 = x1 ^ x2, p34 = x3 ^ x4          XOR-XNOR cells, both rails
//   t   = p12 ^ p34                        mux on p12 picking p34 or ~p34,
//                                          both rails (the modified mux)
//   sum   = t ^ cin                        XOR-XNOR cell
//   cout  = p12 ? x3  : x1                 mux selected by p12
//   carry = t   ? cin : x4                 mux selected by t
// The XOR-XNOR plus transmission-gate mux make-up follows the design; the
// wiring above is the standard XOR/MUX decomposition of a 4-2 compressor.
//
// Ports: x1..x4, cin of weight 1; sum of weight 1; carry and cout of weight
// 2. Purely combinational.
module compressor_4_2 (
  input  logic x1,
  input  logic x2,
  input  logic x3,
  input  logic x4,
  input  logic cin,
  output logic sum,
  output logic carry,
  output logic cout
);

  logic p12, p12_n;
  logic p34, p34_n;
  logic t, t_n;
  logic sum_n;

  xor_xnor u_x12 (.a(x1), .b(x2), .x(p12), .xn(p12_n));
  xor_xnor u_x34 (.a(x3), .b(x4), .x(p34), .xn(p34_n));

  // Modified mux: both rails of p12 ^ p34 from the rails of p34.
  tg_mux2 u_mt   (.d0(p34),   .d1(p34_n), .s(p12), .s_n(p12_n), .y(t));
  tg_mux2 u_mtn  (.d0(p34_n), .d1(p34),   .s(p12), .s_n(p12_n), .y(t_n));

  xor_xnor u_xs  (.a(t), .b(cin), .x(sum), .xn(sum_n));

  tg_mux2 u_mco  (.d0(x1), .d1(x3),  .s(p12), .s_n(p12_n), .y(cout));
  tg_mux2 u_mca  (.d0(x4), .d1(cin), .s(t),   .s_n(t_n),   .y(carry));

endmodule

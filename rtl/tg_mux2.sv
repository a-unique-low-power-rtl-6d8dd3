// tg_mux2: 2:1 multiplexer modelled on a transmission-gate mux.
//
// The cell it models passes d0 through one transmission gate that conducts
// while s_n is high and d1 through a second one that conducts while s is
// high; the two gate outputs meet on y. The model keeps that structure: each
// data input reaches y only through its own select rail, so s and s_n must be
// complements (the XOR-XNOR cell delivers them that way). If both rails are
// high the model ORs the inputs, if both are low it outputs 0.
//
// Ports: d0, d1 data; s select, s_n complement of s; y = s ? d1 : d0.
// Purely combinational.
module tg_mux2 (
  input  logic d0,
  input  logic d1,
  input  logic s,
  input  logic s_n,
  output logic y
);

  always_comb y = (s & d1) | (s_n & d0);

endmodule

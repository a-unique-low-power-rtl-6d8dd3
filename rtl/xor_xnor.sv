// xor_xnor: dual-rail XOR/XNOR cell.
//
// Produces a XOR b and its complement together. The cell it models is an
// eight-transistor XOR-XNOR gate that works at low supply voltage and drives
// both outputs at once, so the multiplexers downstream get a select and its
// complement without an extra inverter. In RTL only its logic function is
// kept; transistor sizing, drive strength and power are outside what RTL can
// express.
//
// Ports: a, b inputs; x = a ^ b; xn = ~(a ^ b). Purely combinational.
module xor_xnor (
  input  logic a,
  input  logic b,
  output logic x,
  output logic xn
);

  always_comb begin
    x  = a ^ b;
    xn = ~(a ^ b);
  end

endmodule

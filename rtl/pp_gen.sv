// pp_gen: partial-product generator of an unsigned N x N multiplier.
//
// Row j is the multiplicand a ANDed bit by bit with multiplier bit b[j] and
// shifted left by j, so row j occupies product bits j .. j+N-1 and is zero
// elsewhere. The N rows summed give a * b. One AND gate per partial-product
// bit, N*N in all. Purely combinational.
//
// Ports: a multiplicand, b multiplier (N bits each); pp[j] row j, 2N bits.
module pp_gen #(
  parameter int unsigned N = 8
) (
  input  logic [N-1:0]            a,
  input  logic [N-1:0]            b,
  output logic [N-1:0][2*N-1:0]   pp
);

  always_comb begin
    for (int unsigned j = 0; j < N; j++) begin
      pp[j] = '0;
      pp[j][j +: N] = a & {N{b[j]}};
    end
  end

endmodule

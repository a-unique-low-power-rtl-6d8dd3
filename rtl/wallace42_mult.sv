// wallace42_mult: unsigned 8 x 8 Wallace tree multiplier built on 4-2
// compressors.
//
// Three stages after the AND-array partial-product generator:
//   stage 1  two reduction_stage blocks side by side, each compressing four
//            partial-product rows (rows 0..3 and rows 4..7) to two, so the
//            matrix height drops from 8 to 4;
//   stage 2  one reduction_stage compressing those four rows to two;
//   stage 3  a carry propagate adder adding the last two rows.
// With full and half adders alone the same array needs four reduction stages
// (8 -> 6 -> 4 -> 3 -> 2) before the adder; a 4-2 compressor removes two bits
// of height per level, so two levels suffice.
//
// The live bit ranges handed to each stage follow from the cells the stage
// places (see reduction_stage):
//   stage 1, rows 0..3 -> sum bits 0..10, carry bits 2..10
//   stage 1, rows 4..7 -> sum bits 4..14, carry bits 6..14
//   stage 2            -> sum bits 0..14, carry bits 3..15
// The product's three low bits are therefore final after stage 2 and the
// carry propagate adder spans bits 3..15 (13 bits). Cells used: 17 4-2
// compressors, 7 full and 7 half adders in the tree, 12 full and 1 half
// adder in the final adder. The split of rows into groups of four and these
// counts are this design's own schedule.
//
// Ports: a multiplicand, b multiplier (8 bits, unsigned); p = a * b (16
// bits). Purely combinational: p is valid one combinational delay after a
// and b change.
module wallace42_mult
  import mult42_pkg::*;
(
  input  logic [N-1:0]  a,
  input  logic [N-1:0]  b,
  output logic [PW-1:0] p
);

  localparam int unsigned CPA_LSB = 3;
  localparam int unsigned CPA_W   = PW - CPA_LSB;

  logic [N-1:0][PW-1:0] pp;

  pp_gen #(.N(N)) u_pp (.a(a), .b(b), .pp(pp));

  // Stage 1: 8 rows -> 4 rows.
  logic [PW-1:0] s1a, c1a, s1b, c1b;

  reduction_stage #(
    .W(PW), .LO('{0, 1, 2, 3}), .HI('{7, 8, 9, 10})
  ) u_s1a (
    .in_rows({pp[3], pp[2], pp[1], pp[0]}), .s_row(s1a), .c_row(c1a)
  );

  reduction_stage #(
    .W(PW), .LO('{4, 5, 6, 7}), .HI('{11, 12, 13, 14})
  ) u_s1b (
    .in_rows({pp[7], pp[6], pp[5], pp[4]}), .s_row(s1b), .c_row(c1b)
  );

  // Stage 2: 4 rows -> 2 rows.
  logic [PW-1:0] s2, c2;

  reduction_stage #(
    .W(PW), .LO('{0, 2, 4, 6}), .HI('{10, 10, 14, 14})
  ) u_s2 (
    .in_rows({c1b, s1b, c1a, s1a}), .s_row(s2), .c_row(c2)
  );

  // Stage 3: carry propagate adder over the columns that still hold two bits.
  logic [CPA_W-1:0] sum_hi;
  logic             cpa_co;  // always 0: 255 * 255 fits in 16 bits

  cpa #(.W(CPA_W)) u_cpa (
    .a(s2[PW-1:CPA_LSB]), .b(c2[PW-1:CPA_LSB]), .s(sum_hi), .co(cpa_co)
  );

  assign p = {sum_hi, s2[CPA_LSB-1:0]};

endmodule

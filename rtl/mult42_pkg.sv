// mult42_pkg: constants and types shared by the 4-2 compressor multiplier.
//
// The multiplier is an unsigned N x N Wallace-style column-compression
// multiplier whose reduction tree is made of 4-2 compressors, with full and
// half adders only where a column holds fewer than four bits. N = 8 is the
// operand width of the multiplier this RTL implements; the reduction tree in
// wallace42_mult is scheduled by hand for that width. cell_e names the cell a
// reduction column is given (see reduction_stage).
package mult42_pkg;

  // Operand width of the multiplier and width of its product.
  localparam int unsigned N  = 8;
  localparam int unsigned PW = 2 * N;

  // Cell placed in one column of a reduction stage.
  typedef enum logic [2:0] {
    CELL_NONE = 3'd0,  // no bit in the column: output 0
    CELL_PASS = 3'd1,  // one bit: bypassed to the next stage unchanged
    CELL_HA   = 3'd2,  // two bits: half adder
    CELL_FA   = 3'd3,  // three bits: full adder (3-2 compressor)
    CELL_C42  = 3'd4   // four bits plus carry-in: 4-2 compressor
  } cell_e;

endpackage

// reduction_stage: one column-compression stage, four rows in, two rows out.
//
// Takes four W-bit rows whose bits all carry the weight of their position and
// returns a sum row s_row and a carry row c_row with
//   s_row + c_row == in_rows[0] + in_rows[1] + in_rows[2] + in_rows[3]  (mod 2^W)
// Row k is only known to be nonzero between bit LO[k] and bit HI[k]; bits
// outside that range are ignored. The stage uses that knowledge to give each
// column the cheapest cell that keeps the output at two rows, as a Wallace
// tree built from compressors does:
//   four bits                 -> 4-2 compressor, cin from the column below
//   three bits and a cin      -> 4-2 compressor with one input tied low
//   three bits, or two + cin  -> full adder
//   two bits, or one + cin    -> half adder
//   one bit (or only a cin)   -> bypassed to the next stage as it is
// Sums go to s_row at the column's position, carries to c_row one position
// up, and each compressor's cout feeds the cin of the compressor one column
// up. Because cout does not depend on cin, that chain does not ripple.
// The cell choice is computed at elaboration from LO and HI; the caller must
// make W wide enough that the top column produces no carry (checked).
//
// Ports: in_rows[k] row k; s_row sum row; c_row carry row (bit 0 always 0).
// Purely combinational. Defaults: first stage of an 8 x 8 multiplier for
// partial-product rows 0..3.
module reduction_stage
  import mult42_pkg::*;
#(
  parameter int unsigned W      = 16,
  parameter int          LO [4] = '{0, 1, 2, 3},
  parameter int          HI [4] = '{7, 8, 9, 10}
) (
  input  logic [3:0][W-1:0] in_rows,
  output logic [W-1:0]      s_row,
  output logic [W-1:0]      c_row
);

  // Number of rows with a possibly nonzero bit in column i.
  function automatic int live_n(int i);
    int n = 0;
    for (int k = 0; k < 4; k++)
      if (LO[k] <= i && i <= HI[k]) n++;
    return n;
  endfunction

  // Position of row k among the live rows of column i.
  function automatic int live_pos(int k, int i);
    int pos = 0;
    for (int m = 0; m < k; m++)
      if (LO[m] <= i && i <= HI[m]) pos++;
    return pos;
  endfunction

  // Cell of column i; walks up from column 0 because a column receives a
  // cin exactly when the column below holds a 4-2 compressor.
  function automatic cell_e cell_at(int i);
    cell_e c   = CELL_NONE;
    bit    cin = 1'b0;
    for (int col = 0; col <= i; col++) begin
      int n = live_n(col);
      cin = (c == CELL_C42);
      if (n == 4 || (n == 3 && cin))      c = CELL_C42;
      else if (n + int'(cin) == 3)        c = CELL_FA;
      else if (n + int'(cin) == 2)        c = CELL_HA;
      else if (n + int'(cin) == 1)        c = CELL_PASS;
      else                                c = CELL_NONE;
    end
    return c;
  endfunction

  function automatic bit has_cin(int i);
    return i > 0 && cell_at(i - 1) == CELL_C42;
  endfunction

  // c_ext[i+1] is the carry out of column i; c_ext[W] must stay unused.
  logic [W:0]   c_ext;
  logic [W-1:0] cout_w;

  assign c_ext[0] = 1'b0;
  assign c_row    = c_ext[W-1:0];

  if (cell_at(W - 1) inside {CELL_HA, CELL_FA, CELL_C42}) begin : g_width_check
    $error("reduction_stage: W too small, top column produces a carry");
  end

  for (genvar i = 0; i < W; i++) begin : g_col
    localparam int    N_LIVE = live_n(i);
    localparam cell_e CELL   = cell_at(i);
    localparam bit    CIN    = has_cin(i);

    logic [3:0] lb;    // live bits of the column, packed from bit 0 up
    logic       cin;

    for (genvar k = 0; k < 4; k++) begin : g_pick
      if (LO[k] <= i && i <= HI[k]) begin : g_live
        assign lb[live_pos(k, i)] = in_rows[k][i];
      end
    end
    for (genvar p = N_LIVE; p < 4; p++) begin : g_zero
      assign lb[p] = 1'b0;
    end

    if (CIN) begin : g_cin
      assign cin = cout_w[i - 1];
    end else begin : g_nocin
      assign cin = 1'b0;
    end

    if (CELL == CELL_C42) begin : g_c42
      compressor_4_2 u_c42 (
        .x1(lb[0]), .x2(lb[1]), .x3(lb[2]), .x4(lb[3]), .cin(cin),
        .sum(s_row[i]), .carry(c_ext[i + 1]), .cout(cout_w[i])
      );
    end else begin : g_other
      assign cout_w[i] = 1'b0;
      if (CELL == CELL_FA) begin : g_fa
        // Three live bits, or two and the cin (the third live slot is 0).
        full_adder u_fa (
          .a(lb[0]), .b(lb[1]), .ci(CIN ? cin : lb[2]),
          .s(s_row[i]), .co(c_ext[i + 1])
        );
      end else if (CELL == CELL_HA) begin : g_ha
        half_adder u_ha (
          .a(lb[0]), .b(CIN ? cin : lb[1]),
          .s(s_row[i]), .co(c_ext[i + 1])
        );
      end else if (CELL == CELL_PASS) begin : g_pass
        assign s_row[i]     = CIN ? cin : lb[0];
        assign c_ext[i + 1] = 1'b0;
      end else begin : g_none
        assign s_row[i]     = 1'b0;
        assign c_ext[i + 1] = 1'b0;
      end
    end
  end

endmodule

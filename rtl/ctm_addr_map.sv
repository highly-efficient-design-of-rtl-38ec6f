// ctm_addr_map: interleaving address map of the corner turning memory.
//
// Maps sample d(x, y) of an N x N frame (x = input row, y = input column,
// N = 2**N_LOG2) onto one side of the memory: two groups, four banks each.
// The mapping follows the interior-group and inter-group interleaving tables
// of the design:
//   * every four input rows form a block n = x/4; the four columns y with
//     y[2] = 0 of that block form S_n (first group), those with y[2] = 1 form
//     S'_n (second group), so the writer switches group every four samples;
//   * S_n lives in bank n mod 4, so the reader, walking down a column, changes
//     bank every four samples;
//   * inside a bank, S_n occupies a region of N/8 rows by 16 columns: the
//     region index n/4 is split into a row block r (low bits) and a column
//     block c (high bits), giving 2**(N_LOG2-COL_BITS) row blocks and
//     2**(COL_BITS-4) column blocks (8 x 32 for the 4096 x 4096 frame);
//   * inside the region, SDRAM row m = y/8 holds columns 8m..8m+3 (or
//     8m+4..8m+7 in the second group); column q = y mod 4 of those takes the
//     four consecutive SDRAM columns 4q..4q+3, one per row x mod 4, so a
//     single BL=4 read returns d(4n..4n+3, y).
// Result: row = {r, m}, column = {c, q, x[1:0]}.  Purely combinational.
// Because every size involved is a power of two, the divisions and
// remainders of the mapping reduce to selecting and reordering bits of x and
// y, so the module synthesises to wiring; it is kept as a module of its own
// because both engines must use exactly the same mapping.
// N_LOG2 must exceed COL_BITS, and 2*N_LOG2-COL_BITS-3 row bits must fit in
// the 12 address pins; defaults are the document's 4096 x 4096 frame on
// 4096 x 512 banks.
module ctm_addr_map
  import ctm_pkg::*;
#(
  parameter int unsigned N_LOG2   = 12,
  parameter int unsigned COL_BITS = 9
) (
  input  logic [N_LOG2-1:0] x,
  input  logic [N_LOG2-1:0] y,
  output logic              grp,
  output logic [BA_W-1:0]   bank,
  output logic [ADDR_W-1:0] row,
  output logic [ADDR_W-1:0] col
);
  localparam int unsigned RB_W  = N_LOG2 - COL_BITS;   // row-block bits
  localparam int unsigned CB_W  = COL_BITS - 4;        // column-block bits
  localparam int unsigned M_W   = N_LOG2 - 3;          // row-in-region bits
  localparam int unsigned ROW_W = RB_W + M_W;

  logic [RB_W-1:0] rblk;
  logic [CB_W-1:0] cblk;
  logic [M_W-1:0]  m;

  always_comb begin
    grp  = y[2];
    bank = x[3:2];
    rblk = x[4+RB_W-1:4];
    cblk = x[N_LOG2-1:N_LOG2-CB_W];
    m    = y[N_LOG2-1:3];
    row  = ADDR_W'({rblk, m});
    col  = ADDR_W'({cblk, y[1:0], x[1:0]});
  end

  initial begin
    assert (N_LOG2 > COL_BITS && COL_BITS > 4 && ROW_W <= ADDR_W && COL_BITS < 10)
      else $fatal(1, "ctm_addr_map: unsupported N_LOG2/COL_BITS");
  end
endmodule

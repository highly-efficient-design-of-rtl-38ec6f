// ctm_tb_pkg: reference functions shared by the corner turning memory
// testbenches.  ref_map restates the interleaving with integer arithmetic
// (independently of the bit slicing in ctm_addr_map); sample() gives each
// matrix element of each frame a distinct 64-bit value.
package ctm_tb_pkg;

  typedef struct {
    int g;    // group inside the side
    int b;    // bank
    int row;
    int col;
  } loc_t;

  // n_dim x n_dim frame on banks with `cols` columns
  function automatic loc_t ref_map(int n_dim, int cols, int x, int y);
    loc_t l;
    int n, rb;
    n     = x / 4;
    rb    = n_dim / (16 * (cols / 16));
    l.g   = (y / 4) % 2;
    l.b   = n % 4;
    l.row = ((n / 4) % rb) * (n_dim / 8) + y / 8;
    l.col = (n / (4 * rb)) * 16 + (y % 4) * 4 + x % 4;
    return l;
  endfunction

  function automatic logic [63:0] sample(int frame, int x, int y);
    logic [31:0] re, im;
    re = 32'(frame * 32'h9E37_79B9) ^ {8'hA5, 12'(x), 12'(y)};
    im = {12'(y), 12'(x), 8'(frame)} ^ 32'h5A5A_0F0F;
    return {re, im};
  endfunction

endpackage

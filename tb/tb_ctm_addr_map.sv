// tb_ctm_addr_map: self-checking test of the interleaving address map.
//
// Two instances: the full 4096 x 4096 frame on 4096 x 512 banks, checked on
// random samples and on entries of the interleaving tables (S_0 .. S_1023,
// S'_n), and a 64 x 64 frame on 16 x 32 banks, checked exhaustively, including
// that no two samples share a memory word.  The reference is written with
// integer division and remainders rather than bit slices.
module tb_ctm_addr_map;
  import ctm_pkg::*;

  int checks = 0, failures = 0;

  // ---- full size -------------------------------------------------------
  logic [11:0] fx, fy;
  logic        fg;
  logic [1:0]  fb;
  logic [11:0] frow, fcol;
  ctm_addr_map #(.N_LOG2(12), .COL_BITS(9)) dut_full (
    .x(fx), .y(fy), .grp(fg), .bank(fb), .row(frow), .col(fcol));

  // ---- small -----------------------------------------------------------
  logic [5:0]  sx, sy;
  logic        sg;
  logic [1:0]  sb;
  logic [11:0] srow, scol;
  ctm_addr_map #(.N_LOG2(6), .COL_BITS(5)) dut_small (
    .x(sx), .y(sy), .grp(sg), .bank(sb), .row(srow), .col(scol));

  // reference: n = x/4 is the 4-row block, S_n or S'_n by (y/4) mod 2,
  // bank n mod 4, row block (n/4) mod RB, column block n/(4*RB),
  // row inside the region y/8, column 16*cblk + 4*(y mod 4) + x mod 4
  task automatic ref_map(input int n_dim, input int cols, input int x, input int y,
                         output int g, output int b, output int row, output int col);
    int n, rb;
    n   = x / 4;
    rb  = n_dim / (16 * (cols / 16));
    g   = (y / 4) % 2;
    b   = n % 4;
    row = ((n / 4) % rb) * (n_dim / 8) + y / 8;
    col = (n / (4 * rb)) * 16 + (y % 4) * 4 + x % 4;
  endtask

  task automatic check(string tag, int got, int exp);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 10) $display("FAIL %s: got %0d expected %0d", tag, got, exp);
    end
  endtask

  int g, b, row, col;
  bit used [int];

  initial begin
    // exhaustive small frame
    for (int x = 0; x < 64; x++) begin
      for (int y = 0; y < 64; y++) begin
        int key;
        sx = 6'(x); sy = 6'(y);
        #1;
        ref_map(64, 32, x, y, g, b, row, col);
        check("small grp", int'(sg), g);
        check("small bank", int'(sb), b);
        check("small row", int'(srow), row);
        check("small col", int'(scol), col);
        key = (int'(sg) << 16) | (int'(sb) << 14) | (int'(srow) << 5) | int'(scol);
        checks++;
        if (used.exists(key)) begin
          failures++;
          $display("FAIL two samples share one word at x=%0d y=%0d", x, y);
        end
        used[key] = 1;
      end
    end
    check("small words used", used.num(), 64 * 64);

    // random full-size samples
    for (int i = 0; i < 20000; i++) begin
      int x, y;
      x = int'($urandom_range(4095));
      y = int'($urandom_range(4095));
      fx = 12'(x); fy = 12'(y);
      #1;
      ref_map(4096, 512, x, y, g, b, row, col);
      check("full grp", int'(fg), g);
      check("full bank", int'(fb), b);
      check("full row", int'(frow), row);
      check("full col", int'(fcol), col);
    end

    // table entries: S_32 starts bank 0, second column block; S_4 second row
    // block; S'_0 holds d(0:3,4..7); d(0:3,8) is in the next row of S_0
    fx = 12'd128; fy = 12'd0; #1;
    check("S32 bank", int'(fb), 0); check("S32 row", int'(frow), 0); check("S32 col", int'(fcol), 16);
    fx = 12'd16;  fy = 12'd0; #1;
    check("S4 bank", int'(fb), 0); check("S4 row", int'(frow), 512); check("S4 col", int'(fcol), 0);
    fx = 12'd4;   fy = 12'd0; #1;
    check("S1 bank", int'(fb), 1);
    fx = 12'd2;   fy = 12'd5; #1;
    check("S'0 grp", int'(fg), 1); check("S'0 row", int'(frow), 0); check("S'0 col", int'(fcol), 6);
    fx = 12'd3;   fy = 12'd11; #1;
    check("d(3,11) row", int'(frow), 1); check("d(3,11) col", int'(fcol), 15);
    fx = 12'd4095; fy = 12'd4095; #1;
    check("last bank", int'(fb), 3); check("last row", int'(frow), 4095); check("last col", int'(fcol), 511);

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #10_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

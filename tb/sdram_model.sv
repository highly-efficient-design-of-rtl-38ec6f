// sdram_model: behavioural model of one 32-bit SDR SDRAM (MT48LC8M32B2 kind),
// for simulation only.
//
// While `cke` is low the pins are ignored (held in power-up).
// Four banks of 2**ROW_BITS rows by 2**COL_BITS columns of 32 bits (4096 x 512
// for the real part).  Commands are sampled on the rising clock edge from the
// {CS#,RAS#,CAS#,WE#} pins.  Supported: LOAD MODE REGISTER (must select BL=4,
// sequential, CL=2), AUTO REFRESH, ACTIVE, READ, WRITE and PRECHARGE (one bank,
// or all with A10 = 1).  A WRITE stores the word on the bus at the same edge;
// a burst goes on over the next NOP clocks and is cut short by any other
// command.  A READ fetches four words; each appears on `dq_out` one clock
// after it is fetched, i.e. the first word can be sampled CL = 2 edges after
// the READ edge.  A later READ or WRITE cuts a read burst short; a PRECHARGE
// does not (simplification).
//
// The model checks the bank state machine (ACTIVE only on an idle bank, READ
// and WRITE only to an open bank, REFRESH and LOAD MODE only with all banks
// idle) and the timing tRCD = 2, tRP = 2, tRAS = 5, tRC = 6 and tRRD = 2
// clocks (100 MHz clock), and counts violations in `errors`.  Write recovery
// and the refresh deadline are not enforced; instead `max_act_gap` reports the
// longest time, in clocks, between two ACTIVE commands to a row that holds
// written data, which is how long that row went without being refreshed.
module sdram_model
  import ctm_pkg::*;
#(
  parameter int unsigned ROW_BITS = 12,
  parameter int unsigned COL_BITS = 9,
  parameter string       NAME     = "sdram"
) (
  input  logic        clk,
  input  logic        cke,
  input  sdram_cmd_e  cmd,
  input  logic [1:0]  ba,
  input  logic [11:0] addr,
  input  logic [31:0] dq_in,
  output logic [31:0] dq_out,
  output logic        dq_drive,
  output int          errors,
  output longint      max_act_gap,
  output int          n_act,
  output int          n_read,
  output int          n_write,
  output int          n_ref
);
  localparam int unsigned AW    = 2 + ROW_BITS + COL_BITS;
  localparam int unsigned NROWS = 4 << ROW_BITS;

  logic [31:0]         mem [2**AW];
  longint              last_act_row [NROWS];
  bit                  row_has_data [NROWS];

  bit                  open_b  [4];
  logic [ROW_BITS-1:0] row_b   [4];
  longint              t_act_b [4];
  longint              t_pre_b [4];
  longint              t_act_any;
  longint              cyc;
  bit                  mode_ok;

  int                  wr_left, rd_left;
  logic [1:0]          bst_bank;
  logic [ROW_BITS-1:0] bst_row;
  logic [COL_BITS-1:0] bst_col;
  logic [31:0]         fetch;
  bit                  fetch_v;

  initial begin
    errors = 0; max_act_gap = 0; n_act = 0; n_read = 0; n_write = 0; n_ref = 0;
    cyc = 0; mode_ok = 0; wr_left = 0; rd_left = 0; t_act_any = -100;
    fetch_v = 0; fetch = '0; dq_out = '0; dq_drive = 0;
    bst_bank = '0; bst_row = '0; bst_col = '0;
    for (int b = 0; b < 4; b++) begin
      open_b[b] = 0; row_b[b] = '0; t_act_b[b] = -100; t_pre_b[b] = -100;
    end
    foreach (last_act_row[i]) begin
      last_act_row[i] = 0; row_has_data[i] = 0;
    end
  end

  function automatic int unsigned idx(logic [1:0] b, logic [ROW_BITS-1:0] r,
                                      logic [COL_BITS-1:0] c);
    return int'({b, r, c});
  endfunction

  task automatic fail(string what);
    errors++;
    if (errors <= 10) $display("%s: cycle %0d: %s", NAME, cyc, what);
  endtask

  // next column inside the aligned group of four
  function automatic logic [COL_BITS-1:0] nxt(logic [COL_BITS-1:0] c);
    return {c[COL_BITS-1:2], c[1:0] + 2'd1};
  endfunction

  always @(posedge clk) if (cke) begin
    logic [ROW_BITS-1:0] r;
    logic [COL_BITS-1:0] c;
    int unsigned         ri;
    cyc++;
    r = addr[ROW_BITS-1:0];
    c = addr[COL_BITS-1:0];

    // data output path: one register stage after the fetch
    dq_out   <= fetch;
    dq_drive <= fetch_v;
    fetch_v   = 0;

    if (cmd != CMD_NOP) begin
      wr_left = 0;
      if (cmd == CMD_READ || cmd == CMD_WRITE) rd_left = 0;
    end

    // burst continuation
    if (wr_left > 0) begin
      mem[idx(bst_bank, bst_row, bst_col)] = dq_in;
      bst_col = nxt(bst_col);
      wr_left--;
    end

    case (cmd)
      CMD_NOP: ;
      CMD_MRS: begin
        for (int b = 0; b < 4; b++) if (open_b[b]) fail("LOAD MODE with a bank open");
        mode_ok = (addr[2:0] == 3'b010) && !addr[3] && (addr[6:4] == 3'd2);
        if (!mode_ok) fail("mode register is not BL=4, sequential, CL=2");
      end
      CMD_REF: begin
        for (int b = 0; b < 4; b++) if (open_b[b]) fail("REFRESH with a bank open");
        n_ref++;
      end
      CMD_ACT: begin
        if (open_b[ba])                 fail("ACTIVE to an open bank");
        if (cyc - t_pre_b[ba] < 2)      fail("tRP violated");
        if (cyc - t_act_b[ba] < 6)      fail("tRC violated");
        if (cyc - t_act_any < 2)        fail("tRRD violated");
        open_b[ba]  = 1;
        row_b[ba]   = r;
        t_act_b[ba] = cyc;
        t_act_any   = cyc;
        ri = int'({ba, r});
        if (row_has_data[ri] && cyc - last_act_row[ri] > max_act_gap)
          max_act_gap = cyc - last_act_row[ri];
        last_act_row[ri] = cyc;
        n_act++;
      end
      CMD_WRITE, CMD_READ: begin
        if (!mode_ok)                  fail("access before LOAD MODE");
        if (!open_b[ba])               fail("access to a closed bank");
        if (cyc - t_act_b[ba] < 2)     fail("tRCD violated");
        if (addr[10])                  fail("auto precharge not expected");
        bst_bank = ba;
        bst_row  = row_b[ba];
        if (cmd == CMD_WRITE) begin
          mem[idx(ba, row_b[ba], c)] = dq_in;
          row_has_data[int'({ba, row_b[ba]})] = 1;
          bst_col = nxt(c);
          wr_left = BL - 1;
          n_write++;
        end else begin
          bst_col = c;
          rd_left = BL;
          n_read++;
        end
      end
      CMD_PRE: begin
        for (int b = 0; b < 4; b++) begin
          if (addr[10] || ba == 2'(b)) begin
            if (open_b[b] && cyc - t_act_b[b] < 5) fail("tRAS violated");
            if (open_b[b]) t_pre_b[b] = cyc;
            open_b[b] = 0;
          end
        end
      end
      default: fail("unknown command");
    endcase

    // read fetch for this edge
    if (rd_left > 0) begin
      fetch   = mem[idx(bst_bank, bst_row, bst_col)];
      fetch_v = 1;
      bst_col = nxt(bst_col);
      rd_left--;
    end
  end
endmodule

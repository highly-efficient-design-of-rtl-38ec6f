// ctm_write_engine: write operation of the corner turning memory.
//
// Accepts one frame of N x N samples in row-major order (d(0,0), d(0,1), ...)
// and writes it into one side of the memory, i.e. the two groups of that side.
// The input is cut into chunks of four samples (y mod 4 = 0..3).  For each
// chunk the engine opens the row given by ctm_addr_map in the chunk's group,
// writes the four samples with four single-word WRITE commands to the columns
// k, k+4, k+8, k+12 and closes the row again:
//
//   edge  E0     E1   E2     E3     E4     E5     E6   (E0 = first sample taken)
//   cmd   ACTIVE NOP  WRITE  WRITE  WRITE  WRITE  PRE
//
// (the cycle each command is on the pins; the SDRAM samples it one edge
// later).  Consecutive chunks go to alternate groups, so while one group
// spends its ACTIVE/PRECHARGE cycles the other one uses the shared data bus
// and the bus carries a sample every clock.  Every chunk activates and
// precharges a row, which is also what a refresh of that row does; the design
// issues no separate refresh.  The command sequence, the group alternation
// and the column steps follow the document's write timing diagram; the
// two-stage data delay that lets ACTIVE go out two clocks ahead of the first
// WRITE is this implementation's choice.
//
// Interface: `side_avail` (from the stream switch) says an empty side is
// assigned; the engine then raises `din_ready` until the frame's last sample
// is taken.  A chunk that has started must continue without gaps: din_valid
// has to stay high for its four samples (checked by an assertion).  Idle
// cycles between chunks are allowed.  `frame_done` is high for one clock once
// the last PRECHARGE has left the pins.  `pins[0]`/`pins[1]` are the command,
// bank and address of the side's first and second group, `dq_o`/`dq_oe` the
// side's data bus.  All outputs are registered.
module ctm_write_engine
  import ctm_pkg::*;
#(
  parameter int unsigned N_LOG2   = 12,
  parameter int unsigned COL_BITS = 9
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              side_avail,
  input  logic [DATA_W-1:0] din,
  input  logic              din_valid,
  output logic              din_ready,
  output grp_pins_t         pins [2],
  output logic [DATA_W-1:0] dq_o,
  output logic              dq_oe,
  output logic              frame_done
);
  typedef enum logic [1:0] {W_IDLE, W_RUN, W_DRAIN} wstate_e;

  typedef struct packed {
    logic              valid;
    logic              last;   // fourth sample of a chunk
    logic              grp;
    logic [BA_W-1:0]   bank;
    logic [ADDR_W-1:0] col;
    logic [DATA_W-1:0] data;
  } wword_t;

  // what the PRECHARGE stage still needs of a sample
  typedef struct packed {
    logic            valid;
    logic            last;
    logic            grp;
    logic [BA_W-1:0] bank;
  } wtail_t;

  wstate_e           state;
  logic [N_LOG2-1:0] x, y;
  wword_t            p1, p2;
  wtail_t            p3;
  logic              accept, last_of_frame, pins_idle;

  logic              m_grp;
  logic [BA_W-1:0]   m_bank;
  logic [ADDR_W-1:0] m_row, m_col;

  ctm_addr_map #(.N_LOG2(N_LOG2), .COL_BITS(COL_BITS)) u_map (
    .x(x), .y(y), .grp(m_grp), .bank(m_bank), .row(m_row), .col(m_col)
  );

  assign din_ready     = (state == W_RUN);
  assign accept        = din_ready && din_valid;
  assign last_of_frame = (&x) && (&y);
  assign pins_idle     = (pins[0].cmd == CMD_NOP) && (pins[1].cmd == CMD_NOP);
  assign frame_done    = (state == W_DRAIN) && !p1.valid && !p2.valid && !p3.valid && pins_idle;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state <= W_IDLE;
      x     <= '0;
      y     <= '0;
      p1    <= '0;
      p2    <= '0;
      p3    <= '0;
      pins  <= '{default: GRP_IDLE};
      dq_o  <= '0;
      dq_oe <= 1'b0;
    end else begin
      unique case (state)
        W_IDLE:  if (side_avail) state <= W_RUN;
        W_RUN:   if (accept && last_of_frame) state <= W_DRAIN;
        W_DRAIN: if (frame_done) state <= W_IDLE;
        default: state <= W_IDLE;
      endcase

      if (accept) begin
        y <= y + 1'b1;
        if (&y) x <= x + 1'b1;
      end

      // data pipeline: p1 = taken one edge ago, p2 two, p3 three
      p1 <= '{valid: accept, last: accept && (&y[1:0]), grp: m_grp, bank: m_bank,
              col: m_col, data: din};
      p2 <= p1;
      p3 <= '{valid: p2.valid, last: p2.last, grp: p2.grp, bank: p2.bank};

      // command scheduling; the three sources never hit the same group in the
      // same clock because chunks alternate groups and last at least 4 clocks
      pins  <= '{default: GRP_IDLE};
      dq_oe <= 1'b0;
      if (accept && y[1:0] == 2'd0)
        pins[m_grp] <= '{cmd: CMD_ACT, ba: m_bank, addr: m_row};
      if (p2.valid) begin
        pins[p2.grp] <= '{cmd: CMD_WRITE, ba: p2.bank, addr: p2.col};
        dq_o         <= p2.data;
        dq_oe        <= 1'b1;
      end
      if (p3.valid && p3.last)
        pins[p3.grp] <= '{cmd: CMD_PRE, ba: p3.bank, addr: '0};
    end
  end

  // a chunk, once started, must not be interrupted
  property p_chunk_contiguous;
    @(posedge clk) disable iff (!rst_n) (state == W_RUN && y[1:0] != 2'd0) |-> din_valid;
  endproperty
  a_chunk_contiguous: assert property (p_chunk_contiguous)
    else $error("ctm_write_engine: din_valid dropped inside a 4-sample chunk");

  a_no_collision: assert property (@(posedge clk) disable iff (!rst_n)
    !(p2.valid && p3.valid && p3.last && p2.grp == p3.grp))
    else $error("ctm_write_engine: WRITE and PRECHARGE collide on one group");
endmodule

// ctm_read_engine: read operation of the corner turning memory.
//
// Reads one frame back from one side of the memory in column-major order:
// d(0,0), d(1,0), ... d(N-1,0), d(0,1), ...  That is the transpose of the
// order the frame was written in.  The output is cut into chunks of four
// samples d(4n..4n+3, y); thanks to the interleaving (ctm_addr_map) each chunk
// is one BL=4 burst in bank n mod 4 of group y[2], so consecutive chunks
// rotate over the four banks and a column switches group every four columns.
// For each chunk the engine issues, on that chunk's group:
//
//   edge  E0     E1   E2    E3   E4   E5          (E0 = chunk start)
//   cmd   ACTIVE  -   READ   -    -   PRE
//
// and starts the next chunk at E4 in the next bank, so the ACTIVE, READ and
// PRECHARGE of neighbouring chunks interleave on one command bus and the
// bursts follow each other on the data bus without a gap.  With CAS latency 2
// the four words are captured at edges E5..E8 and leave on `dout` one clock
// later.  The command offsets (READ two clocks after ACTIVE, PRECHARGE three
// clocks after READ, next bank four clocks later) follow the document's read
// timing diagram.  No separate refresh is issued: every chunk activates and
// precharges a row.
//
// Interface: `side_avail` (from the stream switch) says a full side is
// assigned; the engine then starts a chunk every fourth clock for as long as
// `rd_enable` is high; a low `rd_enable` pauses it between chunks, and chunk
// starts stay on a grid of four clocks.  `dq_i` is
// the data bus of the side being read.  `frame_done` is high for one clock
// once the last word has been captured and the last PRECHARGE has left the
// pins.  `pins[0]`/`pins[1]` drive the side's first and second group.
module ctm_read_engine
  import ctm_pkg::*;
#(
  parameter int unsigned N_LOG2   = 12,
  parameter int unsigned COL_BITS = 9
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              side_avail,
  input  logic              rd_enable,
  output grp_pins_t         pins [2],
  input  logic [DATA_W-1:0] dq_i,
  output logic [DATA_W-1:0] dout,
  output logic              dout_valid,
  output logic              frame_done
);
  localparam int unsigned T_RD  = 2;               // ACTIVE -> READ
  localparam int unsigned T_PRE = 5;               // ACTIVE -> PRECHARGE
  localparam int unsigned T_CAP = T_RD + 1 + CL;   // ACTIVE -> first capture
  localparam int unsigned DEPTH = T_CAP + BL - 1;  // stages kept per chunk

  typedef enum logic [1:0] {R_IDLE, R_RUN, R_DRAIN} rstate_e;

  typedef struct packed {
    logic              valid;
    logic              grp;
    logic [BA_W-1:0]   bank;
    logic [ADDR_W-1:0] col;
  } rchunk_t;

  rstate_e             state;
  logic [N_LOG2-1:0]   y;
  logic [N_LOG2-3:0]   n;
  logic [1:0]          ph;    // chunks start only when ph == 0
  rchunk_t             st [1:DEPTH];  // st[k]: chunk started k edges ago
  logic                issue, last_chunk, capture, pipe_busy, pins_idle;

  logic              m_grp;
  logic [BA_W-1:0]   m_bank;
  logic [ADDR_W-1:0] m_row, m_col;

  ctm_addr_map #(.N_LOG2(N_LOG2), .COL_BITS(COL_BITS)) u_map (
    .x({n, 2'b00}), .y(y), .grp(m_grp), .bank(m_bank), .row(m_row), .col(m_col)
  );

  assign issue      = (state == R_RUN) && rd_enable && (ph == 2'd0);
  assign last_chunk = (&y) && (&n);
  assign pins_idle  = (pins[0].cmd == CMD_NOP) && (pins[1].cmd == CMD_NOP);

  always_comb begin
    capture   = 1'b0;
    pipe_busy = 1'b0;
    for (int k = 1; k <= DEPTH; k++) begin
      pipe_busy |= st[k].valid;
      if (k >= T_CAP) capture |= st[k].valid;
    end
  end

  assign frame_done = (state == R_DRAIN) && !pipe_busy && pins_idle && !dout_valid;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state      <= R_IDLE;
      y          <= '0;
      n          <= '0;
      ph         <= '0;
      st         <= '{default: '0};
      pins       <= '{default: GRP_IDLE};
      dout       <= '0;
      dout_valid <= 1'b0;
    end else begin
      unique case (state)
        R_IDLE:  if (side_avail) state <= R_RUN;
        R_RUN:   if (issue && last_chunk) state <= R_DRAIN;
        R_DRAIN: if (frame_done) state <= R_IDLE;
        default: state <= R_IDLE;
      endcase

      // chunk starts stay on a 4-clock grid even across pauses, so a new
      // ACTIVE never meets the PRECHARGE of an earlier chunk
      ph <= ph + 1'b1;
      if (issue) begin
        n <= n + 1'b1;
        if (&n) y <= y + 1'b1;
      end

      st[1] <= '{valid: issue, grp: m_grp, bank: m_bank, col: m_col};
      for (int k = 2; k <= DEPTH; k++) st[k] <= st[k-1];

      pins <= '{default: GRP_IDLE};
      if (issue)
        pins[m_grp] <= '{cmd: CMD_ACT, ba: m_bank, addr: m_row};
      if (st[T_RD].valid)
        pins[st[T_RD].grp] <= '{cmd: CMD_READ, ba: st[T_RD].bank, addr: st[T_RD].col};
      if (st[T_PRE].valid)
        pins[st[T_PRE].grp] <= '{cmd: CMD_PRE, ba: st[T_PRE].bank, addr: '0};

      dout_valid <= capture;
      if (capture) dout <= dq_i;
    end
  end

  a_no_collision: assert property (@(posedge clk) disable iff (!rst_n)
    !(issue && st[T_PRE].valid && st[T_PRE].grp == m_grp) &&
    !(st[T_RD].valid && st[T_PRE].valid && st[T_RD].grp == st[T_PRE].grp))
    else $error("ctm_read_engine: two commands for one group in one clock");
endmodule

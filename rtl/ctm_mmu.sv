// ctm_mmu: memory management unit of an SDRAM corner turning memory (CTM).
//
// The CTM transposes frames of N x N complex samples (64 bits: real [63:32],
// imaginary [31:0]; N = 4096 by default) for a real-time SAR processor: a
// frame enters row by row on `din` and leaves column by column on `dout`.  It
// is built from eight 32-bit SDRAMs of the MT48LC8M32B2 kind (4 banks of
// 4096 rows x 512 columns), paired into four 64-bit groups.  Group1/Group2
// form side 0 with data bus D_O, Group3/Group4 side 1 with data bus D_E; each
// group has its own address bus Addr1..Addr4 (index 0..3 here) and command
// pins.  One side holds one frame.  While one side is written with a new frame
// the other one returns the previous frame, and the sides swap every frame,
// so input and output both run at one sample per clock in one clock domain.
//
// Inside: ctm_sdram_init (power-up, BL=4, CL=2), ctm_write_engine (ACTIVE,
// four WRITEs, PRECHARGE per four samples, alternating groups),
// ctm_read_engine (ACTIVE, one BL=4 READ, PRECHARGE per four samples,
// rotating banks), both addressing through ctm_addr_map, and
// ctm_stream_switch (ping-pong side ownership and pin routing).  No refresh
// commands are issued after power-up: every access opens and closes a row.
// Caution: with column-order reading some rows go up to about one frame time
// (~172 ms at 100 MHz for 4096 x 4096) between activations, longer than the
// 64 ms retention of typical SDRAM.
//
// The memory organisation, the interleaving, the command sequences and the
// ping-pong use of the two sides follow the published design.  The
// valid/ready handshakes, the power-up sequence, the flag-based side
// switching and the split data buses are this implementation's choices.
//
// Timing: a sample taken on `din` is on the SDRAM data bus, with its WRITE,
// two clocks later.  The first word of a read chunk appears on `dout` five
// clocks after the chunk's ACTIVE is on the pins, the other three on the
// following clocks.  `din_ready` is high while an empty side is assigned to
// the writer; `din_valid` must stay high for all four samples of a chunk (four
// consecutive samples of a row starting at a column that is a multiple of 4).
// `rd_enable` lets the reader start chunks.  `side_full`, `wr_side` and
// `rd_side` show the ping-pong state (which side is full, which side the
// writer and the reader own).  SDRAM data buses are split into
// `dq_o`/`dq_oe` (to the pads) and `dq_i` (from the pads).
module ctm_mmu
  import ctm_pkg::*;
#(
  parameter int unsigned N_LOG2    = 12,
  parameter int unsigned COL_BITS  = 9,
  parameter int unsigned INIT_WAIT = 10000
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic [DATA_W-1:0] din,
  input  logic              din_valid,
  output logic              din_ready,
  input  logic              rd_enable,
  output logic [DATA_W-1:0] dout,
  output logic              dout_valid,
  output sdram_cmd_e        sdram_cmd  [N_GROUPS],
  output logic [BA_W-1:0]   sdram_ba   [N_GROUPS],
  output logic [ADDR_W-1:0] sdram_addr [N_GROUPS],
  output logic [DATA_W-1:0] dq_o  [2],
  output logic              dq_oe [2],
  input  logic [DATA_W-1:0] dq_i  [2],
  output logic              init_done,
  output logic              wr_frame_done,
  output logic              rd_frame_done,
  output logic [1:0]        side_full,
  output logic              wr_side,
  output logic              rd_side
);
  grp_pins_t         init_pins;
  grp_pins_t         wr_pins [2];
  grp_pins_t         rd_pins [2];
  grp_pins_t         grp_pins [N_GROUPS];
  logic [DATA_W-1:0] wr_dq, rd_dq;
  logic              wr_dq_oe, wr_avail, rd_avail;

  ctm_sdram_init #(.INIT_WAIT(INIT_WAIT)) u_init (
    .clk, .rst_n, .pins(init_pins), .done(init_done)
  );

  ctm_write_engine #(.N_LOG2(N_LOG2), .COL_BITS(COL_BITS)) u_wr (
    .clk, .rst_n, .side_avail(wr_avail), .din, .din_valid, .din_ready,
    .pins(wr_pins), .dq_o(wr_dq), .dq_oe(wr_dq_oe), .frame_done(wr_frame_done)
  );

  ctm_read_engine #(.N_LOG2(N_LOG2), .COL_BITS(COL_BITS)) u_rd (
    .clk, .rst_n, .side_avail(rd_avail), .rd_enable, .pins(rd_pins), .dq_i(rd_dq),
    .dout, .dout_valid, .frame_done(rd_frame_done)
  );

  ctm_stream_switch u_sw (
    .clk, .rst_n, .init_done, .init_pins,
    .wr_pins, .wr_dq, .wr_dq_oe, .wr_done(wr_frame_done), .wr_avail,
    .rd_pins, .rd_dq, .rd_done(rd_frame_done), .rd_avail,
    .grp_pins, .dq_o, .dq_oe, .dq_i,
    .side_full, .wr_side, .rd_side
  );

  always_comb begin
    for (int g = 0; g < N_GROUPS; g++) begin
      sdram_cmd[g]  = grp_pins[g].cmd;
      sdram_ba[g]   = grp_pins[g].ba;
      sdram_addr[g] = grp_pins[g].addr;
    end
  end
endmodule

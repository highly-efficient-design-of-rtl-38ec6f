// ctm_stream_switch: ping-pong data stream switch of the corner turning memory.
//
// The memory has two sides, each of two groups of SDRAMs with their own data
// bus: side 0 = Group1/Group2 on bus D_O, side 1 = Group3/Group4 on bus D_E.
// One side takes the incoming frame while the other returns the previous
// frame transposed, and the roles swap frame by frame.  The switch keeps one
// full/empty flag per side and a side pointer for the writer and for the
// reader.  The writer may work on its side while that side is empty; when the
// writer reports the frame done the side becomes full and the writer pointer
// moves to the other side.  The reader may work on its side while it is full;
// when the reader is done the side becomes empty and the reader pointer moves
// on.  So writer and reader never own the same side, and a frame is read only
// after it has been completely written.
//
// Before `init_done` the power-up command goes to all four groups.  Afterwards
// each side's pins and data bus are connected to the engine that owns it, and
// the reader sees the data bus of its side; a side nobody owns gets NOP, and
// write data is driven to zero on every side but the writer's.  The
// routing is combinational from registered selects and engine outputs.  The
// ping-pong use of the two sides follows the document; the flag handshake is
// this design's choice.
module ctm_stream_switch
  import ctm_pkg::*;
(
  input  logic              clk,
  input  logic              rst_n,
  // power-up sequence
  input  logic              init_done,
  input  grp_pins_t         init_pins,
  // writer
  input  grp_pins_t         wr_pins [2],
  input  logic [DATA_W-1:0] wr_dq,
  input  logic              wr_dq_oe,
  input  logic              wr_done,
  output logic              wr_avail,
  // reader
  input  grp_pins_t         rd_pins [2],
  output logic [DATA_W-1:0] rd_dq,
  input  logic              rd_done,
  output logic              rd_avail,
  // memory side
  output grp_pins_t         grp_pins [N_GROUPS],
  output logic [DATA_W-1:0] dq_o  [2],
  output logic              dq_oe [2],
  input  logic [DATA_W-1:0] dq_i  [2],
  // state, for observation
  output logic [1:0]        side_full,
  output logic              wr_side,
  output logic              rd_side
);
  always_ff @(posedge clk) begin
    if (!rst_n) begin
      side_full <= '0;
      wr_side   <= 1'b0;
      rd_side   <= 1'b0;
    end else begin
      if (wr_done) begin
        side_full[wr_side] <= 1'b1;
        wr_side            <= !wr_side;
      end
      if (rd_done) begin
        side_full[rd_side] <= 1'b0;
        rd_side            <= !rd_side;
      end
    end
  end

  assign wr_avail = init_done && !side_full[wr_side];
  assign rd_avail = init_done &&  side_full[rd_side];
  assign rd_dq    = dq_i[rd_side];

  always_comb begin
    for (int s = 0; s < 2; s++) begin
      dq_o[s]  = '0;
      dq_oe[s] = 1'b0;
      for (int g = 0; g < 2; g++) begin
        if (!init_done)
          grp_pins[2*s+g] = init_pins;
        else if (wr_side == 1'(s) && !side_full[s])
          grp_pins[2*s+g] = wr_pins[g];
        else if (rd_side == 1'(s) && side_full[s])
          grp_pins[2*s+g] = rd_pins[g];
        else
          grp_pins[2*s+g] = GRP_IDLE;
      end
      // only the writer's own side sees write data; the other bus stays quiet
      if (init_done && wr_side == 1'(s) && !side_full[s]) begin
        dq_o[s]  = wr_dq;
        dq_oe[s] = wr_dq_oe;
      end
    end
  end

  a_done_alone: assert property (@(posedge clk) disable iff (!rst_n)
    !(wr_done && rd_done && wr_side == rd_side))
    else $error("ctm_stream_switch: writer and reader finished on one side");
endmodule

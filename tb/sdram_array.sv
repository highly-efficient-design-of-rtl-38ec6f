// sdram_array: the eight SDRAMs of the corner turning memory, for simulation.
//
// Four groups of two 32-bit sdram_model chips.  In each group one chip holds
// bits [63:32] (real part) and the other bits [31:0] (imaginary part); both
// share the group's command, bank and address pins.  Groups 0/1 (Group1/
// Group2) share side bus 0, groups 2/3 (Group3/Group4) side bus 1.  The array
// returns the word driven on each side bus, counts bus conflicts (two groups,
// or a group and the controller, driving one bus in the same clock) into
// `errors` together with the chips' own protocol errors, and collects the
// chips' activity counters.
module sdram_array
  import ctm_pkg::*;
#(
  parameter int unsigned ROW_BITS = 12,
  parameter int unsigned COL_BITS = 9
) (
  input  logic              clk,
  input  logic              cke,
  input  sdram_cmd_e        sdram_cmd  [N_GROUPS],
  input  logic [BA_W-1:0]   sdram_ba   [N_GROUPS],
  input  logic [ADDR_W-1:0] sdram_addr [N_GROUPS],
  input  logic [DATA_W-1:0] dq_o  [2],
  input  logic              dq_oe [2],
  output logic [DATA_W-1:0] dq_i  [2],
  output int                errors,
  output longint            max_act_gap,
  output int                n_act,
  output int                n_read,
  output int                n_write,
  output int                n_ref
);
  logic [31:0] q     [8];
  logic        drive [8];
  int          e [8], na [8], nr [8], nw [8], nf [8];
  longint      gap [8];
  int          conflicts = 0;

  for (genvar c = 0; c < 8; c++) begin : g_chip
    localparam int G = c / 2;
    localparam int S = c / 4;
    sdram_model #(.ROW_BITS(ROW_BITS), .COL_BITS(COL_BITS), .NAME($sformatf("sdram%0d", c + 1))) u_chip (
      .clk, .cke, .cmd(sdram_cmd[G]), .ba(sdram_ba[G]), .addr(sdram_addr[G]),
      .dq_in((c % 2 == 0) ? dq_o[S][63:32] : dq_o[S][31:0]),
      .dq_out(q[c]), .dq_drive(drive[c]), .errors(e[c]), .max_act_gap(gap[c]),
      .n_act(na[c]), .n_read(nr[c]), .n_write(nw[c]), .n_ref(nf[c]));
  end

  always_comb begin
    for (int s = 0; s < 2; s++) begin
      if (drive[4*s])
        dq_i[s] = {q[4*s], q[4*s+1]};
      else if (drive[4*s+2])
        dq_i[s] = {q[4*s+2], q[4*s+3]};
      else
        dq_i[s] = '0;
    end
  end

  always @(posedge clk) begin
    for (int s = 0; s < 2; s++) begin
      if ((drive[4*s] && drive[4*s+2]) || ((drive[4*s] || drive[4*s+2]) && dq_oe[s])) begin
        conflicts++;
        if (conflicts < 5) $display("sdram_array: bus conflict on side %0d", s);
      end
    end
  end

  always_comb begin
    errors = conflicts; max_act_gap = 0; n_act = 0; n_read = 0; n_write = 0; n_ref = 0;
    for (int c = 0; c < 8; c++) begin
      errors += e[c];
      if (gap[c] > max_act_gap) max_act_gap = gap[c];
      n_act += na[c]; n_read += nr[c]; n_write += nw[c]; n_ref += nf[c];
    end
  end
endmodule

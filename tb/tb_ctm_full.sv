// tb_ctm_full: the corner turning memory at full size, every parameter at its
// default: 4096 x 4096 frames of 64-bit samples, eight 4-bank 4096 x 512 x 32
// SDRAM models, the 10000-clock power-up pause.
//
// Two frames stream in at one sample per clock and both come out transposed at
// one sample per clock; every output sample is compared with the expected
// element.  The second frame is written while the first is read, so this run
// covers one full ping-pong cycle.  The testbench checks the bus efficiency
// while both streams run (over 99 %) and reports the longest
// interval between two ACTIVE commands to a row holding data, in clocks
// (at 100 MHz, 64 ms is 6,400,000 clocks), and checks the SDRAM protocol.
module tb_ctm_full;
  import ctm_pkg::*;
  import ctm_tb_pkg::*;

  localparam int N = 4096, FRAMES = 2;

  logic clk = 0, rst_n = 0;
  logic [63:0] din = '0, dout;
  logic din_valid = 0, din_ready, rd_enable = 1, dout_valid;
  sdram_cmd_e sdram_cmd [N_GROUPS];
  logic [1:0] sdram_ba [N_GROUPS];
  logic [11:0] sdram_addr [N_GROUPS];
  logic [63:0] dq_o [2], dq_i [2];
  logic dq_oe [2];
  logic init_done, wr_frame_done, rd_frame_done, wr_side, rd_side;
  logic [1:0] side_full;

  ctm_mmu dut (.*);

  int mem_errors, n_act, n_read, n_write, n_ref;
  longint max_act_gap;
  sdram_array #(.ROW_BITS(12), .COL_BITS(9)) mem (
    .clk, .cke(rst_n), .sdram_cmd, .sdram_ba, .sdram_addr, .dq_o, .dq_oe, .dq_i,
    .errors(mem_errors), .max_act_gap, .n_act, .n_read, .n_write, .n_ref);

  always #5 clk = ~clk;

  longint checks = 0, failures = 0, cyc = 0;
  longint first_in = -1, last_out = -1, n_in = 0, n_out = 0;
  longint first_out = -1, last_in = -1, ov_in = 0, ov_out = 0;  // overlap window
  int out_frame = 0, ox = 0, oy = 0, ix = 0, iy = 0, in_frame = 0;

  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (din_valid && din_ready) begin
      if (first_in < 0) first_in = cyc;
      n_in++;
      last_in = cyc;
      if (first_out >= 0) ov_in++;
    end
    if (dout_valid) begin
      checks++;
      if (dout !== sample(out_frame, ox, oy)) begin
        failures++;
        if (failures < 10)
          $display("FAIL frame %0d d(%0d,%0d) = %h, expected %h", out_frame, ox, oy, dout,
                   sample(out_frame, ox, oy));
      end
      if (first_out < 0) first_out = cyc;
      n_out++;
      last_out = cyc;
      if (n_in < longint'(FRAMES) * N * N) ov_out++;
      ox++;
      if (ox == N) begin
        ox = 0; oy++;
        if (oy == N) begin oy = 0; out_frame++; end
      end
    end
  end

  // producer: one sample per clock whenever the memory takes it
  always @(posedge clk) begin
    if (rst_n && in_frame < FRAMES) begin
      if (din_valid && din_ready) begin
        iy++;
        if (iy == N) begin
          iy = 0; ix++;
          if (ix == N) begin ix = 0; in_frame++; end
        end
      end
      din_valid <= (in_frame < FRAMES);
      din       <= sample(in_frame, ix, iy);
    end else begin
      din_valid <= 0;
    end
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n <= 1;
    while (out_frame < FRAMES) @(posedge clk);
    repeat (20) @(posedge clk);
    $display("%0d samples in, %0d out, first in at clock %0d, last out at clock %0d",
             n_in, n_out, first_in, last_out);
    $display("while frame 1 goes in and frame 0 comes out (%0d clocks): %0d in, %0d out, bus efficiency %0.6f",
             last_in - first_out + 1, ov_in, ov_out,
             real'(ov_in + ov_out) / (2.0 * real'(last_in - first_out + 1)));
    checks++;
    if (real'(ov_in + ov_out) / (2.0 * real'(last_in - first_out + 1)) < 0.99) begin
      failures++; $display("FAIL efficiency below 99 %%");
    end
    $display("sdram: %0d ACTIVE, %0d READ, %0d WRITE, %0d REFRESH; longest gap between ACTIVEs of a used row %0d clocks",
             n_act, n_read, n_write, n_ref, max_act_gap);
    checks++;
    if (n_out != longint'(FRAMES) * N * N) failures++;
    checks++;
    if (mem_errors != 0) begin failures++; $display("FAIL %0d SDRAM protocol errors", mem_errors); end
    checks++;
    if (n_ref != 16) begin failures++; $display("FAIL refresh after power-up"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (60_000_000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_ctm_sar_workload: the corner turning memory inside the SAR processing
// chains it is meant for, at full size with every parameter at its default.
//
// The producer and the consumer are paced like a 4096-point FFT that needs
// 4206 clocks per line: in every 4206-clock period the producer offers one
// 4096-sample row and the consumer lets the reader run for 4096 clocks.  Three
// frames pass through the memory one after another, and frame k+1 starts
// entering only once frame k has started to come out (the next FFT stage
// consumes the transposed lines and produces the next frame's rows).  The
// first pass is the single corner turn of the Range-Doppler chain; the three
// passes together are the three corner turns of the Chirp Scaling chain.
// Every output sample is checked.  The first frame must take two periods of
// 4096 lines x 4206 clocks from its first sample in to its last sample out
// (one to write it, one to read it), and each later frame one more period
// (172.3 ms at 100 MHz), within a few lines.
module tb_ctm_sar_workload;
  import ctm_pkg::*;
  import ctm_tb_pkg::*;

  localparam int N = 4096, PERIOD = 4206, PASSES = 3;

  logic clk = 0, rst_n = 0;
  logic [63:0] din = '0, dout;
  logic din_valid = 0, din_ready, rd_enable = 0, dout_valid;
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
  int out_frame = 0, ox = 0, oy = 0, ix = 0, iy = 0, in_frame = 0;
  longint t_in_first [PASSES], t_out_last [PASSES];
  int in_ph = 0, out_ph = 0;
  bit in_go;

  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (dout_valid) begin
      checks++;
      if (dout !== sample(out_frame, ox, oy)) begin
        failures++;
        if (failures < 10) $display("FAIL pass %0d d(%0d,%0d)", out_frame, ox, oy);
      end
      ox++;
      if (ox == N) begin
        ox = 0; oy++;
        if (oy == N) begin
          oy = 0;
          t_out_last[out_frame] = cyc;
          out_frame++;
        end
      end
    end
  end

  // producer: a row starts at the beginning of an FFT period and runs until
  // its 4096 samples are taken; the next frame only starts once the previous
  // one has started to come out
  bit row_active = 0;
  always @(posedge clk) begin
    if (!rst_n) begin
      din_valid <= 0;
    end else begin
      if (din_valid && din_ready) begin
        if (ix == 0 && iy == 0) t_in_first[in_frame] = cyc;
        iy++;
        if (iy == N) begin
          iy = 0; ix++; row_active = 0;
          if (ix == N) begin ix = 0; in_frame++; end
        end
      end
      in_go = (in_frame < PASSES) &&
              ((in_frame == 0) || (out_frame >= in_frame) ||
               (out_frame == in_frame - 1 && (ox != 0 || oy != 0)));
      if (in_ph == 0 && in_go && !row_active) row_active = 1;
      in_ph = (in_ph == PERIOD - 1) ? 0 : in_ph + 1;
      din_valid <= row_active;
      din       <= sample(in_frame, ix, iy);
      // consumer: the reader may run for N clocks of every period
      out_ph    = (out_ph == PERIOD - 1) ? 0 : out_ph + 1;
      rd_enable <= (out_ph < N);
    end
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n <= 1;
    while (out_frame < PASSES) @(posedge clk);
    repeat (20) @(posedge clk);
    // stage 1: frame 0 from its first sample in to its last sample out,
    // i.e. one write period plus one read period; later stages: one period
    for (int p = 0; p < PASSES; p++) begin
      longint t, lo, hi;
      t  = (p == 0) ? t_out_last[0] - t_in_first[0] : t_out_last[p] - t_out_last[p-1];
      lo = longint'((p == 0) ? 2 * N - 4 : N - 2) * PERIOD;
      hi = longint'((p == 0) ? 2 * N + 4 : N + 2) * PERIOD;
      $display("stage %0d: %0d clocks = %0.2f ms at 100 MHz", p + 1, t, real'(t) / 1.0e5);
      checks++;
      if (t > hi || t < lo) begin
        failures++;
        $display("FAIL stage %0d is not the expected number of FFT periods", p + 1);
      end
    end
    $display("Range-Doppler, one corner turn (frame in, then transposed out): %0.2f ms",
             real'(t_out_last[0] - t_in_first[0]) / 1.0e5);
    $display("Chirp Scaling, three corner turns (three read periods from node 1): %0.2f ms",
             real'(t_out_last[PASSES-1] - t_in_first[1]) / 1.0e5);
    $display("longest gap between ACTIVEs of a used row: %0d clocks", max_act_gap);
    checks++;
    if (mem_errors != 0) begin failures++; $display("FAIL %0d SDRAM protocol errors", mem_errors); end
    checks++;
    if (n_ref != 16) begin failures++; $display("FAIL refresh after power-up"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (80_000_000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_ctm_mmu: end-to-end test of the corner turning memory.
//
// The MMU (64 x 64 frames, banks of 16 rows x 32 columns, short power-up
// pause) drives eight SDRAM models.  Six frames with distinct contents go in
// row by row and must come out column by column, each the exact transpose of
// its input.  Frames 0-2 arrive with random idle clocks between chunks and
// rows, and the reader is paused at random; frames 3-5 stream at one sample
// per clock in and out, and over that stretch the data buses must carry
// over 99 % of the possible samples.  The testbench counts each mechanism of
// the design and fails if one never happens: power-up, group alternation on
// writes, bank rotation on reads, side swaps, the writer stalled because no
// side is empty, the reader paused, a write and a read on the two sides in the
// same clock.  The SDRAM models check the command protocol and timing; after
// power-up there must be no refresh command.
module tb_ctm_mmu;
  import ctm_pkg::*;
  import ctm_tb_pkg::*;

  localparam int N_LOG2 = 6, COL_BITS = 5, N = 1 << N_LOG2;
  localparam int ROW_BITS = 2 * N_LOG2 - COL_BITS - 3;
  localparam int FRAMES = 6, SLOW = 3;

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

  ctm_mmu #(.N_LOG2(N_LOG2), .COL_BITS(COL_BITS), .INIT_WAIT(20)) dut (.*);

  int mem_errors, n_act, n_read, n_write, n_ref;
  longint max_act_gap;
  sdram_array #(.ROW_BITS(ROW_BITS), .COL_BITS(COL_BITS)) mem (
    .clk, .cke(rst_n), .sdram_cmd, .sdram_ba, .sdram_addr, .dq_o, .dq_oe, .dq_i,
    .errors(mem_errors), .max_act_gap, .n_act, .n_read, .n_write, .n_ref);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  longint cyc = 0;

  task automatic fail(string s);
    failures++;
    if (failures < 12) $display("FAIL @%0d: %s", cyc, s);
  endtask

  // mechanism counters
  int c_init = 0, c_grp_alt = 0, c_bank_rot = 0, c_wr_swap = 0, c_rd_swap = 0;
  int c_wr_stall = 0, c_rd_pause = 0, c_overlap = 0;
  int last_wr_grp = -1, last_rd_bank = -1;

  // output checking
  int out_frame = 0, out_k = 0, in_count = 0;
  longint fast_start = -1, fast_end = -1;
  int fast_in = 0, fast_out = 0;
  bit fast = 0;

  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (rst_n) begin
      if (init_done && c_init == 0) c_init = 1;
      for (int g = 0; g < 4; g++) begin
        if (sdram_cmd[g] == CMD_WRITE && sdram_addr[g][1:0] == 2'd0 && init_done) begin
          // first WRITE of a chunk: which group of the side
          if (last_wr_grp >= 0 && (g % 2) != last_wr_grp) c_grp_alt++;
          last_wr_grp = g % 2;
        end
        if (sdram_cmd[g] == CMD_READ) begin
          if (last_rd_bank >= 0 && int'(sdram_ba[g]) != last_rd_bank) c_bank_rot++;
          last_rd_bank = int'(sdram_ba[g]);
        end
      end
      if (wr_frame_done) c_wr_swap++;
      if (rd_frame_done) c_rd_swap++;
      if (din_valid && !din_ready && init_done) c_wr_stall++;
      if (!rd_enable && side_full[rd_side]) c_rd_pause++;
      if ((dq_oe[0] && mem.drive[4]) || (dq_oe[0] && mem.drive[6]) ||
          (dq_oe[1] && mem.drive[0]) || (dq_oe[1] && mem.drive[2])) c_overlap++;
      if (din_valid && din_ready) begin
        in_count++;
        if (fast) fast_in++;
      end
      if (dout_valid) begin
        int x, y;
        y = out_k / N;
        x = out_k % N;
        checks++;
        if (dout !== sample(out_frame, x, y))
          fail($sformatf("frame %0d out %0d: %h, expected d(%0d,%0d) = %h", out_frame, out_k,
                         dout, x, y, sample(out_frame, x, y)));
        if (fast) fast_out++;
        out_k++;
        if (out_k == N * N) begin out_k = 0; out_frame++; end
      end
    end
  end

  // producer
  initial begin
    repeat (3) @(posedge clk);
    rst_n <= 1;
    for (int f = 0; f < FRAMES; f++) begin
      for (int x = 0; x < N; x++) begin
        if (f < SLOW) begin
          din_valid <= 0;
          repeat ($urandom_range(6)) @(posedge clk);
        end
        for (int y = 0; y < N; y += 4) begin
          if (f < SLOW && $urandom_range(3) == 0) begin
            din_valid <= 0;
            repeat ($urandom_range(3) + 1) @(posedge clk);
          end
          for (int k = 0; k < 4; k++) begin
            din_valid <= 1;
            din <= sample(f, x, y + k);
            @(posedge clk);
            while (!din_ready) @(posedge clk);
          end
        end
      end
    end
    din_valid <= 0;
  end

  // consumer pacing and the measurement window
  initial begin
    while (out_frame < FRAMES) begin
      if (out_frame < SLOW - 1) rd_enable <= ($urandom_range(4) != 0);
      else rd_enable <= 1;
      if (out_frame == SLOW && !fast) begin
        fast = 1;
        fast_start = cyc;
      end
      if (out_frame == FRAMES - 1 && fast) begin
        fast = 0;
        fast_end = cyc;
      end
      @(posedge clk);
    end
    repeat (20) @(posedge clk);
    begin
      real eff;
      eff = real'(fast_in + fast_out) / (2.0 * real'(fast_end - fast_start));
      $display("streaming window: %0d clocks, %0d samples in, %0d out, bus efficiency %0.4f",
               fast_end - fast_start, fast_in, fast_out, eff);
      checks++;
      if (eff < 0.99) fail("streaming efficiency below 99 %");
    end
    $display("mechanisms: init %0d, group alternations %0d, bank rotations %0d, write swaps %0d, read swaps %0d, writer stalls %0d, reader pauses %0d, write/read overlap clocks %0d",
             c_init, c_grp_alt, c_bank_rot, c_wr_swap, c_rd_swap, c_wr_stall, c_rd_pause, c_overlap);
    $display("sdram: %0d ACTIVE, %0d READ, %0d WRITE, %0d REFRESH, longest gap between ACTIVEs of a used row %0d clocks",
             n_act, n_read, n_write, n_ref, max_act_gap);
    checks++; if (c_init == 0) fail("power-up never finished");
    checks++; if (c_grp_alt == 0) fail("writes never alternated groups");
    checks++; if (c_bank_rot == 0) fail("reads never rotated banks");
    checks++; if (c_wr_swap != FRAMES) fail($sformatf("%0d frames written", c_wr_swap));
    checks++; if (c_rd_swap != FRAMES) fail($sformatf("%0d frames read", c_rd_swap));
    checks++; if (c_wr_stall == 0) fail("writer never stalled");
    checks++; if (c_rd_pause == 0) fail("reader never paused");
    checks++; if (c_overlap == 0) fail("write and read never overlapped");
    checks++; if (mem_errors != 0) fail($sformatf("%0d SDRAM protocol errors", mem_errors));
    checks++; if (n_ref != 16) fail($sformatf("%0d refresh commands, expected the 2 x 8 of power-up", n_ref));
    checks++; if (n_write != FRAMES * N * N * 2) fail($sformatf("%0d writes", n_write));
    checks++; if (n_read != FRAMES * N * N / 2) fail($sformatf("%0d reads", n_read));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_ctm_read_engine: self-checking test of the read operation.
//
// The testbench plays the two SDRAM groups of one side: it keeps the open row
// of every bank, answers each READ with four words two edges later (CAS
// latency 2), and gives every memory word a value that encodes its group,
// bank, row and column.  A 64 x 64 frame (16 x 32 banks) is read twice, first
// with rd_enable always high, then with random pauses.  The words on dout must
// be, in order, the ones the reference map gives for d(0,0), d(1,0), ...,
// d(63,0), d(0,1), ...; every command must respect the bank state; READ must
// come two clocks after ACTIVE and PRECHARGE three after READ; consecutive
// chunks must change bank; and the unpaused frame must stream one word per
// clock without a gap.
module tb_ctm_read_engine;
  import ctm_pkg::*;
  import ctm_tb_pkg::*;

  localparam int N_LOG2 = 6, COL_BITS = 5, N = 1 << N_LOG2;

  logic clk = 0, rst_n = 0, side_avail = 0, rd_enable = 0;
  logic [63:0] dq_i = '0, dout;
  logic dout_valid, frame_done;
  grp_pins_t pins [2];

  ctm_read_engine #(.N_LOG2(N_LOG2), .COL_BITS(COL_BITS)) dut (
    .clk, .rst_n, .side_avail, .rd_enable, .pins, .dq_i, .dout, .dout_valid, .frame_done);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  longint cyc = 0;

  task automatic fail(string s);
    failures++;
    if (failures < 12) $display("FAIL @%0d: %s", cyc, s);
  endtask

  function automatic logic [63:0] word(int g, int b, int row, int col);
    return {16'hC7A3, 8'(g), 8'(b), 16'(row), 16'(col)};
  endfunction

  bit          open_b [2][4];
  int          row_b  [2][4];
  longint      t_act  [2][4];
  longint      t_rd   [2][4];
  logic [63:0] rsp [longint];
  int          k_out = 0, n_done = 0, last_bank = -1, bank_changes = 0, same_bank = 0;
  longint      first_v = -1, last_v = -1;

  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (rsp.exists(cyc + 1)) begin
      dq_i <= rsp[cyc + 1];
      rsp.delete(cyc + 1);
    end
    if (rst_n) begin
      for (int g = 0; g < 2; g++) begin
        int b;
        b = int'(pins[g].ba);
        case (pins[g].cmd)
          CMD_NOP: ;
          CMD_ACT: begin
            checks++;
            if (open_b[g][b]) fail("ACTIVE to an open bank");
            open_b[g][b] = 1; row_b[g][b] = int'(pins[g].addr); t_act[g][b] = cyc;
            if (last_bank >= 0) begin
              if (b != last_bank) bank_changes++; else same_bank++;
            end
            last_bank = b;
          end
          CMD_READ: begin
            checks++;
            if (!open_b[g][b]) fail("READ to a closed bank");
            if (cyc - t_act[g][b] != 2) fail("READ not two clocks after ACTIVE");
            t_rd[g][b] = cyc;
            for (int i = 0; i < 4; i++)
              rsp[cyc + 2 + i] = word(g, b, row_b[g][b], int'(pins[g].addr) + i);
          end
          CMD_PRE: begin
            checks++;
            if (!open_b[g][b]) fail("PRECHARGE to a closed bank");
            if (cyc - t_rd[g][b] != 3) fail("PRECHARGE not three clocks after READ");
            open_b[g][b] = 0;
          end
          default: fail("unexpected command");
        endcase
      end
      if (dout_valid) begin
        loc_t l;
        int x, y;
        y = (k_out / N) % N;
        x = k_out % N;
        l = ref_map(N, 1 << COL_BITS, x, y);
        checks++;
        if (dout !== word(l.g, l.b, l.row, l.col))
          fail($sformatf("output %0d = %h, expected d(%0d,%0d) = %h", k_out, dout, x, y,
                         word(l.g, l.b, l.row, l.col)));
        k_out++;
        if (first_v < 0) first_v = cyc;
        last_v = cyc;
      end
      if (frame_done) n_done++;
    end
  end

  initial begin
    for (int g = 0; g < 2; g++)
      for (int b = 0; b < 4; b++) begin
        open_b[g][b] = 0; t_act[g][b] = 0; t_rd[g][b] = 0; row_b[g][b] = 0;
      end
    repeat (3) @(posedge clk);
    rst_n <= 1;
    rd_enable <= 1;
    repeat (4) @(posedge clk);
    checks++;
    if (pins[0].cmd != CMD_NOP || pins[1].cmd != CMD_NOP) fail("commands without a side");
    // frame 0, unpaused
    side_avail <= 1;
    @(posedge clk);
    side_avail <= 0;
    while (n_done < 1) @(posedge clk);
    checks++;
    if (k_out != N * N) fail($sformatf("%0d words read", k_out));
    checks++;
    if (last_v - first_v + 1 != N * N) fail($sformatf("frame took %0d clocks", last_v - first_v + 1));
    checks++;
    if (same_bank != 0) fail("two consecutive chunks in one bank");
    // frame 1 with random pauses
    first_v = -1;
    side_avail <= 1;
    fork
      begin
        while (n_done < 2) begin
          rd_enable <= ($urandom_range(3) != 0);
          @(posedge clk);
        end
      end
      begin
        @(posedge clk);
        side_avail <= 0;
      end
    join
    repeat (5) @(posedge clk);
    checks++;
    if (k_out != 2 * N * N) fail($sformatf("%0d words read after two frames", k_out));
    checks++;
    if (n_done != 2) fail("frame_done count");
    checks++;
    if (bank_changes < N * N / 2 - 2) fail("bank rotation missing");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_ctm_write_engine: self-checking test of the write operation.
//
// A 64 x 64 frame (16 x 32 banks) is written twice: once with random idle
// clocks between 4-sample chunks, once as an unbroken stream.  For every
// accepted sample the expected commands are derived from the reference map:
// ACTIVE on the chunk's group one clock after the first sample is taken,
// WRITE with the sample on the data bus three clocks after each sample,
// PRECHARGE four clocks after the last sample of the chunk.  Every command on
// the pins must be one of these, at exactly that clock.  The unbroken frame
// must keep the data bus busy on every clock, and frame_done must follow the
// last PRECHARGE.
module tb_ctm_write_engine;
  import ctm_pkg::*;
  import ctm_tb_pkg::*;

  localparam int N_LOG2 = 6, COL_BITS = 5, N = 1 << N_LOG2;

  logic clk = 0, rst_n = 0, side_avail = 0, din_valid = 0;
  logic [63:0] din = '0;
  logic din_ready, dq_oe, frame_done;
  logic [63:0] dq_o;
  grp_pins_t pins [2];

  ctm_write_engine #(.N_LOG2(N_LOG2), .COL_BITS(COL_BITS)) dut (
    .clk, .rst_n, .side_avail, .din, .din_valid, .din_ready, .pins, .dq_o, .dq_oe,
    .frame_done);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  longint cyc = 0;

  typedef struct {
    sdram_cmd_e  cmd;
    int          ba;
    int          addr;
    logic [63:0] data;
  } exp_t;
  exp_t exp_q [longint];   // key: cycle*2 + group

  task automatic fail(string s);
    failures++;
    if (failures < 12) $display("FAIL @%0d: %s", cyc, s);
  endtask

  int frame = 0, ax = 0, ay = 0;
  longint last_accept = 0, first_accept = -1, done_cyc = -1;
  int n_done = 0, oe_cycles = 0, max_gap_oe = 0;

  // monitor: sample what the SDRAMs would sample at this edge
  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (rst_n) begin
      for (int g = 0; g < 2; g++) begin
        longint key;
        key = cyc * 2 + g;
        if (pins[g].cmd != CMD_NOP) begin
          checks++;
          if (!exp_q.exists(key)) fail($sformatf("unexpected %s on group %0d", pins[g].cmd.name(), g));
          else begin
            exp_t e;
            e = exp_q[key];
            if (e.cmd != pins[g].cmd || e.ba != int'(pins[g].ba) || e.addr != int'(pins[g].addr))
              fail($sformatf("group %0d got %s ba%0d a%0d, expected %s ba%0d a%0d", g,
                   pins[g].cmd.name(), pins[g].ba, pins[g].addr, e.cmd.name(), e.ba, e.addr));
            if (e.cmd == CMD_WRITE) begin
              checks++;
              if (!dq_oe || dq_o != e.data) fail("write data wrong");
            end
            exp_q.delete(key);
          end
        end else if (exp_q.exists(key)) begin
          checks++;
          fail($sformatf("missing %s on group %0d", exp_q[key].cmd.name(), g));
          exp_q.delete(key);
        end
      end
      if (dq_oe) oe_cycles++;
      if (frame_done) begin
        n_done++;
        done_cyc = cyc;
      end
      if (din_valid && din_ready) begin
        loc_t l;
        l = ref_map(N, 1 << COL_BITS, ax, ay);
        if (ay % 4 == 0)
          exp_q[(cyc + 1) * 2 + l.g] = '{CMD_ACT, l.b, l.row, '0};
        exp_q[(cyc + 3) * 2 + l.g] = '{CMD_WRITE, l.b, l.col, din};
        if (ay % 4 == 3)
          exp_q[(cyc + 4) * 2 + l.g] = '{CMD_PRE, l.b, 0, '0};
        if (first_accept < 0) first_accept = cyc;
        last_accept = cyc;
        ay++;
        if (ay == N) begin ay = 0; ax++; end
      end
    end
  end

  task automatic send_frame(int f, bit gaps);
    for (int x = 0; x < N; x++) begin
      for (int y = 0; y < N; y += 4) begin
        if (gaps) begin
          int idle;
          idle = int'($urandom_range(3));
          repeat (idle) begin
            din_valid <= 0;
            @(posedge clk);
          end
        end
        for (int k = 0; k < 4; k++) begin
          din_valid <= 1;
          din       <= sample(f, x, y + k);
          @(posedge clk);
          while (!din_ready) @(posedge clk);
        end
      end
    end
    din_valid <= 0;
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n <= 1;
    repeat (5) @(posedge clk);
    checks++;
    if (din_ready) fail("ready without a side");
    side_avail <= 1;
    @(posedge clk);
    @(posedge clk);
    checks++;
    if (!din_ready) fail("not ready with a side");
    // frame 0 with idle clocks between chunks
    send_frame(0, 1);
    side_avail <= 0;
    repeat (10) @(posedge clk);
    checks++;
    if (n_done != 1 || done_cyc != last_accept + 5) fail($sformatf("frame_done %0d at %0d, last sample %0d", n_done, done_cyc, last_accept));
    checks++;
    if (din_ready) fail("still ready after the frame");
    // frame 1 as one unbroken stream
    ax = 0; ay = 0; first_accept = -1; oe_cycles = 0;
    side_avail <= 1;
    @(posedge clk);
    @(posedge clk);
    send_frame(1, 0);
    side_avail <= 0;
    repeat (10) @(posedge clk);
    checks++;
    if (last_accept - first_accept + 1 != N * N)
      fail($sformatf("frame took %0d clocks for %0d samples", last_accept - first_accept + 1, N * N));
    checks++;
    if (oe_cycles != N * N) fail($sformatf("data bus busy %0d clocks", oe_cycles));
    checks++;
    if (n_done != 2) fail("second frame_done missing");
    checks++;
    if (exp_q.num() != 0) fail($sformatf("%0d expected commands never came", exp_q.num()));
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

// tb_ctm_stream_switch: self-checking test of the ping-pong stream switch.
//
// Drives the switch with recognisable pin patterns from the power-up
// sequencer, the writer and the reader, and with frame-done pulses in random
// order.  A reference model of the two side flags and pointers decides, every
// clock, which source each of the four groups and the two data buses must
// show, which side's data the reader must see and when the writer and the
// reader may start.  It also checks that nothing but the power-up command
// reaches the groups before init_done.
module tb_ctm_stream_switch;
  import ctm_pkg::*;

  logic clk = 0, rst_n = 0, init_done = 0;
  grp_pins_t init_pins, wr_pins [2], rd_pins [2], grp_pins [N_GROUPS];
  logic [63:0] wr_dq, rd_dq, dq_o [2], dq_i [2];
  logic wr_dq_oe, wr_done = 0, rd_done = 0, wr_avail, rd_avail;
  logic dq_oe [2];
  logic [1:0] side_full;
  logic wr_side, rd_side;

  ctm_stream_switch dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0, swaps = 0;
  bit m_full [2];
  bit m_wr, m_rd;

  task automatic fail(string s);
    failures++;
    if (failures < 12) $display("FAIL: %s", s);
  endtask

  function automatic bit same(grp_pins_t a, grp_pins_t b);
    return a == b;
  endfunction

  // compare outputs with the reference state (after inputs settle)
  task automatic compare();
    for (int s = 0; s < 2; s++) begin
      for (int g = 0; g < 2; g++) begin
        grp_pins_t e;
        if (!init_done) e = init_pins;
        else if (m_wr == 1'(s) && !m_full[s]) e = wr_pins[g];
        else if (m_rd == 1'(s) && m_full[s]) e = rd_pins[g];
        else e = GRP_IDLE;
        checks++;
        if (!same(grp_pins[2*s+g], e)) fail($sformatf("group %0d pins", 2*s+g));
      end
      checks++;
      if (dq_oe[s] !== (init_done && m_wr == 1'(s) && !m_full[s] && wr_dq_oe)) fail($sformatf("dq_oe %0d", s));
      checks++;
      if (dq_oe[s] && dq_o[s] !== wr_dq) fail("write data");
    end
    checks++;
    if (rd_dq !== dq_i[m_rd]) fail("read data side");
    checks++;
    if (wr_avail !== (init_done && !m_full[m_wr])) fail("wr_avail");
    checks++;
    if (rd_avail !== (init_done && m_full[m_rd])) fail("rd_avail");
    checks++;
    if (side_full !== {m_full[1], m_full[0]} || wr_side !== m_wr || rd_side !== m_rd) fail("state outputs");
  endtask

  initial begin
    m_full = '{0, 0}; m_wr = 0; m_rd = 0;
    init_pins = '{cmd: CMD_REF, ba: 2'd0, addr: 12'h400};
    wr_pins[0] = '{cmd: CMD_WRITE, ba: 2'd1, addr: 12'h011};
    wr_pins[1] = '{cmd: CMD_ACT,   ba: 2'd2, addr: 12'h022};
    rd_pins[0] = '{cmd: CMD_READ,  ba: 2'd3, addr: 12'h033};
    rd_pins[1] = '{cmd: CMD_PRE,   ba: 2'd0, addr: 12'h044};
    wr_dq = 64'h1111_2222_3333_4444; wr_dq_oe = 1;
    dq_i[0] = 64'hAAAA_0000_0000_0000; dq_i[1] = 64'hBBBB_0000_0000_0000;
    repeat (2) @(posedge clk);
    rst_n <= 1;
    @(negedge clk);
    compare();
    repeat (3) @(negedge clk);
    init_done = 1;
    #1 compare();
    for (int i = 0; i < 400; i++) begin
      @(negedge clk);
      // random engine outputs and done pulses; a done only when legal
      wr_dq_oe = 1'($urandom_range(1));
      wr_dq    = {$urandom, $urandom};
      dq_i[0]  = {$urandom, $urandom};
      dq_i[1]  = {$urandom, $urandom};
      wr_done  = !m_full[m_wr] && ($urandom_range(3) == 0);
      rd_done  = m_full[m_rd] && ($urandom_range(3) == 0);
      #1 compare();
      @(posedge clk);
      if (wr_done) begin m_full[m_wr] = 1; m_wr = !m_wr; swaps++; end
      if (rd_done) begin m_full[m_rd] = 0; m_rd = !m_rd; swaps++; end
      #1;
    end
    wr_done = 0; rd_done = 0;
    checks++;
    if (swaps < 50) fail("too few side swaps");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

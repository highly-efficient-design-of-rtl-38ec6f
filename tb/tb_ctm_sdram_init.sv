// tb_ctm_sdram_init: self-checking test of the SDRAM power-up sequence.
//
// With INIT_WAIT = 50 the commands must be, at these clocks after reset:
// PRECHARGE ALL (A10 = 1) after the 50-clock pause, AUTO REFRESH tRP = 2
// later, a second AUTO REFRESH tRFC = 7 later, LOAD MODE REGISTER 7 later with
// BL = 4, sequential, CL = 2 in the address, and done tMRD = 2 after that.
// Nothing else may appear, and done must stay high.
module tb_ctm_sdram_init;
  import ctm_pkg::*;

  logic clk = 0, rst_n = 0;
  grp_pins_t pins;
  logic done;

  ctm_sdram_init #(.INIT_WAIT(50)) dut (.clk, .rst_n, .pins, .done);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int cyc = 0, n_cmd = 0, t_done = -1;
  sdram_cmd_e got_cmd [4];
  int got_t [4];
  logic [11:0] got_a [4];

  always @(posedge clk) begin
    if (rst_n) begin
      cyc++;
      if (pins.cmd != CMD_NOP) begin
        if (n_cmd < 4) begin
          got_cmd[n_cmd] = pins.cmd; got_t[n_cmd] = cyc; got_a[n_cmd] = pins.addr;
        end
        n_cmd++;
      end
      if (done && t_done < 0) t_done = cyc;
      if (t_done >= 0) begin
        checks++;
        if (!done) begin failures++; $display("FAIL done fell"); end
      end
    end
  end

  task automatic expect_cmd(int i, sdram_cmd_e c, int t);
    checks++;
    if (got_cmd[i] != c || got_t[i] != t) begin
      failures++;
      $display("FAIL command %0d: %s at %0d, expected %s at %0d", i, got_cmd[i].name(), got_t[i], c.name(), t);
    end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n <= 1;
    repeat (120) @(posedge clk);
    checks++;
    if (n_cmd != 4) begin failures++; $display("FAIL %0d commands", n_cmd); end
    // first edge with rst_n high counts as 1; the pause ends at edge 51
    expect_cmd(0, CMD_PRE, 52);
    expect_cmd(1, CMD_REF, 54);
    expect_cmd(2, CMD_REF, 61);
    expect_cmd(3, CMD_MRS, 68);
    checks++;
    if (got_a[0][10] !== 1'b1) begin failures++; $display("FAIL precharge is not all-bank"); end
    checks++;
    if (got_a[3][2:0] !== 3'b010 || got_a[3][3] !== 1'b0 || got_a[3][6:4] !== 3'd2 || got_a[3][9] !== 1'b0) begin
      failures++; $display("FAIL mode word %h", got_a[3]);
    end
    checks++;
    if (t_done != 70) begin failures++; $display("FAIL done at %0d", t_done); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

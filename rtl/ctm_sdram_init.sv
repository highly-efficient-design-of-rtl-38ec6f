// ctm_sdram_init: power-up sequence for all SDRAMs of the corner turning memory.
//
// After reset it holds NOP for INIT_WAIT clocks (the chips' power-up pause),
// then issues PRECHARGE ALL, two AUTO REFRESH commands and LOAD MODE REGISTER
// with burst length 4, sequential bursts and CAS latency 2 (ctm_pkg::MODE_WORD),
// waiting the precharge, refresh-cycle and mode-register times in between.
// `done` rises after the last wait and stays high until the next reset.  The
// same command goes to every group, so `pins` is one set fanned out by the
// stream switch.  The burst length and CAS latency are the document's
// operating point; the sequence itself and the wait times (given in clocks,
// chosen for a 100 MHz clock and the usual PC100 figures) are this design's
// choice.  The command and address are registered.
module ctm_sdram_init
  import ctm_pkg::*;
#(
  parameter int unsigned INIT_WAIT = 10000,  // 100 us at 100 MHz
  parameter int unsigned T_RP      = 2,
  parameter int unsigned T_RFC     = 7,
  parameter int unsigned T_MRD     = 2
) (
  input  logic      clk,
  input  logic      rst_n,
  output grp_pins_t pins,
  output logic      done
);
  typedef enum logic [2:0] {I_WAIT, I_PALL, I_REF1, I_REF2, I_MRS, I_DONE} istate_e;

  istate_e     state;
  logic [31:0] cnt;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state <= I_WAIT;
      cnt   <= 32'(INIT_WAIT);
      pins  <= GRP_IDLE;
      done  <= 1'b0;
    end else begin
      pins <= GRP_IDLE;
      if (cnt != 0) begin
        cnt <= cnt - 1;
      end else begin
        unique case (state)
          I_WAIT: begin
            pins  <= '{cmd: CMD_PRE, ba: '0, addr: ADDR_W'(1) << 10};  // A10 = all banks
            cnt   <= 32'(T_RP - 1);
            state <= I_PALL;
          end
          I_PALL: begin
            pins  <= '{cmd: CMD_REF, ba: '0, addr: '0};
            cnt   <= 32'(T_RFC - 1);
            state <= I_REF1;
          end
          I_REF1: begin
            pins  <= '{cmd: CMD_REF, ba: '0, addr: '0};
            cnt   <= 32'(T_RFC - 1);
            state <= I_REF2;
          end
          I_REF2: begin
            pins  <= '{cmd: CMD_MRS, ba: '0, addr: MODE_WORD};
            cnt   <= 32'(T_MRD - 1);
            state <= I_MRS;
          end
          I_MRS: begin
            done  <= 1'b1;
            state <= I_DONE;
          end
          default: ;
        endcase
      end
    end
  end
endmodule

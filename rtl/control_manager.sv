// control_manager: runs the processor for a chosen number of clock cycles
// and resets it, on commands from the serial manager. A command is taken
// when cm_interrupt is high: cm_request[1:0] = 01 is RESET, 10 is RUN with
// cm_request[9:2] = number of cycles minus one (0x006 runs 2 cycles, since
// zero counts as one cycle), and 11 sets the pipelined processor's
// hazard-resolution mode to cm_request[2]. States: IDLE; RUN, held until the
// step count is used up (then IDLE) or a RESET arrives (then RESET); RESET,
// which asserts the system reset for one cycle and returns to IDLE.
// Outputs: `run` enables the processor (program counter, memories and
// register file) for exactly the requested number of cycles; `sys_reset`
// resets the processor. The states, transitions and command encodings of
// RESET and RUN are the document's; the hazard-mode code 11 and the single
// `run` enable (the original staggered separate enables for the program
// counter, the memories and the register file across an auxiliary clock) are
// this design's choices. Synchronous, active-high reset `rst`.
module control_manager
  import mips_pkg::*;
#(
  parameter int unsigned REQW = 10
) (
  input  logic            clk,
  input  logic            rst,
  input  logic            cm_interrupt,
  input  logic [REQW-1:0] cm_request,
  output logic            run,
  output logic            sys_reset,
  output logic            hazard_en,
  output logic            busy
);
  typedef enum logic [1:0] {IDLE, RUN, RESET} cm_state_e;
  cm_state_e         state;
  logic [REQW-3:0]   steps;

  assign run       = (state == RUN);
  assign sys_reset = (state == RESET);
  assign busy      = (state != IDLE);

  always_ff @(posedge clk) begin
    if (rst) begin
      state     <= IDLE;
      steps     <= '0;
      hazard_en <= 1'b0;
    end else begin
      unique case (state)
        IDLE: begin
          if (cm_interrupt && cm_request[1:0] == CM_RESET) begin
            state <= RESET;
          end else if (cm_interrupt && cm_request[1:0] == CM_RUN) begin
            state <= RUN;
            steps <= cm_request[REQW-1:2];
          end else if (cm_interrupt && cm_request[1:0] == CM_HAZARD) begin
            hazard_en <= cm_request[2];
          end
        end
        RUN: begin
          if (cm_interrupt && cm_request[1:0] == CM_RESET) state <= RESET;
          else if (steps == '0)                            state <= IDLE;
          else                                             steps <= steps - 1'b1;
        end
        default: state <= IDLE;    // RESET lasts one cycle
      endcase
    end
  end
endmodule

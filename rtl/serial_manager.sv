// serial_manager: decodes the byte commands arriving from the serial port
// (through the UART core) and carries them out: it reads and writes the
// wrapper's storage (memories, registers, program counter, event counters)
// and passes run/reset requests to the control manager.
// Protocol (one byte per rx_load strobe): a command byte, then its argument
// bytes, most significant first.
//   write commands (WR_IMEM, WR_DMEM, WR_REG, SET_CNT): 2 address bytes and
//     4 data bytes; the write is issued when the last byte arrives;
//   read commands (RD_IMEM, RD_DMEM, RD_REG, RD_CNT): 2 address bytes; the
//     32-bit answer is sent back as 4 bytes, most significant first;
//   SET_PC: 2 bytes, the next program-counter byte address; RD_PC: none,
//     answers {next PC[15:0], current PC[15:0]};
//   RUN (0x0B): 1 byte, cycles minus one; RESET: none; HAZARD: 1 byte, bit 0
//     enables the pipelined processor's hazard resolution;
//   RD_TYPES: none; answers all fourteen instruction-type counters in type
//     order, 4 bytes each (the document reads that counter group in one
//     iterative command; here the read repeats with the next counter address
//     after each answer).
// An unknown command byte is ignored. The machine is a two-level FSM: IDLE
// and command execution, with a counter stepping through the command's
// bytes, as in the document; its command codes other than RUN and its byte
// layouts are this design's own. Timing: rx_load is a one-cycle strobe per
// received byte; a byte is sent by a one-cycle tx_enout strobe with tx_data
// while tx_ready is high, after which the manager waits one cycle before
// looking at tx_ready again. Host requests and cm_interrupt last one cycle.
module serial_manager
  import mips_pkg::*;
(
  input  logic        clk,
  input  logic        rst,
  // UART side
  input  logic [7:0]  rx_data,
  input  logic        rx_load,
  input  logic        tx_ready,
  output logic [7:0]  tx_data,
  output logic        tx_enout,
  // control manager side
  output logic        cm_interrupt,
  output logic [9:0]  cm_request,
  // wrapper side
  output host_req_t   host_req,
  input  logic [31:0] host_rdata
);
  typedef enum logic [1:0] {S_IDLE, S_ARGS, S_EXEC, S_SEND} sm_state_e;
  typedef enum logic [1:0] {K_WRITE, K_READ, K_CM} kind_e;

  sm_state_e   state;
  cmd_e        cmd;
  logic [2:0]  counter, need;
  logic [47:0] buffer;
  logic [31:0] txbuf;
  logic [2:0]  left;
  logic [3:0]  words;   // further words of a RD_TYPES answer
  logic        tx_wait;

  function automatic logic known(input logic [7:0] b);
    return b inside {CMD_WR_IMEM, CMD_RD_IMEM, CMD_WR_DMEM, CMD_RD_DMEM,
                     CMD_WR_REG, CMD_RD_REG, CMD_SET_PC, CMD_RD_PC,
                     CMD_SET_CNT, CMD_RESET, CMD_RUN, CMD_RD_CNT, CMD_HAZARD,
                     CMD_RD_TYPES};
  endfunction
  function automatic logic [2:0] nargs(input cmd_e c);
    unique case (c)
      CMD_WR_IMEM, CMD_WR_DMEM, CMD_WR_REG, CMD_SET_CNT: return 3'd6;
      CMD_RD_IMEM, CMD_RD_DMEM, CMD_RD_REG, CMD_RD_CNT, CMD_SET_PC: return 3'd2;
      CMD_RUN, CMD_HAZARD: return 3'd1;
      default: return 3'd0;
    endcase
  endfunction
  function automatic kind_e kind(input cmd_e c);
    unique case (c)
      CMD_RD_IMEM, CMD_RD_DMEM, CMD_RD_REG, CMD_RD_CNT, CMD_RD_PC,
      CMD_RD_TYPES: return K_READ;
      CMD_RUN, CMD_RESET, CMD_HAZARD: return K_CM;
      default: return K_WRITE;
    endcase
  endfunction
  function automatic host_tgt_e target(input cmd_e c);
    unique case (c)
      CMD_WR_IMEM, CMD_RD_IMEM: return TGT_IMEM;
      CMD_WR_DMEM, CMD_RD_DMEM: return TGT_DMEM;
      CMD_WR_REG,  CMD_RD_REG:  return TGT_REG;
      CMD_SET_PC,  CMD_RD_PC:   return TGT_PC;
      default:                  return TGT_CNT;
    endcase
  endfunction

  kind_e knd;
  assign knd = kind(cmd);

  // ---------------- outputs ----------------
  always_comb begin
    host_req     = '0;
    host_req.tgt = target(cmd);
    cm_interrupt = 1'b0;
    cm_request   = '0;
    unique case (cmd)
      CMD_WR_IMEM, CMD_WR_DMEM, CMD_WR_REG, CMD_SET_CNT: begin
        host_req.addr  = buffer[47:32];
        host_req.wdata = buffer[31:0];
      end
      CMD_SET_PC: begin
        host_req.addr  = '0;
        host_req.wdata = {16'b0, buffer[15:0]};
      end
      default: host_req.addr = buffer[15:0];
    endcase
    if (state == S_EXEC) begin
      unique case (knd)
        K_WRITE: host_req.we = 1'b1;
        K_READ:  host_req.re = 1'b1;
        default: begin
          cm_interrupt = 1'b1;
          unique case (cmd)
            CMD_RESET: cm_request = {8'b0, CM_RESET};
            CMD_RUN:   cm_request = {buffer[7:0], CM_RUN};
            default:   cm_request = {7'b0, buffer[0], CM_HAZARD};
          endcase
        end
      endcase
    end
  end

  assign tx_data  = txbuf[31:24];
  assign tx_enout = (state == S_SEND) && tx_ready && !tx_wait;

  // ---------------- state machine ----------------
  always_ff @(posedge clk) begin
    if (rst) begin
      state   <= S_IDLE;
      cmd     <= CMD_RESET;
      counter <= '0;
      need    <= '0;
      buffer  <= '0;
      txbuf   <= '0;
      left    <= '0;
      words   <= '0;
      tx_wait <= 1'b0;
    end else begin
      unique case (state)
        S_IDLE: begin
          if (rx_load && known(rx_data)) begin
            cmd     <= cmd_e'(rx_data);
            counter <= '0;
            need    <= nargs(cmd_e'(rx_data));
            buffer  <= (rx_data == CMD_RD_TYPES) ? 48'(CNT_ITYPE) : '0;
            words   <= (rx_data == CMD_RD_TYPES) ? 4'(N_ITYPES - 1) : '0;
            state   <= (nargs(cmd_e'(rx_data)) == 3'd0) ? S_EXEC : S_ARGS;
          end
        end
        S_ARGS: begin
          if (rx_load) begin
            buffer  <= {buffer[39:0], rx_data};
            counter <= counter + 1'b1;
            if (counter == need - 1'b1) state <= S_EXEC;
          end
        end
        S_EXEC: begin
          if (knd == K_READ) begin
            txbuf   <= host_rdata;
            left    <= 3'd4;
            tx_wait <= 1'b0;
            state   <= S_SEND;
          end else begin
            state <= S_IDLE;
          end
        end
        default: begin   // S_SEND
          tx_wait <= 1'b0;
          if (tx_enout) begin
            txbuf   <= {txbuf[23:0], 8'h00};
            left    <= left - 1'b1;
            tx_wait <= 1'b1;
            if (left == 3'd1) begin
              if (words != '0) begin
                words         <= words - 1'b1;
                buffer[15:0]  <= buffer[15:0] + 1'b1;
                state         <= S_EXEC;
              end else begin
                state <= S_IDLE;
              end
            end
          end
        end
      endcase
    end
  end
endmodule

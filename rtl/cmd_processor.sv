// cmd_processor: the command processor (Cmd_Mach) of the gamma analog FPGA.
//
// A 16-bit ground command {id[15:8], data[7:0]} is taken in with a
// valid/ready handshake and latched as Cmd_Data. The Cmd_Mach state machine
// then checks it against the command table and either executes it or flags
// it as rejected:
//   IDLE -> DECODE -> EXEC   -> DONE -> IDLE    valid command, 4 cycles
//   IDLE -> DECODE -> REJECT -> DONE -> IDLE    invalid command, 4 cycles
//   IDLE -> DECODE -> EXEC -> TLM_WAIT (until the telemetry machine is free)
//        -> DONE -> IDLE                        2A command with data bit 7 set
// The command table (ids, data patterns, which data bits are used, the reject
// rule for unknown ids and for the reserved ids 2E/2F) follows the design
// document. Executing a command writes the command registers (cmd_regs_t) with
// load_mem high for that one cycle, counts it in the 8-bit command counter and
// sets cmd_accept. An invalid command sets the sticky cmd_reject flag, clears
// cmd_accept and is not counted; the reject flag is cleared only by command
// 000A (or reset), the counter only by command 00AA (or reset).
//
// This design's own choices, where the document gives only the function: the
// parallel command port and its handshake, the state sequence and encoding,
// that the counter counts accepted commands only, that id 00 and 01 commands
// with any other data pattern are invalid, and that command 0101 (APPS board
// reset) returns all command registers to their reset values and drives
// apps_reset for APPS_RST_CYCLES clock cycles, leaving the counter and the
// reject flag alone.
//
// Interface: cmd_word is accepted on a clock edge where cmd_valid and
// cmd_ready are both high; tlm_req is a one-cycle request to the telemetry
// machine, issued only while tlm_busy is low. All outputs are registered.
module cmd_processor
  import gamma_pkg::*;
#(
  parameter int unsigned APPS_RST_CYCLES = 16
) (
  input  logic        clk,
  input  logic        rst_n,
  // command input from the CEB
  input  logic        cmd_valid,
  input  logic [15:0] cmd_word,
  output logic        cmd_ready,
  // command registers and status
  output cmd_regs_t   regs,
  output logic [7:0]  cmd_count,
  output logic        cmd_accept,
  output logic        cmd_reject,
  output logic        load_mem,
  output logic        apps_reset,
  output cmd_state_e  cmd_state,
  output logic [15:0] cmd_data,
  // digital telemetry request
  output logic        tlm_req,
  input  logic        tlm_busy
);

  localparam int unsigned RW = $clog2(APPS_RST_CYCLES + 1);

  logic [RW-1:0] rst_cnt;
  logic          valid_cmd;
  logic [7:0]    id, data;

  assign id   = cmd_data[15:8];
  assign data = cmd_data[7:0];

  // The command table: which {id, data} words are valid commands.
  always_comb begin
    unique case (id) inside
      ID_SYS:             valid_cmd = (data == D_NOP) || (data == D_REJ_RST) ||
                                      (data == D_CNT_RST);
      ID_APPS_RST:        valid_cmd = (data == D_APPS_RST);
      [ID_DAC0:ID_DAC7],
      ID_DAC_CLR, ID_GAIN, ID_AMUX, ID_HK_TLM,
      ID_TP, ID_PHA, ID_HV: valid_cmd = 1'b1;
      default:            valid_cmd = 1'b0;   // includes spares 2E, 2F
    endcase
  end

  assign cmd_ready  = (cmd_state == CM_IDLE);
  assign apps_reset = (rst_cnt != '0);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cmd_state  <= CM_IDLE;
      cmd_data   <= '0;
      regs       <= CMD_REGS_RESET;
      cmd_count  <= '0;
      cmd_accept <= 1'b0;
      cmd_reject <= 1'b0;
      load_mem   <= 1'b0;
      tlm_req    <= 1'b0;
      rst_cnt    <= '0;
    end else begin
      load_mem <= 1'b0;
      tlm_req  <= 1'b0;
      if (rst_cnt != '0) rst_cnt <= rst_cnt - 1'b1;

      unique case (cmd_state)
        CM_IDLE: if (cmd_valid) begin
          cmd_data  <= cmd_word;
          cmd_state <= CM_DECODE;
        end

        CM_DECODE: cmd_state <= valid_cmd ? CM_EXEC : CM_REJECT;

        CM_EXEC: begin
          load_mem   <= 1'b1;
          cmd_accept <= 1'b1;
          cmd_count  <= cmd_count + 1'b1;
          cmd_state  <= CM_DONE;
          unique case (id) inside
            ID_SYS: begin
              if (data == D_REJ_RST) cmd_reject <= 1'b0;
              if (data == D_CNT_RST) cmd_count  <= '0;
            end
            ID_APPS_RST: begin
              regs    <= CMD_REGS_RESET;
              rst_cnt <= RW'(APPS_RST_CYCLES);
            end
            [ID_DAC0:ID_DAC7]: regs.dac[id[2:0]] <= data;
            ID_DAC_CLR: regs.dac  <= '0;
            ID_GAIN:    regs.gain <= data;
            ID_AMUX:    regs.amux <= data[4:0];
            ID_HK_TLM: begin
              regs.dmux <= data[3:0];
              if (data[7]) cmd_state <= CM_TLM_WAIT;
            end
            ID_TP:      regs.tp_enable <= data[0];
            ID_PHA:     regs.pha_stop  <= data[0];
            ID_HV: begin
              regs.hv_enable <= data[0];
              regs.hv_cmds   <= data[2:1];
            end
            default: ;
          endcase
        end

        CM_REJECT: begin
          cmd_reject <= 1'b1;
          cmd_accept <= 1'b0;
          cmd_state  <= CM_DONE;
        end

        CM_TLM_WAIT: if (!tlm_busy) begin
          tlm_req   <= 1'b1;
          cmd_state <= CM_DONE;
        end

        CM_DONE: cmd_state <= CM_IDLE;

        default: cmd_state <= CM_IDLE;
      endcase
    end
  end

  // The source must hold a command until it is taken.
  a_cmd_hold: assert property (@(posedge clk) disable iff (!rst_n)
    cmd_valid && !cmd_ready |=> cmd_valid && $stable(cmd_word));

  // A telemetry request is only issued to an idle telemetry machine.
  a_tlm_req: assert property (@(posedge clk) disable iff (!rst_n)
    tlm_req |-> $past(!tlm_busy));

endmodule

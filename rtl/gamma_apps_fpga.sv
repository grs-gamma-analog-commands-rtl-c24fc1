// gamma_apps_fpga: command and housekeeping FPGA of the GRS gamma analog
// (APPS) brassboard.
//
// The FPGA sits between the CEB, which sends 16-bit commands and receives
// digital housekeeping words, and the analog electronics: eight threshold and
// bias DACs, the shaping amplifier gain control, the 32-channel analog
// housekeeping multiplexer, the test pulser, the PHA logic and the high
// voltage bias supply (HVBS). It contains
//   cmd_processor  Cmd_Mach: command decode, command registers, counter,
//                  accept/reject flags, APPS reset;
//   test_pulser    TP_Mach: test pulse sequencer;
//   dig_hk_mux     16-channel digital HK word multiplexer;
//   hk_telem       Telem_Mach: one HK word to the CEB per telemetry command.
// The digital HK multiplexer position is the one set by the last 2A command.
// The DAC levels, gain, analog mux channel and HV and PHA controls leave the
// FPGA as registered levels; how they are serialised to the parts (if at all)
// is not described and is left to the board. The analog parts are outside.
//
// The command set and the housekeeping word layout follow the design
// document; the parallel command port, the serial telemetry format, the reset
// handling and the test pulser timing are this design's own choices (see the
// submodules). Reset is asynchronous, active low.
module gamma_apps_fpga
  import gamma_pkg::*;
#(
  parameter int unsigned APPS_RST_CYCLES = 16,
  parameter int unsigned TLM_DIV         = 8,
  parameter int unsigned TP_DIV          = 1024
) (
  input  logic            clk,
  input  logic            rst_n,
  // command port from the CEB
  input  logic            cmd_valid,
  input  logic [15:0]     cmd_word,
  output logic            cmd_ready,
  // serial digital HK telemetry to the CEB
  output logic            tlm_frame,
  output logic            tlm_sclk,
  output logic            tlm_sdata,
  // analog side
  output logic [7:0][7:0] dac_level,     // [i] = DAC i; DAC 7 is the HVBS DAC
  output logic [7:0]      amp_gain,      // shaping amplifier gain control
  output logic [4:0]      amux_chan,     // analog HK multiplexer address
  output logic            hv_enable,     // HVBS enable (DAC and oscillator on)
  output logic [2:1]      hv_cmds,
  output logic            tp_enable,
  output logic            test_pulse,
  output logic            pha_stop,      // 1 = PHA stop/abort mode
  input  logic            pha_latch,     // from the PHA logic
  input  logic [15:0]     bpha,          // PHA buffer word
  output logic            apps_reset,
  // status
  output logic [7:0]      cmd_count,
  output logic            cmd_accept,
  output logic            cmd_reject
);

  cmd_regs_t   regs;
  cmd_state_e  cmd_state;
  tlm_state_e  tlm_state;
  logic [15:0] cmd_data;
  logic [15:0] hk_word;
  logic [3:0]  tp_state;
  logic        load_mem, tlm_req, tlm_busy;

  cmd_processor #(.APPS_RST_CYCLES(APPS_RST_CYCLES)) u_cmd (
    .clk, .rst_n, .cmd_valid, .cmd_word, .cmd_ready,
    .regs, .cmd_count, .cmd_accept, .cmd_reject, .load_mem, .apps_reset,
    .cmd_state, .cmd_data, .tlm_req, .tlm_busy
  );

  test_pulser #(.TP_DIV(TP_DIV)) u_tp (
    .clk, .rst_n, .apps_reset, .enable(regs.tp_enable),
    .tp_state, .test_pulse
  );

  dig_hk_mux u_dmux (
    .sel(regs.dmux), .regs, .cmd_state, .cmd_data, .cmd_count, .cmd_accept,
    .cmd_reject, .load_mem, .apps_reset, .board_reset(!rst_n), .tlm_state,
    .tp_state, .pha_latch, .bpha, .word(hk_word)
  );

  hk_telem #(.TLM_DIV(TLM_DIV)) u_tlm (
    .clk, .rst_n, .apps_reset, .req(tlm_req), .hk_word, .busy(tlm_busy),
    .state(tlm_state), .tlm_frame, .tlm_sclk, .tlm_sdata
  );

  assign dac_level = regs.dac;
  assign amp_gain  = regs.gain;
  assign amux_chan = regs.amux;
  assign hv_enable = regs.hv_enable;
  assign hv_cmds   = regs.hv_cmds;
  assign tp_enable = regs.tp_enable;
  assign pha_stop  = regs.pha_stop;

endmodule

// gamma_pkg: command identifiers, state encodings and shared constants of the
// GRS gamma analog (APPS) command and housekeeping FPGA.
//
// A ground command is a 16-bit word: the command id in bits [15:8] and its
// data in bits [7:0]. The id values and the special data patterns of the
// reset and NOP commands follow the command table of the design. The state
// encodings of the three state machines (Cmd_Mach, Telem_Mach, TP_Mach) are
// this design's own choice; only their widths (4, 3 and 4 bits) are fixed,
// because they are reported in the digital housekeeping words.
package gamma_pkg;

  // Command ids, bits [15:8] of a command word.
  localparam logic [7:0] ID_SYS       = 8'h00; // NOP, reject-flag reset, counter reset
  localparam logic [7:0] ID_APPS_RST  = 8'h01; // APPS board reset (data must be 01)
  localparam logic [7:0] ID_DAC0      = 8'h10; // DAC 0..7 level: 10..17
  localparam logic [7:0] ID_DAC7      = 8'h17;
  localparam logic [7:0] ID_DAC_CLR   = 8'h18; // clear all DACs, data ignored
  localparam logic [7:0] ID_GAIN      = 8'h20; // shaping amplifier gain
  localparam logic [7:0] ID_AMUX      = 8'h28; // analog HK mux channel, data[4:0]
  localparam logic [7:0] ID_HK_TLM    = 8'h2A; // digital mux position, telemetry request
  localparam logic [7:0] ID_TP        = 8'h2B; // test pulser enable, data[0]
  localparam logic [7:0] ID_PHA       = 8'h2C; // PHA stop/abort mode, data[0]
  localparam logic [7:0] ID_HV        = 8'h2D; // HV enable data[0], HV bits data[2:1]

  // Data patterns of the id-00 and id-01 commands.
  localparam logic [7:0] D_NOP        = 8'h00;
  localparam logic [7:0] D_REJ_RST    = 8'h0A;
  localparam logic [7:0] D_CNT_RST    = 8'hAA;
  localparam logic [7:0] D_APPS_RST   = 8'h01;

  localparam int unsigned NUM_DACS    = 8;

  // Two-bit tag in bits [15:14] of every digital HK telemetry word.
  localparam logic [1:0] DIG_HK_ID    = 2'b11;

  // Cmd_Mach: command processor state (4 bits, reported in HK words 0, B-F).
  typedef enum logic [3:0] {
    CM_IDLE     = 4'h0,  // waiting for a command
    CM_DECODE   = 4'h1,  // command word latched, being checked
    CM_EXEC     = 4'h2,  // valid command: registers written (Load_mem)
    CM_REJECT   = 4'h3,  // invalid command: reject flag set
    CM_TLM_WAIT = 4'h4,  // telemetry requested, waiting for Telem_Mach
    CM_DONE     = 4'h5   // last cycle of a command
  } cmd_state_e;

  // Telem_Mach: digital HK word transfer to the CEB (3 bits, HK words A, B).
  typedef enum logic [2:0] {
    TM_IDLE  = 3'd0,
    TM_LOAD  = 3'd1,     // word captured from the digital HK multiplexer
    TM_SHIFT = 3'd2,     // 16 bits going out, most significant first
    TM_DONE  = 3'd3
  } tlm_state_e;

  // Everything the command processor has written: the "command memory".
  typedef struct packed {
    logic [NUM_DACS-1:0][7:0] dac;   // DAC 0..7 levels (dac[0] = DAC 0)
    logic [7:0]               gain;  // shaping amplifier gain control
    logic [4:0]               amux;  // analog HK multiplexer channel
    logic [3:0]               dmux;  // digital HK multiplexer position
    logic                     tp_enable;
    logic                     pha_stop;  // 1 = PHA stop/abort mode
    logic                     hv_enable;
    logic [2:1]               hv_cmds;   // latched, unused on the brassboard
  } cmd_regs_t;

  localparam cmd_regs_t CMD_REGS_RESET = '0;

endpackage

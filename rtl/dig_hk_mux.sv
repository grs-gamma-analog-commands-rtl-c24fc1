// dig_hk_mux: the 16-channel digital housekeeping multiplexer.
//
// Every digital HK telemetry word is 16 bits: a fixed tag 2'b11 in bits
// [15:14], the multiplexer channel in bits [13:10] and ten data bits in
// [9:0]. The ten data bits of each channel are packed from the command
// registers, the three state machines and the PHA buffer exactly as the
// channel table of the design lists them; the eight DAC levels are packed
// back to back over channels 1 to 7, the 16-bit PHA buffer word is split over
// channels 7 and 8, and channels C to F repeat Cmd_Mach[3:2] above an 8-bit
// value.
//
// The analog multiplexer channel field of channel A is six bits wide while
// the analog mux command uses only five data bits; its top bit therefore
// always reads 0 (this design's reading of the two tables).
//
// The digital mux position and the PHA stop/abort bit of regs have no field
// in any word, so those bits of the regs input are unused here.
//
// Purely combinational: word follows sel and the inputs in the same cycle.
module dig_hk_mux
  import gamma_pkg::*;
(
  input  logic [3:0]  sel,          // digital multiplexer position
  input  cmd_regs_t   regs,
  input  cmd_state_e  cmd_state,    // Cmd_Mach
  input  logic [15:0] cmd_data,     // last command word
  input  logic [7:0]  cmd_count,
  input  logic        cmd_accept,
  input  logic        cmd_reject,
  input  logic        load_mem,
  input  logic        apps_reset,
  input  logic        board_reset,  // "Reset": the board reset line, active high
  input  tlm_state_e  tlm_state,    // Telem_Mach
  input  logic [3:0]  tp_state,     // TP_Mach
  input  logic        pha_latch,
  input  logic [15:0] bpha,         // PHA buffer word
  output logic [15:0] word
);

  logic [3:0]  cm;
  logic [2:0]  tm;
  logic [9:0]  d;
  logic [63:0] dacs;                // DAC 0 in [63:56] ... DAC 7 in [7:0]

  assign cm = cmd_state;
  assign tm = tlm_state;

  always_comb begin
    for (int i = 0; i < NUM_DACS; i++) dacs[63-8*i -: 8] = regs.dac[i];
  end

  always_comb begin
    unique case (sel)
      4'h0: d = {cm, cmd_data[5:0]};
      4'h1: d = dacs[63:54];        // DAC0[7:0], DAC1[7:6]
      4'h2: d = dacs[53:44];        // DAC1[5:0], DAC2[7:4]
      4'h3: d = dacs[43:34];        // DAC2[3:0], DAC3[7:2]
      4'h4: d = dacs[33:24];        // DAC3[1:0], DAC4[7:0]
      4'h5: d = dacs[23:14];        // DAC5[7:0], DAC6[7:6]
      4'h6: d = dacs[13:4];         // DAC6[5:0], DAC7[7:4]
      4'h7: d = {dacs[3:0], bpha[15:10]};
      4'h8: d = bpha[9:0];
      4'h9: d = {tp_state, regs.tp_enable, cmd_accept, cmd_reject,
                 pha_latch, load_mem, apps_reset};
      4'hA: d = {board_reset, tm, 1'b0, regs.amux};
      4'hB: d = {cm, tm, regs.hv_cmds, regs.hv_enable};
      4'hC: d = {cm[3:2], cmd_data[15:8]};
      4'hD: d = {cm[3:2], cmd_data[7:0]};
      4'hE: d = {cm[3:2], cmd_count};
      4'hF: d = {cm[3:2], regs.gain};
      default: d = '0;
    endcase
  end

  assign word = {DIG_HK_ID, sel, d};

endmodule

// dig_hk_mux_tb: self-checking testbench of the digital HK multiplexer.
//
// Drives random values on every input and, for each of the 16 multiplexer
// positions, compares the word with one assembled here field by field from the
// channel table (tag 11, channel number, ten data bits).
module dig_hk_mux_tb;
  import gamma_pkg::*;

  logic [3:0]  sel;
  cmd_regs_t   regs;
  cmd_state_e  cmd_state;
  logic [15:0] cmd_data;
  logic [7:0]  cmd_count;
  logic        cmd_accept, cmd_reject, load_mem, apps_reset, board_reset;
  tlm_state_e  tlm_state;
  logic [3:0]  tp_state;
  logic        pha_latch;
  logic [15:0] bpha;
  logic [15:0] word;

  dig_hk_mux dut (.*);

  int checks = 0, failures = 0;

  function automatic logic [9:0] expect_data(input logic [3:0] ch);
    logic [7:0] d0 = regs.dac[0], d1 = regs.dac[1], d2 = regs.dac[2],
                d3 = regs.dac[3], d4 = regs.dac[4], d5 = regs.dac[5],
                d6 = regs.dac[6], d7 = regs.dac[7];
    logic [3:0] cm = cmd_state;
    logic [2:0] tm = tlm_state;
    case (ch)
      4'h0: return {cm, cmd_data[5:0]};
      4'h1: return {d0, d1[7:6]};
      4'h2: return {d1[5:0], d2[7:4]};
      4'h3: return {d2[3:0], d3[7:2]};
      4'h4: return {d3[1:0], d4};
      4'h5: return {d5, d6[7:6]};
      4'h6: return {d6[5:0], d7[7:4]};
      4'h7: return {d7[3:0], bpha[15:10]};
      4'h8: return bpha[9:0];
      4'h9: return {tp_state, regs.tp_enable, cmd_accept, cmd_reject, pha_latch,
                    load_mem, apps_reset};
      4'hA: return {board_reset, tm, 6'(regs.amux)};
      4'hB: return {cm, tm, regs.hv_cmds, regs.hv_enable};
      4'hC: return {cm[3:2], cmd_data[15:8]};
      4'hD: return {cm[3:2], cmd_data[7:0]};
      4'hE: return {cm[3:2], cmd_count};
      default: return {cm[3:2], regs.gain};
    endcase
  endfunction

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 300; n++) begin
      regs        = {$urandom, $urandom, $urandom, $urandom};
      cmd_state   = cmd_state_e'($urandom_range(0, 5));
      tlm_state   = tlm_state_e'($urandom_range(0, 3));
      cmd_data    = 16'($urandom);
      cmd_count   = 8'($urandom);
      {cmd_accept, cmd_reject, load_mem, apps_reset, board_reset, pha_latch} = 6'($urandom);
      tp_state    = 4'($urandom);
      bpha        = 16'($urandom);
      for (int c = 0; c < 16; c++) begin
        sel = 4'(c);
        #1;
        checks++;
        if (word !== {2'b11, 4'(c), expect_data(4'(c))}) begin
          failures++;
          $display("FAIL channel %h: %h", c, word);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

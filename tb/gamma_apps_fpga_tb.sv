// gamma_apps_fpga_tb: end-to-end testbench of the gamma analog FPGA, with the
// top at its default parameters.
//
// Plays the CEB: sends commands on the command port and receives the serial
// digital HK words. It runs the checkout sequences of the command set:
//   1 every valid command once, with its effect on the analog-side outputs;
//   2 a loop of NOP commands;
//   3 DAC 5 written with one value in a loop;
//   4 DAC 5 stepped through 00..FF;
//   5 all 16 digital HK channels read out, each word compared with one built
//     here from the commands sent (twice: pulser off, and pulser running);
//   6 the analog HK mux stepped through its 32 channels;
//   7 invalid and reserved commands (30, 2E, 2F, ...) that must be rejected.
// Each mechanism of the design is counted and must occur at least once:
// rejects, reject-flag and counter resets, APPS reset, DAC clear, telemetry
// transfers, a telemetry command waiting for a busy Telem_Mach, test pulses,
// PHA and HV mode changes.
module gamma_apps_fpga_tb;

  logic            clk = 0, rst_n = 0;
  logic            cmd_valid = 0;
  logic [15:0]     cmd_word = '0;
  logic            cmd_ready;
  logic            tlm_frame, tlm_sclk, tlm_sdata;
  logic [7:0][7:0] dac_level;
  logic [7:0]      amp_gain;
  logic [4:0]      amux_chan;
  logic            hv_enable;
  logic [2:1]      hv_cmds;
  logic            tp_enable, test_pulse, pha_stop;
  logic            pha_latch = 0;
  logic [15:0]     bpha = '0;
  logic            apps_reset;
  logic [7:0]      cmd_count;
  logic            cmd_accept, cmd_reject;

  gamma_apps_fpga dut (.*);

  // analog side of the board, driven by the FPGA's outputs
  real amux_out_v;
  apps_analog_model u_analog (.dac_level, .hv_enable, .amux_chan, .amux_out_v);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s (t=%0t)", what, $time); end
  endtask

  // ---- event counters -------------------------------------------------
  int n_reject = 0, n_rej_rst = 0, n_cnt_rst = 0, n_apps_rst = 0, n_dac_clr = 0;
  int n_tlm = 0, n_tlm_stall = 0, n_pulse = 0, n_pha_mode = 0, n_hv_mode = 0;
  int n_cmds = 0;

  logic tp_q = 0;
  always @(posedge clk) begin
    if (test_pulse && !tp_q) n_pulse++;
    tp_q <= test_pulse;
  end

  // ---- serial telemetry receiver ----------------------------------------
  logic [15:0] rx_sh;
  int rx_bits = 0;
  logic sclk_q = 0;
  logic [15:0] rx_q[$];
  always @(posedge clk) begin
    if (tlm_frame && tlm_sclk && !sclk_q) begin
      rx_sh = {rx_sh[14:0], tlm_sdata};
      rx_bits++;
      if (rx_bits == 16) begin rx_q.push_back(rx_sh); rx_bits = 0; n_tlm++; end
    end
    if (!tlm_frame) rx_bits = 0;
    sclk_q = tlm_sclk;
  end

  // ---- reference model of the command registers --------------------------
  logic [7:0] m_dac[8];
  logic [7:0] m_gain = 0, m_count = 0;
  logic [4:0] m_amux = 0;
  logic       m_tp = 0, m_pha = 0, m_hv = 0, m_accept = 0, m_reject = 0;
  logic [1:0] m_hvc = 0;

  function automatic bit valid_cmd(input logic [15:0] w);
    case (w[15:8])
      8'h00: return w[7:0] inside {8'h00, 8'h0A, 8'hAA};
      8'h01: return w[7:0] == 8'h01;
      8'h10, 8'h11, 8'h12, 8'h13, 8'h14, 8'h15, 8'h16, 8'h17, 8'h18,
      8'h20, 8'h28, 8'h2A, 8'h2B, 8'h2C, 8'h2D: return 1;
      default: return 0;
    endcase
  endfunction

  task automatic model(input logic [15:0] w);
    logic [7:0] d = w[7:0];
    if (!valid_cmd(w)) begin m_reject = 1; m_accept = 0; n_reject++; return; end
    m_accept = 1; m_count++;
    case (w[15:8])
      8'h00: begin
        if (d == 8'h0A) begin m_reject = 0; n_rej_rst++; end
        if (d == 8'hAA) begin m_count = 0; n_cnt_rst++; end
      end
      8'h01: begin
        foreach (m_dac[i]) m_dac[i] = 0;
        m_gain = 0; m_amux = 0; m_tp = 0; m_pha = 0; m_hv = 0; m_hvc = 0;
        n_apps_rst++;
      end
      8'h18: begin foreach (m_dac[i]) m_dac[i] = 0; n_dac_clr++; end
      8'h20: m_gain = d;
      8'h28: m_amux = d[4:0];
      8'h2B: m_tp = d[0];
      8'h2C: begin if (m_pha != d[0]) n_pha_mode++; m_pha = d[0]; end
      8'h2D: begin if (m_hv != d[0]) n_hv_mode++; m_hv = d[0]; m_hvc = d[2:1]; end
      default: if (w[15:12] == 4'h1) m_dac[w[10:8]] = d;
    endcase
  endtask

  task automatic check_outputs(input string tag);
    bit ok = 1;
    for (int i = 0; i < 8; i++) if (dac_level[i] != m_dac[i]) ok = 0;
    check(ok, {tag, ": DAC levels"});
    check(amp_gain == m_gain && amux_chan == m_amux && tp_enable == m_tp &&
          pha_stop == m_pha && hv_enable == m_hv && hv_cmds == m_hvc,
          {tag, ": control outputs"});
    check(cmd_count == m_count && cmd_accept == m_accept && cmd_reject == m_reject,
          $sformatf("%s: count %0d/%0d accept %0d/%0d reject %0d/%0d", tag,
                    cmd_count, m_count, cmd_accept, m_accept, cmd_reject, m_reject));
  endtask

  // Send one command; returns the cycles from acceptance to ready again.
  task automatic send(input logic [15:0] w, output int cyc);
    while (!cmd_ready) begin @(posedge clk); #1; end
    cmd_word <= w; cmd_valid <= 1;
    @(posedge clk); #1;
    cmd_valid <= 0;
    cyc = 0;
    do begin @(posedge clk); #1; cyc++; end while (!cmd_ready);
    model(w);
    n_cmds++;
  endtask

  task automatic cmd(input logic [15:0] w);
    int cyc;
    send(w, cyc);
    if (!(w[15:8] == 8'h2A && w[7]))
      check(cyc == 3, $sformatf("command %h took %0d cycles", w, cyc + 1));
    check_outputs($sformatf("after %h", w));
  endtask

  // Expected digital HK word, as captured one cycle after the telemetry
  // request: Cmd_Mach is then back in IDLE (0) and Telem_Mach in LOAD (1),
  // provided no further command has been sent.
  function automatic logic [15:0] exp_hk(input logic [3:0] ch, input logic [3:0] tp);
    logic [15:0] cd = {8'h2A, 4'h8, ch};
    logic [3:0]  cm = 4'h0;
    logic [2:0]  tm = 3'h1;
    logic [63:0] dv = {m_dac[0], m_dac[1], m_dac[2], m_dac[3],
                       m_dac[4], m_dac[5], m_dac[6], m_dac[7]};
    logic [9:0] d;
    case (ch)
      4'h0: d = {cm, cd[5:0]};
      4'h1: d = dv[63:54];
      4'h2: d = dv[53:44];
      4'h3: d = dv[43:34];
      4'h4: d = dv[33:24];
      4'h5: d = dv[23:14];
      4'h6: d = dv[13:4];
      4'h7: d = {dv[3:0], bpha[15:10]};
      4'h8: d = bpha[9:0];
      4'h9: d = {tp, m_tp, m_accept, m_reject, pha_latch, 1'b0, 1'b0};
      4'hA: d = {1'b0, tm, 1'b0, m_amux};
      4'hB: d = {cm, tm, m_hvc, m_hv};
      4'hC: d = {cm[3:2], cd[15:8]};
      4'hD: d = {cm[3:2], cd[7:0]};
      4'hE: d = {cm[3:2], m_count};
      default: d = {cm[3:2], m_gain};
    endcase
    return {2'b11, ch, d};
  endfunction

  // Workload 5: read all 16 digital HK channels.
  task automatic hk_readout(input bit mask_tp);
    logic [15:0] got;
    logic [15:0] exp;
    for (int ch = 0; ch < 16; ch++) begin
      int cyc, t0;
      send({8'h2A, 4'h8, 4'(ch)}, cyc);
      t0 = 0;
      while (rx_q.size() == 0 && t0 < 1000) begin @(posedge clk); #1; t0++; end
      check(rx_q.size() == 1, $sformatf("one HK word for channel %0d", ch));
      if (rx_q.size() > 0) begin
        got = rx_q.pop_front();
        exp = exp_hk(4'(ch), mask_tp ? got[9:6] : 4'h0);
        check(got == exp, $sformatf("HK channel %0d: got %h expected %h", ch, got, exp));
      end
    end
  endtask

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [15:0] bad_cmds[6] = '{16'h3000, 16'h2E01, 16'h2F00, 16'h0033, 16'h0102, 16'hFF00};

  initial begin
    foreach (m_dac[i]) m_dac[i] = 0;
    repeat (3) @(posedge clk);
    rst_n <= 1;
    repeat (2) @(posedge clk); #1;
    check_outputs("after reset");
    bpha = 16'hB6E3; pha_latch = 1;

    // 1: every valid command
    cmd(16'h0000);
    for (int i = 0; i < 8; i++) cmd({8'h10 + 8'(i), 8'(8'h1F * (i + 3))});
    cmd(16'h20A5); cmd(16'h2813); cmd(16'h2B00); cmd(16'h2C01); cmd(16'h2C00);
    cmd(16'h2D07); cmd(16'h2D02); cmd(16'h2A03);
    // 7: invalid and reserved commands
    foreach (bad_cmds[k]) cmd(bad_cmds[k]);
    cmd(16'h000A);
    // 5: digital HK readout, test pulser off
    hk_readout(0);
    // a telemetry command right behind another must wait for Telem_Mach
    begin
      int c1, c2;
      send(16'h2A8E, c1);
      send(16'h2A8F, c2);
      check(c2 > 8, $sformatf("second telemetry command waited (%0d cycles)", c2));
      if (c2 > 8) n_tlm_stall++;
      repeat (300) @(posedge clk); #1;
      check(rx_q.size() == 2, "two words from back-to-back telemetry commands");
      while (rx_q.size() > 0) void'(rx_q.pop_front());
    end
    // 2: NOP loop
    for (int n = 0; n < 50; n++) begin cmd(16'h0000); repeat (20) @(posedge clk); end
    // 3: DAC 5 loop, one value
    for (int n = 0; n < 20; n++) cmd(16'h155A);
    // 4: DAC 5 sweep
    for (int v = 0; v < 256; v++) cmd({8'h15, 8'(v)});
    // 6: analog HK mux through all 32 channels, with the HVBS on; each
    // voltage is converted back with the channel's slope and compared
    cmd(16'h17CC); cmd(16'h2D01);
    for (int c = 0; c < 32; c++) begin
      real v, code;
      cmd({8'h28, 8'(c)});
      check(amux_chan == 5'(c), $sformatf("analog mux channel %0d", c));
      repeat (5) @(posedge clk); #1;
      v = amux_out_v;
      if (c >= 'h10 && c <= 'h17) begin
        code = v * 255.0 / 5.0;
        check(code > real'(m_dac[c - 16]) - 0.01 && code < real'(m_dac[c - 16]) + 0.01,
              $sformatf("DAC %0d monitor %f V", c - 16, v));
      end else if (c == 'h18) begin
        check(v * 1000.0 > 5000.0 * 8'hCC / 255.0 - 1.0 && v * 1000.0 < 5000.0 * 8'hCC / 255.0 + 1.0,
              $sformatf("HVBS output %f kV", v));
      end else if (c == 'h1A) check(v > 4.9, "HVBS enable monitor");
      else if (c == 'h0D) check(v > 1.6655 && v < 1.6665, "1.66 V reference");
      else if (c == 'h0E) check(v > 3.3325 && v < 3.3335, "3.33 V reference");
      else if (c == 'h0F) check(v > 4.9995 && v < 5.0005, "5.00 V reference");
      else if (c == 'h19 || c == 'h1E || c == 'h1F) check(v == 0.0, "0 V channel");
    end
    cmd(16'h28E7);                       // unused bits [7:5] ignored
    // test pulser running; HK readout with TP_Mach masked
    cmd(16'h2B01);
    repeat (40000) @(posedge clk); #1;
    hk_readout(1);
    cmd(16'h2BFE);
    // DAC clear, counter reset, APPS reset
    cmd(16'h1801);
    cmd(16'h00AA);
    for (int i = 0; i < 8; i++) cmd({8'h10 + 8'(i), 8'($urandom)});
    cmd(16'h2D01); cmd(16'h2C01); cmd(16'h20FF);
    cmd(16'h0101);
    check(apps_reset, "apps_reset driven after APPS reset command");
    repeat (20) @(posedge clk); #1;
    check(!apps_reset, "apps_reset released");
    cmd(16'h3000);
    hk_readout(0);

    check(n_reject > 0,    "reject happened");
    check(n_rej_rst > 0,   "reject-flag reset happened");
    check(n_cnt_rst > 0,   "counter reset happened");
    check(n_apps_rst > 0,  "APPS reset happened");
    check(n_dac_clr > 0,   "DAC clear happened");
    check(n_tlm >= 50,     $sformatf("telemetry words %0d", n_tlm));
    check(n_tlm_stall > 0, "telemetry wait happened");
    check(n_pulse >= 2,    $sformatf("test pulses %0d", n_pulse));
    check(n_pha_mode > 0,  "PHA mode change happened");
    check(n_hv_mode > 0,   "HV mode change happened");
    $display("events: commands=%0d rejects=%0d rej_rst=%0d cnt_rst=%0d apps_rst=%0d dac_clr=%0d tlm=%0d tlm_wait=%0d pulses=%0d pha=%0d hv=%0d",
             n_cmds, n_reject, n_rej_rst, n_cnt_rst, n_apps_rst, n_dac_clr, n_tlm,
             n_tlm_stall, n_pulse, n_pha_mode, n_hv_mode);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// test_pulser_tb: self-checking testbench of the test pulser sequencer.
//
// With TP_DIV = 3, checks every cycle that TP_Mach follows an independent
// model (one step per 3 cycles while enabled, 0 when disabled or reset), that
// test_pulse is high exactly while TP_Mach is 15, and that pulses are 3 cycles
// wide and 48 cycles apart; enable is toggled and APPS reset pulsed at random.
module test_pulser_tb;

  localparam int unsigned DIV = 3;

  logic       clk = 0, rst_n = 0, apps_reset = 0, enable = 0;
  logic [3:0] tp_state;
  logic       test_pulse;

  test_pulser #(.TP_DIV(DIV)) dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0, pulses = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s (t=%0t)", what, $time); end
  endtask

  // model
  int m_div = 0, m_state = 0;
  int rise_t = -1, prev_rise = -1, cyc = 0, width = 0;
  bit steady = 0;   // enabled without interruption since the previous pulse
  always @(posedge clk) if (rst_n) begin
    cyc++;
    if (apps_reset || !enable) begin m_div = 0; m_state = 0; steady = 0; end
    else if (m_div == DIV - 1) begin m_div = 0; m_state = (m_state + 1) % 16; end
    else m_div++;
    #1;
    check(tp_state == 4'(m_state), $sformatf("tp_state %0d vs %0d", tp_state, m_state));
    check(test_pulse == (m_state == 15), "test_pulse follows TP_Mach 15");
    if (test_pulse) width++;
    else if (width != 0) begin
      check(width == DIV, $sformatf("pulse width %0d", width));
      width = 0;
    end
    if (test_pulse && width == 1) begin
      pulses++;
      if (steady && prev_rise >= 0)
        check(cyc - prev_rise == 16 * DIV, $sformatf("pulse period %0d", cyc - prev_rise));
      prev_rise = cyc;
      steady = 1;
    end
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    rst_n <= 1;
    repeat (20) @(posedge clk);
    enable <= 1;
    repeat (500) @(posedge clk);
    for (int n = 0; n < 60; n++) begin
      case ($urandom_range(0, 3))
        0: enable <= 0;
        1: apps_reset <= 1;
        default: ;
      endcase
      @(posedge clk);
      apps_reset <= 0;
      repeat ($urandom_range(1, 6)) @(posedge clk);
      enable <= 1;
      repeat ($urandom_range(10, 200)) @(posedge clk);
    end
    check(pulses > 20, $sformatf("pulses seen %0d", pulses));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

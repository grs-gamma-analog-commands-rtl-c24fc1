// test_pulser: the test pulser sequencer (TP_Mach).
//
// While enabled by the test pulser command (2B, data bit 0), the 4-bit
// sequencer TP_Mach advances one step every TP_DIV clock cycles and wraps
// after 15; test_pulse is high while TP_Mach is 15, so one pulse of TP_DIV
// cycles is produced every 16*TP_DIV cycles. Disabling the pulser, or an
// APPS reset, returns TP_Mach to 0 at once and stops the pulses.
//
// The document gives only the enable command and the 4-bit TP_Mach state that
// the housekeeping word reports; the sequence, the pulse rate and the pulse
// width are this design's own choices. tp_state and test_pulse are registered.
module test_pulser #(
  parameter int unsigned TP_DIV = 1024    // clock cycles per TP_Mach step
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       apps_reset,
  input  logic       enable,
  output logic [3:0] tp_state,
  output logic       test_pulse
);

  localparam int unsigned DW = (TP_DIV > 1) ? $clog2(TP_DIV) : 1;

  logic [DW-1:0] div_cnt;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      tp_state   <= '0;
      div_cnt    <= '0;
      test_pulse <= 1'b0;
    end else if (apps_reset || !enable) begin
      tp_state   <= '0;
      div_cnt    <= '0;
      test_pulse <= 1'b0;
    end else if (div_cnt == DW'(TP_DIV - 1)) begin
      div_cnt    <= '0;
      tp_state   <= tp_state + 1'b1;
      test_pulse <= (tp_state == 4'hE);
    end else begin
      div_cnt    <= div_cnt + 1'b1;
    end
  end

endmodule

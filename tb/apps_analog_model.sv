// apps_analog_model: behavioural model of the analog side of the APPS board,
// for simulation only (not synthesizable, not part of the FPGA).
//
// It turns the FPGA's digital controls into the voltage at the output of the
// 32-channel analog housekeeping multiplexer. The eight DACs span 0 to 5 V
// over codes 00..FF; the HVBS produces 0 to 5000 V from DAC 7 while enabled
// and 0 V otherwise, and its output monitor reads 1 V per kV. Each multiplexer
// channel reads slope * quantity + offset with the slopes of the analog HK
// channel table; supply, current, leakage and temperature values are fixed
// nominal inputs given as parameters, and offsets marked "to be determined"
// in the table are taken as 0. The output settles SETTLE_NS after a change
// of channel.
module apps_analog_model #(
  parameter real LEAK_NA   = 0.25,   // detector leakage current, nA
  parameter real TEMP_C    = 20.0,   // board temperature, degC
  parameter real SETTLE_NS = 20.0
) (
  input  logic [7:0][7:0] dac_level,
  input  logic            hv_enable,
  input  logic [4:0]      amux_chan,
  output real             amux_out_v
);

  function automatic real dac_v(input logic [7:0] code);
    return 5.0 * real'(code) / 255.0;
  endfunction

  function automatic real chan_v(input logic [4:0] ch);
    real hv_kv = hv_enable ? 5.0 * real'(dac_level[7]) / 255.0 : 0.0;
    case (ch)
      5'h00, 5'h01: return 1.0 * LEAK_NA;           // electrometer, 1 V/nA
      5'h02:        return 0.417 * 12.0;            // APPS +12 V
      5'h03:        return 0.050 * 40.0;            // APPS +12 V current, 40 mA
      5'h04:        return 0.417 * -12.0;           // APPS -12 V
      5'h05:        return 0.050 * 30.0;            // APPS -12 V current, 30 mA
      5'h06:        return 1.0 * 5.0;               // APPS +5 V
      5'h07:        return 0.100 * 20.0;            // APPS +5 V current, 20 mA
      5'h08:        return 0.100 * (hv_enable ? 15.0 : 1.0);
      5'h09:        return 0.100 * (hv_enable ? 5.0 : 1.0);
      5'h0A:        return 0.050 * 25.0;            // GPA +12 V current
      5'h0B:        return 0.050 * 20.0;            // GPA -12 V current
      5'h0C:        return 5.0;                     // VDD direct
      5'h0D:        return 1.666;
      5'h0E:        return 3.333;
      5'h0F:        return 5.000;
      5'h18:        return hv_kv;                   // HVBS output, 1 V/kV
      5'h19, 5'h1E: return 0.0;                     // spares
      5'h1A:        return hv_enable ? 5.0 : 0.0;
      5'h1B:        return 0.0128 * TEMP_C + 0.025;
      5'h1C, 5'h1D: return -0.010 * TEMP_C;
      5'h1F:        return 0.0;                     // mux offset, brassboard
      default:      return dac_v(dac_level[ch[2:0]]); // 10..17 DAC monitors
    endcase
  endfunction

  initial amux_out_v = 0.0;
  always @(amux_chan or dac_level or hv_enable) begin
    #(SETTLE_NS) amux_out_v = chan_v(amux_chan);
  end

endmodule

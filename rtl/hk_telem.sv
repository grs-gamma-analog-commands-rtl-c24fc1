// hk_telem: the digital housekeeping telemetry machine (Telem_Mach).
//
// Each telemetry request (a 2A command with data bit 7 set) sends exactly one
// 16-bit digital HK word to the CEB. Telem_Mach steps
//   IDLE -> LOAD -> SHIFT (16 bit periods) -> DONE -> IDLE.
// In LOAD the word on hk_word (the output of the digital HK multiplexer) is
// captured, so the word reflects the state of the design one cycle after the
// request. In SHIFT the word leaves most significant bit first on tlm_sdata,
// framed by tlm_frame, with a serial clock tlm_sclk that is low for the first
// half and high for the second half of each bit period of TLM_DIV clock
// cycles; the receiver samples on the rising edge of tlm_sclk.
//
// The document says only that one word per command is transferred to the CEB
// and that Telem_Mach is three bits wide; the serial format, the bit period,
// the state sequence and its encoding are this design's own choices.
// A request is taken only in IDLE (busy low); apps_reset aborts a transfer.
// A transfer takes 1 + 1 + 16*TLM_DIV + 1 cycles from the request.
module hk_telem
  import gamma_pkg::*;
#(
  parameter int unsigned TLM_DIV = 8      // clock cycles per bit, even, >= 2
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        apps_reset,
  input  logic        req,
  input  logic [15:0] hk_word,
  output logic        busy,
  output tlm_state_e  state,
  output logic        tlm_frame,
  output logic        tlm_sclk,
  output logic        tlm_sdata
);

  localparam int unsigned DW = $clog2(TLM_DIV);

  logic [15:0]   shreg;
  logic [3:0]    bit_cnt;
  logic [DW-1:0] div_cnt;

  assign busy      = (state != TM_IDLE);
  assign tlm_frame = (state == TM_SHIFT);
  assign tlm_sclk  = tlm_frame && (div_cnt >= DW'(TLM_DIV / 2));
  assign tlm_sdata = tlm_frame && shreg[15];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state   <= TM_IDLE;
      shreg   <= '0;
      bit_cnt <= '0;
      div_cnt <= '0;
    end else if (apps_reset) begin
      state   <= TM_IDLE;
      bit_cnt <= '0;
      div_cnt <= '0;
    end else begin
      unique case (state)
        TM_IDLE: if (req) state <= TM_LOAD;
        TM_LOAD: begin
          shreg   <= hk_word;
          bit_cnt <= '0;
          div_cnt <= '0;
          state   <= TM_SHIFT;
        end
        TM_SHIFT: begin
          if (div_cnt == DW'(TLM_DIV - 1)) begin
            div_cnt <= '0;
            shreg   <= {shreg[14:0], 1'b0};
            bit_cnt <= bit_cnt + 1'b1;
            if (bit_cnt == 4'd15) state <= TM_DONE;
          end else begin
            div_cnt <= div_cnt + 1'b1;
          end
        end
        TM_DONE: state <= TM_IDLE;
        default: state <= TM_IDLE;
      endcase
    end
  end

  initial assert (TLM_DIV >= 2 && TLM_DIV % 2 == 0)
    else $error("hk_telem: TLM_DIV must be even and at least 2");

endmodule

// hk_telem_tb: self-checking testbench of the telemetry machine.
//
// Issues telemetry requests with random words, receives the serial output on
// the rising edges of tlm_sclk while tlm_frame is high, and checks the
// received word against the word present one cycle after the request (the
// input is scrambled afterwards to prove it was captured), the bit count, the
// transfer time of 16*TLM_DIV + 3 cycles, that busy covers the whole
// transfer, that a request while busy is ignored, and that an APPS reset
// aborts a transfer.
module hk_telem_tb;
  import gamma_pkg::*;

  localparam int unsigned DIV = 4;

  logic        clk = 0, rst_n = 0, apps_reset = 0, req = 0;
  logic [15:0] hk_word = '0;
  logic        busy;
  tlm_state_e  state;
  logic        tlm_frame, tlm_sclk, tlm_sdata;

  hk_telem #(.TLM_DIV(DIV)) dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s (t=%0t)", what, $time); end
  endtask

  // serial receiver
  logic [15:0] rx;
  int rx_bits = 0;
  logic sclk_q = 0;
  always @(posedge clk) begin
    if (tlm_frame && tlm_sclk && !sclk_q) begin
      rx = {rx[14:0], tlm_sdata};
      rx_bits++;
    end
    sclk_q = tlm_sclk;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic transfer(input logic [15:0] w, input bit extra_req);
    int cyc = 0;
    rx_bits = 0;
    hk_word <= w;
    req <= 1;
    @(posedge clk); #1;
    req <= 0;
    check(busy, "busy after request");
    @(posedge clk); #1;               // LOAD captured w
    hk_word <= 16'($urandom);
    cyc = 2;
    while (busy) begin
      if (extra_req && cyc == 20) req <= 1; else req <= 0;
      @(posedge clk); #1; cyc++;
    end
    req <= 0;
    check(cyc == 16 * DIV + 3, $sformatf("transfer time %0d", cyc));
    check(rx_bits == 16, $sformatf("bits received %0d", rx_bits));
    check(rx == w, $sformatf("word %h received %h", w, rx));
    repeat (3) @(posedge clk); #1;
    check(!busy && !tlm_frame, "idle after transfer");
  endtask

  initial begin
    repeat (2) @(posedge clk);
    rst_n <= 1;
    @(posedge clk); #1;
    check(state == TM_IDLE && !busy, "idle after reset");
    transfer(16'hC5A3, 0);
    transfer(16'hFFFF, 1);
    for (int n = 0; n < 40; n++) transfer(16'($urandom), n % 5 == 0);
    // abort by APPS reset
    req <= 1; hk_word <= 16'hABCD;
    @(posedge clk); #1; req <= 0;
    repeat (10) @(posedge clk); #1;
    check(tlm_frame, "shifting before abort");
    apps_reset <= 1; @(posedge clk); #1; apps_reset <= 0;
    check(!busy && state == TM_IDLE && !tlm_frame, "aborted by apps_reset");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

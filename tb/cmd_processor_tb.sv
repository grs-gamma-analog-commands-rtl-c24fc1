// cmd_processor_tb: self-checking testbench of the command processor.
//
// Sends every command of the command table, a set of invalid and reserved
// command words and a long random mix, keeping its own model of the command
// registers, the command counter and the accept/reject flags, and compares
// them after every command. It also checks the 4-cycle command latency, the
// one-cycle load_mem strobe, the length of the APPS reset pulse, and that a
// telemetry command waits while the telemetry machine is busy (the
// tb-modelled tlm_busy is held high for a while after every request).
module cmd_processor_tb;
  import gamma_pkg::*;

  localparam int unsigned RST_CYC = 5;

  logic        clk = 0, rst_n = 0;
  logic        cmd_valid = 0;
  logic [15:0] cmd_word = '0;
  logic        cmd_ready;
  cmd_regs_t   regs;
  logic [7:0]  cmd_count;
  logic        cmd_accept, cmd_reject, load_mem, apps_reset;
  cmd_state_e  cmd_state;
  logic [15:0] cmd_data;
  logic        tlm_req;
  logic        tlm_busy = 0;

  cmd_processor #(.APPS_RST_CYCLES(RST_CYC)) dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int n_tlm = 0, n_tlm_stall = 0, n_reject = 0, n_apps_rst = 0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s (t=%0t)", what, $time);
    end
  endtask

  // telemetry machine stand-in: busy for 7 cycles after each request
  int busy_left = 0;
  always @(posedge clk) begin
    if (tlm_req) begin
      check(!tlm_busy, "tlm_req while busy");
      busy_left = 7;
      n_tlm++;
    end else if (busy_left > 0) busy_left--;
    tlm_busy <= (busy_left > 0) || tlm_req;
  end
  always @(posedge clk) if (cmd_state == CM_TLM_WAIT && tlm_busy) n_tlm_stall++;

  // load_mem and apps_reset pulse widths
  int lm_run = 0, ar_run = 0;
  always @(posedge clk) if (rst_n) begin
    if (load_mem) lm_run++; else begin
      if (lm_run != 0) check(lm_run == 1, "load_mem one cycle wide");
      lm_run = 0;
    end
    if (apps_reset) ar_run++; else begin
      if (ar_run != 0) check(ar_run == RST_CYC, "apps_reset width");
      ar_run = 0;
    end
  end

  // reference model
  cmd_regs_t m_regs;
  logic [7:0] m_count;
  logic m_accept, m_reject;

  function automatic bit is_valid(input logic [15:0] w);
    logic [7:0] id = w[15:8], d = w[7:0];
    if (id == 8'h00) return d == 8'h00 || d == 8'h0A || d == 8'hAA;
    if (id == 8'h01) return d == 8'h01;
    if (id >= 8'h10 && id <= 8'h18) return 1;
    return id == 8'h20 || id == 8'h28 || id == 8'h2A || id == 8'h2B ||
           id == 8'h2C || id == 8'h2D;
  endfunction

  task automatic model(input logic [15:0] w);
    logic [7:0] id = w[15:8], d = w[7:0];
    if (!is_valid(w)) begin m_reject = 1; m_accept = 0; return; end
    m_accept = 1;
    m_count  = m_count + 1;
    case (id)
      8'h00: begin if (d == 8'h0A) m_reject = 0; if (d == 8'hAA) m_count = 0; end
      8'h01: m_regs = '0;
      8'h18: for (int i = 0; i < 8; i++) m_regs.dac[i] = 0;
      8'h20: m_regs.gain = d;
      8'h28: m_regs.amux = d[4:0];
      8'h2A: m_regs.dmux = d[3:0];
      8'h2B: m_regs.tp_enable = d[0];
      8'h2C: m_regs.pha_stop = d[0];
      8'h2D: begin m_regs.hv_enable = d[0]; m_regs.hv_cmds = d[2:1]; end
      default: if (id >= 8'h10 && id <= 8'h17) m_regs.dac[id - 8'h10] = d;
    endcase
  endtask

  task automatic send(input logic [15:0] w);
    int cyc = 0;
    bit expect_tlm = is_valid(w) && w[15:8] == 8'h2A && w[7];
    bit was_busy;
    int n0 = n_tlm;
    while (!cmd_ready) begin @(posedge clk); #1; end
    cmd_word  <= w;
    cmd_valid <= 1;
    @(posedge clk);
    cmd_valid <= 0;
    cmd_word  <= 16'($urandom);
    #1;
    was_busy = tlm_busy;
    do begin @(posedge clk); #1; cyc++; end while (!cmd_ready);
    model(w);
    if (is_valid(w) && w == 16'h0101) n_apps_rst++;
    if (!is_valid(w)) n_reject++;
    check(cmd_data == w, $sformatf("cmd_data %h", w));
    check(regs == m_regs, $sformatf("regs after %h", w));
    check(cmd_count == m_count, $sformatf("count after %h: %0d vs %0d", w, cmd_count, m_count));
    check(cmd_accept == m_accept, $sformatf("accept after %h", w));
    check(cmd_reject == m_reject, $sformatf("reject after %h", w));
    check((n_tlm - n0) == (expect_tlm ? 1 : 0), $sformatf("tlm request count after %h", w));
    if (!expect_tlm) check(cyc == 3, $sformatf("latency %0d after %h", cyc + 1, w));
    else if (!was_busy) check(cyc == 4, $sformatf("telemetry latency %0d", cyc + 1));
    else check(cyc >= 4, "telemetry wait");
  endtask

  logic [7:0] ids [14] = '{8'h00, 8'h01, 8'h10, 8'h11, 8'h12, 8'h13, 8'h14,
                           8'h15, 8'h16, 8'h17, 8'h18, 8'h20, 8'h28, 8'h2A};
  logic [7:0] ids2 [6] = '{8'h2B, 8'h2C, 8'h2D, 8'h2E, 8'h2F, 8'h30};

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    m_regs = '0; m_count = 0; m_accept = 0; m_reject = 0;
    repeat (3) @(posedge clk);
    rst_n <= 1;
    @(posedge clk);
    // directed: every command of the table
    send(16'h0000);
    for (int i = 0; i < 8; i++) send({8'h10 + 8'(i), 8'(8'h11 * (i + 1))});
    send(16'h20C3); send(16'h28FF); send(16'h2A05); send(16'h2B01);
    send(16'h2C01); send(16'h2D07); send(16'h1801);
    send(16'h2E00); send(16'h2F00); send(16'h3000); send(16'h0005); send(16'h0100);
    send(16'h000A);
    send(16'h2A8C);                    // telemetry request
    send(16'h2A83);                    // immediately again: must wait
    send(16'h1755); send(16'h0101);    // APPS reset
    send(16'h00AA);
    repeat (10) @(posedge clk);
    // random mix
    for (int n = 0; n < 400; n++) begin
      logic [7:0] id;
      case ($urandom_range(0, 3))
        0: id = ids[$urandom_range(0, 13)];
        1: id = ids2[$urandom_range(0, 5)];
        2: id = 8'($urandom);
        default: id = 8'h10 + 8'($urandom_range(0, 8));
      endcase
      send({id, (id == 8'h00) ? ((n % 3 == 0) ? 8'hAA : 8'h0A) : 8'($urandom)});
    end
    check(n_tlm > 2 && n_tlm_stall > 0 && n_reject > 3 && n_apps_rst > 0,
          $sformatf("coverage tlm=%0d stall=%0d rej=%0d rst=%0d",
                    n_tlm, n_tlm_stall, n_reject, n_apps_rst));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

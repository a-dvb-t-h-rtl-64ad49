// tb_icfo_est: integer CFO and scattered-pilot phase estimation.
//
// The testbench builds an FFT output symbol in a memory model (one-cycle
// read latency): continual and scattered pilots at +-4/3 UNIT, random
// 64-QAM-like data cells on the other used carriers, zero elsewhere, all
// moved by an integer carrier offset s (bin of carrier k =
// carrier_bin(k, mode, s)). For several modes, offsets from -15 to +15 and
// all four pilot phases, `icfo` must equal s and `sp_phase` the phase.
// Watchdog: 2000000 cycles.
//
// The stimulus sizes follow the reference where it gives them; the
// reference model and the tolerances are this testbench's own.
`timescale 1ns/1ps
module tb_icfo_est;
  import dvb_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  fft_mode_e mode = MODE_2K;
  logic start = 0, done, busy;
  logic [LOGMAX-1:0] rd_addr;
  cplx_t rd_data;
  logic signed [5:0] icfo;
  logic [1:0] sp_phase;
  int checks = 0, failures = 0;

  cplx_t mem [1 << LOGMAX];
  always_ff @(posedge clk) rd_data <= mem[rd_addr];

  icfo_est dut (.clk, .rst_n, .mode, .start, .rd_addr, .rd_data, .icfo, .sp_phase, .done, .busy);

  task automatic one(fft_mode_e m, int sh, int phase);
    int n, kused;
    n = 1 << fft_log2(m); kused = n_used(m);
    for (int a = 0; a < n; a++) mem[a] = '0;
    for (int k = 0; k < kused; k++) begin
      int b;
      b = carrier_bin(k, m, sh);
      if (is_cp(k) || k % 12 == 3 * phase) begin
        mem[b].re = ($urandom % 2) ? 16'sd1365 : -16'sd1365;
        mem[b].im = '0;
      end else begin
        mem[b].re = DW'((2 * int'($urandom % 8) - 7) * LVL_QAM64);
        mem[b].im = DW'((2 * int'($urandom % 8) - 7) * LVL_QAM64);
      end
    end
    @(negedge clk); mode = m; start = 1'b1;
    @(negedge clk); start = 1'b0;
    while (!done) @(negedge clk);
    checks++;
    if (int'(icfo) != sh || int'(sp_phase) != phase) begin
      failures++;
      $display("mode %0d shift %0d phase %0d: got icfo %0d phase %0d", m, sh, phase, icfo, sp_phase);
    end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    for (int sh = -15; sh <= 15; sh += 3) one(MODE_2K, sh, (sh + 15) % 4);
    one(MODE_2K, 15, 1);
    one(MODE_4K, 2, 3);
    one(MODE_4K, -7, 0);
    one(MODE_8K, 0, 2);
    one(MODE_8K, -13, 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2000000) @(posedge clk);
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule

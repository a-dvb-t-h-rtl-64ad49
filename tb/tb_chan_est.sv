// tb_chan_est: channel estimator (pilot LS estimate, time prediction,
// frequency interpolation).
//
// 2K mode. The channel is H_k(t) = 0.8 * (1 + 0.3 exp(-j 2 pi 3 k / N))
// * exp(j 0.03 t): a two-path channel turning slowly from symbol to
// symbol. Pilots (continual and scattered, phase t mod 4, +-4/3 UNIT with
// the reference PRBS sign) and random QPSK data cells are multiplied by H
// and fed in carrier order with random idle cycles. Checks:
//   - output carriers come out in order with the right data flag and the
//     received value, one `out_last` per symbol;
//   - est_ok rises after four symbols;
//   - while est_ok, every estimate is within 3 % of |H| + 8 LSB of H from
//     symbol 8 on, where the linear prediction is used (pred_used must
//     pulse), and within 10 % before, where the latest pilot is held;
//   - interp_used pulses for carriers between columns;
//   - `clear` with sym_start drops est_ok again.
// Watchdog: 1000000 cycles.
//
// The stimulus sizes follow the reference where it gives them; the
// reference model and the tolerances are this testbench's own.
`timescale 1ns/1ps
module tb_chan_est;
  import dvb_pkg::*;

  localparam int NSYM = 14;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic sym_start = 0, clear = 0, busy, in_valid = 0;
  logic [1:0] sp_phase = '0;
  cplx_t in_data = '0, out_r, out_h;
  logic out_valid, out_data, out_last, est_ok, pred_used, interp_used;
  logic [13:0] out_k;
  int checks = 0, failures = 0;

  chan_est dut (.clk, .rst_n, .mode(MODE_2K), .sym_start, .sp_phase, .clear, .busy,
                .in_valid, .in_data, .out_valid, .out_k, .out_r, .out_h, .out_data,
                .out_last, .est_ok, .pred_used, .interp_used);

  localparam int K = 1705, N = 2048;
  real hre [K], him [K];
  cplx_t sent [K];
  logic  isdat [K];
  int n_pred = 0, n_interp = 0, n_last = 0, ko = 0, herr = 0, t_cur = 0;

  always @(posedge clk) if (rst_n) begin
    if (pred_used) n_pred++;
    if (interp_used) n_interp++;
    if (out_last) n_last++;
    if (out_valid) begin
      real er, ei, tol;
      checks++;
      if (int'(out_k) != ko || out_r != sent[ko] || out_data != isdat[ko] || out_last != (ko == K - 1)) begin
        failures++;
        if (failures < 10) $display("t %0d k %0d: order/flag/value wrong", t_cur, ko);
      end
      if (est_ok) begin
        er = real'(out_h.re) - hre[ko]; ei = real'(out_h.im) - him[ko];
        tol = (t_cur >= 8 ? 0.03 : 0.10) * $sqrt(hre[ko] * hre[ko] + him[ko] * him[ko]) + 8.0;
        if (er * er + ei * ei > tol * tol) herr++;
      end
      ko++;
    end
  end

  task automatic symbol(int t, bit clr);
    logic [10:0] prbs;
    real rot;
    prbs = '1;
    rot = 0.03 * real'(t);
    for (int k = 0; k < K; k++) begin
      real a, br, bi, xr, xi;
      a = -6.283185307179586 * 3.0 * real'(k) / real'(N);
      br = 1.0 + 0.3 * $cos(a); bi = 0.3 * $sin(a);
      hre[k] = 819.2 * (br * $cos(rot) - bi * $sin(rot));
      him[k] = 819.2 * (br * $sin(rot) + bi * $cos(rot));
      if (is_cp(k) || k % 12 == 3 * (t % 4)) begin
        xr = prbs[10] ? -1365.0 : 1365.0; xi = 0.0; isdat[k] = 1'b0;
      end else begin
        xr = ($urandom % 2 != 0) ? -724.0 : 724.0; xi = ($urandom % 2 != 0) ? -724.0 : 724.0; isdat[k] = 1'b1;
      end
      prbs = prbs_next(prbs);
      sent[k].re = DW'($rtoi((hre[k] * xr - him[k] * xi) / 1024.0));
      sent[k].im = DW'($rtoi((hre[k] * xi + him[k] * xr) / 1024.0));
    end
    ko = 0; herr = 0; t_cur = t;
    @(negedge clk); sym_start = 1'b1; sp_phase = 2'(t % 4); clear = clr;
    @(negedge clk); sym_start = 1'b0; clear = 1'b0;
    for (int k = 0; k < K; k++) begin
      while ($urandom % 4 == 0) @(negedge clk);
      in_valid = 1'b1; in_data = sent[k];
      @(negedge clk); in_valid = 1'b0;
    end
    while (busy) @(negedge clk);
    repeat (2) @(negedge clk);
  endtask

  initial begin
    int pred_before;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    for (int t = 0; t < NSYM; t++) begin
      pred_before = n_pred;
      symbol(t, 1'b0);
      checks++;
      if (ko != K || herr != 0) begin
        failures++;
        $display("symbol %0d: %0d outputs, %0d estimates out of tolerance", t, ko, herr);
      end
      checks++;
      if (est_ok != (t >= 3)) begin failures++; $display("symbol %0d: est_ok %0d", t, est_ok); end
      checks++;
      if ((n_pred != pred_before) != (t >= 8)) begin
        failures++; $display("symbol %0d: prediction use %0d", t, n_pred - pred_before);
      end
    end
    symbol(NSYM, 1'b1);
    checks++; if (est_ok) begin failures++; $display("est_ok after clear"); end
    checks++; if (n_interp == 0 || n_last != NSYM + 1) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (1000000) @(posedge clk);
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule

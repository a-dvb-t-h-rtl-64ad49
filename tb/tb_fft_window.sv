// tb_fft_window: FFT window placement, sample add/drop and window buffer.
//
// 2K mode, G = 64 (period 2112, advance D = 16, dead band 4). Samples
// carry their own index as data, one every 4 cycles. The peak of symbol s
// is reported 20 samples after its end, moved by a per-symbol offset:
//   symbol 4 alone +12            -> `suspect`, window unchanged
//   symbols 7, 8 +12              -> `suspect`, then `slip_drop`
//   symbols 9, 10 +14             -> inside the dead band, nothing
//   symbols 11, 12 back to 0      -> `suspect`, then `slip_add`
// A reference model of the schedule gives the start of each window; every
// window is read back completely through rd_addr/rd_data and must hold
// NF consecutive samples from that start. At the end the windows are no
// longer taken, which must raise `overrun`. Watchdog: 1000000 cycles.
`timescale 1ns/1ps
module tb_fft_window;
  import dvb_pkg::*;

  localparam int NF = 2048, G = 64, PER = NF + G, D = 16, DB = 4, NSYM = 16;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic peak_valid = 0, in_valid = 0, win_ready, win_take = 0;
  logic slip_add, slip_drop, suspect, overrun;
  logic [31:0] peak_idx = '0, now_idx = '0, in_idx = '0;
  logic [LOGMAX-1:0] rd_addr = '0;
  cplx_t in_data = '0, rd_data;
  bit take_on = 1;
  int checks = 0, failures = 0;

  fft_window dut (.clk, .rst_n, .enable(1'b1), .log2n(4'd11), .glen(LOGMAX'(G)),
                  .peak_valid, .peak_idx, .now_idx, .in_valid, .in_data, .in_idx,
                  .win_ready, .win_take, .rd_addr, .rd_data, .slip_add, .slip_drop,
                  .suspect, .overrun);

  function automatic int offset_of(int s);
    if (s == 4 || s == 7 || s == 8) return 12;
    if (s == 9 || s == 10) return 14;
    return 0;
  endfunction

  // expected events and window starts from the reference model
  int exp_start [$];
  int n_sus = 0, n_add = 0, n_drop = 0, n_ovr = 0, e_sus = 0, e_add = 0, e_drop = 0;
  always @(posedge clk) if (rst_n) begin
    if (suspect) n_sus++;
    if (slip_add) n_add++;
    if (slip_drop) n_drop++;
    if (overrun) n_ovr++;
  end

  initial begin
    int conf, pend, off, idx;
    bit pend_v;
    conf = 0; pend_v = 0; pend = 0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    for (int s = 0; s < NSYM; s++) begin
      off = offset_of(s);
      if (s > 0) begin
        if (off - conf > DB || off - conf < -DB) begin
          if (pend_v && off - pend <= DB && off - pend >= -DB) begin
            if (off > conf) e_drop++; else e_add++;
            conf = off; pend_v = 0;
          end else begin
            pend_v = 1; pend = off; e_sus++;
          end
        end else pend_v = 0;
      end else conf = off;
      exp_start.push_back((s + 1) * PER + G - D + conf);
    end
    // without further reports the windows go on with the same period
    for (int s = NSYM; s < NSYM + 5; s++) exp_start.push_back((s + 1) * PER + G - D + conf);
  end

  // sample source and peak reports
  initial begin
    int s;
    wait (rst_n);
    s = 0;
    for (int n = 0; n < (NSYM + 2) * PER; n++) begin
      @(negedge clk);
      in_valid = 1'b1; in_idx = 32'(n); in_data.re = DW'(n); in_data.im = DW'(n >> 16);
      peak_valid = 1'b0;
      if (s < NSYM && n == s * PER + G + NF - 1 + 20) begin
        peak_valid = 1'b1;
        peak_idx   = 32'(s * PER + G + NF - 1 + offset_of(s));
        s++;
      end
      @(negedge clk); in_valid = 1'b0; peak_valid = 1'b0; now_idx = 32'(n);
      repeat (2) @(negedge clk);
    end
    // stop taking windows: overrun expected
    take_on = 0;
    for (int n = (NSYM + 2) * PER; n < (NSYM + 5) * PER; n++) begin
      @(negedge clk);
      in_valid = 1'b1; in_idx = 32'(n); in_data.re = DW'(n); in_data.im = DW'(n >> 16);
      @(negedge clk); in_valid = 1'b0; now_idx = 32'(n);
    end
    checks++; if (n_ovr == 0) begin failures++; $display("no overrun"); end
    checks++; if (n_sus != e_sus || n_add != e_add || n_drop != e_drop) begin
      failures++;
      $display("events suspect/add/drop %0d %0d %0d, expected %0d %0d %0d",
               n_sus, n_add, n_drop, e_sus, e_add, e_drop);
    end
    checks++; if (e_add == 0 || e_drop == 0 || e_sus < 3) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // consumer: read back every window
  initial begin
    int w;
    w = 0;
    wait (rst_n);
    forever begin
      @(negedge clk);
      if (win_ready && take_on) begin
        int bad, st;
        st = exp_start[w];
        bad = 0;
        for (int a = 0; a < NF; a++) begin
          rd_addr = LOGMAX'(a);
          @(negedge clk);
          if (rd_data.re != DW'(st + a) || rd_data.im != DW'((st + a) >> 16)) bad++;
        end
        checks++;
        if (bad != 0 || overrun) begin
          failures++;
          $display("window %0d: %0d wrong samples (expected start %0d, first %0d)", w, bad, st,
                   int'(rd_data.re) - NF + 1);
        end
        win_take = 1'b1;
        @(negedge clk); win_take = 1'b0;
        w++;
      end
    end
  end

  initial begin
    repeat (1000000) @(posedge clk);
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule

// tb_frame_adapt: OFDM symbol assembly.
//
// The testbench plays the mapper: when data_req is high and it offers bits
// (randomly, to test stalls), it delivers a numbered cell one cycle later.
// A memory model records the writes. For 2K phase 0, 4K phase 1 and 8K
// phase 3 it checks every bin: data carriers hold the data cells in carrier
// order, continual and scattered pilots (k mod 12 = 3*phase) hold
// +-4/3 UNIT with the sign of the reference PRBS (generated here from
// x^11 + x^2 + 1, all-ones start, one step per used carrier), unused bins
// are zero; all N bins written once and one `done` pulse.
// Watchdog: 300000 cycles.
//
// The stimulus sizes follow the reference where it gives them; the
// reference model and the tolerances are this testbench's own.
`timescale 1ns/1ps
module tb_frame_adapt;
  import dvb_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  fft_mode_e mode = MODE_2K;
  logic start = 0, data_req, bits_valid = 0, wr_en, busy, done;
  logic [1:0] sym_phase = '0;
  cplx_t cell_in = '0, wr_data;
  logic [LOGMAX-1:0] wr_addr;
  int checks = 0, failures = 0;

  frame_adapt dut (.clk, .rst_n, .mode, .start, .sym_phase, .data_req, .bits_valid, .cell_in,
                   .wr_en, .wr_addr, .wr_data, .busy, .done);

  cplx_t mem [1 << LOGMAX];
  int    nwr [1 << LOGMAX];
  int    ncell = 0, ndone = 0;

  always @(posedge clk) if (rst_n) begin
    if (wr_en) begin mem[wr_addr] = wr_data; nwr[wr_addr]++; end
    if (done) ndone++;
    if (data_req && bits_valid) begin
      cell_in.re <= DW'(ncell); cell_in.im <= DW'(~ncell);
      ncell++;
    end
  end
  always @(negedge clk) bits_valid = 1'($urandom % 3 != 0);

  task automatic one(fft_mode_e m, int phase);
    int n, kused, bin, dcount, w;
    logic [10:0] reg11;
    n = 1 << fft_log2(m); kused = n_used(m);
    for (int a = 0; a < n; a++) begin nwr[a] = 0; mem[a] = '0; end
    ncell = 0; ndone = 0;
    @(negedge clk); mode = m; sym_phase = 2'(phase); start = 1'b1;
    @(negedge clk); start = 1'b0;
    while (busy) @(negedge clk);
    repeat (3) @(negedge clk);
    reg11 = '1; dcount = 0;
    for (int k = 0; k < kused; k++) begin
      logic pil;
      w = reg11[10];
      reg11 = {reg11[9:0], reg11[10] ^ reg11[8]};
      bin = (k - (kused - 1) / 2 + n) % n;
      pil = is_cp(k) || (k % 12 == 3 * phase);
      checks++;
      if (pil) begin
        if (int'(mem[bin].re) != (w ? -1365 : 1365) || mem[bin].im != 0) begin
          failures++;
          if (failures < 10) $display("k %0d pilot: %0d", k, mem[bin].re);
        end
      end else begin
        if (int'(mem[bin].re) != dcount || mem[bin].im != ~DW'(dcount)) begin
          failures++;
          if (failures < 10) $display("k %0d data: %0d exp %0d", k, mem[bin].re, dcount);
        end
        dcount++;
      end
    end
    for (int k = kused; k < n; k++) begin
      bin = (k - (kused - 1) / 2 + n) % n;
      checks++;
      if (mem[bin] != '0) failures++;
    end
    for (int a = 0; a < n; a++) if (nwr[a] != 1) begin
      failures++;
      if (failures < 10) $display("bin %0d written %0d times", a, nwr[a]);
    end
    checks++;
    if (ndone != 1 || ncell != dcount) begin
      failures++;
      $display("done %0d, cells %0d of %0d", ndone, ncell, dcount);
    end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    one(MODE_2K, 0);
    one(MODE_4K, 1);
    one(MODE_8K, 3);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (300000) @(posedge clk);
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule

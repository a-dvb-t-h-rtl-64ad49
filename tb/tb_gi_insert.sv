// tb_gi_insert: guard-interval insertion.
//
// The IFFT memory is modelled here with a one-cycle read latency; word a
// holds a value made from a. For (N, G) = (64, 16), (2048, 64) and
// (8192, 2048) the output stream, with a random out_ready, must be
// samples N-G .. N-1 followed by 0 .. N-1, out_first only on the first
// one, and one `done` pulse at the end. Watchdog: 400000 cycles.
//
// The stimulus sizes follow the reference where it gives them; the
// reference model and the tolerances are this testbench's own.
`timescale 1ns/1ps
module tb_gi_insert;
  import dvb_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic [3:0] log2n = 4'd6;
  logic [LOGMAX-1:0] glen = '0, rd_addr;
  logic start = 0, out_valid, out_ready = 0, out_first, busy, done;
  cplx_t rd_data, out_data;
  int checks = 0, failures = 0;

  always_ff @(posedge clk) begin
    rd_data.re <= DW'(rd_addr);
    rd_data.im <= ~DW'(rd_addr);
  end

  gi_insert dut (.clk, .rst_n, .log2n, .glen, .start, .rd_addr, .rd_data,
                 .out_valid, .out_ready, .out_data, .out_first, .busy, .done);

  task automatic one(int ln, int g);
    int n, pos, ndone, exp_a;
    n = 1 << ln;
    @(negedge clk);
    log2n = 4'(ln); glen = LOGMAX'(g); start = 1'b1;
    @(negedge clk); start = 1'b0;
    pos = 0; ndone = 0;
    while (busy || pos == 0) begin
      out_ready = 1'($urandom % 4 != 0);
      @(posedge clk);
      if (out_valid && out_ready) begin
        exp_a = (pos < g) ? n - g + pos : pos - g;
        checks++;
        if (int'(out_data.re) != exp_a || out_data.im != ~DW'(exp_a) || out_first != (pos == 0)) begin
          failures++;
          if (failures < 10) $display("N %0d pos %0d: got %0d exp %0d", n, pos, out_data.re, exp_a);
        end
        pos++;
      end
      if (done) ndone++;
      @(negedge clk);
    end
    repeat (3) begin @(posedge clk); if (done) ndone++; end
    checks++;
    if (pos != n + g || ndone != 1) begin
      failures++;
      $display("N %0d: %0d samples, %0d done pulses", n, pos, ndone);
    end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    one(6, 16);
    one(11, 64);
    one(13, 2048);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (400000) @(posedge clk);
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule

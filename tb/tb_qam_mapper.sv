// tb_qam_mapper: exhaustive test of the QAM mapper.
//
// All 64 input bit patterns are applied for QPSK, 16-QAM and 64-QAM and the
// registered output cell is compared with a reference built here from the
// DVB-T level table (per axis: sign bit, then Gray-coded magnitude level,
// levels 1, 3, 5, 7 times the constellation spacing). A gap cycle between
// inputs checks that out_valid follows in_valid. Watchdog: 10000 cycles.
`timescale 1ns/1ps
module tb_qam_mapper;
  import dvb_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  constel_e   constel;
  logic       in_valid = 1'b0;
  logic [5:0] in_bits = '0;
  logic       out_valid;
  cplx_t      out_cell;
  int checks = 0, failures = 0;

  qam_mapper dut (.clk, .rst_n, .constel, .in_valid, .in_bits, .out_valid, .out_cell);

  function automatic int ref_axis(logic s, logic b1, logic b2, constel_e c);
    int m;
    case (c)
      QPSK:    m = LVL_QPSK;
      QAM16:   m = (b1 ? 3 : 1) * LVL_QAM16;
      default: case ({b1, b2})
                 2'b00: m = 1 * LVL_QAM64;
                 2'b01: m = 3 * LVL_QAM64;
                 2'b11: m = 5 * LVL_QAM64;
                 default: m = 7 * LVL_QAM64;
               endcase
    endcase
    return s ? -m : m;
  endfunction

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    for (int c = 0; c < 3; c++) begin
      constel = constel_e'(c);
      for (int b = 0; b < 64; b++) begin
        int er, ei;
        @(negedge clk); in_valid = 1'b1; in_bits = 6'(b);
        @(negedge clk); in_valid = 1'b0;
        er = ref_axis(in_bits[0], in_bits[2], in_bits[4], constel);
        ei = ref_axis(in_bits[1], in_bits[3], in_bits[5], constel);
        checks++;
        if (!out_valid || int'(out_cell.re) != er || int'(out_cell.im) != ei) begin
          failures++;
          if (failures < 10) $display("constel %0d bits %b: got %0d %0d exp %0d %0d",
                                      c, in_bits, out_cell.re, out_cell.im, er, ei);
        end
        @(negedge clk);
        checks++;
        if (out_valid) failures++;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule

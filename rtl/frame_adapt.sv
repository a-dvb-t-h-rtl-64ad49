// frame_adapt: builds one OFDM symbol in the (I)FFT input memory.
//
// For carrier k = 0 .. Kused-1 it writes either a pilot or the next data
// cell_in to the FFT bin of that carrier (carriers centred on DC), then writes
// zero to the remaining N - Kused bins. Pilots are the scattered pilots
// (every 12th carrier, shifted by 3 carriers per symbol, as the document
// describes) and the continual pilots of the dvb_pkg table; a pilot carries
// +-4/3 * UNIT on the real axis, the sign given by the standard's reference
// PRBS (x^11 + x^2 + 1) bit w_k: 0 -> +, 1 -> -.
//
// Interface: `start` with `sym_phase` = symbol index mod 4 begins a symbol.
// Data cells come from a qam_mapper with one cycle of latency:
// `data_req` high means carrier k is a data carrier and the bits presented
// with bits_valid are consumed in that cycle; their cell_in is expected on
// `cell_in` one cycle later. `done` pulses after the last of the N writes.
// One carrier per cycle when data is available.
module frame_adapt
  import dvb_pkg::*;
(
  input  logic            clk,
  input  logic            rst_n,
  input  fft_mode_e       mode,
  input  logic            start,
  input  logic [1:0]      sym_phase,
  output logic            data_req,
  input  logic            bits_valid,
  input  cplx_t           cell_in,
  output logic            wr_en,
  output logic [LOGMAX-1:0] wr_addr,
  output cplx_t           wr_data,
  output logic            busy,
  output logic            done
);
  logic        run;
  logic [13:0] k;
  logic [10:0] prbs;
  logic [1:0]  ph;
  logic        is_pilot, is_used, step;
  int          nfull, kused;

  assign nfull    = 1 << fft_log2(mode);
  assign kused    = n_used(mode);
  assign is_used  = int'(k) < kused;
  assign is_pilot = is_used && (is_cp(int'(k)) || is_sp(int'(k), ph));
  assign data_req = run && is_used && !is_pilot;
  assign step     = run && (!data_req || bits_valid);
  assign busy     = run;

  // second stage: registered write of carrier k
  logic        s1_valid, s1_data;
  cplx_t       s1_val;
  logic [LOGMAX-1:0] s1_addr;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      run <= 1'b0; k <= '0; prbs <= '1; ph <= '0;
      s1_valid <= 1'b0; s1_data <= 1'b0; s1_val <= '0; s1_addr <= '0;
      done <= 1'b0;
    end else begin
      done     <= 1'b0;
      s1_valid <= 1'b0;
      if (!run) begin
        if (start) begin
          run <= 1'b1; k <= '0; prbs <= '1; ph <= sym_phase;
        end
      end else if (step) begin
        s1_valid <= 1'b1;
        s1_data  <= data_req;
        s1_addr  <= LOGMAX'(carrier_bin(int'(k), mode, 0));
        s1_val.im <= '0;
        if (!is_used)      s1_val.re <= '0;
        else if (prbs[10]) s1_val.re <= -DW'(PILOT_AMP);
        else               s1_val.re <= DW'(PILOT_AMP);
        if (is_used) prbs <= prbs_next(prbs);
        if (int'(k) == nfull - 1) begin
          run  <= 1'b0;
          done <= 1'b1;
        end
        k <= k + 1'b1;
      end
    end
  end

  assign wr_en   = s1_valid;
  assign wr_addr = s1_addr;
  assign wr_data = s1_data ? cell_in : s1_val;

endmodule

// dvbt_tx: DVB-T/H inner transmitter.
//
// Chain (document Sec. 3.1): bits from the outer encoder -> QAM mapper ->
// frame adaption (pilots + data cells) -> IFFT -> guard interval insertion
// -> sample stream to the RF front end. Symbols are produced one after the
// other: build (N cycles plus data stalls), IFFT (log2N * N/2 cycles), emit
// (N + G samples). The symbol counter sets the scattered-pilot phase
// (symbol index mod 4). Mode, GI and constellation are sampled when a
// symbol starts; `enable` low stops after the current symbol.
//
// Interface: din_valid/din_ready/din_bits, one cell's worth of bits per
// transfer (2, 4 or 6 LSBs used); out_valid/out_ready/out_data complex
// samples, out_first on the first guard sample of each symbol.
module dvbt_tx
  import dvb_pkg::*;
(
  input  logic      clk,
  input  logic      rst_n,
  input  logic      enable,
  input  fft_mode_e mode,
  input  gi_e       gi,
  input  constel_e  constel,
  input  logic      din_valid,
  output logic      din_ready,
  input  logic [5:0] din_bits,
  output logic      out_valid,
  input  logic      out_ready,
  output cplx_t     out_data,
  output logic      out_first,
  output logic [1:0] sym_phase
);
  typedef enum logic [1:0] {T_IDLE, T_FILL, T_FFT, T_EMIT} tstate_e;
  tstate_e   st;
  fft_mode_e m_q;
  gi_e       g_q;
  constel_e  c_q;

  logic fa_start, fa_req, fa_done, fa_wr;
  logic [LOGMAX-1:0] fa_addr, gi_addr;
  cplx_t fa_data, map_cell, fft_rd;
  logic fft_start, fft_done, gi_start, gi_done;

  assign din_ready = fa_req;

  qam_mapper u_map (
    .clk, .rst_n, .constel(c_q), .in_valid(din_valid && fa_req), .in_bits(din_bits),
    .out_valid(), .out_cell(map_cell)
  );

  frame_adapt u_fa (
    .clk, .rst_n, .mode(m_q), .start(fa_start), .sym_phase,
    .data_req(fa_req), .bits_valid(din_valid), .cell_in(map_cell),
    .wr_en(fa_wr), .wr_addr(fa_addr), .wr_data(fa_data), .busy(), .done(fa_done)
  );

  fft_core u_ifft (
    .clk, .rst_n, .log2n(4'(fft_log2(m_q))), .inverse(1'b1),
    .wr_en(fa_wr), .wr_addr(fa_addr), .wr_data(fa_data),
    .start(fft_start), .busy(), .done(fft_done),
    .rd_addr(gi_addr), .rd_data(fft_rd)
  );

  gi_insert u_gi (
    .clk, .rst_n, .log2n(4'(fft_log2(m_q))), .glen(LOGMAX'(gi_len(m_q, g_q))),
    .start(gi_start), .rd_addr(gi_addr), .rd_data(fft_rd),
    .out_valid, .out_ready, .out_data, .out_first, .busy(), .done(gi_done)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st <= T_IDLE; m_q <= MODE_2K; g_q <= GI_1_32; c_q <= QPSK;
      sym_phase <= '0; fa_start <= 1'b0; fft_start <= 1'b0; gi_start <= 1'b0;
    end else begin
      fa_start <= 1'b0; fft_start <= 1'b0; gi_start <= 1'b0;
      case (st)
        T_IDLE: if (enable) begin
          m_q <= mode; g_q <= gi; c_q <= constel;
          fa_start <= 1'b1;
          st <= T_FILL;
        end
        T_FILL: if (fa_done) begin
          fft_start <= 1'b1;
          st <= T_FFT;
        end
        T_FFT: if (fft_done) begin
          gi_start <= 1'b1;
          st <= T_EMIT;
        end
        T_EMIT: if (gi_done) begin
          sym_phase <= sym_phase + 1'b1;
          st <= T_IDLE;
        end
        default: st <= T_IDLE;
      endcase
    end
  end

endmodule

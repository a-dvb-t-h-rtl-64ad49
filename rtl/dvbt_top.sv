// dvbt_top: DVB-T/H inner baseband processor, transmitter and receiver.
//
// The two halves share no state: the transmitter turns outer-encoder bits
// into a time-domain sample stream for the RF front end, the receiver
// turns a received sample stream back into cell bits. See dvbt_tx and
// dvbt_rx for their structure and timing. The RF front end and the outer
// (de)coder are outside this block; their streams are the ports below.
//
// The split into transmitter and receiver, and the blocks inside each,
// follow the reference's block diagram; bringing the outer-coder and RF
// streams out as plain valid/ready ports is this design's own choice.
module dvbt_top
  import dvb_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  // transmitter
  input  logic        tx_enable,
  input  fft_mode_e   tx_mode,
  input  gi_e         tx_gi,
  input  constel_e    tx_constel,
  input  logic        tx_din_valid,
  output logic        tx_din_ready,
  input  logic [5:0]  tx_din_bits,
  output logic        tx_out_valid,
  input  logic        tx_out_ready,
  output cplx_t       tx_out_data,
  output logic        tx_out_first,
  output logic [1:0]  tx_sym_phase,
  // receiver
  input  constel_e    rx_constel,
  input  logic        rx_in_valid,
  input  cplx_t       rx_in_data,
  output logic        rx_out_valid,
  output logic [13:0] rx_out_k,
  output logic [5:0]  rx_out_bits,
  output logic        rx_sym_last,
  output logic        rx_detected,
  output fft_mode_e   rx_mode,
  output gi_e         rx_gi,
  output logic signed [5:0] rx_icfo,
  output logic [31:0] rx_fcfo_inc,
  output logic        rx_est_ok,
  output logic [6:0]  rx_events   // acq, scan_next, slip_add, slip_drop, overrun, pred, interp
);
  dvbt_tx u_tx (
    .clk, .rst_n, .enable(tx_enable), .mode(tx_mode), .gi(tx_gi), .constel(tx_constel),
    .din_valid(tx_din_valid), .din_ready(tx_din_ready), .din_bits(tx_din_bits),
    .out_valid(tx_out_valid), .out_ready(tx_out_ready), .out_data(tx_out_data),
    .out_first(tx_out_first), .sym_phase(tx_sym_phase)
  );

  dvbt_rx u_rx (
    .clk, .rst_n, .constel(rx_constel), .in_valid(rx_in_valid), .in_data(rx_in_data),
    .out_valid(rx_out_valid), .out_k(rx_out_k), .out_bits(rx_out_bits), .sym_last(rx_sym_last),
    .detected(rx_detected), .mode(rx_mode), .gi(rx_gi), .icfo(rx_icfo), .fcfo_inc(rx_fcfo_inc),
    .est_ok(rx_est_ok),
    .ev_acq(rx_events[0]), .ev_scan_next(rx_events[1]), .ev_slip_add(rx_events[2]),
    .ev_slip_drop(rx_events[3]), .ev_overrun(rx_events[4]), .ev_pred(rx_events[5]),
    .ev_interp(rx_events[6])
  );
endmodule

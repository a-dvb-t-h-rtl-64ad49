// fft_window: FFT window controller with sample add/drop.
//
// The signal detector reports the index of each symbol-end peak. The next
// FFT window then starts at peak + 1 + G - D, i.e. at the first useful
// sample of the next symbol moved D samples early; D = NF/128 is a quarter
// of the smallest guard interval (document, Sec. 3.2), which keeps the
// window inside the guard of the same symbol even with a slightly late
// peak. Windows then repeat every NF + G samples on their own. When a
// later peak moves the schedule by more than a dead band of NF/512
// samples in two successive reports, the controller follows it: a later
// window drops samples (`slip_drop`), an earlier one adds samples again
// (`slip_add`). Smaller deviations (peak jitter from multipath) are
// absorbed by the D-sample advance, and a single outlying peak is ignored.
// The dead band and the two-report confirmation are this design's
// choices; the document only asks for "a simple windows controller".
//
// The NF samples of a window are stored in a window buffer so the FFT can
// work on one symbol while the next is being collected. `win_ready` rises
// when a window is complete; the consumer reads it through rd_addr/rd_data
// (one cycle latency) and pulses `win_take`. The next window is written
// from address 0 at the input sample rate while the previous one may still
// be read: a consumer that starts at `win_ready` and reads one word per
// cycle stays ahead of the writer. A window that completes before the
// previous one was taken raises `overrun` (the older one is lost).
module fft_window
  import dvb_pkg::*;
(
  input  logic              clk,
  input  logic              rst_n,
  input  logic              enable,
  input  logic [3:0]        log2n,
  input  logic [LOGMAX-1:0] glen,
  input  logic              peak_valid,
  input  logic [31:0]       peak_idx,
  input  logic [31:0]       now_idx,     // index of the newest input sample
  input  logic              in_valid,
  input  cplx_t             in_data,
  input  logic [31:0]       in_idx,
  output logic              win_ready,
  input  logic              win_take,
  input  logic [LOGMAX-1:0] rd_addr,
  output cplx_t             rd_data,
  output logic              slip_add,
  output logic              slip_drop,
  output logic              suspect,     // a peak outside the dead band, not yet confirmed
  output logic              overrun
);
  cplx_t buffer [NMAX];

  logic [31:0] nf, per, dadv, dband, t_sched, t_new;
  logic        sched_v, active, pend_v;
  logic [31:0] pend_off;

  function automatic logic outside(logic [31:0] diff);
    return $signed(diff) > $signed(dband) || $signed(diff) < -$signed(dband);
  endfunction
  logic [LOGMAX-1:0] waddr;

  assign nf   = 32'(1) << log2n;
  assign per  = nf + 32'(glen);
  assign dadv = nf >> 7;
  assign dband = nf >> 9;

  logic begin_w;
  assign begin_w = enable && sched_v && !active && in_idx == t_sched;

  always_comb begin
    t_new = peak_idx + 32'd1 + 32'(glen) - dadv;
    if ($signed(t_new - now_idx) <= 0) t_new = t_new + per;
  end

  always_ff @(posedge clk) begin
    if (in_valid && active)      buffer[waddr] <= in_data;
    else if (in_valid && begin_w) buffer[0]   <= in_data;
    rd_data <= buffer[rd_addr];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      t_sched <= '0; sched_v <= 1'b0; pend_v <= 1'b0; pend_off <= '0; active <= 1'b0; waddr <= '0;
      win_ready <= 1'b0; slip_add <= 1'b0; slip_drop <= 1'b0; overrun <= 1'b0; suspect <= 1'b0;
    end else begin
      slip_add <= 1'b0; slip_drop <= 1'b0; overrun <= 1'b0; suspect <= 1'b0;
      if (win_take) win_ready <= 1'b0;
      if (!enable) begin
        sched_v <= 1'b0; active <= 1'b0;
      end else begin
        if (in_valid) begin
          if (active) begin
            waddr <= waddr + 1'b1;
            if (32'(waddr) == nf - 1) begin
              active    <= 1'b0;
              win_ready <= 1'b1;
              if (win_ready && !win_take) overrun <= 1'b1;
            end
          end else if (begin_w) begin
            active  <= 1'b1;
            waddr   <= LOGMAX'(1);
            t_sched <= t_sched + per;
          end
        end
        if (peak_valid) begin
          if (!sched_v || $signed(t_sched - now_idx) <= 0) begin
            t_sched <= t_new;
            sched_v <= 1'b1;
          end else if (outside(t_new - t_sched) && !begin_w) begin
            // move only when two reports in a row agree on the new position
            if (pend_v && !outside(t_new - t_sched - pend_off)) begin
              t_sched   <= t_new;
              slip_drop <= $signed(t_new - t_sched) > 0;
              slip_add  <= $signed(t_new - t_sched) < 0;
              pend_v    <= 1'b0;
            end else begin
              pend_v   <= 1'b1;
              pend_off <= t_new - t_sched;
              suspect  <= 1'b1;
            end
          end else begin
            pend_v <= 1'b0;
          end
        end
      end
    end
  end

endmodule

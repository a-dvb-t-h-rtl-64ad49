// icfo_est: integer CFO estimation (document eq. (3)) and scattered-pilot
// phase detection, on one FFT output symbol.
//
// Pass 1 (eq. 3): for every shift s = -15 .. +15 the powers |R|^2 of the
// bins at the continual-pilot carriers p_c + s are summed; the shift with
// the largest sum is the integer CFO (boosted pilots carry more power than
// data). Pass 2 (this design's own addition; the document does not say how
// the receiver learns which of the four scattered-pilot patterns a symbol
// carries): with the integer CFO applied, the powers of the carriers
// k = 0 mod 3 are summed in four groups by (k/3) mod 4; the strongest group
// is the scattered-pilot phase of the symbol.
//
// Interface: `start` begins; the FFT result is read through rd_addr/rd_data
// (one cycle latency). `done` pulses with `icfo` and `sp_phase` valid.
// Timing: 31*45 + Kused/3 + 2 reads, about 1.9k cycles in 2K mode.
module icfo_est
  import dvb_pkg::*;
(
  input  logic              clk,
  input  logic              rst_n,
  input  fft_mode_e         mode,
  input  logic              start,
  output logic [LOGMAX-1:0] rd_addr,
  input  cplx_t             rd_data,
  output logic signed [5:0] icfo,
  output logic [1:0]        sp_phase,
  output logic              done,
  output logic              busy
);
  typedef enum logic [2:0] {I_IDLE, I_CP, I_MID, I_SP, I_END} istate_e;
  istate_e st;

  logic signed [5:0]  sh;         // current shift in pass 1
  logic [12:0]        ci;         // pilot / column counter
  // read pipeline: address registered here, data registered in the FFT,
  // so data arrives two cycles after issue (stage 1 -> stage 2)
  logic               rv1, rlast1, rp1, rv, rlast, rp;  // valid, last of group, pass 1
  logic [1:0]         rgrp1, rgrp;
  logic [39:0]        acc, best;
  logic [39:0]        grp [4];
  logic signed [5:0]  best_sh, sh1, cur_sh;  // shift tag through the read pipeline

  logic [32:0] pw;
  assign pw = 33'(rd_data.re * rd_data.re) + 33'(rd_data.im * rd_data.im);

  // strongest of the four pilot-column groups
  logic [1:0] bg;
  always_comb begin
    bg = 2'd0;
    for (int g = 1; g < 4; g++) if (grp[g] > grp[bg]) bg = 2'(g);
  end
  assign busy = (st != I_IDLE);

  int jlast;
  assign jlast = (n_used(mode) - 1) / 3;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st <= I_IDLE; sh <= '0; ci <= '0; rv <= 1'b0; rlast <= 1'b0; rgrp <= '0;
      sh1 <= '0; cur_sh <= '0;
      rv1 <= 1'b0; rlast1 <= 1'b0; rgrp1 <= '0; rp1 <= 1'b0; rp <= 1'b0;
      acc <= '0; best <= '0; best_sh <= '0; icfo <= '0; sp_phase <= '0; done <= 1'b0;
      rd_addr <= '0;
      for (int g = 0; g < 4; g++) grp[g] <= '0;
    end else begin
      done <= 1'b0;
      rv1  <= 1'b0;
      rv <= rv1; rlast <= rlast1; rgrp <= rgrp1; rp <= rp1; cur_sh <= sh1;
      // accumulate the data of the read issued two cycles ago
      if (rv) begin
        if (rp) begin
          if (rlast) begin
            if (acc + 40'(pw) > best || cur_sh == -6'sd15) begin
              best    <= acc + 40'(pw);
              best_sh <= cur_sh;
            end
            acc <= '0;
          end else begin
            acc <= acc + 40'(pw);
          end
        end else begin
          grp[rgrp] <= grp[rgrp] + 40'(pw);
        end
      end
      case (st)
        I_IDLE: if (start) begin
          st <= I_CP; sh <= -6'sd15; ci <= '0; acc <= '0; best <= '0;
        end
        I_CP: begin
          rd_addr <= LOGMAX'(carrier_bin(cp_pos(int'(ci)), mode, int'(sh)));
          rv1     <= 1'b1;
          rp1     <= 1'b1;
          sh1     <= sh;
          rlast1  <= (int'(ci) == NCP - 1);
          if (int'(ci) == NCP - 1) begin
            ci <= '0;
            sh <= sh + 6'sd1;
            if (sh == 6'sd15) begin
              st <= I_MID;
              for (int g = 0; g < 4; g++) grp[g] <= '0;
            end
          end else begin
            ci <= ci + 1'b1;
          end
        end
        // wait until the last pass-1 group is compared (best_sh final)
        I_MID: if (!rv1 && !rv) st <= I_SP;
        I_SP: begin
          rd_addr <= LOGMAX'(carrier_bin(3 * int'(ci), mode, int'(best_sh)));
          rv1    <= 1'b1;
          rp1    <= 1'b0;
          rlast1 <= 1'b0;
          rgrp1  <= ci[1:0];
          if (int'(ci) == jlast) st <= I_END;
          else ci <= ci + 1'b1;
        end
        I_END: if (!rv1 && !rv) begin
          icfo     <= best_sh;
          sp_phase <= bg;
          done <= 1'b1;
          st   <= I_IDLE;
        end
        default: st <= I_IDLE;
      endcase
    end
  end

endmodule

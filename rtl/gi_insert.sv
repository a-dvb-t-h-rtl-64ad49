// gi_insert: reads one OFDM symbol out of the IFFT memory and emits it with
// its guard interval (cyclic prefix): samples N-G .. N-1, then 0 .. N-1.
//
// Interface: `start` begins a symbol of size 2^log2n with guard length
// `glen`; the IFFT is read through its one-cycle-latency read port
// (rd_addr/rd_data). Output is a valid/ready stream; `out_first` marks the
// first guard sample. Throughput is one sample per two cycles (address
// cycle, then data cycle held until accepted). `done` pulses after the last
// sample is accepted.
//
// Cyclic-prefix insertion and the four guard ratios follow the standard the
// reference implements; the two-cycle read/output pattern is this design's
// own. out_data is wired straight from rd_data on purpose: the IFFT memory's
// registered read port is the output register, and out_valid says when it
// holds a sample.
module gi_insert
  import dvb_pkg::*;
(
  input  logic              clk,
  input  logic              rst_n,
  input  logic [3:0]        log2n,
  input  logic [LOGMAX-1:0] glen,
  input  logic              start,
  output logic [LOGMAX-1:0] rd_addr,
  input  cplx_t             rd_data,
  output logic              out_valid,
  input  logic              out_ready,
  output cplx_t             out_data,
  output logic              out_first,
  output logic              busy,
  output logic              done
);
  typedef enum logic [1:0] {S_IDLE, S_READ, S_OUT} state_e;
  state_e      st;
  logic [14:0] idx;
  logic [14:0] total;
  logic [LOGMAX:0] nfull;

  assign nfull = (LOGMAX+1)'(1) << log2n;
  assign total = 15'(nfull) + 15'(glen);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st <= S_IDLE; idx <= '0; rd_addr <= '0; done <= 1'b0;
    end else begin
      done <= 1'b0;
      case (st)
        S_IDLE: if (start) begin
          idx     <= '0;
          rd_addr <= LOGMAX'(nfull - (LOGMAX+1)'(glen));
          st      <= S_READ;
        end
        S_READ: st <= S_OUT;
        S_OUT: if (out_ready) begin
          if (idx == total - 1'b1) begin
            st   <= S_IDLE;
            done <= 1'b1;
          end else begin
            idx     <= idx + 1'b1;
            rd_addr <= rd_addr + 1'b1;  // wraps from N-1 to 0 ...
            if (idx + 1'b1 == 15'(glen)) rd_addr <= '0;  // ... at the end of the guard
            st      <= S_READ;
          end
        end
        default: st <= S_IDLE;
      endcase
    end
  end

  assign out_valid = (st == S_OUT);
  assign out_data  = rd_data;
  assign out_first = (st == S_OUT) && (idx == 0);
  assign busy      = (st != S_IDLE);

endmodule

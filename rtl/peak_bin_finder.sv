// peak_bin_finder: finds the frequency of interest, the FFT bin of largest
// magnitude on one channel.
//
// After start it reads bins MIN_BIN..MAX_BIN from the FFT output port, one
// per clock (rd_addr out, rd_data back one clock later), forms the squared
// magnitude re^2 + im^2 of each and keeps the largest. On a tie the lower bin
// wins. done pulses with peak_bin and peak_mag valid; they hold until the
// next search. A search takes MAX_BIN - MIN_BIN + 3 clocks.
//
// Searching a single channel for the largest bin follows the design. The
// default range 1..N/2-1 (no DC bin, no bins above the Nyquist frequency,
// which mirror those below for a real input) and the use of the squared
// magnitude are this block's own choices.
//
// Ports: clk, rst (synchronous, active high); start, busy, done; rd_addr,
// rd_data (FFT read port, one-cycle latency); peak_bin, peak_mag.
module peak_bin_finder
  import sl_pkg::*;
#(
  parameter int unsigned N       = 1024,
  parameter int unsigned MIN_BIN = 1,
  parameter int unsigned MAX_BIN = N / 2 - 1,
  localparam int unsigned LG     = $clog2(N)
) (
  input  logic              clk,
  input  logic              rst,
  input  logic              start,
  output logic              busy,
  output logic              done,
  output logic [LG-1:0]     rd_addr,
  input  cplx_t             rd_data,
  output logic [LG-1:0]     peak_bin,
  output logic [2*FFT_W:0]  peak_mag
);

  typedef logic [2*FFT_W:0] mag_t;

  logic          issuing;     // an address is being issued this cycle
  logic          data_ok;     // rd_data holds the bin issued last cycle
  logic [LG-1:0] data_bin;
  mag_t          mag;
  logic signed [2*FFT_W-1:0] sq_re, sq_im;

  assign sq_re = rd_data.re * rd_data.re;   // operands widened by the context
  assign sq_im = rd_data.im * rd_data.im;
  assign mag   = mag_t'(unsigned'(sq_re)) + mag_t'(unsigned'(sq_im));

  always_ff @(posedge clk) begin
    if (rst) begin
      busy     <= 1'b0;
      done     <= 1'b0;
      issuing  <= 1'b0;
      data_ok  <= 1'b0;
      rd_addr  <= '0;
      data_bin <= '0;
      peak_bin <= '0;
      peak_mag <= '0;
    end else begin
      done <= 1'b0;
      if (!busy) begin
        if (start) begin
          busy     <= 1'b1;
          issuing  <= 1'b1;
          data_ok  <= 1'b0;
          rd_addr  <= LG'(MIN_BIN);
          peak_bin <= LG'(MIN_BIN);
          peak_mag <= '0;
        end
      end else begin
        // issue stage
        data_ok  <= issuing;
        data_bin <= rd_addr;
        if (issuing) begin
          if (rd_addr == LG'(MAX_BIN)) issuing <= 1'b0;
          else rd_addr <= rd_addr + LG'(1);
        end
        // compare stage
        if (data_ok) begin
          if (mag > peak_mag) begin
            peak_mag <= mag;
            peak_bin <= data_bin;
          end
          if (data_bin == LG'(MAX_BIN)) begin
            busy <= 1'b0;
            done <= 1'b1;
          end
        end
      end
    end
  end

endmodule

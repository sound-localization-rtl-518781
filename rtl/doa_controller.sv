// doa_controller: sequences the processing of one captured chunk.
//
// When the capture side reports a complete chunk (chunk_ready, with the
// bank that holds it) and test mode is off, the controller takes the bank
// (busy goes high, so capture will not overwrite it) and, for each channel
// ch = 0..M-1 in turn:
//   LOAD  reads the N samples of channel ch from the time-series RAM (one
//         per clock, one clock of read latency) into the FFT;
//   FFT   starts the transform and waits for it;
//   PEAK  for channel 0 only: runs the peak-bin search on its spectrum and
//         keeps the bin as the frequency of interest;
//   GRAB  reads X_ch at that bin and stores it in the snapshot.
// Then DOA starts the beamformer on the eight snapshot values and waits for
// it; busy drops when it is done and the next chunk can be taken.
// A chunk takes roughly M*(N + N/2*log2(N) + 5) + N/2 + N_ANG*(M + 2)
// clocks from chunk_ready to the result, 51,518 clocks for the defaults,
// well inside the 1,048,576 clocks it takes to capture the next chunk.
//
// Test mode: with test_mode high no chunk is processed; the raw samples are
// only streamed out at the top for recording, bypassing the FFT. The mode is
// sampled when a chunk arrives; a chunk already being processed completes.
//
// The order of work (capture, then frequency of interest from one channel,
// then the direction of arrival), the FFT on all eight channels and the
// bypassing test system follow the design. The sequencing, handshakes and
// the single shared FFT are this block's own choices.
//
// Ports: clk, rst (synchronous, active high); test_mode; chunk_ready,
// chunk_bank; busy; RAM read port ram_raddr/ram_rdata; FFT load, start,
// done and read ports; peak finder start/done/bin and its read address
// (muxed onto the FFT read port during PEAK); beamformer start/done, bin and
// snapshot; chunks_done (count of processed chunks).
module doa_controller
  import sl_pkg::*;
#(
  parameter int unsigned M    = 8,
  parameter int unsigned N    = 1024,
  parameter int unsigned SW   = 14,
  localparam int unsigned LG  = $clog2(N),
  localparam int unsigned MW  = $clog2(M)
) (
  input  logic                  clk,
  input  logic                  rst,
  input  logic                  test_mode,
  input  logic                  chunk_ready,
  input  logic                  chunk_bank,
  output logic                  busy,
  // time-series RAM read port
  output logic [LG:0]           ram_raddr,
  input  logic [M*SW-1:0]       ram_rdata,
  // FFT
  output logic                  fft_in_we,
  output logic [LG-1:0]         fft_in_addr,
  output logic signed [SW-1:0]  fft_in_data,
  output logic                  fft_start,
  input  logic                  fft_done,
  output logic [LG-1:0]         fft_rd_addr,
  input  cplx_t                 fft_rd_data,
  // peak-bin finder
  output logic                  pk_start,
  input  logic                  pk_done,
  input  logic [LG-1:0]         pk_bin,
  input  logic [LG-1:0]         pk_rd_addr,
  // beamformer
  output logic                  doa_start,
  input  logic                  doa_done,
  output logic [LG-1:0]         doa_bin,
  output cplx_t                 snap [M],
  output logic [15:0]           chunks_done
);

  typedef enum logic [2:0] {
    C_IDLE, C_LOAD, C_FFT, C_PEAK, C_GRAB, C_GRAB2, C_DOA
  } state_t;
  state_t state;

  logic          bank;
  logic [MW-1:0] ch;
  logic [LG:0]   n;        // samples issued to the RAM (0..N)
  logic          rd_ok;    // ram_rdata holds the sample issued last clock
  logic [LG-1:0] rd_idx;

  assign busy        = (state != C_IDLE);
  assign ram_raddr   = {bank, n[LG-1:0]};
  assign fft_rd_addr = (state == C_PEAK) ? pk_rd_addr : doa_bin;

  always_ff @(posedge clk) begin
    if (rst) begin
      state       <= C_IDLE;
      bank        <= 1'b0;
      ch          <= '0;
      n           <= '0;
      rd_ok       <= 1'b0;
      rd_idx      <= '0;
      fft_in_we   <= 1'b0;
      fft_in_addr <= '0;
      fft_in_data <= '0;
      fft_start   <= 1'b0;
      pk_start    <= 1'b0;
      doa_start   <= 1'b0;
      doa_bin     <= '0;
      chunks_done <= '0;
      for (int i = 0; i < M; i++) snap[i] <= '0;
    end else begin
      fft_in_we <= 1'b0;
      fft_start <= 1'b0;
      pk_start  <= 1'b0;
      doa_start <= 1'b0;
      unique case (state)
        C_IDLE: if (chunk_ready && !test_mode) begin
          bank  <= chunk_bank;
          ch    <= '0;
          n     <= '0;
          rd_ok <= 1'b0;
          state <= C_LOAD;
        end
        C_LOAD: begin
          // issue RAM addresses 0..N-1, write the FFT one clock later
          rd_ok  <= (n < (LG+1)'(N));
          rd_idx <= n[LG-1:0];
          if (n < (LG+1)'(N)) n <= n + 1'b1;
          if (rd_ok) begin
            fft_in_we   <= 1'b1;
            fft_in_addr <= rd_idx;
            fft_in_data <= ram_rdata[int'(ch)*SW +: SW];
            if (rd_idx == LG'(N - 1)) begin
              fft_start <= 1'b1;
              state     <= C_FFT;
            end
          end
        end
        C_FFT: if (fft_done) begin
          if (ch == '0) begin
            pk_start <= 1'b1;
            state    <= C_PEAK;
          end else begin
            state <= C_GRAB;
          end
        end
        C_PEAK: if (pk_done) begin
          doa_bin <= pk_bin;
          state   <= C_GRAB;
        end
        C_GRAB: state <= C_GRAB2;    // FFT read of doa_bin in flight
        C_GRAB2: begin
          snap[ch] <= fft_rd_data;
          if (ch == MW'(M - 1)) begin
            doa_start <= 1'b1;
            state     <= C_DOA;
          end else begin
            ch    <= ch + 1'b1;
            n     <= '0;
            rd_ok <= 1'b0;
            state <= C_LOAD;
          end
        end
        C_DOA: if (doa_done) begin
          chunks_done <= chunks_done + 16'd1;
          state       <= C_IDLE;
        end
        default: state <= C_IDLE;
      endcase
    end
  end

endmodule

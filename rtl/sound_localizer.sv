// sound_localizer: direction-of-arrival estimator for a linear array of
// eight I2S MEMS microphones.
//
// Data flow:
//   i2s_clkgen     makes SCK and WS for all microphones from the system clock
//   i2s_rx x4      one per SD line; each line carries a pair of microphones
//                  (mic 2p on the left slot, mic 2p+1 on the right slot)
//   acq_writer     truncates each word to 14 bits, fills 1024-sample chunks
//   time_series_ram  two chunk banks, written by capture, read by processing
//   doa_controller per chunk: FFT of every channel, peak bin of channel 0,
//                  snapshot of all channels at that bin, beamformer
//   fft_radix2     shared 1024-point FFT
//   peak_bin_finder  the frequency of interest
//   bartlett_doa   Bartlett spectrum over -90..+90 degrees, its maximum
//
// The raw 24-bit frames (pcm_*) are always brought out for a host
// processor; in test mode (test_mode high) that is all that happens, the
// FFT and beamformer are bypassed and the frames can be recorded. The angle
// result (doa_*), the frequency bin used and the whole spectrum (spec_*, one
// value per grid angle) are brought out for display by the host. With
// T_SNAP > 1 the spectrum is averaged over T_SNAP chunks before a result is
// given (default 1: a result per chunk).
//
// Timing, defaults: 50 MHz clock, SCK = 3.125 MHz, 48.828 kHz sample rate,
// a chunk every 1,048,576 clocks (21 ms); its angle is ready 51,518
// clocks after the chunk completes. overflows counts chunks lost because the
// previous one was still being processed (none at the default rates).
//
// The block structure, word sizes, FFT size and algorithm follow the design;
// the clock division, bank scheme, microphone numbering and the beamformer's
// physical constants (4 cm spacing, 343 m/s) are this implementation's own
// choices and are parameters.
module sound_localizer
  import sl_pkg::*;
#(
  parameter int unsigned SCK_HALF      = 8,       // system clocks per SCK half period
  parameter real         CLK_HZ        = 50.0e6,
  parameter int unsigned N             = FFT_N,   // chunk and FFT length
  parameter int unsigned N_ANG         = 181,
  parameter int          ANG_MIN_DEG   = -90,
  parameter int          ANG_STEP_DEG  = 1,
  parameter real         MIC_SPACING_M = 0.04,
  parameter real         SOUND_MPS     = 343.0,
  parameter int unsigned T_SNAP        = 1,       // chunks averaged per result
  localparam int unsigned LG           = $clog2(N),
  localparam int unsigned AIW          = $clog2(N_ANG),
  localparam int unsigned POW_W        = 2 * (FFT_W + $clog2(N_MICS) + 1) + $clog2(T_SNAP)
) (
  input  logic                          clk,
  input  logic                          rst,
  input  logic                          test_mode,
  // microphone pins
  output logic                          sck,
  output logic                          ws,
  input  logic [N_PAIRS-1:0]            sd,
  // raw sample stream to the host
  output logic                          pcm_valid,
  output logic [N_MICS-1:0][I2S_W-1:0]  pcm_data,
  // results
  output logic                          busy,
  output logic                          doa_valid,
  output logic [AIW-1:0]                doa_angle_idx,
  output logic signed [15:0]            doa_angle_deg,
  output logic [POW_W-1:0]              doa_power,
  output logic [LG-1:0]                 peak_bin,
  output logic                          spec_valid,
  output logic [AIW-1:0]                spec_idx,
  output logic [POW_W-1:0]              spec_pow,
  output logic [15:0]                   overflows,
  output logic [15:0]                   chunks_done
);

  localparam real FS_HZ = CLK_HZ / real'(2 * SCK_HALF * 2 * SLOT_BITS);

  // ---------------- I2S capture ----------------
  logic sck_rise, sck_fall, frame_start;
  i2s_clkgen #(.SCK_HALF(SCK_HALF)) u_clk (
    .clk, .rst, .sck, .ws, .sck_rise, .sck_fall, .frame_start
  );

  logic [N_PAIRS-1:0] pair_valid;
  for (genvar p = 0; p < N_PAIRS; p++) begin : g_rx
    i2s_rx u_rx (
      .clk, .rst, .sck_rise, .ws,
      .sd         (sd[p]),
      .left_data  (pcm_data[2*p]),
      .right_data (pcm_data[2*p+1]),
      .valid      (pair_valid[p])
    );
  end
  // all pairs share SCK and WS, so they complete in the same clock
  assign pcm_valid = pair_valid[0];
  a_pairs_in_step: assert property (@(posedge clk) disable iff (rst)
    (pair_valid == '0) || (pair_valid == '1));

  // ---------------- chunk capture ----------------
  logic                       ram_we;
  logic [LG:0]                ram_waddr, ram_raddr;
  logic [N_MICS*SAMPLE_W-1:0] ram_wdata, ram_rdata;
  logic                       chunk_ready, chunk_bank, overflow;

  acq_writer #(.CHUNK(N)) u_acq (
    .clk, .rst,
    .enable      (1'b1),
    .frame_valid (pcm_valid),
    .frame_data  (pcm_data),
    .proc_busy   (busy),
    .ram_we, .ram_waddr, .ram_wdata,
    .chunk_ready, .chunk_bank, .overflow, .overflows
  );

  time_series_ram #(.CH(N_MICS), .W(SAMPLE_W), .DEPTH(2 * N)) u_ram (
    .clk,
    .we (ram_we), .waddr (ram_waddr), .wdata (ram_wdata),
    .raddr (ram_raddr), .rdata (ram_rdata)
  );

  // ---------------- processing ----------------
  logic                       fft_in_we, fft_start, fft_busy, fft_done;
  logic [LG-1:0]              fft_in_addr, fft_rd_addr;
  logic signed [SAMPLE_W-1:0] fft_in_data;
  cplx_t                      fft_rd_data;
  logic                       pk_start, pk_busy, pk_done;
  logic [LG-1:0]              pk_bin, pk_rd_addr;
  logic [2*FFT_W:0]           pk_mag;
  logic                       doa_start, doa_busy, doa_done;
  logic [LG-1:0]              doa_bin;
  cplx_t                      snap [N_MICS];

  doa_controller #(.M(N_MICS), .N(N), .SW(SAMPLE_W)) u_ctrl (
    .clk, .rst, .test_mode, .chunk_ready, .chunk_bank, .busy,
    .ram_raddr, .ram_rdata,
    .fft_in_we, .fft_in_addr, .fft_in_data, .fft_start, .fft_done,
    .fft_rd_addr, .fft_rd_data,
    .pk_start, .pk_done, .pk_bin, .pk_rd_addr,
    .doa_start, .doa_done, .doa_bin, .snap, .chunks_done
  );

  fft_radix2 #(.N(N), .IN_W(SAMPLE_W)) u_fft (
    .clk, .rst,
    .in_we (fft_in_we), .in_addr (fft_in_addr), .in_data (fft_in_data),
    .start (fft_start), .busy (fft_busy), .done (fft_done),
    .rd_addr (fft_rd_addr), .rd_data (fft_rd_data)
  );

  peak_bin_finder #(.N(N)) u_peak (
    .clk, .rst,
    .start (pk_start), .busy (pk_busy), .done (pk_done),
    .rd_addr (pk_rd_addr), .rd_data (fft_rd_data),
    .peak_bin (pk_bin), .peak_mag (pk_mag)
  );

  bartlett_doa #(
    .M (N_MICS), .N (N), .N_ANG (N_ANG), .ANG_MIN_DEG (ANG_MIN_DEG),
    .ANG_STEP_DEG (ANG_STEP_DEG), .MIC_SPACING_M (MIC_SPACING_M),
    .SOUND_MPS (SOUND_MPS), .FS_HZ (FS_HZ), .T_SNAP (T_SNAP)
  ) u_doa (
    .clk, .rst,
    .start (doa_start), .busy (doa_busy), .done (doa_done), .valid (doa_valid),
    .bin (doa_bin), .snap,
    .best_idx (doa_angle_idx), .best_deg (doa_angle_deg), .best_pow (doa_power),
    .spec_valid, .spec_idx, .spec_pow
  );

  assign peak_bin = doa_bin;

endmodule

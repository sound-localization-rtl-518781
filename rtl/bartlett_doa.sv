// bartlett_doa: the selector. Evaluates the Bartlett (delay-and-sum) spatial
// power spectrum of the array at the frequency of interest over a grid of
// candidate directions and reports the direction of its maximum.
//
// Input is one narrow-band snapshot: X_i, the FFT value of microphone i at
// the peak bin k (i = 0..M-1, microphone 0 is the phase reference). For a
// plane wave from angle theta, microphone i lags microphone 0 by
//   phi_i(theta) = 2*pi * d * i * sin(theta) / lambda,
//   lambda = c / f,  f = k * fs / N,
// so phi_i = 2*pi * i * k * K * sin(theta) with K = d*fs/(N*c). The steering
// vector is a_i = exp(-j*phi_i) and the spectrum is
//   P(theta) = |a^H X|^2 = |sum_i X_i * exp(+j*phi_i)|^2.
// The normalisation by a^H a = M is a constant and is left out, since only
// the position of the maximum is wanted. Each run (one chunk) is one
// snapshot. With T_SNAP > 1 the covariance is averaged over T_SNAP
// snapshots, R = (1/T) sum_t X_t X_t^H; since a^H R a = (1/T) sum_t
// |a^H X_t|^2, this is done by adding P(theta) of T_SNAP consecutive runs in
// a per-angle accumulator (the sum, T times the average, is reported; the
// division does not move the maximum). The default T_SNAP = 1 uses each
// chunk on its own.
//
// Pre-calculated table: for every grid angle the block holds
// KSIN[a] = K * sin(theta_a) in turns with PH_F fraction bits, computed at
// elaboration from the parameters. Per angle the step k * KSIN[a] is formed
// once; the phase of microphone i is i times the step, accumulated modulo one
// turn, and a cosine/sine table turns it into exp(+j*phi_i). One microphone
// is multiplied and accumulated per clock, so an angle takes M + 2 clocks
// and the whole grid N_ANG * (M + 2) + 1 clocks (1811 for the defaults).
// When the last of T_SNAP runs is evaluated, each accumulated P(theta_a) is
// also streamed out (spec_*) for display, the maximum is taken, and valid
// pulses with done. Ties keep the lower angle.
//
// The Bartlett spectrum, its average over T snapshots, the 8-microphone
// linear array and the comparison against pre-calculated values stored in
// the FPGA follow the design. The angle grid (-90..+90 degrees in 1-degree
// steps), the spacing d = 4 cm, c = 343 m/s, fs = 48828.125 Hz, the default
// T_SNAP = 1, the fixed-point formats and the one-MAC-per-clock schedule are
// this block's own choices. Positive angles
// are directions from which sound reaches microphone 0 first.
//
// Ports: clk, rst (synchronous, active high); start, busy, done (every
// run); valid (with done of every T_SNAP-th run: a new result); bin (k);
// snap (X_0..X_{M-1}, held stable while busy); best_idx, best_deg,
// best_pow (from valid until the next valid); spec_valid, spec_idx,
// spec_pow (one pulse per grid angle, in the result-producing run).
module bartlett_doa
  import sl_pkg::*;
#(
  parameter int unsigned M             = 8,
  parameter int unsigned N             = 1024,
  parameter int unsigned N_ANG         = 181,
  parameter int          ANG_MIN_DEG   = -90,
  parameter int          ANG_STEP_DEG  = 1,
  parameter real         MIC_SPACING_M = 0.04,
  parameter real         SOUND_MPS     = 343.0,
  parameter real         FS_HZ         = 48828.125,
  parameter int unsigned PH_F          = 24,   // phase fraction bits (turns)
  parameter int unsigned LUT_AB        = 10,   // cos/sin table address bits
  parameter int unsigned T_SNAP        = 1,    // snapshots averaged per result
  localparam int unsigned LG           = $clog2(N),
  localparam int unsigned AIW          = $clog2(N_ANG),
  localparam int unsigned ACC_W        = FFT_W + $clog2(M) + 1,
  localparam int unsigned POW_W        = 2 * ACC_W + $clog2(T_SNAP)
) (
  input  logic                    clk,
  input  logic                    rst,
  input  logic                    start,
  output logic                    busy,
  output logic                    done,
  output logic                    valid,
  input  logic [LG-1:0]           bin,
  input  cplx_t                   snap [M],
  output logic [AIW-1:0]          best_idx,
  output logic signed [15:0]      best_deg,
  output logic [POW_W-1:0]        best_pow,
  output logic                    spec_valid,
  output logic [AIW-1:0]          spec_idx,
  output logic [POW_W-1:0]        spec_pow
);

  typedef logic signed [PH_F+1:0] ks_t;       // |K sin| < 1 turn
  typedef ks_t ks_tab_t [N_ANG];
  typedef logic signed [ACC_W-1:0] acc_t;
  typedef logic signed [FFT_W+TW_W-1:0] prod_t;

  function automatic ks_tab_t make_ksin();
    ks_tab_t t;
    real k, th, v;
    k = MIC_SPACING_M * FS_HZ / (real'(N) * SOUND_MPS);
    for (int a = 0; a < N_ANG; a++) begin
      th   = real'(ANG_MIN_DEG + a * ANG_STEP_DEG) * 3.14159265358979323846 / 180.0;
      v    = k * $sin(th) * (2.0 ** PH_F);
      t[a] = ks_t'($rtoi(v < 0.0 ? v - 0.5 : v + 0.5));
    end
    return t;
  endfunction

  localparam ks_tab_t KSIN = make_ksin();

  typedef enum logic [1:0] {S_IDLE, S_SETUP, S_MAC, S_EVAL} state_t;
  state_t state;

  logic [AIW-1:0]          ang;
  logic [$clog2(M)-1:0]    mic;
  logic [PH_F-1:0]         step, phase;
  acc_t                    acc_re, acc_im;
  logic signed [TW_W-1:0]  ph_c, ph_s;
  logic [PH_F-1:0]         phase_rnd;
  logic signed [PH_F+LG+2:0] step_full;

  // phase rounded to the table resolution
  assign phase_rnd = phase + (PH_F'(1) << (PH_F - LUT_AB - 1));

  cos_sin_lut #(.AB(LUT_AB), .W(TW_W)) u_lut (
    .a     (phase_rnd[PH_F-1 -: LUT_AB]),
    .cos_o (ph_c),
    .sin_o (ph_s)
  );

  assign step_full = $signed({1'b0, bin}) * KSIN[ang];

  // X_i * exp(+j phi) = (xr*c - xi*s) + j(xr*s + xi*c)
  prod_t t_re, t_im;
  acc_t  t_re_r, t_im_r;
  always_comb begin
    t_re   = prod_t'(snap[mic].re) * prod_t'(ph_c) - prod_t'(snap[mic].im) * prod_t'(ph_s);
    t_im   = prod_t'(snap[mic].re) * prod_t'(ph_s) + prod_t'(snap[mic].im) * prod_t'(ph_c);
    t_re_r = acc_t'((t_re + (prod_t'(1) <<< (TW_W - 2))) >>> (TW_W - 1));
    t_im_r = acc_t'((t_im + (prod_t'(1) <<< (TW_W - 2))) >>> (TW_W - 1));
  end

  logic signed [2*ACC_W-1:0] p_re2, p_im2;
  logic [POW_W-1:0]          pow, psum_new;
  assign p_re2 = acc_re * acc_re;
  assign p_im2 = acc_im * acc_im;
  assign pow   = POW_W'(unsigned'(p_re2)) + POW_W'(unsigned'(p_im2));

  // snapshot averaging: per-angle sum of P over T_SNAP runs
  localparam int unsigned TCW = (T_SNAP > 1) ? $clog2(T_SNAP) : 1;
  logic [TCW-1:0]   snap_cnt;
  logic             last_snap;
  logic [POW_W-1:0] psum [N_ANG];
  assign last_snap = (snap_cnt == TCW'(T_SNAP - 1));
  assign psum_new  = (snap_cnt == '0) ? pow : psum[ang] + pow;

  assign busy = (state != S_IDLE);

  always_ff @(posedge clk) begin
    if (rst) begin
      state      <= S_IDLE;
      done       <= 1'b0;
      valid      <= 1'b0;
      snap_cnt   <= '0;
      ang        <= '0;
      mic        <= '0;
      step       <= '0;
      phase      <= '0;
      acc_re     <= '0;
      acc_im     <= '0;
      best_idx   <= '0;
      best_deg   <= '0;
      best_pow   <= '0;
      spec_valid <= 1'b0;
      spec_idx   <= '0;
      spec_pow   <= '0;
    end else begin
      done       <= 1'b0;
      valid      <= 1'b0;
      spec_valid <= 1'b0;
      unique case (state)
        S_IDLE: if (start) begin
          state <= S_SETUP;
          ang   <= '0;
        end
        S_SETUP: begin
          step   <= step_full[PH_F-1:0];   // modulo one turn
          phase  <= '0;
          mic    <= '0;
          acc_re <= '0;
          acc_im <= '0;
          state  <= S_MAC;
        end
        S_MAC: begin
          acc_re <= acc_re + t_re_r;
          acc_im <= acc_im + t_im_r;
          phase  <= phase + step;
          mic    <= mic + 1'b1;
          if (mic == $clog2(M)'(M - 1)) state <= S_EVAL;
        end
        S_EVAL: begin
          psum[ang] <= psum_new;
          if (last_snap) begin
            spec_valid <= 1'b1;
            spec_idx   <= ang;
            spec_pow   <= psum_new;
            if (ang == '0 || psum_new > best_pow) begin
              best_pow <= psum_new;
              best_idx <= ang;
              best_deg <= 16'(ANG_MIN_DEG + int'(ang) * ANG_STEP_DEG);
            end
          end
          if (ang == AIW'(N_ANG - 1)) begin
            state    <= S_IDLE;
            done     <= 1'b1;
            valid    <= last_snap;
            snap_cnt <= last_snap ? '0 : snap_cnt + TCW'(1);
          end else begin
            ang   <= ang + 1'b1;
            state <= S_SETUP;
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end

endmodule

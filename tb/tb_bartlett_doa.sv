// tb_bartlett_doa: the beamformer against plane-wave snapshots.
//
// For a source at angle theta0 and bin k the testbench builds the snapshot
// X_i = A * exp(j*psi) * exp(-j*2*pi*i*k*K*sin(theta0)), K = d*fs/(N*c),
// with its own double-precision arithmetic, plus a little random noise.
// Checked for each case:
//   - the reported angle equals theta0 (within 1 degree for |theta0| <= 60,
//     within 4 degrees towards endfire, where the spectrum is flat),
//   - every streamed spectrum value P(theta) is within 1 % (plus 2e-4 of
//     the peak, the effect of the 10-bit phase table) of |sum_i X_i exp(+j*phi_i(theta))|^2 computed here,
//   - the streamed values arrive for all 181 grid angles in order,
//   - start to done takes N_ANG * (M + 2) + 1 clocks, and valid comes with
//     every done (T_SNAP = 1).
// A second instance with T_SNAP = 3 sees the same runs: it must give a
// result (valid) only on every third run, and then each streamed value
// must be the sum of the three reference spectra, with the maximum at the
// argmax of that sum.
module tb_bartlett_doa;
  import sl_pkg::*;
  localparam int M = 8, N = 1024, LG = 10, N_ANG = 181;
  localparam real PI = 3.14159265358979323846;
  localparam real D = 0.04, C = 343.0, FS = 48828.125;
  logic clk = 0, rst = 1, start = 0, busy, done;
  logic [LG-1:0] bin = '0;
  cplx_t snap [M];
  logic [7:0] best_idx, spec_idx;
  logic signed [15:0] best_deg;
  logic [59:0] best_pow, spec_pow;
  logic spec_valid, valid;
  // averaging instance
  localparam int T3 = 3;
  logic busy3, done3, valid3, spec_valid3;
  logic [7:0] best_idx3, spec_idx3;
  logic signed [15:0] best_deg3;
  logic [61:0] best_pow3, spec_pow3;
  int checks = 0, failures = 0;

  bartlett_doa #(.M(M), .N(N)) dut (.*);
  bartlett_doa #(.M(M), .N(N), .T_SNAP(T3)) dut3 (
    .clk, .rst, .start, .busy(busy3), .done(done3), .valid(valid3), .bin, .snap,
    .best_idx(best_idx3), .best_deg(best_deg3), .best_pow(best_pow3),
    .spec_valid(spec_valid3), .spec_idx(spec_idx3), .spec_pow(spec_pow3));

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s at %0t", what, $time);
    end
  endtask

  function automatic real fabs(input real v);
    return (v < 0.0) ? -v : v;
  endfunction

  real xr [M], xi [M];
  real psum_ref [N_ANG];
  int  runs = 0, n_spec3 = 0, n_valid3 = 0, total_spec = 0;
  real amp_window = 0.0;   // sum of (M*amp)^2 over the runs being averaged
  int  n_spec, exp_idx;
  real cur_amp = 1.0;

  always @(posedge clk) if (spec_valid && !rst) begin
    real sr, si, phi, pref, pgot, kk;
    kk = D * FS / (N * C);
    sr = 0.0; si = 0.0;
    for (int i = 0; i < M; i++) begin
      phi = 2.0 * PI * i * bin * kk * $sin((-90.0 + spec_idx) * PI / 180.0);
      sr += xr[i] * $cos(phi) - xi[i] * $sin(phi);
      si += xr[i] * $sin(phi) + xi[i] * $cos(phi);
    end
    pref = sr * sr + si * si;
    psum_ref[spec_idx] = (((total_spec / N_ANG) % T3) == 0 ? 0.0 : psum_ref[spec_idx]) + pref;
    total_spec++;
    pgot = real'(spec_pow);
    check(fabs(pgot - pref) <= 0.01 * pref + 2.0e-4 * (M * cur_amp) ** 2, $sformatf("P(%0d) %e vs %e", spec_idx, pgot, pref));
    check(int'(spec_idx) == exp_idx, "spectrum order");
    exp_idx++;
    n_spec++;
  end

  // averaging instance: compared with the reference sums (updated above on
  // the same clock edge, so they are read one clock later)
  always @(posedge clk) if (spec_valid3 && !rst) begin
    real got;
    int  idx;
    idx = spec_idx3;
    @(negedge clk);
    got = real'(spec_pow3);
    n_spec3++;
    check(fabs(got - psum_ref[idx]) <= 0.01 * psum_ref[idx] + 2.0e-4 * amp_window,
          $sformatf("averaged P(%0d) %e vs %e", idx, got, psum_ref[idx]));
  end

  task automatic run_case(input int th0, input int k, input real amp);
    real kk, psi, phi;
    int  cycles, tol;
    bit  v1, d3, v3;
    kk  = D * FS / (N * C);
    psi = 2.0 * PI * ($urandom_range(999) / 1000.0);
    bin <= LG'(k);
    for (int i = 0; i < M; i++) begin
      phi   = 2.0 * PI * i * k * kk * $sin(th0 * PI / 180.0);
      xr[i] = amp * $cos(psi - phi) + ($urandom_range(200) - 100.0);
      xi[i] = amp * $sin(psi - phi) + ($urandom_range(200) - 100.0);
      snap[i].re <= FFT_W'($rtoi(xr[i]));
      snap[i].im <= FFT_W'($rtoi(xi[i]));
    end
    n_spec = 0; exp_idx = 0; cur_amp = amp;
    amp_window = ((runs % T3) == 0 ? 0.0 : amp_window) + (M * amp) ** 2;
    @(posedge clk);
    start <= 1;
    @(posedge clk);
    start <= 0;
    cycles = 0;
    do begin @(posedge clk); cycles++; end while (!done);
    check(cycles == N_ANG * (M + 2) + 1, $sformatf("DOA time %0d", cycles));
    v1 = valid; d3 = done3; v3 = valid3;
    @(negedge clk);   // let the monitors take the last spectrum value
    check(v1, "valid with done");
    check(d3 && (v3 == ((runs % T3) == T3 - 1)), "averaged result every third run");
    if (v3) begin
      int   am;
      real  bv;
      n_valid3++;
      am = 0; bv = -1.0;
      for (int a = 0; a < N_ANG; a++) if (psum_ref[a] > bv) begin bv = psum_ref[a]; am = a; end
      check(int'(best_idx3) >= am - 1 && int'(best_idx3) <= am + 1,
            $sformatf("averaged maximum %0d vs %0d", best_idx3, am));
    end
    runs++;
    @(posedge clk);
    check(n_spec == N_ANG, $sformatf("%0d spectrum values", n_spec));
    tol = (fabs(th0) <= 60.0) ? 1 : 4;
    check(fabs(real'(int'(best_deg) - th0)) <= real'(tol), $sformatf("theta0 %0d bin %0d: got %0d", th0, k, best_deg));
    check(int'(best_idx) == int'(best_deg) + 90, "index matches degrees");
    $display("theta0 %0d bin %0d -> %0d", th0, k, best_deg);
  endtask

  initial begin
    for (int i = 0; i < M; i++) snap[i] = '0;
    repeat (3) @(posedge clk);
    rst <= 0;
    @(posedge clk);
    run_case(30, 60, 1.0e6);
    run_case(-45, 60, 3.0e6);
    run_case(0, 40, 5.0e5);
    run_case(12, 80, 2.0e6);
    run_case(-7, 25, 1.0e6);
    run_case(75, 60, 1.0e6);
    run_case(-60, 70, 4.0e6);
    for (int r = 0; r < 4; r++) run_case($urandom_range(120) - 60, $urandom_range(85, 20), 1.0e6);
    check(n_valid3 == runs / T3, $sformatf("%0d averaged results", n_valid3));
    check(n_spec3 == N_ANG * (runs / T3), "averaged spectrum values");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

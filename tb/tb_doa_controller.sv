// tb_doa_controller: the chunk sequencer with the real memory, FFT, peak
// finder and beamformer around it, at N = 64 to keep the run short.
//
// The testbench writes a plane-wave tone (source angle theta0, bin k) for
// all eight channels into one bank of the time-series RAM and pulses
// chunk_ready. Checked independently of the design:
//   - every sample the controller writes into the FFT is the right sample
//     of the right channel from the right bank, in order (the two banks
//     hold different tones);
//   - the peak bin equals k;
//   - each snapshot value equals the DFT of its channel at bin k (computed
//     here in double precision) within a small tolerance;
//   - the reported angle equals theta0;
//   - busy covers the whole chunk and chunks_done counts it;
//   - the time from chunk_ready to the end of busy is within the budget
//     M*(N + N/2*log2 N + 8) + N/2 + 8 + N_ANG*(M+2) + 8;
//   - in test mode a chunk_ready is ignored (bypass).
module tb_doa_controller;
  import sl_pkg::*;
  localparam int M = 8, N = 64, LG = 6, SW = 14, N_ANG = 181;
  localparam real PI = 3.14159265358979323846;
  localparam real D = 0.04, C = 343.0, FS = 48828.125;
  logic clk = 0, rst = 1, test_mode = 0, chunk_ready = 0, chunk_bank = 0, busy;
  logic [LG:0] ram_raddr;
  logic [M*SW-1:0] ram_rdata;
  logic fft_in_we, fft_start, fft_done, fft_busy;
  logic [LG-1:0] fft_in_addr, fft_rd_addr;
  logic signed [SW-1:0] fft_in_data;
  cplx_t fft_rd_data;
  logic pk_start, pk_done, pk_busy;
  logic [LG-1:0] pk_bin, pk_rd_addr, doa_bin;
  logic [2*FFT_W:0] pk_mag;
  logic doa_start, doa_done, doa_busy;
  cplx_t snap [M];
  logic [15:0] chunks_done;
  logic [7:0] best_idx, spec_idx;
  logic signed [15:0] best_deg;
  logic [59:0] best_pow, spec_pow;
  logic spec_valid;
  logic ram_we = 0;
  logic [LG:0] ram_waddr = '0;
  logic [M*SW-1:0] ram_wdata = '0;
  int checks = 0, failures = 0;

  doa_controller #(.M(M), .N(N), .SW(SW)) dut (.*);
  time_series_ram #(.CH(M), .W(SW), .DEPTH(2 * N)) u_ram (
    .clk, .we(ram_we), .waddr(ram_waddr), .wdata(ram_wdata), .raddr(ram_raddr), .rdata(ram_rdata));
  fft_radix2 #(.N(N), .IN_W(SW)) u_fft (
    .clk, .rst, .in_we(fft_in_we), .in_addr(fft_in_addr), .in_data(fft_in_data),
    .start(fft_start), .busy(fft_busy), .done(fft_done), .rd_addr(fft_rd_addr), .rd_data(fft_rd_data));
  peak_bin_finder #(.N(N)) u_pk (
    .clk, .rst, .start(pk_start), .busy(pk_busy), .done(pk_done), .rd_addr(pk_rd_addr),
    .rd_data(fft_rd_data), .peak_bin(pk_bin), .peak_mag(pk_mag));
  bartlett_doa #(.M(M), .N(N), .FS_HZ(FS)) u_doa (
    .clk, .rst, .start(doa_start), .busy(doa_busy), .done(doa_done), .valid(), .bin(doa_bin), .snap,
    .best_idx, .best_deg, .best_pow, .spec_valid, .spec_idx, .spec_pow);

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s at %0t", what, $time);
    end
  endtask

  int x [M][N];
  int load_ch = 0, load_n = 0, bad_loads = 0;

  // FFT load monitor: channel by channel, sample by sample
  always @(posedge clk) if (!rst && fft_in_we) begin
    if (int'(fft_in_addr) != load_n || int'(fft_in_data) != x[load_ch][load_n]) bad_loads++;
    load_n++;
    if (load_n == N) begin load_n = 0; load_ch++; end
  end

  task automatic run_chunk(input int bank, input int th0, input int k);
    real kk, tau, er, ei, dr, di;
    int  cycles;
    kk = D * FS / (N * C);
    // a tone on bin k, channel i delayed by i*d*sin(theta0)/c
    for (int n = 0; n < N; n++) begin
      logic [M*SW-1:0] w;
      for (int i = 0; i < M; i++) begin
        tau = i * kk * $sin(th0 * PI / 180.0) * N;   // i*d*sin(theta0)*fs/c samples
        x[i][n] = $rtoi(6000.0 * $cos(2.0 * PI * k * (n - tau) / N));
        w[i*SW +: SW] = SW'(x[i][n]);
      end
      ram_we <= 1; ram_waddr <= {1'(bank), LG'(n)}; ram_wdata <= w;
      @(posedge clk);
    end
    ram_we <= 0;
    load_ch = 0; load_n = 0; bad_loads = 0;
    chunk_ready <= 1; chunk_bank <= 1'(bank);
    @(posedge clk);
    chunk_ready <= 0;
    cycles = 0;
    do begin
      @(posedge clk); cycles++;
    end while (busy);
    check(cycles <= M * (N + N / 2 * LG + 8) + N / 2 + 8 + N_ANG * (M + 2) + 8,
          $sformatf("chunk time %0d", cycles));
    check(bad_loads == 0 && load_ch == M, $sformatf("FFT loads (%0d bad, %0d channels)", bad_loads, load_ch));
    check(int'(doa_bin) == k, $sformatf("peak bin %0d, expected %0d", doa_bin, k));
    for (int i = 0; i < M; i++) begin
      dr = 0.0; di = 0.0;
      for (int n = 0; n < N; n++) begin
        dr += x[i][n] * $cos(2.0 * PI * ((k * n) % N) / N);
        di -= x[i][n] * $sin(2.0 * PI * ((k * n) % N) / N);
      end
      er = real'(snap[i].re) - dr;
      ei = real'(snap[i].im) - di;
      check($sqrt(er * er + ei * ei) < 50.0, $sformatf("snapshot %0d", i));
    end
    check(int'(best_deg) >= th0 - 1 && int'(best_deg) <= th0 + 1,
          $sformatf("angle %0d, expected %0d", best_deg, th0));
    $display("chunk bank %0d: theta0 %0d -> %0d in %0d clocks", bank, th0, best_deg, cycles);
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst <= 0;
    @(posedge clk);
    check(!busy, "idle after reset");
    run_chunk(1, 30, 4);
    check(chunks_done == 1, "one chunk counted");
    run_chunk(0, -20, 6);
    check(chunks_done == 2, "two chunks counted");
    // test mode: the chunk is not processed
    test_mode <= 1;
    chunk_ready <= 1; chunk_bank <= 1;
    @(posedge clk);
    chunk_ready <= 0;
    repeat (20) @(posedge clk);
    check(!busy && chunks_done == 2, "test mode bypasses processing");
    test_mode <= 0;
    run_chunk(1, -45, 5);
    check(chunks_done == 3, "three chunks counted");
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

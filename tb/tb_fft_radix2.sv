// tb_fft_radix2: the 1024-point FFT against a double-precision DFT.
//
// Four inputs are transformed: a full-scale tone on a bin centre, a tone
// between bins plus a DC offset, uniform random full-scale samples, and a
// single impulse. After each transform every bin is read back and compared
// with the DFT computed in the testbench; the allowed error is 8 LSB plus
// 2e-4 of the largest bin (twiddle and rounding error of ten fixed-point
// stages). The latency from start to done is checked to be
// N/2 * log2(N) butterfly clocks plus one.
module tb_fft_radix2;
  import sl_pkg::*;
  localparam int N = 1024, LG = 10, IN_W = 14;
  localparam real PI = 3.14159265358979323846;
  logic clk = 0, rst = 1;
  logic in_we = 0, start = 0, busy, done;
  logic [LG-1:0] in_addr = '0, rd_addr = '0;
  logic signed [IN_W-1:0] in_data = '0;
  cplx_t rd_data;
  int checks = 0, failures = 0;

  fft_radix2 #(.N(N), .IN_W(IN_W)) dut (.*);

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s at %0t", what, $time);
    end
  endtask

  int  x [N];
  real ref_re [N], ref_im [N];

  task automatic run_case(input int kind);
    real peak, tol, er, ei, maxerr;
    int  cycles;
    for (int n = 0; n < N; n++) begin
      case (kind)
        0: x[n] = $rtoi(8000.0 * $cos(2.0 * PI * 37.0 * n / N));
        1: x[n] = 500 + $rtoi(6000.0 * $sin(2.0 * PI * 100.3 * n / N + 0.4));
        2: x[n] = $urandom_range(16383) - 8192;
        default: x[n] = (n == 5) ? 8191 : 0;
      endcase
    end
    // reference DFT
    peak = 0.0;
    for (int k = 0; k < N; k++) begin
      ref_re[k] = 0.0; ref_im[k] = 0.0;
      for (int n = 0; n < N; n++) begin
        ref_re[k] += x[n] * $cos(2.0 * PI * ((k * n) % N) / N);
        ref_im[k] -= x[n] * $sin(2.0 * PI * ((k * n) % N) / N);
      end
      if ($sqrt(ref_re[k]**2 + ref_im[k]**2) > peak) peak = $sqrt(ref_re[k]**2 + ref_im[k]**2);
    end
    // load
    for (int n = 0; n < N; n++) begin
      in_we <= 1; in_addr <= LG'(n); in_data <= IN_W'(x[n]);
      @(posedge clk);
    end
    in_we <= 0;
    start <= 1;
    @(posedge clk);
    start <= 0;
    cycles = 0;
    do begin @(posedge clk); cycles++; end while (!done);
    check(cycles == N / 2 * LG + 1, $sformatf("latency %0d", cycles));
    // read all bins
    tol = 8.0 + 2.0e-4 * peak;
    maxerr = 0.0;
    for (int k = 0; k < N; k++) begin
      rd_addr <= LG'(k);
      @(posedge clk);
      #1;
      er = real'(rd_data.re) - ref_re[k];
      ei = real'(rd_data.im) - ref_im[k];
      if ($sqrt(er*er + ei*ei) > maxerr) maxerr = $sqrt(er*er + ei*ei);
      check($sqrt(er*er + ei*ei) <= tol,
            $sformatf("case %0d bin %0d: (%0d, %0d) vs (%f, %f)", kind, k, rd_data.re, rd_data.im, ref_re[k], ref_im[k]));
    end
    $display("case %0d: peak %f, max error %f, tolerance %f", kind, peak, maxerr, tol);
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst <= 0;
    @(posedge clk);
    for (int c = 0; c < 4; c++) run_case(c);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

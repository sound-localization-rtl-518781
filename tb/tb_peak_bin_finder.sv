// tb_peak_bin_finder: the peak search against a reference argmax.
//
// The testbench plays the FFT's read port: a table of random complex bins
// answered with one clock of latency. For several tables (random, a strong
// peak at a random bin, the peak at the first and at the last searched bin,
// a tie between two bins, a large peak outside the searched range) the
// reported bin and squared magnitude must match the argmax over
// MIN_BIN..MAX_BIN computed here, with the lower bin winning a tie. The
// search must take MAX_BIN - MIN_BIN + 3 clocks from start to done.
module tb_peak_bin_finder;
  import sl_pkg::*;
  localparam int N = 1024, LG = 10, MIN_BIN = 1, MAX_BIN = 511;
  logic clk = 0, rst = 1, start = 0, busy, done;
  logic [LG-1:0] rd_addr, peak_bin;
  cplx_t rd_data;
  logic [2*FFT_W:0] peak_mag;
  int checks = 0, failures = 0;

  peak_bin_finder #(.N(N)) dut (.*);

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s at %0t", what, $time);
    end
  endtask

  cplx_t spec [N];
  always @(posedge clk) rd_data <= spec[rd_addr];

  task automatic run_case(input int kind);
    longint best, m;
    int     best_k, cycles, pk;
    for (int k = 0; k < N; k++) begin
      spec[k].re = FFT_W'($signed($urandom_range(40000)) - 20000);
      spec[k].im = FFT_W'($signed($urandom_range(40000)) - 20000);
    end
    pk = $urandom_range(MAX_BIN, MIN_BIN);
    case (kind)
      1: begin spec[pk].re = -26'sd3000000; spec[pk].im = 26'sd2000000; end
      2: spec[MIN_BIN].re = 26'sd30000000;
      3: spec[MAX_BIN].im = -26'sd30000000;
      4: begin spec[pk].re = 26'sd1000000; spec[pk].im = '0;
               spec[pk / 2 + 1].re = '0; spec[pk / 2 + 1].im = -26'sd1000000; end
      5: begin spec[0].re = 26'sd30000000; spec[N - 3].re = 26'sd30000000; end
      default: ;
    endcase
    best = -1; best_k = 0;
    for (int k = MIN_BIN; k <= MAX_BIN; k++) begin
      m = longint'(spec[k].re) * spec[k].re + longint'(spec[k].im) * spec[k].im;
      if (m > best) begin best = m; best_k = k; end
    end
    start <= 1;
    @(posedge clk);
    start <= 0;
    cycles = 0;
    do begin @(posedge clk); cycles++; end while (!done);
    check(cycles == MAX_BIN - MIN_BIN + 3, $sformatf("search time %0d", cycles));
    check(int'(peak_bin) == best_k, $sformatf("case %0d: bin %0d, expected %0d", kind, peak_bin, best_k));
    check(longint'(peak_mag) == best, "peak magnitude");
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst <= 0;
    @(posedge clk);
    for (int r = 0; r < 4; r++)
      for (int c = 0; c < 6; c++) run_case(c);
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

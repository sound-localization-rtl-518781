// tb_time_series_ram: random writes and reads against an associative-array
// reference, including a read and a write to the same address in one clock
// (the read returns the old word). Read latency is one clock.
module tb_time_series_ram;
  localparam int CH = 8, W = 14, DEPTH = 2048;
  logic clk = 0;
  logic we = 0;
  logic [10:0] waddr = '0, raddr = '0;
  logic [CH*W-1:0] wdata = '0, rdata;
  int checks = 0, failures = 0;

  time_series_ram #(.CH(CH), .W(W), .DEPTH(DEPTH)) dut (.*);

  always #5 clk = ~clk;

  logic [CH*W-1:0] ref_mem [int];

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s at %0t", what, $time);
    end
  endtask

  function automatic logic [CH*W-1:0] rnd();
    logic [CH*W-1:0] v;
    for (int i = 0; i < CH*W; i += 32) v[i +: 32] = $urandom;
    return v;
  endfunction

  initial begin
    // fill every word
    for (int a = 0; a < DEPTH; a++) begin
      we <= 1; waddr <= 11'(a); wdata <= rnd();
      @(posedge clk);
      ref_mem[a] = wdata;
    end
    we <= 0;
    // random mixed traffic
    for (int t = 0; t < 4000; t++) begin
      logic [CH*W-1:0] expect_v;
      int ra;
      ra = $urandom_range(DEPTH - 1);
      raddr <= 11'(ra);
      we    <= ($urandom_range(1) == 1);
      waddr <= (t % 7 == 0) ? 11'(ra) : 11'($urandom_range(DEPTH - 1));
      wdata <= rnd();
      @(posedge clk);
      expect_v = ref_mem[ra];
      if (we) ref_mem[int'(waddr)] = wdata;
      #1 check(rdata == expect_v, $sformatf("read %0d", ra));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

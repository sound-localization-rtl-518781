// fft_radix2: N-point fixed-point FFT, iterative radix-2 decimation in time
// (Cooley-Tukey), one butterfly per clock.
//
// Operation:
//   1. Load: the N real input samples are written through in_we/in_addr/
//      in_data in natural order; the block stores each at the bit-reversed
//      address, which is the input order a decimation-in-time FFT needs.
//      The imaginary parts are cleared.
//   2. start (one-cycle pulse) runs log2(N) stages of N/2 butterflies each,
//      in place. Stage s pairs elements i and i + 2^s and uses the twiddle
//      W_N^k = exp(-j*2*pi*k/N) with k = (i mod 2^s) * N / 2^(s+1):
//        X[i] = a + W*b,   X[i+2^s] = a - W*b.
//      busy is high meanwhile; done pulses once after the last butterfly.
//      The transform takes N/2 * log2(N) clocks (5120 for N = 1024).
//   3. Read: rd_addr selects a bin, rd_data gives X[rd_addr] one clock later,
//      in natural order.
//
// Arithmetic: data are W-bit two's complement per real/imaginary part,
// twiddles TW_W-bit with TW_W-1 fraction bits. Products are rounded back to
// W bits; there is no scaling between stages, so the output is the unscaled
// DFT. With a 14-bit input and N = 1024 the largest possible magnitude is
// 2^23, which W = 26 holds without overflow.
//
// The FFT length, fixed-point arithmetic, hardware multipliers and the
// iterative decimation-in-time Cooley-Tukey structure follow the design.
// The word widths, the one-butterfly-per-clock schedule, the working memory
// with two read and two write ports (a register file, not a block RAM) and
// the load/read interface are this block's own choices.
module fft_radix2
  import sl_pkg::*;
#(
  parameter int unsigned N     = 1024,
  parameter int unsigned IN_W  = 14,
  localparam int unsigned LG   = $clog2(N)
) (
  input  logic                    clk,
  input  logic                    rst,
  input  logic                    in_we,
  input  logic [LG-1:0]           in_addr,
  input  logic signed [IN_W-1:0]  in_data,
  input  logic                    start,
  output logic                    busy,
  output logic                    done,
  input  logic [LG-1:0]           rd_addr,
  output cplx_t                   rd_data
);

  localparam int unsigned SW = $clog2(LG);   // stage counter width
  typedef logic signed [FFT_W-1:0] d_t;
  typedef logic signed [FFT_W+TW_W-1:0] p_t;

  d_t mem_re [N];
  d_t mem_im [N];

  logic [SW-1:0]   stage;
  logic [LG-2:0]   bfly;      // butterfly index within the stage
  logic [LG-1:0]   ia, ib, half;
  logic [LG-2:0]   pos, tw_k;
  logic [LG-1:0]   in_addr_rev;

  // bit reversal of the load address
  always_comb begin
    for (int b = 0; b < LG; b++) in_addr_rev[b] = in_addr[LG-1-b];
  end

  // butterfly addressing: group g = bfly >> stage, pos = bfly mod 2^stage
  always_comb begin
    half = LG'(1) << stage;
    pos  = bfly & ((LG-1)'(half) - (LG-1)'(1));
    ia   = ((LG'(bfly) >> stage) << (stage + 1)) | LG'(pos);
    ib   = ia | half;
    tw_k = pos << (LG - 1 - int'(stage));
  end

  // twiddle W = cos - j sin of 2*pi*k/N
  logic signed [TW_W-1:0] tw_c, tw_s;
  cos_sin_lut #(.AB(LG), .W(TW_W)) u_tw (
    .a     ({1'b0, tw_k}),
    .cos_o (tw_c),
    .sin_o (tw_s)
  );

  function automatic d_t round_q(input p_t p);
    p_t r;
    r = (p + (p_t'(1) <<< (TW_W - 2))) >>> (TW_W - 1);
    return d_t'(r);
  endfunction

  d_t ar, ai, br, bi, tr, ti;
  always_comb begin
    ar = mem_re[ia];
    ai = mem_im[ia];
    br = mem_re[ib];
    bi = mem_im[ib];
    // t = b * (c - j s) = (br*c + bi*s) + j(bi*c - br*s)
    tr = round_q(p_t'(br) * p_t'(tw_c) + p_t'(bi) * p_t'(tw_s));
    ti = round_q(p_t'(bi) * p_t'(tw_c) - p_t'(br) * p_t'(tw_s));
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      busy  <= 1'b0;
      done  <= 1'b0;
      stage <= '0;
      bfly  <= '0;
    end else begin
      done <= 1'b0;
      if (!busy) begin
        if (start) begin
          busy  <= 1'b1;
          stage <= '0;
          bfly  <= '0;
        end
      end else begin
        if (bfly == '1) begin
          bfly <= '0;
          if (stage == SW'(LG - 1)) begin
            busy <= 1'b0;
            done <= 1'b1;
          end else begin
            stage <= stage + SW'(1);
          end
        end else begin
          bfly <= bfly + (LG-1)'(1);
        end
      end
    end
  end

  // working memory: load port when idle, butterfly writes when busy
  always_ff @(posedge clk) begin
    if (busy) begin
      mem_re[ia] <= ar + tr;
      mem_im[ia] <= ai + ti;
      mem_re[ib] <= ar - tr;
      mem_im[ib] <= ai - ti;
    end else if (in_we) begin
      mem_re[in_addr_rev] <= d_t'(in_data);
      mem_im[in_addr_rev] <= '0;
    end
  end

  always_ff @(posedge clk) begin
    rd_data.re <= mem_re[rd_addr];
    rd_data.im <= mem_im[rd_addr];
  end

  // a new transform may only be started when idle
  a_start_idle: assert property (@(posedge clk) disable iff (rst) start |-> !busy);

endmodule

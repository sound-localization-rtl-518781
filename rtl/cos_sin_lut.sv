// cos_sin_lut: combinational cosine/sine table for one full turn.
//
// For an AB-bit angle a (one turn = 2^AB steps) it returns
//   cos_o = round(cos(2*pi*a/2^AB) * (2^(W-1)-1))
//   sin_o = round(sin(2*pi*a/2^AB) * (2^(W-1)-1))
// as W-bit two's complement numbers. The table is computed when the design
// is elaborated, from the formula above, and becomes a ROM.
//
// Used for the FFT twiddle factors and for the steering-vector phases of the
// beamformer.
module cos_sin_lut #(
  parameter int unsigned AB = 10,  // angle bits
  parameter int unsigned W  = 16   // output bits
) (
  input  logic [AB-1:0]       a,
  output logic signed [W-1:0] cos_o,
  output logic signed [W-1:0] sin_o
);

  typedef logic signed [W-1:0] tab_t [2**AB];

  function automatic tab_t make_tab(input bit want_sin);
    tab_t t;
    real  ang, amp, v;
    amp = (2.0 ** (W - 1)) - 1.0;
    for (int i = 0; i < 2**AB; i++) begin
      ang  = 2.0 * 3.14159265358979323846 * i / (2.0 ** AB);
      v    = (want_sin ? $sin(ang) : $cos(ang)) * amp;
      t[i] = W'($rtoi(v < 0.0 ? v - 0.5 : v + 0.5));
    end
    return t;
  endfunction

  localparam tab_t COS_TAB = make_tab(1'b0);
  localparam tab_t SIN_TAB = make_tab(1'b1);

  assign cos_o = COS_TAB[a];
  assign sin_o = SIN_TAB[a];

endmodule

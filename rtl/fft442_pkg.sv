// fft442_pkg: constants and elaboration-time helpers shared by the 32-point
// mixed-radix (4-4-2) multi-path delay commutator FFT.
//
// The FFT length and the pipeline latencies of every stage live here so that
// the control unit and the datapath agree on them. The twiddle coefficient function runs only at elaboration: it returns
// W32^e = exp(-j*2*pi*e/32), scaled by 2^(TW-1) and rounded to the nearest
// integer, which is the TW-bit two's complement coefficient the complex
// multipliers use. Rounding the coefficients to TW bits is the coefficient
// quantisation whose noise the design's wordlength study is about; the
// scaling by 2^(TW-1) (one sign bit, TW-1 fraction bits) is this design's
// choice.
package fft442_pkg;

  localparam int unsigned N     = 32;  // FFT points

  // Pipeline latencies in clock cycles, input to output of each stage.
  localparam int unsigned LAT_R4  = 1;  // radix-4 butterfly (output register)
  localparam int unsigned LAT_TW  = 1;  // twiddle stage (output register)
  localparam int unsigned LAT_SB0 = 6;  // SB0: 2-sample blocks over 4 lanes
  localparam int unsigned LAT_SB1 = 1;  // SB1: 1-sample blocks over 2 lanes
  localparam int unsigned LAT_R2  = 1;  // radix-2 butterfly (output register)

  // Tag delays (from the core input) at which each control is needed.
  localparam int unsigned T_WB0  = LAT_R4;
  localparam int unsigned T_SB0  = T_WB0 + LAT_TW;
  localparam int unsigned T_WB1  = T_SB0 + LAT_SB0 + LAT_R4;
  localparam int unsigned T_SB1  = T_WB1 + LAT_TW;
  localparam int unsigned T_OUT  = T_SB1 + LAT_SB1 + LAT_R2;  // core latency (12)

  // Real (im = 0) or imaginary (im = 1) part of W32^e in TW-bit fixed point.
  function automatic int tw_coef(int unsigned e, int unsigned tw, bit im);
    real ang, v;
    ang = 2.0 * 3.14159265358979323846 * real'(e % N) / real'(N);
    v   = (im ? -$sin(ang) : $cos(ang)) * (2.0 ** (tw - 1));
    return $rtoi(v >= 0.0 ? v + 0.5 : v - 0.5);
  endfunction

endpackage

// twiddle_rom: combinational lookup of the 32-point twiddle factor
// W32^e = exp(-j*2*pi*e/32) for e = 0..31, as TW-bit two's complement numbers
// with TW-1 fraction bits. The 32-entry table is computed while elaborating,
// from cos and sin rounded to the nearest integer (fft442_pkg::tw_coef), so
// changing TW regenerates it. Entries whose exact value is +1 would not fit;
// they are the trivial factors, which never reach a multiplier, and are
// clipped to the largest positive code only so the table is well defined.
module twiddle_rom #(
  parameter int unsigned TW = 12  // coefficient wordlength
) (
  input  logic [4:0]           e,
  output logic signed [TW-1:0] wr,
  output logic signed [TW-1:0] wi
);
  import fft442_pkg::*;

  function automatic logic signed [TW-1:0] coef(int unsigned k, bit im);
    int v;
    v = tw_coef(k, TW, im);
    if (v > (2 ** (TW - 1)) - 1) v = (2 ** (TW - 1)) - 1;
    return TW'(v);
  endfunction

  typedef logic signed [TW-1:0] coef_t;
  typedef coef_t table_t [N];

  function automatic table_t make_table(bit im);
    table_t t;
    for (int unsigned k = 0; k < N; k++) t[k] = coef(k, im);
    return t;
  endfunction

  localparam table_t RE = make_table(1'b0);
  localparam table_t IM = make_table(1'b1);

  assign wr = RE[e];
  assign wi = IM[e];
endmodule

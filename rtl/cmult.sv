// cmult: non-trivial complex multiplier z = x * w, with w = wr + j*wi a
// BW-bit twiddle coefficient (one sign bit, BW-1 fraction bits).
//   zr = xr*wr - xi*wi,   zi = xr*wi + xi*wr
// Each real output is the sum of two BX x BW products; the sum is rounded by
// dropping BW-1 fraction bits so that the output has the input's wordlength
// BX, as the design keeps every multiplier output at its input wordlength.
// Rounding is round-half-to-even, which is unbiased, so the rounding error is
// the zero-mean uniform noise the design's noise model assumes. A rotated
// sample's real or imaginary part can exceed the BX-bit range (for example
// (2^(BX-1)-1)(1+j) turned by 45 degrees), so the rounded result saturates at
// the BX-bit limits; saturation is this design's choice.
// One register stage: x and w at cycle n give z at cycle n+1.
module cmult #(
  parameter int unsigned BX = 12,  // data wordlength
  parameter int unsigned BW = 12   // twiddle coefficient wordlength
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic signed [BX-1:0] xr,
  input  logic signed [BX-1:0] xi,
  input  logic signed [BW-1:0] wr,
  input  logic signed [BW-1:0] wi,
  output logic signed [BX-1:0] zr,
  output logic signed [BX-1:0] zi,
  output logic                 sat   // a saturation happened on this output
);
  localparam int unsigned PW = BX + BW + 1;  // full sum width
  localparam int unsigned L  = BW - 1;       // fraction bits dropped

  logic signed [PW-1:0] sr, si;
  logic signed [BX-1:0] rr, ri;
  logic                 sat_r, sat_i;

  // Round-half-to-even by L bits, then saturate to BX bits.
  function automatic logic signed [BX-1:0] round_sat(input logic signed [PW-1:0] v,
                                                  output logic ovf);
    logic signed [PW-1:0] q;
    logic [L-1:0]         frac;
    logic                 up;
    logic signed [PW-1:0] hi, lo;
    q    = v >>> L;
    frac = v[L-1:0];
    up   = frac[L-1] && ((frac[L-2:0] != '0) || q[0]);
    q    = q + PW'(up);
    hi   = PW'((64'sd1 <<< (BX - 1)) - 1);
    lo   = -PW'(64'sd1 <<< (BX - 1));
    ovf  = 1'b0;
    if (q > hi) begin q = hi; ovf = 1'b1; end
    if (q < lo) begin q = lo; ovf = 1'b1; end
    return BX'(q);
  endfunction

  always_comb begin
    sr = PW'(xr) * PW'(wr) - PW'(xi) * PW'(wi);
    si = PW'(xr) * PW'(wi) + PW'(xi) * PW'(wr);
    rr = round_sat(sr, sat_r);
    ri = round_sat(si, sat_i);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      zr <= '0; zi <= '0; sat <= 1'b0;
    end else begin
      zr <= rr; zi <= ri; sat <= sat_r | sat_i;
    end
  end
endmodule

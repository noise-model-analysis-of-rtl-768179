// r4bf: radix-4 butterfly, four complex inputs to four complex outputs,
//   y[k] = sum_{l=0..3} x[l] * (-j)^(l*k),   k = 0..3,
// i.e. a 4-point DFT. Multiplication by -j or +j is a swap of real and
// imaginary parts with one sign change, so the block is adders only.
// The outputs are two bits wider than the inputs (W+2) so that nothing
// overflows and nothing is rounded, as the design rounds only at the
// non-trivial multipliers and never at butterfly outputs. One register stage:
// inputs at cycle n appear on the outputs at cycle n+1.
module r4bf #(
  parameter int unsigned W = 10  // input wordlength per real component
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic signed [W-1:0] xr [4],
  input  logic signed [W-1:0] xi [4],
  output logic signed [W+1:0] yr [4],
  output logic signed [W+1:0] yi [4]
);
  logic signed [W+1:0] ar [4], ai [4];
  logic signed [W+1:0] nr [4], ni [4];

  always_comb begin
    for (int l = 0; l < 4; l++) begin
      ar[l] = (W+2)'(xr[l]);
      ai[l] = (W+2)'(xi[l]);
    end
    // k = 0:  x0 + x1 + x2 + x3
    nr[0] = ar[0] + ar[1] + ar[2] + ar[3];
    ni[0] = ai[0] + ai[1] + ai[2] + ai[3];
    // k = 1:  x0 - j x1 - x2 + j x3
    nr[1] = ar[0] + ai[1] - ar[2] - ai[3];
    ni[1] = ai[0] - ar[1] - ai[2] + ar[3];
    // k = 2:  x0 - x1 + x2 - x3
    nr[2] = ar[0] - ar[1] + ar[2] - ar[3];
    ni[2] = ai[0] - ai[1] + ai[2] - ai[3];
    // k = 3:  x0 + j x1 - x2 - j x3
    nr[3] = ar[0] - ai[1] - ar[2] + ai[3];
    ni[3] = ai[0] + ar[1] - ai[2] - ar[3];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int k = 0; k < 4; k++) begin
        yr[k] <= '0;
        yi[k] <= '0;
      end
    end else begin
      yr <= nr;
      yi <= ni;
    end
  end
endmodule

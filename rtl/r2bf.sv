// r2bf: radix-2 butterfly, y0 = a + b and y1 = a - b on complex samples.
// The outputs are one bit wider than the inputs (W+1) and are not rounded,
// following the design rule that only the non-trivial multipliers round.
// One register stage: inputs at cycle n appear on the outputs at cycle n+1.
module r2bf #(
  parameter int unsigned W = 14  // input wordlength per real component
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic signed [W-1:0] ar,
  input  logic signed [W-1:0] ai,
  input  logic signed [W-1:0] br,
  input  logic signed [W-1:0] bi,
  output logic signed [W:0]   y0r,
  output logic signed [W:0]   y0i,
  output logic signed [W:0]   y1r,
  output logic signed [W:0]   y1i
);
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      y0r <= '0; y0i <= '0; y1r <= '0; y1i <= '0;
    end else begin
      y0r <= (W+1)'(ar) + (W+1)'(br);
      y0i <= (W+1)'(ai) + (W+1)'(bi);
      y1r <= (W+1)'(ar) - (W+1)'(br);
      y1i <= (W+1)'(ai) - (W+1)'(bi);
    end
  end
endmodule

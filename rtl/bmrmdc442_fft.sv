// bmrmdc442_fft: buffered 32-point mixed-radix (4-4-2) multi-path delay
// commutator FFT. The input buffer turns a natural-order stream of four
// complex DW-bit samples per clock into the decimated order the pipeline
// needs, and mrmdc442_core computes the transform at one frame per 8 clocks.
// Default wordlengths: 10-bit data and 12-bit twiddle factors; outputs are
// DW+5 = 15 bits, unscaled.
// Interface: in_valid high for 8 consecutive clocks per frame, x[4c+j] on
// lane j at clock c. The transform appears 14 clocks after the frame's last
// input clock (2 in the buffer, 12 in the pipeline) for 8 clocks, vout1 high,
// vout2 on the first of them; see mrmdc442_core for the output order.
module bmrmdc442_fft #(
  parameter int unsigned DW = 10,  // input data wordlength
  parameter int unsigned TW = 12   // twiddle coefficient wordlength
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 in_valid,
  input  logic signed [DW-1:0] in_re  [4],
  input  logic signed [DW-1:0] in_im  [4],
  output logic signed [DW+4:0] out_re [4],
  output logic signed [DW+4:0] out_im [4],
  output logic                 vout1,
  output logic                 vout2,
  output logic                 sat
);
  logic                 vin;
  logic signed [DW-1:0] b_re [4], b_im [4];

  input_buffer #(.W(DW)) u_buf (
    .clk, .rst_n, .in_valid, .in_re, .in_im,
    .out_valid(vin), .out_re(b_re), .out_im(b_im)
  );

  mrmdc442_core #(.DW(DW), .TW(TW)) u_core (
    .clk, .rst_n, .vin, .in_re(b_re), .in_im(b_im),
    .out_re, .out_im, .vout1, .vout2, .sat
  );
endmodule

// mrmdc442_core: 32-point mixed-radix 4-4-2 multi-path delay commutator FFT
// pipeline. Four complex samples enter per clock; a frame is 8 clocks, lane l
// carrying x[t + 8l] at frame clock t (t = 0..7), the order the input buffer
// produces. The frame is transformed by decimation in frequency:
//   R4BF  4-point DFTs over x[t], x[t+8], x[t+16], x[t+24]  (DW -> DW+2 bits)
//   WB0   lane m times W32^(m*t), rounded back to DW+2 bits
//   SB0   4x4 transpose of 2-sample blocks (delays 2/4/6, 4:1 muxes)
//   R4BF  4-point DFTs over the 8-point sub-sequences      (-> DW+4 bits)
//   WB1   lane q times W8^(q*t'), rounded back to DW+4 bits
//   SB1   2x2 transposes of single samples (delays 1, 2:1 muxes)
//   R2BF  x2  final 2-point DFTs                           (-> DW+5 bits)
// No stage scales, so X[k] = sum_n x[n] W32^(n*k) up to rounding in WB0/WB1.
// Output order: at output clock c (c = 0..7, vout2 marks c = 0), with
// m = c/2 and r = c%2, the four outputs carry
//   out[0] = X[m+4r], out[1] = X[m+4r+16], out[2] = X[m+4r+8], out[3] = X[m+4r+24].
// Latency 12 clocks from vin to vout1; one frame per 8 clocks, back to back.
// sat flags a saturation in WB0 or WB1 (the cycle it leaves that stage).
module mrmdc442_core
  import fft442_pkg::*;
#(
  parameter int unsigned DW = 10,  // input data wordlength
  parameter int unsigned TW = 12   // twiddle coefficient wordlength
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  vin,
  input  logic signed [DW-1:0]  in_re  [4],
  input  logic signed [DW-1:0]  in_im  [4],
  output logic signed [DW+4:0]  out_re [4],
  output logic signed [DW+4:0]  out_im [4],
  output logic                  vout1,
  output logic                  vout2,
  output logic                  sat
);
  localparam int unsigned W1 = DW + 2;  // after the first radix-4 stage
  localparam int unsigned W2 = DW + 4;  // after the second radix-4 stage

  logic [2:0] wb0_sel, wb1_sel;
  logic [1:0] sb0_sel [4];
  logic [0:0] sb1_sel [2];
  logic       sat0, sat1;

  mrmdc442_cu u_cu (
    .clk, .rst_n, .vin, .wb0_sel, .sb0_sel, .wb1_sel, .sb1_sel, .vout1, .vout2
  );

  // Stage 1: radix-4 butterfly and WB0.
  logic signed [W1-1:0] s1r [4], s1i [4], s2r [4], s2i [4];
  r4bf #(.W(DW)) u_r4_0 (.clk, .rst_n, .xr(in_re), .xi(in_im), .yr(s1r), .yi(s1i));
  twiddle_stage #(.W(W1), .TW(TW), .STEP(1), .KMASK(7)) u_wb0 (
    .clk, .rst_n, .sel(wb0_sel), .xr(s1r), .xi(s1i), .zr(s2r), .zi(s2i), .sat(sat0)
  );

  // SB0.
  logic [2*W1-1:0] c0_in [4], c0_out [4];
  logic signed [W1-1:0] s3r [4], s3i [4];
  for (genvar l = 0; l < 4; l++) begin : g_sb0
    assign c0_in[l] = {s2r[l], s2i[l]};
    assign s3r[l]   = c0_out[l][2*W1-1:W1];
    assign s3i[l]   = c0_out[l][W1-1:0];
  end
  commutator #(.W(2*W1), .NL(4), .BLK(2), .NGRP(1)) u_sb0 (
    .clk, .rst_n, .sel(sb0_sel), .d(c0_in), .q(c0_out)
  );

  // Stage 2: radix-4 butterfly and WB1.
  logic signed [W2-1:0] s4r [4], s4i [4], s5r [4], s5i [4];
  r4bf #(.W(W1)) u_r4_1 (.clk, .rst_n, .xr(s3r), .xi(s3i), .yr(s4r), .yi(s4i));
  twiddle_stage #(.W(W2), .TW(TW), .STEP(4), .KMASK(1)) u_wb1 (
    .clk, .rst_n, .sel(wb1_sel), .xr(s4r), .xi(s4i), .zr(s5r), .zi(s5i), .sat(sat1)
  );

  // SB1.
  logic [2*W2-1:0] c1_in [4], c1_out [4];
  logic signed [W2-1:0] s6r [4], s6i [4];
  for (genvar l = 0; l < 4; l++) begin : g_sb1
    assign c1_in[l] = {s5r[l], s5i[l]};
    assign s6r[l]   = c1_out[l][2*W2-1:W2];
    assign s6i[l]   = c1_out[l][W2-1:0];
  end
  commutator #(.W(2*W2), .NL(2), .BLK(1), .NGRP(2)) u_sb1 (
    .clk, .rst_n, .sel(sb1_sel), .d(c1_in), .q(c1_out)
  );

  // Stage 3: two radix-2 butterflies.
  r2bf #(.W(W2)) u_r2_0 (
    .clk, .rst_n, .ar(s6r[0]), .ai(s6i[0]), .br(s6r[1]), .bi(s6i[1]),
    .y0r(out_re[0]), .y0i(out_im[0]), .y1r(out_re[1]), .y1i(out_im[1])
  );
  r2bf #(.W(W2)) u_r2_1 (
    .clk, .rst_n, .ar(s6r[2]), .ai(s6i[2]), .br(s6r[3]), .bi(s6i[3]),
    .y0r(out_re[2]), .y0i(out_im[2]), .y1r(out_re[3]), .y1i(out_im[3])
  );

  assign sat = sat0 | sat1;
endmodule

// commutator: delay-commutator (the SB blocks of the pipeline). It transposes
// NL lanes against NL consecutive blocks of BLK samples, in NGRP independent
// groups of NL lanes that share one set of selects.
//   - input lane i of a group is delayed by BLK*i cycles (skew),
//   - output j of the group takes the skewed input lane sel[j] (an NL:1 mux),
//   - output j is delayed by BLK*(NL-1-j) cycles (de-skew).
// With sel[j] = (index of the sample on skewed lane j) / BLK, input lane m,
// block b comes out on lane b, block m, so samples that were spread over time
// on one lane arrive side by side for the next butterfly. The control unit
// supplies sel. SB0 is NL = 4, BLK = 2 (delays 0/2/4/6 in, 6/4/2/0 out);
// SB1 is NL = 2, BLK = 1, NGRP = 2 (delays 0/1 in, 1/0 out).
// Latency BLK*(NL-1) cycles. Each lane carries one complex sample packed as
// {re, im} in W bits.
module commutator #(
  parameter int unsigned W    = 24,  // bits per lane (complex sample)
  parameter int unsigned NL   = 4,   // lanes per group
  parameter int unsigned BLK  = 2,   // block length in samples
  parameter int unsigned NGRP = 1,   // groups
  localparam int unsigned SW  = (NL > 1) ? $clog2(NL) : 1
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic [SW-1:0] sel [NL],
  input  logic [W-1:0]  d   [NL*NGRP],
  output logic [W-1:0]  q   [NL*NGRP]
);
  for (genvar g = 0; g < NGRP; g++) begin : g_grp
    logic [W-1:0] skew [NL];
    logic [W-1:0] sw   [NL];

    for (genvar i = 0; i < NL; i++) begin : g_in
      delay_line #(.W(W), .D(BLK*i)) u_pre (
        .clk, .rst_n, .d(d[g*NL+i]), .q(skew[i])
      );
    end

    for (genvar j = 0; j < NL; j++) begin : g_out
      assign sw[j] = skew[sel[j]];
      delay_line #(.W(W), .D(BLK*(NL-1-j))) u_post (
        .clk, .rst_n, .d(sw[j]), .q(q[g*NL+j])
      );
    end
  end
endmodule

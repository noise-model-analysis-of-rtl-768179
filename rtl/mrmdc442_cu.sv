// mrmdc442_cu: control unit of the 4-4-2 pipeline. It numbers the samples of
// each incoming frame (index 0..7, one per clock while vin is high) and sends
// that tag {valid, index} down a shift register as long as the pipeline. Each
// control is a tap of that register at the delay where its stage sees the
// frame's data, so frames may follow each other back to back or with any gap.
//   wb0_sel   index for WB0 (twiddle W32^(q*t)), tag delay T_WB0
//   sb0_sel   per SB0 output j: index/2 of the sample on skewed lane j,
//             tag delay T_SB0 + 2*j
//   wb1_sel   index for WB1 (twiddle W8^(q*t'), t' = bit 0), tag delay T_WB1
//   sb1_sel   per SB1 output j of a pair: index bit 0 on skewed lane j,
//             tag delay T_SB1 + j
//   vout1     output valid, T_OUT (12) cycles after vin
//   vout2     marks the first output clock of each frame
// A frame is 8 consecutive vin clocks; an assertion checks that vin does not
// drop inside a frame.
module mrmdc442_cu
  import fft442_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  logic       vin,
  output logic [2:0] wb0_sel,
  output logic [1:0] sb0_sel [4],
  output logic [2:0] wb1_sel,
  output logic [0:0] sb1_sel [2],
  output logic       vout1,
  output logic       vout2
);
  typedef struct packed {
    logic       valid;
    logic [2:0] idx;
  } tag_t;

  logic [2:0] idx;
  tag_t       tag [T_OUT+1];  // tag[d]: tag of the sample that entered d cycles ago

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) idx <= '0;
    else if (vin) idx <= idx + 3'd1;
  end

  assign tag[0] = '{valid: vin, idx: idx};

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int d = 1; d <= int'(T_OUT); d++) tag[d] <= '0;
    end else begin
      for (int d = 1; d <= int'(T_OUT); d++) tag[d] <= tag[d-1];
    end
  end

  assign wb0_sel = tag[T_WB0].idx;
  for (genvar j = 0; j < 4; j++) begin : g_sb0
    assign sb0_sel[j] = tag[T_SB0 + 2*j].idx[2:1];
  end
  assign wb1_sel = tag[T_WB1].idx;
  for (genvar j = 0; j < 2; j++) begin : g_sb1
    assign sb1_sel[j] = tag[T_SB1 + j].idx[0];
  end
  assign vout1 = tag[T_OUT].valid;
  assign vout2 = tag[T_OUT].valid && (tag[T_OUT].idx == 3'd0);

  // A frame is eight consecutive samples.
  a_frame_contiguous: assert property (@(posedge clk) disable iff (!rst_n)
    (vin && idx != 3'd7) |=> vin)
    else $error("vin dropped inside a frame");
endmodule

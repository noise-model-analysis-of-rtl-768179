// tb_commutator: checks both commutator configurations of the pipeline,
// SB0 (4 lanes, 2-sample blocks) and SB1 (two groups of 2 lanes, 1-sample
// blocks). Each sample carries a label {frame, lane, index}; the selects are
// generated here from the delayed sample indices, as the control unit does.
// After the latency BLK*(NL-1), output lane b at output index e must carry
// input lane e/BLK, input index BLK*b + e%BLK of the same frame. Frames are
// sent back to back and with gaps.
module tb_commutator;
  localparam int W = 16;
  logic clk = 1'b0, rst_n = 1'b0;
  logic [W-1:0] d [4], q0 [4], q1 [4];
  logic [1:0]   sel0 [4];
  logic [0:0]   sel1 [2];

  commutator #(.W(W), .NL(4), .BLK(2), .NGRP(1)) dut0 (
    .clk, .rst_n, .sel(sel0), .d, .q(q0));
  commutator #(.W(W), .NL(2), .BLK(1), .NGRP(2)) dut1 (
    .clk, .rst_n, .sel(sel1), .d, .q(q1));

  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  // input tag history: valid, index, frame
  logic       vh [16];
  logic [2:0] ih [16];
  logic [7:0] fh [16];
  logic       vin = 1'b0;
  logic [2:0] idx = '0;
  logic [7:0] frm = '0;

  function automatic logic [W-1:0] label(logic [7:0] f, int lane, logic [2:0] i);
    return {f, 3'(lane), 2'b0, i};
  endfunction

  always_ff @(posedge clk) begin
    vh[0] <= vin; ih[0] <= idx; fh[0] <= frm;
    for (int k = 1; k < 16; k++) begin vh[k] <= vh[k-1]; ih[k] <= ih[k-1]; fh[k] <= fh[k-1]; end
  end

  // selects from the tag seen on each skewed lane
  always_comb begin
    logic [2:0] t;
    for (int j = 0; j < 4; j++) begin
      t = (2 * j == 0) ? idx : ih[2 * j - 1];
      sel0[j] = t[2:1];
    end
    for (int j = 0; j < 2; j++) begin
      t = (j == 0) ? idx : ih[j - 1];
      sel1[j] = t[0];
    end
  end

  always_comb begin
    for (int l = 0; l < 4; l++) d[l] = label(frm, l, idx);
  end

  int nout0 = 0, nout1 = 0;
  always @(negedge clk) begin
    if (rst_n) begin
      // SB0: latency 6
      if (vh[5]) begin
        for (int b = 0; b < 4; b++) begin
          int e;
          e = int'(ih[5]);
          checks++;
          if (q0[b] != label(fh[5], e / 2, 3'(2 * b + e % 2))) begin
            failures++;
            if (failures < 10) $display("FAIL SB0 lane %0d e=%0d got %h", b, e, q0[b]);
          end
        end
        nout0++;
      end
      // SB1: latency 1, groups {0,1} and {2,3}
      if (vh[0]) begin
        for (int g = 0; g < 2; g++)
          for (int b = 0; b < 2; b++) begin
            int e;
            e = int'(ih[0]);
            checks++;
            if (q1[2*g+b] != label(fh[0], 2*g + e % 2, 3'((e / 2) * 2 + b))) begin
              failures++;
              if (failures < 10) $display("FAIL SB1 lane %0d e=%0d got %h", 2*g+b, e, q1[2*g+b]);
            end
          end
        nout1++;
      end
    end
  end

  initial begin
    for (int k = 0; k < 16; k++) begin vh[k] = 1'b0; ih[k] = '0; fh[k] = '0; end
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int f = 0; f < 60; f++) begin
      int gap;
      frm = 8'(f);
      for (int c = 0; c < 8; c++) begin
        vin = 1'b1; idx = 3'(c);
        @(negedge clk);
      end
      gap = (f % 3 == 0) ? 0 : $urandom_range(1, 7);
      vin = 1'b0;
      repeat (gap) @(negedge clk);
    end
    vin = 1'b0;
    repeat (12) @(negedge clk);
    checks++;
    if (nout0 != 480 || nout1 != 480) begin
      failures++;
      $display("FAIL output clocks %0d %0d", nout0, nout1);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_mrmdc442_cu: checks the control unit. Frames of 8 vin clocks are sent
// with gaps of various lengths; for every clock the expected controls are
// derived here from a record of when each frame started: the WB0 index one
// clock after the sample entered, the SB0 selects (index/2 of the sample two,
// four, six and eight clocks in), the WB1 index nine clocks in, the SB1
// selects ten and eleven clocks in, and vout1/vout2 twelve clocks in.
module tb_mrmdc442_cu;
  logic clk = 1'b0, rst_n = 1'b0, vin = 1'b0;
  logic [2:0] wb0_sel, wb1_sel;
  logic [1:0] sb0_sel [4];
  logic [0:0] sb1_sel [2];
  logic vout1, vout2;
  mrmdc442_cu dut (.*);
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  // sample index entering at each clock, -1 when idle
  int hist [0:4095];
  int cyc = 0;

  function automatic int at(int d);
    return (cyc - d >= 0) ? hist[cyc - d] : -1;
  endfunction

  task automatic chk(int got, int want, string what);
    checks++;
    if (got != want) begin
      failures++;
      if (failures < 10) $display("FAIL %s cycle %0d got %0d want %0d", what, cyc, got, want);
    end
  endtask

  int nv = 0;
  always @(negedge clk) begin
    if (rst_n) begin
      // hist[cyc] holds the sample presented during this clock
      if (at(1) >= 0) chk(int'(wb0_sel), at(1), "wb0_sel");
      for (int j = 0; j < 4; j++)
        if (at(2 + 2*j) >= 0) chk(int'(sb0_sel[j]), at(2 + 2*j) / 2, $sformatf("sb0_sel[%0d]", j));
      if (at(9) >= 0) chk(int'(wb1_sel) % 2, at(9) % 2, "wb1_sel");
      for (int j = 0; j < 2; j++)
        if (at(10 + j) >= 0) chk(int'(sb1_sel[j]), at(10 + j) % 2, $sformatf("sb1_sel[%0d]", j));
      chk(int'(vout1), int'(at(12) >= 0), "vout1");
      chk(int'(vout2), int'(at(12) == 0), "vout2");
      if (vout1) nv++;
    end
  end

  initial begin
    for (int k = 0; k < 4096; k++) hist[k] = -1;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int f = 0; f < 100; f++) begin
      int gap;
      for (int c = 0; c < 8; c++) begin
        vin = 1'b1;
        hist[cyc] = c;
        @(posedge clk); cyc++; @(negedge clk);
      end
      gap = (f % 4 == 0) ? 0 : $urandom_range(1, 11);
      for (int g = 0; g < gap; g++) begin
        vin = 1'b0;
        @(posedge clk); cyc++; @(negedge clk);
      end
    end
    vin = 1'b0;
    for (int g = 0; g < 14; g++) begin @(posedge clk); cyc++; @(negedge clk); end
    chk(nv, 800, "output valid clocks");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

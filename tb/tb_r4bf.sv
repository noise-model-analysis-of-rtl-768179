// tb_r4bf: checks the radix-4 butterfly against a 4-point DFT computed with
// integer rotations by (-j)^(l*k), on random and full-scale inputs, and
// checks its one-clock latency (inputs applied before a clock edge appear
// after it, and not before).
module tb_r4bf;
  import fft442_ref_pkg::*;
  localparam int W = 10;
  logic clk = 1'b0, rst_n = 1'b0;
  logic signed [W-1:0] xr [4], xi [4];
  logic signed [W+1:0] yr [4], yi [4];
  r4bf #(.W(W)) dut (.*);
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  initial begin
    longint ar [4], ai [4], er [4], ei [4];
    longint mx = (64'sd1 <<< (W - 1)) - 1;
    for (int l = 0; l < 4; l++) begin xr[l] = '0; xi[l] = '0; end
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int it = 0; it < 2000; it++) begin
      for (int l = 0; l < 4; l++) begin
        if (it < 16) begin
          ar[l] = (((it >> l) & 1) != 0) ? -mx - 1 : mx;
          ai[l] = (((it >> (3 - l)) & 1) != 0) ? -mx - 1 : mx;
        end else begin
          ar[l] = $signed($urandom_range(0, 2 * mx + 1)) - mx - 1;
          ai[l] = $signed($urandom_range(0, 2 * mx + 1)) - mx - 1;
        end
        xr[l] = W'(ar[l]); xi[l] = W'(ai[l]);
      end
      dft4(ar, ai, er, ei);
      #1;
      // not yet visible before the clock edge (latency 1)
      if (it > 0 && it < 16) begin
        checks++;
        if (yr[1] == (W+2)'(er[1]) && yi[1] == (W+2)'(ei[1]) &&
            yr[3] == (W+2)'(er[3]) && yi[3] == (W+2)'(ei[3]) &&
            yr[2] == (W+2)'(er[2])) begin
          failures++;
          $display("FAIL outputs changed before the clock edge");
        end
      end
      @(negedge clk);
      for (int k = 0; k < 4; k++) begin
        checks++;
        if (yr[k] != er[k] || yi[k] != ei[k]) begin
          failures++;
          if (failures < 10) $display("FAIL it=%0d k=%0d got (%0d,%0d) want (%0d,%0d)",
                                      it, k, yr[k], yi[k], er[k], ei[k]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

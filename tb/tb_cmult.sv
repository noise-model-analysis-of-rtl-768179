// tb_cmult: checks the complex multiplier against an integer model: exact
// products, round-half-to-even by BW-1 bits, saturation to BX bits. Uses the
// 32-point twiddle coefficients, random coefficients, exact rounding ties and
// inputs that force saturation; checks the sat flag and the one-clock latency.
module tb_cmult;
  import fft442_ref_pkg::*;
  localparam int BX = 12, BW = 12;
  logic clk = 1'b0, rst_n = 1'b0;
  logic signed [BX-1:0] xr, xi, zr, zi;
  logic signed [BW-1:0] wr, wi;
  logic sat;
  cmult #(.BX(BX), .BW(BW)) dut (.*);
  always #5 clk = ~clk;
  int checks = 0, failures = 0, n_sat = 0, n_tie = 0;

  initial begin
    longint x_r, x_i, w_r, w_i, pr, pi, er, ei;
    longint mx = (64'sd1 <<< (BX - 1)) - 1;
    longint wmx = (64'sd1 <<< (BW - 1)) - 1;
    int ns;
    xr = '0; xi = '0; wr = '0; wi = '0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int it = 0; it < 4000; it++) begin
      case (it % 4)
        0: begin  // twiddle coefficients of the 32-point FFT
          w_r = coef(1 + it % 7, BW, 0); w_i = coef(1 + it % 7, BW, 1);
        end
        1: begin w_r = $signed($urandom_range(0, 2 * wmx)) - wmx;
                 w_i = $signed($urandom_range(0, 2 * wmx)) - wmx; end
        2: begin w_r = 64'sd1 <<< (BW - 2); w_i = 0; end  // 0.5: ties
        default: begin w_r = coef(4, BW, 0); w_i = coef(4, BW, 1); end  // 45 degrees
      endcase
      if (it % 4 == 3 && it % 8 == 3) begin x_r = mx; x_i = -mx; end  // saturates
      else begin
        x_r = $signed($urandom_range(0, 2 * mx + 1)) - mx - 1;
        x_i = $signed($urandom_range(0, 2 * mx + 1)) - mx - 1;
      end
      xr = BX'(x_r); xi = BX'(x_i); wr = BW'(w_r); wi = BW'(w_i);
      pr = x_r * w_r - x_i * w_i;
      pi = x_r * w_i + x_i * w_r;
      if ((pr % (64'sd1 <<< (BW - 2))) == 0 && (pr % (64'sd1 <<< (BW - 1))) != 0) n_tie++;
      ns = 0;
      er = fft442_ref_pkg::sat(rne(pr, BW - 1), BX, ns);
      ei = fft442_ref_pkg::sat(rne(pi, BW - 1), BX, ns);
      @(negedge clk);
      checks++;
      if (zr != er || zi != ei || sat != (ns != 0)) begin
        failures++;
        if (failures < 10) $display("FAIL x=(%0d,%0d) w=(%0d,%0d) got (%0d,%0d,%b) want (%0d,%0d,%0d)",
                                    x_r, x_i, w_r, w_i, zr, zi, sat, er, ei, ns);
      end
      if (ns != 0) n_sat++;
    end
    checks++;
    if (n_sat == 0 || n_tie == 0) begin
      failures++;
      $display("FAIL saturation (%0d) or rounding ties (%0d) never happened", n_sat, n_tie);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

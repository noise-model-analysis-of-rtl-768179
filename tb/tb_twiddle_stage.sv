// tb_twiddle_stage: checks both twiddle multiplier banks of the pipeline,
// WB0 (W32^(q*t)) and WB1 (W8^(q*t')), against the integer model: exact
// rotations for the trivial factors (with saturating negation of the most
// negative code), rounded and saturated products otherwise. Every index t
// and lane q is covered, with random and extreme samples; checks the sat flag
// and the one-clock latency, and counts trivial and non-trivial cases.
module tb_twiddle_stage;
  import fft442_ref_pkg::*;
  localparam int W0 = 12, W1 = 14, TW = 12;
  logic clk = 1'b0, rst_n = 1'b0;
  logic [2:0] sel;
  logic signed [W0-1:0] x0r [4], x0i [4], z0r [4], z0i [4];
  logic signed [W1-1:0] x1r [4], x1i [4], z1r [4], z1i [4];
  logic sat0, sat1;

  twiddle_stage #(.W(W0), .TW(TW), .STEP(1), .KMASK(7)) dut0 (
    .clk, .rst_n, .sel, .xr(x0r), .xi(x0i), .zr(z0r), .zi(z0i), .sat(sat0));
  twiddle_stage #(.W(W1), .TW(TW), .STEP(4), .KMASK(1)) dut1 (
    .clk, .rst_n, .sel, .xr(x1r), .xi(x1i), .zr(z1r), .zi(z1i), .sat(sat1));

  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  int n_triv = 0, n_mult = 0, n_sat = 0;

  function automatic longint rnd(int w, int it);
    longint mx = (64'sd1 <<< (w - 1)) - 1;
    if (it % 16 == 5) return -mx - 1;
    if (it % 16 == 9) return mx;
    return $signed($urandom_range(0, 2 * mx + 1)) - mx - 1;
  endfunction

  initial begin
    longint e0r [4], e0i [4], e1r [4], e1i [4];
    int s0, s1, d1, d2;
    sel = '0;
    for (int q = 0; q < 4; q++) begin x0r[q] = '0; x0i[q] = '0; x1r[q] = '0; x1i[q] = '0; end
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int it = 0; it < 3000; it++) begin
      sel = 3'(it % 8);
      s0 = 0; s1 = 0; d1 = 0; d2 = 0;
      for (int q = 0; q < 4; q++) begin
        e0r[q] = rnd(W0, it + q); e0i[q] = rnd(W0, it + 3 * q + 1);
        e1r[q] = rnd(W1, it + q); e1i[q] = rnd(W1, it + 5 * q + 2);
        x0r[q] = W0'(e0r[q]); x0i[q] = W0'(e0i[q]);
        x1r[q] = W1'(e1r[q]); x1i[q] = W1'(e1i[q]);
        twiddle(e0r[q], e0i[q], q * (it % 8), W0, TW, s0, n_triv, n_mult);
        twiddle(e1r[q], e1i[q], 4 * q * (it % 2), W1, TW, s1, n_triv, n_mult);
      end
      @(negedge clk);
      for (int q = 0; q < 4; q++) begin
        checks += 2;
        if (z0r[q] != e0r[q] || z0i[q] != e0i[q]) begin
          failures++;
          if (failures < 10) $display("FAIL WB0 t=%0d q=%0d got (%0d,%0d) want (%0d,%0d)",
                                      it % 8, q, z0r[q], z0i[q], e0r[q], e0i[q]);
        end
        if (z1r[q] != e1r[q] || z1i[q] != e1i[q]) begin
          failures++;
          if (failures < 10) $display("FAIL WB1 t=%0d q=%0d got (%0d,%0d) want (%0d,%0d)",
                                      it % 8, q, z1r[q], z1i[q], e1r[q], e1i[q]);
        end
      end
      // sat reports multiplier saturation only (trivial negation clamps silently)
      if (sat0 || sat1) n_sat++;
    end
    checks++;
    if (n_triv == 0 || n_mult == 0 || n_sat == 0) begin
      failures++;
      $display("FAIL not every case occurred: trivial=%0d mult=%0d sat=%0d", n_triv, n_mult, n_sat);
    end
    $display("trivial=%0d nontrivial=%0d sat_cycles=%0d", n_triv, n_mult, n_sat);
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

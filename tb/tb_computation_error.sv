// tb_computation_error: the computation-error workload. Random 32-point frames
// (independent uniform real and imaginary parts over the full 10-bit range,
// one million frames, the sample size of the wordlength study)
// stream back to back through the buffered FFT at its default wordlengths.
// Each output is checked bit for bit against the frame model, and the error
// against an exact floating-point DFT is accumulated over all frames. Reports
// the signal-to-computation-error ratio in dB and the mean error power in
// output LSB^2. It fails if any output differs from the model or if the ratio
// is below 55 dB. That limit is this testbench's own: with 12-bit twiddles the
// expected ratio is well above 60 dB.
module tb_computation_error;
  import fft442_ref_pkg::*;

  localparam int DW = 10, TW = 12, NFRAMES = 1000000, LAT = 14;

  logic                 clk = 1'b0, rst_n = 1'b0, in_valid = 1'b0;
  logic signed [DW-1:0] in_re [4], in_im [4];
  logic signed [DW+4:0] out_re [4], out_im [4];
  logic                 vout1, vout2, sat;

  bmrmdc442_fft dut (.*);
  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  real sig_pow = 0.0, err_pow = 0.0, err_pow_ns = 0.0, sig_pow_ns = 0.0;
  int  sat_frame [4];
  int  n_sat_frames = 0;

  // exact DFT and model output of the frames in flight (ring of 4 frames)
  real    ex_r [4][32], ex_i [4][32];
  longint md_r [4][32], md_i [4][32];
  int     nsent = 0, nrecv = 0, oc = 0, cur = 0;

  always @(negedge clk) begin
    if (rst_n && vout1) begin
      if (vout2) begin
        cur = nrecv % 4;
        nrecv++;
        oc = 0;
      end
      for (int j = 0; j < 4; j++) begin
        int k;
        real dr, di;
        k = out_bin(oc, j);
        checks++;
        if (out_re[j] != md_r[cur][k] || out_im[j] != md_i[cur][k]) begin
          failures++;
          if (failures < 10) $display("FAIL frame %0d X[%0d]", nrecv - 1, k);
        end
        dr = real'(out_re[j]) - ex_r[cur][k];
        di = real'(out_im[j]) - ex_i[cur][k];
        err_pow += dr * dr + di * di;
        sig_pow += ex_r[cur][k] * ex_r[cur][k] + ex_i[cur][k] * ex_i[cur][k];
        if (sat_frame[cur] == 0) begin
          err_pow_ns += dr * dr + di * di;
          sig_pow_ns += ex_r[cur][k] * ex_r[cur][k] + ex_i[cur][k] * ex_i[cur][k];
        end
      end
      oc++;
    end
  end

  initial begin
    cvec_t xr, xi, Xr, Xi;
    int ns, nt, nm;
    real snr;
    longint mx = (64'sd1 <<< (DW - 1)) - 1;
    for (int j = 0; j < 4; j++) begin in_re[j] = '0; in_im[j] = '0; end
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    for (int f = 0; f < NFRAMES; f++) begin
      int s;
      s = f % 4;
      for (int n = 0; n < 32; n++) begin
        xr[n] = $signed($urandom_range(0, 2 * mx + 1)) - mx - 1;
        xi[n] = $signed($urandom_range(0, 2 * mx + 1)) - mx - 1;
      end
      ns = 0; nt = 0; nm = 0;
      fft32(xr, xi, DW, TW, Xr, Xi, ns, nt, nm);
      sat_frame[s] = ns;
      if (ns != 0) n_sat_frames++;
      for (int k = 0; k < 32; k++) begin
        real a, er, ei;
        md_r[s][k] = Xr[k]; md_i[s][k] = Xi[k];
        er = 0.0; ei = 0.0;
        for (int n = 0; n < 32; n++) begin
          a = -2.0 * 3.14159265358979323846 * ((n * k) % 32) / 32.0;
          er += xr[n] * $cos(a) - xi[n] * $sin(a);
          ei += xr[n] * $sin(a) + xi[n] * $cos(a);
        end
        ex_r[s][k] = er; ex_i[s][k] = ei;
      end
      for (int c = 0; c < 8; c++) begin
        in_valid <= 1'b1;
        for (int j = 0; j < 4; j++) begin
          in_re[j] <= DW'(xr[4*c + j]);
          in_im[j] <= DW'(xi[4*c + j]);
        end
        @(negedge clk);
      end
      nsent++;
    end
    in_valid <= 1'b0;
    repeat (LAT + 10) @(negedge clk);
    checks++;
    if (nrecv != NFRAMES) begin
      failures++;
      $display("FAIL frames out %0d", nrecv);
    end
    snr = 10.0 * $log10(sig_pow / err_pow);
    $display("frames=%0d signal/computation-error = %0.2f dB, mean error power = %0.3f LSB^2 per bin",
             nrecv, snr, err_pow / (32.0 * nrecv));
    $display("frames with a multiplier saturation: %0d; without them: %0.2f dB, %0.3f LSB^2 per bin",
             n_sat_frames, 10.0 * $log10(sig_pow_ns / err_pow_ns),
             err_pow_ns / (32.0 * (nrecv - n_sat_frames)));
    checks++;
    if (snr < 50.0 || 10.0 * $log10(sig_pow_ns / err_pow_ns) < 60.0) begin
      failures++;
      $display("FAIL computation error above the limits");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (NFRAMES * 8 + 1000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

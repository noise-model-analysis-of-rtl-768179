// tb_wordlength_sweep: the wordlength study on a grid. Sixteen copies of the
// FFT pipeline run side by side with data (DW) and twiddle (TW) wordlengths
// of 8, 10, 12 and 14 bits each.
// Each copy gets its own random full-range frames, back to back; every output
// is checked bit for bit against the frame model at that copy's wordlengths,
// and the ratio of signal to computation error is reported, the error being
// the difference from an exact DFT (frames with a saturation left out). The ratio
// must not fall when either wordlength grows, and with 8-bit twiddles it must
// sit on a floor set by coefficient rounding that more data bits do not lift.
module tb_wordlength_sweep;
  import fft442_ref_pkg::*;

  localparam int NCFG = 16, NF = 400, LAT = 12;
  localparam int DWS [NCFG] = '{8, 8, 8, 8, 10, 10, 10, 10, 12, 12, 12, 12, 14, 14, 14, 14};
  localparam int TWS [NCFG] = '{8, 10, 12, 14, 8, 10, 12, 14, 8, 10, 12, 14, 8, 10, 12, 14};

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  int  checks = 0, failures = 0;
  real err_db [NCFG];
  bit  done [NCFG];

  for (genvar g = 0; g < NCFG; g++) begin : g_cfg
    localparam int DW = DWS[g], TW = TWS[g];
    logic                 vin = 1'b0;
    logic signed [DW-1:0] in_re [4], in_im [4];
    logic signed [DW+4:0] out_re [4], out_im [4];
    logic                 vout1, vout2, sat;

    mrmdc442_core #(.DW(DW), .TW(TW)) dut (.*);

    real    ex_r [4][32], ex_i [4][32];
    longint md_r [4][32], md_i [4][32];
    int     sat_f [4];
    int     nrecv = 0, oc = 0, cur = 0;
    real    e_pow = 0.0, s_pow = 0.0;

    always @(negedge clk) begin
      if (rst_n && vout1) begin
        if (vout2) begin cur = nrecv % 4; nrecv++; oc = 0; end
        for (int j = 0; j < 4; j++) begin
          int k;
          real dr, di;
          k = out_bin(oc, j);
          checks++;
          if (out_re[j] != md_r[cur][k] || out_im[j] != md_i[cur][k]) begin
            failures++;
            if (failures < 10) $display("FAIL DW=%0d TW=%0d X[%0d]", DW, TW, k);
          end
          if (sat_f[cur] == 0) begin
            dr = real'(out_re[j]) - ex_r[cur][k];
            di = real'(out_im[j]) - ex_i[cur][k];
            e_pow += dr * dr + di * di;
            s_pow += ex_r[cur][k] * ex_r[cur][k] + ex_i[cur][k] * ex_i[cur][k];
          end
        end
        oc++;
      end
    end

    initial begin
      cvec_t xr, xi, Xr, Xi;
      int ns, nt, nm;
      longint mx = (64'sd1 <<< (DW - 1)) - 1;
      done[g] = 1'b0;
      for (int j = 0; j < 4; j++) begin in_re[j] = '0; in_im[j] = '0; end
      @(posedge rst_n);
      @(negedge clk);
      for (int f = 0; f < NF; f++) begin
        for (int n = 0; n < 32; n++) begin
          xr[n] = $signed($urandom_range(0, 2 * mx + 1)) - mx - 1;
          xi[n] = $signed($urandom_range(0, 2 * mx + 1)) - mx - 1;
        end
        ns = 0; nt = 0; nm = 0;
        fft32(xr, xi, DW, TW, Xr, Xi, ns, nt, nm);
        sat_f[f % 4] = ns;
        for (int k = 0; k < 32; k++) begin
          real a, er, ei;
          md_r[f % 4][k] = Xr[k]; md_i[f % 4][k] = Xi[k];
          er = 0.0; ei = 0.0;
          for (int n = 0; n < 32; n++) begin
            a = -2.0 * 3.14159265358979323846 * ((n * k) % 32) / 32.0;
            er += xr[n] * $cos(a) - xi[n] * $sin(a);
            ei += xr[n] * $sin(a) + xi[n] * $cos(a);
          end
          ex_r[f % 4][k] = er; ex_i[f % 4][k] = ei;
        end
        for (int t = 0; t < 8; t++) begin
          vin <= 1'b1;
          for (int l = 0; l < 4; l++) begin
            in_re[l] <= DW'(xr[t + 8*l]);
            in_im[l] <= DW'(xi[t + 8*l]);
          end
          @(negedge clk);
        end
      end
      vin <= 1'b0;
      repeat (LAT + 4) @(negedge clk);
      checks++;
      if (nrecv != NF) begin
        failures++;
        $display("FAIL DW=%0d TW=%0d frames out %0d", DW, TW, nrecv);
      end
      err_db[g] = 10.0 * $log10(s_pow / e_pow);
      $display("DW=%0d TW=%0d: signal/computation-error %0.2f dB (frames without saturation)",
               DW, TW, err_db[g]);
      done[g] = 1'b1;
    end
  end

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    for (int g = 0; g < NCFG; g++) wait (done[g]);
    for (int g = 0; g < NCFG; g++) $write("%s%7.2f", (g % 4 == 0) ? "\n" : " ", err_db[g]);
    $display("");
    // error never grows with either wordlength (0.5 dB allowed for the
    // finite number of frames)
    for (int d = 0; d < 4; d++)
      for (int w = 0; w < 3; w++) begin
        checks += 2;
        if (err_db[4*d + w + 1] < err_db[4*d + w] - 0.5) begin
          failures++;
          $display("FAIL ratio drops with TW at DW=%0d TW=%0d", DWS[4*d], TWS[w + 1]);
        end
        if (err_db[4*(w + 1) + d] < err_db[4*w + d] - 0.5) begin
          failures++;
          $display("FAIL ratio drops with DW at TW=%0d DW=%0d", TWS[d], DWS[4*(w + 1)]);
        end
      end
    // with 8-bit twiddles the coefficient error is a floor: more data bits
    // gain less than 2 dB, while with 14-bit twiddles they gain over 20 dB
    checks += 2;
    if (err_db[12] - err_db[0] > 2.0) begin
      failures++;
      $display("FAIL no error floor at TW=8");
    end
    if (err_db[15] - err_db[3] < 20.0) begin
      failures++;
      $display("FAIL data wordlength has no effect at TW=14");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (NF * 8 + 500) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

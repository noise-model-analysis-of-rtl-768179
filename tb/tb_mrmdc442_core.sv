// tb_mrmdc442_core: checks the FFT pipeline without the input buffer. Frames
// are applied directly in the pipeline's input order (lane l carries
// x[t + 8l] at frame clock t), back to back and with gaps, including
// full-scale frames; every output is compared bit for bit with the frame
// model in fft442_ref_pkg at the output order the core documents, and the
// 12-clock latency from vin to vout2 is checked.
module tb_mrmdc442_core;
  import fft442_ref_pkg::*;
  localparam int DW = 10, TW = 12, NF = 100, LAT = 12;
  logic clk = 1'b0, rst_n = 1'b0, vin = 1'b0;
  logic signed [DW-1:0] in_re [4], in_im [4];
  logic signed [DW+4:0] out_re [4], out_im [4];
  logic vout1, vout2, sat;
  mrmdc442_core #(.DW(DW), .TW(TW)) dut (.*);
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  longint cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  longint exp_r [NF][32], exp_i [NF][32], first_in [NF];
  int nsent = 0, nrecv = 0, oc = 0, cur = 0;

  task automatic chk(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s (cycle %0d)", what, cyc);
    end
  endtask

  always @(negedge clk) begin
    if (rst_n && vout1) begin
      if (vout2) begin
        chk(nrecv < nsent, "frame expected");
        cur = nrecv;
        chk(cyc - first_in[cur] == LAT, $sformatf("latency %0d", cyc - first_in[cur]));
        nrecv++;
        oc = 0;
      end
      for (int j = 0; j < 4; j++) begin
        int k;
        k = out_bin(oc, j);
        chk(out_re[j] == exp_r[cur][k] && out_im[j] == exp_i[cur][k],
            $sformatf("frame %0d X[%0d] got (%0d,%0d) want (%0d,%0d)", cur, k,
                      out_re[j], out_im[j], exp_r[cur][k], exp_i[cur][k]));
      end
      oc++;
    end
  end

  initial begin
    cvec_t xr, xi, Xr, Xi;
    int ns, nt, nm;
    longint mx = (64'sd1 <<< (DW - 1)) - 1;
    for (int j = 0; j < 4; j++) begin in_re[j] = '0; in_im[j] = '0; end
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int f = 0; f < NF; f++) begin
      int gap;
      for (int n = 0; n < 32; n++) begin
        if (f % 5 == 4) begin
          xr[n] = ($urandom_range(0, 1) != 0) ? mx : -mx - 1;
          xi[n] = ($urandom_range(0, 1) != 0) ? mx : -mx - 1;
        end else begin
          xr[n] = $signed($urandom_range(0, 2 * mx + 1)) - mx - 1;
          xi[n] = $signed($urandom_range(0, 2 * mx + 1)) - mx - 1;
        end
      end
      ns = 0; nt = 0; nm = 0;
      fft32(xr, xi, DW, TW, Xr, Xi, ns, nt, nm);
      for (int k = 0; k < 32; k++) begin exp_r[f][k] = Xr[k]; exp_i[f][k] = Xi[k]; end
      for (int t = 0; t < 8; t++) begin
        vin <= 1'b1;
        for (int l = 0; l < 4; l++) begin
          in_re[l] <= DW'(xr[t + 8*l]);
          in_im[l] <= DW'(xi[t + 8*l]);
        end
        if (t == 0) first_in[f] = cyc;
        @(negedge clk);
      end
      nsent++;
      gap = (f % 3 == 0) ? 0 : $urandom_range(1, 9);
      repeat (gap) begin vin <= 1'b0; @(negedge clk); end
    end
    vin <= 1'b0;
    repeat (LAT + 10) @(negedge clk);
    chk(nrecv == NF, $sformatf("frames out %0d", nrecv));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (NF * 20 + 200) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

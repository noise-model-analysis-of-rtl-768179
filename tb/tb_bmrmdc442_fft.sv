// tb_bmrmdc442_fft: end-to-end test of the buffered 32-point 4-4-2 FFT at its
// default wordlengths (10-bit data, 12-bit twiddles). Frames of four samples
// per clock in natural order are sent back to back and with gaps of various
// lengths; every output sample is compared bit for bit with the frame model
// in fft442_ref_pkg, and each frame is also compared with a floating-point
// DFT within a small rounding tolerance. Checks the 14-clock latency from the
// last input clock to vout2 and that back-to-back frames come out back to
// back. It counts how often each mechanism occurs (trivial twiddle bypass,
// non-trivial multiplication, saturation, back-to-back frames with the two
// buffer halves overlapping, gaps between frames) and fails if one never does.
module tb_bmrmdc442_fft;
  import fft442_ref_pkg::*;

  localparam int DW = 10, TW = 12;
  localparam int NFRAMES = 200;
  localparam int LAT = 14;

  logic                 clk = 1'b0, rst_n = 1'b0;
  logic                 in_valid = 1'b0;
  logic signed [DW-1:0] in_re [4], in_im [4];
  logic signed [DW+4:0] out_re [4], out_im [4];
  logic                 vout1, vout2, sat;

  bmrmdc442_fft dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  longint cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  // expected frames
  longint exp_r [NFRAMES][32], exp_i [NFRAMES][32];
  longint exp_last [NFRAMES];
  int     n_sent = 0, n_recv = 0;
  int n_triv = 0, n_mult = 0, n_sat_model = 0, n_sat_seen = 0;
  int n_b2b = 0, n_gap = 0, n_odd_gap = 0, frames_out = 0;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s (cycle %0d)", what, cyc);
    end
  endtask

  // Output checker.
  int     cur = 0;
  int     oc = -1;
  longint prev_end = -100;
  always @(negedge clk) begin
    if (rst_n) begin
      if (sat) n_sat_seen++;
      if (vout1) begin
        if (vout2) begin
          check(n_recv < n_sent, "output frame expected");
          cur = n_recv;
          if (n_recv < n_sent) begin
            check(cyc - exp_last[cur] == LAT, $sformatf("latency %0d", cyc - exp_last[cur]));
            n_recv++;
          end
          oc = 0;
        end
        check(oc >= 0 && oc < 8, "output clock within frame");
        if (oc >= 0 && oc < 8) begin
          for (int j = 0; j < 4; j++) begin
            int k;
            k = out_bin(oc, j);
            check(out_re[j] == exp_r[cur][k] && out_im[j] == exp_i[cur][k],
                  $sformatf("X[%0d] got (%0d,%0d) want (%0d,%0d)", k,
                            out_re[j], out_im[j], exp_r[cur][k], exp_i[cur][k]));
          end
        end
        oc++;
        if (oc == 8) begin
          frames_out++;
          prev_end = cyc;
        end
      end
    end
  end

  // Frame generator: kind 0 random, 1 full-scale random, 2 saturating.
  task automatic make_frame(int kind, output cvec_t xr, output cvec_t xi);
    longint mx = (64'sd1 <<< (DW - 1)) - 1;
    for (int n = 0; n < 32; n++) begin
      case (kind)
        0: begin
          xr[n] = $signed($urandom_range(0, 2 * mx)) - mx;
          xi[n] = $signed($urandom_range(0, 2 * mx)) - mx;
        end
        1: begin
          xr[n] = ($urandom_range(0, 1) != 0) ? mx : -mx - 1;
          xi[n] = ($urandom_range(0, 1) != 0) ? mx : -mx - 1;
        end
        default: begin
          // x[t+8l] chosen so that the k=1 butterfly output is 4*mx*(1+j)
          case (n / 8)
            0: begin xr[n] = mx;  xi[n] = mx;  end
            1: begin xr[n] = -mx; xi[n] = mx;  end
            2: begin xr[n] = -mx; xi[n] = -mx; end
            default: begin xr[n] = mx; xi[n] = -mx; end
          endcase
        end
      endcase
    end
  endtask

  task automatic send_frame(int kind, int gap);
    cvec_t xr, xi, Xr, Xi;
    real err;
    int ns = 0, nt = 0, nm = 0;
    make_frame(kind, xr, xi);
    fft32(xr, xi, DW, TW, Xr, Xi, ns, nt, nm);
    n_sat_model += ns; n_triv += nt; n_mult += nm;
    if (kind == 0) begin
      err = dft_error(xr, xi, Xr, Xi);
      check(err < 16.0, $sformatf("model deviates from the DFT by %f", err));
    end
    for (int k = 0; k < 32; k++) begin
      exp_r[n_sent][k] = Xr[k];
      exp_i[n_sent][k] = Xi[k];
    end
    for (int c = 0; c < 8; c++) begin
      in_valid <= 1'b1;
      for (int j = 0; j < 4; j++) begin
        in_re[j] <= DW'(xr[4*c + j]);
        in_im[j] <= DW'(xi[4*c + j]);
      end
      if (c == 7) exp_last[n_sent] = cyc;
      @(negedge clk);
    end
    n_sent++;
    if (gap == 0) n_b2b++;
    else begin
      n_gap++;
      if (gap % 2 == 1) n_odd_gap++;
    end
    repeat (gap) begin
      in_valid <= 1'b0;
      @(negedge clk);
    end
  endtask

  // Back-to-back frames must leave back to back.
  longint b2b_first_end = -1;
  int     b2b_out_checked = 0;

  // Back-to-back throughput: while frames are sent without gaps the output
  // valid must stay high across frame boundaries.
  int vout_run = 0, max_run = 0;
  always @(negedge clk) begin
    if (vout1) begin
      vout_run++;
      if (vout_run > max_run) max_run = vout_run;
    end else vout_run = 0;
  end

  initial begin
    for (int j = 0; j < 4; j++) begin in_re[j] = '0; in_im[j] = '0; end
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    for (int f = 0; f < NFRAMES; f++) begin
      int kind, gap;
      kind = (f % 10 == 3) ? 2 : ((f % 10 == 7) ? 1 : 0);
      case (f % 4)
        0, 1: gap = 0;
        2: gap = $urandom_range(1, 9);
        default: gap = $urandom_range(0, 3);
      endcase
      send_frame(kind, gap);
    end
    in_valid <= 1'b0;
    repeat (LAT + 20) @(negedge clk);
    check(n_recv == n_sent, "all frames came out");
    check(frames_out == NFRAMES, $sformatf("frames out %0d", frames_out));
    check(n_sat_seen > 0 && n_sat_model > 0, "saturation exercised");
    $display("mechanisms: trivial_twiddles=%0d nontrivial_mults=%0d saturations(model)=%0d sat_flag_cycles=%0d back_to_back=%0d gaps=%0d odd_gaps=%0d",
             n_triv, n_mult, n_sat_model, n_sat_seen, n_b2b, n_gap, n_odd_gap);
    check(n_triv > 0, "trivial twiddle bypass exercised");
    check(n_mult > 0, "non-trivial multiplication exercised");
    check(n_b2b > 0, "back-to-back frames exercised");
    check(n_odd_gap > 0, "odd gap exercised");
    check(max_run >= 16, $sformatf("back-to-back frames leave back to back (run %0d)", max_run));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (NFRAMES * 20 + 500) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_input_buffer: checks the double-buffered reorder RAM. Frames of labelled
// samples (frame number and sample number n) are written four per clock in
// natural order, back to back and with gaps; each frame must come out on
// 8 consecutive clocks starting two clocks after its last input clock, lane l
// carrying sample t + 8l at read clock t. Back-to-back frames exercise a read
// of one half while the other half is written.
module tb_input_buffer;
  localparam int W = 10;
  logic clk = 1'b0, rst_n = 1'b0, in_valid = 1'b0, out_valid;
  logic signed [W-1:0] in_re [4], in_im [4], out_re [4], out_im [4];
  input_buffer #(.W(W)) dut (.*);
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  int cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  int last_in [0:255];
  int nsent = 0, nrecv = 0, t = 0, n_overlap = 0;

  function automatic logic [W-1:0] lab_re(int f, int n);
    return W'({f[4:0], n[4:0]});
  endfunction
  function automatic logic [W-1:0] lab_im(int f, int n);
    return W'({n[4:0], f[4:0]} ^ 10'h2a5);
  endfunction

  task automatic chk(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s (cycle %0d)", what, cyc);
    end
  endtask

  always @(negedge clk) begin
    if (rst_n) begin
      if (out_valid) begin
        if (t == 0) begin
          chk(nrecv < nsent, "frame expected");
          chk(cyc - last_in[nrecv] == 2, $sformatf("latency %0d", cyc - last_in[nrecv]));
        end
        if (in_valid) n_overlap++;
        for (int l = 0; l < 4; l++)
          chk(out_re[l] == $signed(lab_re(nrecv, t + 8*l)) &&
              out_im[l] == $signed(lab_im(nrecv, t + 8*l)),
              $sformatf("frame %0d t=%0d lane %0d", nrecv, t, l));
        t++;
        if (t == 8) begin t = 0; nrecv++; end
      end else begin
        chk(t == 0, "out_valid dropped inside a frame");
      end
    end
  end

  initial begin
    for (int j = 0; j < 4; j++) begin in_re[j] = '0; in_im[j] = '0; end
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int f = 0; f < 80; f++) begin
      int gap;
      for (int c = 0; c < 8; c++) begin
        in_valid <= 1'b1;
        for (int j = 0; j < 4; j++) begin
          in_re[j] <= $signed(lab_re(f, 4*c + j));
          in_im[j] <= $signed(lab_im(f, 4*c + j));
        end
        if (c == 7) last_in[f] = cyc;
        @(negedge clk);
      end
      nsent++;
      gap = (f % 2 == 0) ? 0 : $urandom_range(1, 12);
      repeat (gap) begin in_valid <= 1'b0; @(negedge clk); end
    end
    in_valid <= 1'b0;
    repeat (12) @(negedge clk);
    chk(nrecv == 80, $sformatf("frames out %0d", nrecv));
    chk(n_overlap > 0, "read during write exercised");
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

// tb_r2bf: checks the radix-2 butterfly (a+b, a-b, one bit of growth, no
// rounding) on random and extreme inputs, with its one-clock latency.
module tb_r2bf;
  localparam int W = 14;
  logic clk = 1'b0, rst_n = 1'b0;
  logic signed [W-1:0] ar, ai, br, bi;
  logic signed [W:0]   y0r, y0i, y1r, y1i;
  r2bf #(.W(W)) dut (.*);
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  task automatic chk(longint got, longint want, string what);
    checks++;
    if (got != want) begin
      failures++;
      if (failures < 10) $display("FAIL %s got %0d want %0d", what, got, want);
    end
  endtask

  initial begin
    longint a_r, a_i, b_r, b_i;
    longint mx = (64'sd1 <<< (W - 1)) - 1;
    ar = '0; ai = '0; br = '0; bi = '0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int it = 0; it < 2000; it++) begin
      if (it < 4) begin
        a_r = (it[0]) ? -mx - 1 : mx; b_r = (it[1]) ? -mx - 1 : mx;
        a_i = -a_r - 1;               b_i = b_r;
      end else begin
        a_r = $signed($urandom_range(0, 2 * mx + 1)) - mx - 1;
        a_i = $signed($urandom_range(0, 2 * mx + 1)) - mx - 1;
        b_r = $signed($urandom_range(0, 2 * mx + 1)) - mx - 1;
        b_i = $signed($urandom_range(0, 2 * mx + 1)) - mx - 1;
      end
      ar = W'(a_r); ai = W'(a_i); br = W'(b_r); bi = W'(b_i);
      @(negedge clk);
      chk(y0r, a_r + b_r, "y0r"); chk(y0i, a_i + b_i, "y0i");
      chk(y1r, a_r - b_r, "y1r"); chk(y1i, a_i - b_i, "y1i");
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

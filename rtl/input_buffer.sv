// input_buffer: double-buffered sample RAM in front of the FFT pipeline.
// Samples arrive in natural order, four per clock while in_valid is high:
// x[4c+j] on lane j at frame clock c (c = 0..7). The pipeline's first
// radix-4 stage needs x[t], x[t+8], x[t+16], x[t+24] together at clock t, so
// the buffer stores a whole frame and reads it back in that order.
// Storage is 4 banks x 16 words: two 32-sample halves (ping-pong), one being
// written while the other is read. Sample n lives in bank (n + n/8) mod 4 at
// row n/4 of its half; with that skew both the four samples written together
// and the four read together sit in four different banks, so each bank needs
// one write and one read port per clock.
// Reading starts on the clock after a frame's last write and takes 8 clocks;
// since writing a frame takes at least 8 clocks, a read always ends before
// the other half fills. Output lane l carries x[t + 8l] at read clock t, with
// out_valid high for 8 consecutive clocks starting 2 clocks after the
// frame's last input clock (one to start the read, one for the registered
// RAM read). Latencies here and elsewhere count clocks from the clock an
// input is presented to the clock the result is presented.
module input_buffer #(
  parameter int unsigned W = 10  // wordlength per real component
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                in_valid,
  input  logic signed [W-1:0] in_re  [4],
  input  logic signed [W-1:0] in_im  [4],
  output logic                out_valid,
  output logic signed [W-1:0] out_re [4],
  output logic signed [W-1:0] out_im [4]
);
  logic [2*W-1:0] mem [4][16];

  logic [2:0] wc;       // write clock within the frame
  logic       whalf;    // half being written
  logic [2:0] rc;       // read clock within the frame
  logic       rhalf;    // half being read
  logic       ractive;
  logic       frame_done;

  assign frame_done = in_valid && (wc == 3'd7);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wc <= '0; whalf <= 1'b0;
      rc <= '0; rhalf <= 1'b0; ractive <= 1'b0;
    end else begin
      if (in_valid) wc <= wc + 3'd1;
      if (frame_done) whalf <= !whalf;
      if (frame_done) begin
        ractive <= 1'b1;
        rc      <= '0;
        rhalf   <= whalf;
      end else if (ractive) begin
        rc <= rc + 3'd1;
        if (rc == 3'd7) ractive <= 1'b0;
      end
    end
  end

  // Write: bank b takes input lane (b - c/2) mod 4 at row c.
  always_ff @(posedge clk) begin
    if (in_valid) begin
      for (int b = 0; b < 4; b++) begin
        automatic logic [1:0] j = 2'(b) - wc[2:1];
        mem[b][{whalf, wc}] <= {in_re[j], in_im[j]};
      end
    end
  end

  // Read: bank b serves output lane l = (b - t) mod 4 at row t/4 + 2l.
  logic [2*W-1:0] rd_q [4];
  logic [1:0]     rc_q;
  logic           rvalid_q;

  always_ff @(posedge clk) begin
    for (int b = 0; b < 4; b++) begin
      automatic logic [1:0] l   = 2'(b) - rc[1:0];
      automatic logic [2:0] row = 3'(rc[2]) + 3'({l, 1'b0});
      rd_q[b] <= mem[b][{rhalf, row}];
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rc_q <= '0; rvalid_q <= 1'b0;
    end else begin
      rc_q <= rc[1:0]; rvalid_q <= ractive;
    end
  end

  always_comb begin
    for (int l = 0; l < 4; l++) begin
      automatic logic [1:0] b = 2'(l) + rc_q[1:0];
      out_re[l] = rd_q[b][2*W-1:W];
      out_im[l] = rd_q[b][W-1:0];
    end
  end
  assign out_valid = rvalid_q;
endmodule

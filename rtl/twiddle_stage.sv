// twiddle_stage: the four-lane twiddle multiplier bank between two butterfly
// stages (WB0 and WB1 of the pipeline). Lane q multiplies its sample by
// W32^e with exponent
//   e = STEP * q * (sel & KMASK)  (mod 32),
// where sel is the sample index within the frame supplied by the control
// unit. WB0 uses STEP = 1, KMASK = 7 (W32^(q*t)); WB1 uses STEP = 4,
// KMASK = 1 (W8^(q*t'), t' the index's lowest bit).
// Exponents that are multiples of 8 are the trivial factors 1, -j, -1, +j:
// they are applied by swapping and negating components, exactly and without
// a multiplier. The others go through a cmult that rounds back to W bits.
// A cmult is only built for lanes that can ever see a non-trivial factor
// (for WB0 lanes 1..3, for WB1 lanes 1 and 3), so lane 0 of both stages and
// lane 2 of WB1 have no multiplier. Negating the most negative code saturates.
// One register stage for every lane; sat flags a saturation on the output.
module twiddle_stage #(
  parameter int unsigned W     = 12,  // data wordlength
  parameter int unsigned TW    = 12,  // twiddle wordlength
  parameter int unsigned STEP  = 1,
  parameter int unsigned KMASK = 7
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic [2:0]          sel,
  input  logic signed [W-1:0] xr [4],
  input  logic signed [W-1:0] xi [4],
  output logic signed [W-1:0] zr [4],
  output logic signed [W-1:0] zi [4],
  output logic                sat
);
  localparam logic signed [W-1:0] MAXV = {1'b0, {(W-1){1'b1}}};
  localparam logic signed [W-1:0] MINV = {1'b1, {(W-1){1'b0}}};

  function automatic bit lane_needs_mult(int unsigned q);
    for (int unsigned k = 0; k <= KMASK; k++)
      if ((((STEP * q * (k & KMASK)) % 32) % 8) != 0) return 1'b1;
    return 1'b0;
  endfunction

  function automatic logic signed [W-1:0] neg_sat(logic signed [W-1:0] v);
    return (v == MINV) ? MAXV : -v;
  endfunction

  logic [3:0] lane_sat;

  for (genvar q = 0; q < 4; q++) begin : g_lane
    logic [4:0]          e;
    logic [1:0]          rot;
    logic                triv;
    logic signed [W-1:0] tr, ti;      // trivially rotated sample
    logic signed [W-1:0] tr_q, ti_q;

    assign e    = 5'((STEP * q * 32'(sel & 3'(KMASK))) % 32);
    assign triv = (e[2:0] == 3'd0);
    assign rot  = e[4:3];

    always_comb begin
      unique case (rot)
        2'd0: begin tr = xr[q];          ti = xi[q];          end  // * 1
        2'd1: begin tr = xi[q];          ti = neg_sat(xr[q]); end  // * -j
        2'd2: begin tr = neg_sat(xr[q]); ti = neg_sat(xi[q]); end  // * -1
        2'd3: begin tr = neg_sat(xi[q]); ti = xr[q];          end  // * +j
      endcase
    end

    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) begin
        tr_q <= '0; ti_q <= '0;
      end else begin
        tr_q <= tr; ti_q <= ti;
      end
    end

    if (lane_needs_mult(q)) begin : g_mult
      logic signed [TW-1:0] wr, wi;
      logic signed [W-1:0]  mr, mi;
      logic                 msat;
      logic                 triv_q;
      always_ff @(posedge clk or negedge rst_n) begin
        if (!rst_n) triv_q <= 1'b1;
        else        triv_q <= triv;
      end
      twiddle_rom #(.TW(TW)) u_rom (.e(e), .wr(wr), .wi(wi));
      cmult #(.BX(W), .BW(TW)) u_mult (
        .clk, .rst_n, .xr(xr[q]), .xi(xi[q]), .wr, .wi,
        .zr(mr), .zi(mi), .sat(msat)
      );
      assign zr[q]       = triv_q ? tr_q : mr;
      assign zi[q]       = triv_q ? ti_q : mi;
      assign lane_sat[q] = !triv_q && msat;
    end else begin : g_trivial
      assign zr[q]       = tr_q;
      assign zi[q]       = ti_q;
      assign lane_sat[q] = 1'b0;
    end
  end

  assign sat = |lane_sat;
endmodule

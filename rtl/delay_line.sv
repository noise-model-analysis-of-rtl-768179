// delay_line: fixed delay of D clock cycles for a W-bit word, built as a
// chain of registers (D = 0 is a plain wire and leaves clk and rst_n unused).
// The commutators use it for the D, D^2, D^4 and D^6 delay elements in front
// of and behind their switches. Registers
// clear on the active-low asynchronous reset so that idle lanes carry zeros.
module delay_line #(
  parameter int unsigned W = 24,
  parameter int unsigned D = 2
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic [W-1:0] d,
  output logic [W-1:0] q
);
  if (D == 0) begin : g_wire
    assign q = d;
  end else begin : g_regs
    logic [W-1:0] sr [D];
    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) begin
        for (int i = 0; i < int'(D); i++) sr[i] <= '0;
      end else begin
        sr[0] <= d;
        for (int i = 1; i < int'(D); i++) sr[i] <= sr[i-1];
      end
    end
    assign q = sr[D-1];
  end
endmodule

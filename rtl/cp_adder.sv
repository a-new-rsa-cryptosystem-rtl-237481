// cp_adder: bit-serial carry-propagation adder.
//
// Converts the carry-save result of the Montgomery module into binary, one
// bit per clock, least significant first.  load captures the two vectors and
// clears the carry; in every other clock with shift high both vectors move
// right by one and the carry is updated.  r = x[0] ^ y[0] ^ carry is the
// current result bit, a combinational output of registers, so the bit is
// available in the clock after load and feeds the multiplier of the next
// multiplication directly.  Two vector registers and one full adder, as the
// design budgets for this unit.
module cp_adder #(
  parameter int unsigned N_BITS = 512
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              load,
  input  logic              shift,
  input  logic [N_BITS+1:0] x_in,
  input  logic [N_BITS+1:0] y_in,
  output logic              r
);
  logic [N_BITS+1:0] x_q, y_q;
  logic              cy_q, cy_n, sum;

  assign {cy_n, sum} = 2'(x_q[0]) + 2'(y_q[0]) + 2'(cy_q);
  assign r = sum;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      x_q  <= '0;
      y_q  <= '0;
      cy_q <= 1'b0;
    end else if (load) begin
      x_q  <= x_in;
      y_q  <= y_in;
      cy_q <= 1'b0;
    end else if (shift) begin
      x_q  <= x_q >> 1;
      y_q  <= y_q >> 1;
      cy_q <= cy_n;
    end
  end

endmodule

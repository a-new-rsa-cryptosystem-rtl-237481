// operand_reg: linear shift register for one operand of the RSA processor.
//
// Used for the modulus register (N), the constant register (2^(2n+4) mod N)
// and the text register (M, then M', finally the result).  Operands are
// loaded and read serially, least significant bit first: each shift moves the
// register right by one, the new bit entering at the top.  With rot high the
// bit leaving at the bottom re-enters at the top, so a serial read of all W
// bits leaves the contents unchanged.  q is the parallel view used by the
// multiplier and the Montgomery module, sout the bit at the bottom.
// Reset clears the register.  One shift per clock when shift is high.
module operand_reg #(
  parameter int unsigned W = 512
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         shift,
  input  logic         rot,
  input  logic         sin,
  output logic [W-1:0] q,
  output logic         sout
);
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)     q <= '0;
    else if (shift) q <= {rot ? q[0] : sin, q[W-1:1]};
  end

  assign sout = q[0];

endmodule

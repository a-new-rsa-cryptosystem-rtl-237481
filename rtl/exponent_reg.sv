// exponent_reg: exponent shift register with normalisation and bit count.
//
// The exponent is loaded serially, least significant bit first (load_shift).
// While norm is high the register shifts left once per clock until its most
// significant bit is one, decrementing bits_left from N_BITS-1 on every shift;
// when that stops, bits_left = k-1 for a k-bit exponent and norm_done is
// high.  During exponentiation e_bit is the exponent bit under consideration
// (the MSB) and next shifts in the following bit and decrements bits_left.
// An all-zero exponent stops after N_BITS-1 shifts with bits_left = 0 and is
// thus treated like E = 1.  Normalising by shifting and counting follows the
// design; the count direction and the zero-exponent rule are this design's.
module exponent_reg #(
  parameter int unsigned N_BITS = 512,
  localparam int unsigned CW = $clog2(N_BITS)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          load_shift,
  input  logic          sin,
  input  logic          norm,
  input  logic          next,
  output logic          e_bit,
  output logic [CW-1:0] bits_left,
  output logic          norm_done
);
  logic [N_BITS-1:0] e_q;
  logic [CW-1:0]     cnt_q;

  assign e_bit     = e_q[N_BITS-1];
  assign bits_left = cnt_q;
  assign norm_done = e_q[N_BITS-1] || (cnt_q == '0);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      e_q   <= '0;
      cnt_q <= '0;
    end else if (load_shift) begin
      e_q   <= {sin, e_q[N_BITS-1:1]};
      cnt_q <= CW'(N_BITS - 1);
    end else if ((norm && !norm_done) || (next && cnt_q != '0)) begin
      e_q   <= e_q << 1;
      cnt_q <= cnt_q - 1'b1;
    end
  end

endmodule

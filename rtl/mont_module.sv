// mont_module: bit-serial Montgomery reduction in carry-save form.
//
// Implements the reduction loop of the modified Montgomery multiplication
//     q_i = (P + c_i) mod 2,   P = (P + q_i*N + c_i) / 2,   i = 0..n+1
// on the low n+2 product bits c_i arriving one per clock from the multiplier,
// then adds the multiplier's high part C1 so that R = P[n+2] + C1.
//
// State: sum vector S (positions 0..n+1), carry vector K (K[j] has weight
// 2^(j+1)) and one serial carry h of weight 2, so that P = S + 2K + 2h.
// Bit 0 of P is S[0] alone, so the quotient bit is a single XOR, q = S[0]^c.
// Because N is odd, bit 0 of P+q*N+c is always even and its carry into
// position 1 is co = S[0] | c.  One row of full adders forms S[j]+K[j-1]+q*N[j]
// for j >= 1; a separate full adder combines the row's position-1 sum with co
// and h, giving the new S[0] and the new h.  The result is shifted right by one
// position as it is stored.  In the add clocks the same adder row takes the
// vector to add in place of q*N and the outputs are stored unshifted.  A
// two-way selector in front of each adder chooses between the two uses.
//
// Operations (op):  MO_RED_FIRST/MO_RED one reduction step (FIRST starts from
// P = 0); MO_ADD_SUM / MO_ADD_CARRY add the multiplier's held sum / carry
// vector; MO_ADD_H folds h into the carry-save pair; MO_HOLD keeps the state.
// After the three add clocks res_s + res_k is the result R (< 2^(n+1)).
//
// The XOR quotient, the OR carry, the extra LSB full adder, the d/a selector
// and the carry-save output pair follow the design; splitting the final
// addition into three clocks is this implementation's choice.  N must be odd.
module mont_module
  import rsa_pkg::*;
#(
  parameter int unsigned N_BITS = 512
) (
  input  logic              clk,
  input  logic              rst_n,
  input  mont_op_t          op,
  input  logic              c_bit,     // product bit c_i
  input  logic [N_BITS-1:0] n_mod,     // modulus N (odd)
  input  logic [N_BITS-1:0] m_sum,     // multiplier high part, sum vector
  input  logic [N_BITS-1:0] m_carry,   // multiplier high part, carry vector
  output logic [N_BITS+1:0] res_s,     // result, sum vector
  output logic [N_BITS+1:0] res_k,     // result, carry vector (already at its weight)
  output logic              q_bit      // quotient bit of the current step
);
  localparam int unsigned W = N_BITS + 2;

  logic [W-1:0] s_q, s_p, s_n, u, v, third, nn;
  logic [W-2:0] k_q, k_p, k_n;
  logic         h_q, h_p, h_n;
  logic         red, q, co, s0_new, h_new;

  assign red = (op == MO_RED_FIRST) || (op == MO_RED);
  assign nn  = W'(n_mod);

  always_comb begin
    s_p = (op == MO_RED_FIRST) ? '0 : s_q;
    k_p = (op == MO_RED_FIRST) ? '0 : k_q;
    h_p = (op == MO_RED_FIRST) ? 1'b0 : h_q;
  end

  assign q  = s_p[0] ^ c_bit;
  assign co = s_p[0] | c_bit;

  // third adder input: q*N in reduction, the vector to add otherwise
  always_comb begin
    unique case (op)
      MO_RED_FIRST, MO_RED: third = nn & {W{q}};
      MO_ADD_SUM:           third = W'(m_sum);
      MO_ADD_CARRY:         third = W'(m_carry);
      MO_ADD_H:             third = W'({h_q, 1'b0});
      default:              third = '0;
    endcase
  end

  for (genvar j = 0; j < W; j++) begin : g_fa
    logic kin;
    assign kin = (j == 0) ? 1'b0 : k_p[(j == 0) ? 0 : j-1];
    assign {v[j], u[j]} = 2'(s_p[j]) + 2'(kin) + 2'(third[j]);
  end

  // LSB full adder of the reduction path
  assign {h_new, s0_new} = 2'(u[1]) + 2'(co) + 2'(h_p);

  always_comb begin
    s_n = s_q;
    k_n = k_q;
    h_n = h_q;
    if (red) begin
      s_n = {1'b0, u[W-1:2], s0_new};
      k_n = v[W-1:1];
      h_n = h_new;
    end else if (op != MO_HOLD) begin
      s_n = u;
      k_n = v[W-2:0];
      h_n = (op == MO_ADD_H) ? 1'b0 : h_q;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      s_q <= '0;
      k_q <= '0;
      h_q <= 1'b0;
    end else begin
      s_q <= s_n;
      k_q <= k_n;
      h_q <= h_n;
    end
  end

  assign res_s = s_q;
  assign res_k = {k_q, 1'b0};
  assign q_bit = q;

endmodule

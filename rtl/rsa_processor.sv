// rsa_processor: bit-serial RSA processor computing M^E mod N for n-bit
// operands (n = N_BITS, 512 by default) with a modified Montgomery algorithm.
//
// Idea: a Montgomery multiplication MM(A,B) = A*B*2^-(n+2) mod N is split into
// a plain product C = A*B and a Montgomery reduction of only its low n+2 bits;
// the high part is added at the end, R = P[n+2] + C1.  With (n+1)-bit operands
// every result stays below 2^(n+1), so results feed the next multiplication
// without a final subtraction, and the post-processing MM(R,1) lands in
// [0, N).  Three units work on the same bit stream at once: the
// carry-propagation adder emits the previous result one bit per clock, the
// serial-parallel multiplier consumes it and emits product bits, and the
// Montgomery module reduces each product bit the clock after it appears.  One
// multiplication takes n+7 clocks; an exponent with k bits of which v are one
// needs k+v multiplications including pre- and post-processing.
//
// Datapath: modulus register N (parallel to the Montgomery module), constant
// register 2^(2(n+2)) mod N (serial, pre-processing only), text register
// (M, then M' = M*2^(n+2) mod N, parallel to the multiplier, finally the
// result), exponent register, a selector in front of the multiplier's serial
// input, and the 8-bit I/O buffer.  All of this follows the design's block
// diagram; the port protocol below is this implementation's.
//
// Interface: pulse start, then send 4*n/8 bytes on in_data with in_valid /
// in_ready, least significant byte and bit first: N (odd, N < 2^n), the
// constant 2^(2(n+2)) mod N, E (non-zero) and M (< N).  The n/8 result bytes
// of M^E mod N then appear, least significant first, on out_data with
// out_valid / out_ready; done pulses after the last one.  busy is high from
// start to done.  Asynchronous active-low reset.
module rsa_processor
  import rsa_pkg::*;
#(
  parameter int unsigned N_BITS = 512
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       start,
  input  logic [7:0] in_data,
  input  logic       in_valid,
  output logic       in_ready,
  output logic [7:0] out_data,
  output logic       out_valid,
  input  logic       out_ready,
  output logic       busy,
  output logic       done
);
  localparam int unsigned CW = $clog2(N_BITS);

  // control
  logic      io_dir_out, io_bit_take, io_obit_push;
  logic      io_bit_avail, io_bit, io_obit_ready, io_empty;
  logic      mod_shift, const_shift, const_rot, text_shift;
  text_src_t text_src;
  logic      exp_load, exp_norm, exp_next, exp_bit, exp_norm_done;
  logic [CW-1:0] exp_bits_left;
  logic      mul_en, mul_start, ser_zero, cpa_load;
  pp_sel_t   pp_sel;
  ser_sel_t  ser_sel;
  mont_op_t  mont_op;
  state_t    state;

  // datapath
  logic [N_BITS-1:0] mod_q, const_q, hi_sum, hi_carry;
  logic [N_BITS:0]   text_q;
  logic [N_BITS+1:0] res_s, res_k;
  logic const_bit, text_bit, text_sin, ser_x, p_bit, cpa_r, q_bit;

  rsa_controller #(.N_BITS(N_BITS)) u_ctrl (
    .clk, .rst_n, .start,
    .io_bit_avail, .io_obit_ready, .io_empty,
    .io_dir_out, .io_bit_take, .io_obit_push,
    .mod_shift, .const_shift, .const_rot, .text_shift, .text_src,
    .exp_bit, .exp_norm_done, .exp_bits_left, .exp_load, .exp_norm, .exp_next,
    .mul_en, .mul_start, .pp_sel, .ser_sel, .ser_zero, .mont_op, .cpa_load,
    .state, .busy, .done
  );

  io_buffer u_io (
    .clk, .rst_n, .dir_out(io_dir_out),
    .in_data, .in_valid, .in_ready,
    .bit_take(io_bit_take), .bit_out(io_bit), .bit_avail(io_bit_avail),
    .obit_push(io_obit_push), .obit_in(text_bit), .obit_ready(io_obit_ready),
    .empty(io_empty),
    .out_data, .out_valid, .out_ready
  );

  operand_reg #(.W(N_BITS)) u_mod_reg (
    .clk, .rst_n, .shift(mod_shift), .rot(1'b0), .sin(io_bit),
    .q(mod_q), .sout()
  );

  operand_reg #(.W(N_BITS)) u_const_reg (
    .clk, .rst_n, .shift(const_shift), .rot(const_rot), .sin(io_bit),
    .q(const_q), .sout(const_bit)
  );

  always_comb begin
    unique case (text_src)
      TS_IO:   text_sin = io_bit;
      TS_CPA:  text_sin = cpa_r;
      default: text_sin = 1'b0;
    endcase
  end

  operand_reg #(.W(N_BITS + 1)) u_text_reg (
    .clk, .rst_n, .shift(text_shift), .rot(1'b0), .sin(text_sin),
    .q(text_q), .sout(text_bit)
  );

  exponent_reg #(.N_BITS(N_BITS)) u_exp_reg (
    .clk, .rst_n, .load_shift(exp_load), .sin(io_bit), .norm(exp_norm),
    .next(exp_next), .e_bit(exp_bit), .bits_left(exp_bits_left),
    .norm_done(exp_norm_done)
  );

  // selector in front of the multiplier's serial input
  assign ser_x = ser_zero ? 1'b0 : ((ser_sel == SER_CONST) ? const_bit : cpa_r);

  sp_multiplier #(.N_BITS(N_BITS)) u_mult (
    .clk, .rst_n, .en(mul_en), .start(mul_start), .sel(pp_sel),
    .a_par(text_q), .x(ser_x), .p_bit, .hi_sum, .hi_carry
  );

  mont_module #(.N_BITS(N_BITS)) u_mont (
    .clk, .rst_n, .op(mont_op), .c_bit(p_bit), .n_mod(mod_q),
    .m_sum(hi_sum), .m_carry(hi_carry), .res_s, .res_k, .q_bit
  );

  cp_adder #(.N_BITS(N_BITS)) u_cpa (
    .clk, .rst_n, .load(cpa_load), .shift(!cpa_load), .x_in(res_s), .y_in(res_k),
    .r(cpa_r)
  );

endmodule

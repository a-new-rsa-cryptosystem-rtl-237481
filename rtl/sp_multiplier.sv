// sp_multiplier: linear-array serial-parallel multiplier for (n+1)-bit operands.
//
// Cell j (j = 0..n) holds a sum bit and, except for the top cell, a carry bit.
// Every clock each cell adds its partial product pp_j, the sum bit of the cell
// above (the running product shifted right by one) and its own carry.  Cell 0's
// sum bit is the next product bit, least significant first.  After L = n+2
// clocks the low L product bits have left through p_bit and the array holds
// floor(A*B / 2^L) in carry-save form:
//     C1 = hi_sum + hi_carry,  hi_sum[j] = sum bit of cell j+1, hi_carry[j] = carry of cell j.
// The array then stops (en low) and keeps C1 for the Montgomery module.
//
// Partial products (sel):
//   PP_TEXT  pp_j = a_par[j] & x            (x is the serial operand bit)
//   PP_ONE   pp_j = (j == 0) & x            (multiplication by one)
//   PP_SELF  squaring of the serial stream: cell j latches x when it arrives
//            at clock j; at clock j it adds that bit alone (m_j*m_j = m_j), at
//            clock j+1 nothing, and from clock j+2 on a_j & x(t-1).  Each cross
//            term m_j*m_k then enters once, at weight j+k+1, i.e. doubled, which
//            is the input schedule of the squaring operation.  A thermometer
//            register (th[j] = clock > j) times the cells.
// The cell structure, the stop-and-hold of the high half and the squaring
// schedule follow the design; the thermometer timing and the PP_ONE selection
// are this implementation's choices.
//
// Timing: start marks clock 0 of a product (the stored state is taken as zero
// in that clock).  x is sampled in clocks 0..n+1; product bit t is on p_bit in
// the clock after clock t.  The four per-cell registers match the design's
// count of 4n multiplier registers.
module sp_multiplier
  import rsa_pkg::*;
#(
  parameter int unsigned N_BITS = 512
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              en,       // advance one clock of the product
  input  logic              start,    // first clock of a new product
  input  pp_sel_t           sel,
  input  logic [N_BITS:0]   a_par,    // parallel operand
  input  logic              x,        // serial operand bit
  output logic              p_bit,    // registered product bit
  output logic [N_BITS-1:0] hi_sum,   // held high part, sum vector
  output logic [N_BITS-1:0] hi_carry  // held high part, carry vector
);
  localparam int unsigned W = N_BITS + 1;  // number of cells

  logic [W-1:0] s_q, c_q, a_q, th_q;
  logic         xd_q;
  logic [W-1:0] s_p, c_p, a_p, th_p;
  logic         xd_p;
  logic [W-1:0] s_n, c_n, a_n, pp;

  always_comb begin
    s_p  = start ? '0 : s_q;
    c_p  = start ? '0 : c_q;
    a_p  = start ? '0 : a_q;
    th_p = start ? '0 : th_q;
    xd_p = start ? 1'b0 : xd_q;
  end

  for (genvar j = 0; j < W; j++) begin : g_cell
    logic tok, late, sum_in, car_in;
    assign tok    = ((j == 0) ? 1'b1 : th_p[(j == 0) ? 0 : j-1]) & ~th_p[j];
    assign late   = (j + 1 < W) ? th_p[(j + 1 < W) ? j+1 : j] : 1'b0;
    assign sum_in = (j + 1 < W) ? s_p[(j + 1 < W) ? j+1 : j] : 1'b0;
    assign car_in = (j + 1 < W) ? c_p[j] : 1'b0;   // top cell has no carry

    always_comb begin
      unique case (sel)
        PP_TEXT: pp[j] = a_par[j] & x;
        PP_ONE:  pp[j] = (j == 0) ? x : 1'b0;
        PP_SELF: pp[j] = tok ? x : (late & a_p[j] & xd_p);
        default: pp[j] = 1'b0;
      endcase
      a_n[j] = (sel == PP_SELF && tok) ? x : a_p[j];
    end

    assign {c_n[j], s_n[j]} = 2'(pp[j]) + 2'(sum_in) + 2'(car_in);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      s_q  <= '0;
      c_q  <= '0;
      a_q  <= '0;
      th_q <= '0;
      xd_q <= 1'b0;
    end else if (en) begin
      s_q  <= s_n;
      c_q  <= c_n;
      a_q  <= a_n;
      th_q <= {th_p[W-2:0], 1'b1};
      xd_q <= x;
    end
  end

  assign p_bit    = s_q[0];
  assign hi_sum   = s_q[W-1:1];
  assign hi_carry = c_q[W-2:0];

endmodule

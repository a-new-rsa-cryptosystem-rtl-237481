// rsa_controller: counter-based finite state machine of the RSA processor.
//
// Eleven states (rsa_pkg::state_t).  After start the four operands are loaded
// one bit per clock from the I/O buffer: modulus N, constant 2^(2(n+2)) mod N,
// exponent E and message M, each n bits, least significant first.  The text
// register is n+1 bits wide, so the message is followed by one zero bit.
// While M is loaded the exponent register normalises itself.
//
// Every modular multiplication (states PRE, SQR, MUL, POST) lasts exactly
// L+5 = n+7 clocks, counted by cyc:
//   cyc 0..L-1   multiplier runs; its serial input is the constant register
//                (PRE, bits 0..n-1 then zeros) or the carry-propagation adder,
//                which is streaming the previous result in these clocks
//   cyc 1..L     Montgomery module reduces product bit cyc-1
//   cyc L+1..L+3 Montgomery module adds the multiplier's high part and h
//   cyc L+4      carry-propagation adder loads the result
// so bit 0 of the result is on the adder output in cyc 0 of the next
// multiplication.  The sequence is Algorithm 2 of the modified Montgomery
// exponentiation: PRE (M' = MM(M,C)), then for each exponent bit below the
// leading one SQR and, if the bit is one, MUL (by M'), then POST (MM(R,1)).
// During the multiplication after PRE the text register captures M' from the
// adder stream; after POST, state CAPT captures the result in n+1 clocks and
// UNLOAD sends its n bits out through the I/O buffer.  done pulses for one
// clock when the last byte has been taken.  The state list and the sequence
// follow the design; the cycle-level schedule is this implementation's.
module rsa_controller
  import rsa_pkg::*;
#(
  parameter int unsigned N_BITS = 512,
  localparam int unsigned CW = $clog2(N_BITS),
  localparam int unsigned BCW = $clog2(N_BITS + 8)
) (
  input  logic      clk,
  input  logic      rst_n,
  input  logic      start,
  // I/O buffer
  input  logic      io_bit_avail,
  input  logic      io_obit_ready,
  input  logic      io_empty,
  output logic      io_dir_out,
  output logic      io_bit_take,
  output logic      io_obit_push,
  // operand registers
  output logic      mod_shift,
  output logic      const_shift,
  output logic      const_rot,
  output logic      text_shift,
  output text_src_t text_src,
  // exponent register
  input  logic      exp_bit,
  input  logic      exp_norm_done,
  input  logic [CW-1:0] exp_bits_left,
  output logic      exp_load,
  output logic      exp_norm,
  output logic      exp_next,
  // datapath
  output logic      mul_en,
  output logic      mul_start,
  output pp_sel_t   pp_sel,
  output ser_sel_t  ser_sel,
  output logic      ser_zero,
  output mont_op_t  mont_op,
  output logic      cpa_load,
  // status
  output state_t    state,
  output logic      busy,
  output logic      done
);
  localparam int unsigned L = N_BITS + 2;       // reduction steps per MM
  localparam int unsigned MM_CYC = L + 5;       // clocks per MM

  state_t         st_q, st_n;
  logic [BCW-1:0] cnt_q, cnt_n;                 // bit / cycle counter
  logic           capm_q, capm_n;               // capture M' during this MM
  logic           mm, mm_end, exp_last;

  assign state    = st_q;
  assign busy     = (st_q != ST_IDLE);
  assign mm       = (st_q == ST_PRE) || (st_q == ST_SQR) || (st_q == ST_MUL) || (st_q == ST_POST);
  assign mm_end   = mm && (cnt_q == BCW'(MM_CYC - 1));
  assign exp_last = (exp_bits_left == '0);

  always_comb begin
    st_n         = st_q;
    cnt_n        = cnt_q;
    capm_n       = capm_q;
    io_dir_out   = 1'b0;
    io_bit_take  = 1'b0;
    io_obit_push = 1'b0;
    mod_shift    = 1'b0;
    const_shift  = 1'b0;
    const_rot    = 1'b0;
    text_shift   = 1'b0;
    text_src     = TS_IO;
    exp_load     = 1'b0;
    exp_norm     = 1'b0;
    exp_next     = 1'b0;
    mul_en       = 1'b0;
    mul_start    = 1'b0;
    pp_sel       = PP_TEXT;
    ser_sel      = SER_CPA;
    ser_zero     = 1'b0;
    mont_op      = MO_HOLD;
    cpa_load     = 1'b0;
    done         = 1'b0;

    unique case (st_q)
      ST_IDLE: begin
        if (start) begin
          st_n  = ST_LOAD_N;
          cnt_n = '0;
        end
      end

      ST_LOAD_N, ST_LOAD_C, ST_LOAD_E: begin
        if (io_bit_avail) begin
          io_bit_take = 1'b1;
          mod_shift   = (st_q == ST_LOAD_N);
          const_shift = (st_q == ST_LOAD_C);
          exp_load    = (st_q == ST_LOAD_E);
          cnt_n       = cnt_q + 1'b1;
          if (cnt_q == BCW'(N_BITS - 1)) begin
            cnt_n = '0;
            st_n  = (st_q == ST_LOAD_N) ? ST_LOAD_C :
                    (st_q == ST_LOAD_C) ? ST_LOAD_E : ST_LOAD_M;
          end
        end
      end

      ST_LOAD_M: begin
        exp_norm = 1'b1;
        if (cnt_q < BCW'(N_BITS)) begin
          if (io_bit_avail) begin
            io_bit_take = 1'b1;
            text_shift  = 1'b1;
            text_src    = TS_IO;
            cnt_n       = cnt_q + 1'b1;
          end
        end else if (exp_norm_done) begin
          text_shift = 1'b1;              // zero pad: bit n of the text register
          text_src   = TS_ZERO;
          cnt_n      = '0;
          capm_n     = 1'b0;
          st_n       = ST_PRE;
        end
      end

      ST_PRE, ST_SQR, ST_MUL, ST_POST: begin
        cnt_n     = cnt_q + 1'b1;
        mul_en    = (cnt_q < BCW'(L));
        mul_start = (cnt_q == '0);
        unique case (st_q)
          ST_SQR:  pp_sel = PP_SELF;
          ST_POST: pp_sel = PP_ONE;
          default: pp_sel = PP_TEXT;
        endcase
        if (st_q == ST_PRE) begin
          ser_sel     = SER_CONST;
          ser_zero    = (cnt_q >= BCW'(N_BITS));
          const_shift = (cnt_q < BCW'(N_BITS));
          const_rot   = 1'b1;
        end
        if (capm_q && cnt_q <= BCW'(N_BITS)) begin
          text_shift = 1'b1;
          text_src   = TS_CPA;
        end
        if (cnt_q == BCW'(1))                          mont_op = MO_RED_FIRST;
        else if (cnt_q >= BCW'(2) && cnt_q <= BCW'(L)) mont_op = MO_RED;
        else if (cnt_q == BCW'(L + 1))                 mont_op = MO_ADD_SUM;
        else if (cnt_q == BCW'(L + 2))                 mont_op = MO_ADD_CARRY;
        else if (cnt_q == BCW'(L + 3))                 mont_op = MO_ADD_H;
        cpa_load = (cnt_q == BCW'(L + 4));

        if (mm_end) begin
          cnt_n  = '0;
          capm_n = (st_q == ST_PRE);
          unique case (st_q)
            ST_PRE, ST_MUL: begin
              if (exp_last) st_n = ST_POST;
              else begin
                st_n     = ST_SQR;
                exp_next = 1'b1;
              end
            end
            ST_SQR: begin
              if (exp_bit)       st_n = ST_MUL;
              else if (exp_last) st_n = ST_POST;
              else begin
                st_n     = ST_SQR;
                exp_next = 1'b1;
              end
            end
            default: st_n = ST_CAPT;   // ST_POST
          endcase
        end
      end

      ST_CAPT: begin
        text_shift = 1'b1;
        text_src   = TS_CPA;
        cnt_n      = cnt_q + 1'b1;
        if (cnt_q == BCW'(N_BITS)) begin
          cnt_n = '0;
          st_n  = ST_UNLOAD;
        end
      end

      ST_UNLOAD: begin
        io_dir_out = 1'b1;
        text_src   = TS_ZERO;
        if (cnt_q < BCW'(N_BITS)) begin
          if (io_obit_ready) begin
            io_obit_push = 1'b1;
            text_shift   = 1'b1;
            cnt_n        = cnt_q + 1'b1;
          end
        end else if (io_empty) begin
          done  = 1'b1;
          cnt_n = '0;
          st_n  = ST_IDLE;
        end
      end

      default: st_n = ST_IDLE;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st_q   <= ST_IDLE;
      cnt_q  <= '0;
      capm_q <= 1'b0;
    end else begin
      st_q   <= st_n;
      cnt_q  <= cnt_n;
      capm_q <= capm_n;
    end
  end

endmodule

// tb_sp_multiplier: self-checking test of the serial-parallel multiplier at
// 16-bit operand size (17-bit operands, 18 product bits streamed).
//
// For random operands in each of the three partial-product modes (parallel
// operand from the text register, squaring of the serial stream, and
// multiplication by one) the testbench streams the serial operand, collects
// the product bits one clock after each input clock, and checks the low n+2
// bits and the held high part hi_sum + hi_carry against A*B computed with
// ordinary arithmetic.  It also checks that the high part is held while en is
// low.
module tb_sp_multiplier;
  import rsa_pkg::*;

  localparam int unsigned NB = 16;
  localparam int unsigned L  = NB + 2;

  logic clk = 1'b0, rst_n = 1'b0, en = 1'b0, start = 1'b0, x = 1'b0;
  pp_sel_t sel = PP_TEXT;
  logic [NB:0] a_par = '0;
  logic p_bit;
  logic [NB-1:0] hi_sum, hi_carry;
  int checks = 0, failures = 0;

  sp_multiplier #(.N_BITS(NB)) dut (.*);

  always #5 clk = ~clk;

  task automatic run(input pp_sel_t s, input logic [NB:0] a, input logic [NB:0] b);
    logic [2*NB+1:0] prod, hi;
    logic [L-1:0] lo;
    logic [NB:0] par;
    par  = (s == PP_ONE) ? (NB+1)'(1) : (s == PP_SELF) ? b : a;
    prod = (2*NB+2)'(par) * (2*NB+2)'(b);
    @(negedge clk);
    sel   = s;
    a_par = a;
    for (int t = 0; t < L; t++) begin
      en    = 1'b1;
      start = (t == 0);
      x     = (t <= NB) ? b[t] : 1'b0;
      @(negedge clk);
      lo[t] = p_bit;
    end
    en = 1'b0;
    x  = 1'b1;
    repeat (3) @(negedge clk);
    hi = (2*NB+2)'(hi_sum) + (2*NB+2)'(hi_carry);
    checks++;
    if (lo !== prod[L-1:0]) begin
      failures++;
      $display("FAIL low bits mode %s a=%h b=%h got %h exp %h", s.name(), a, b, lo, prod[L-1:0]);
    end
    checks++;
    if (hi !== (prod >> L)) begin
      failures++;
      $display("FAIL high part mode %s a=%h b=%h got %h exp %h", s.name(), a, b, hi, prod >> L);
    end
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    run(PP_SELF, '1, '1);
    run(PP_TEXT, '1, '1);
    run(PP_ONE, '0, '1);
    for (int i = 0; i < 200; i++) begin
      logic [NB:0] a, b;
      a = (NB+1)'({$urandom, $urandom});
      b = (NB+1)'({$urandom, $urandom});
      run(pp_sel_t'(i % 3), a, b);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

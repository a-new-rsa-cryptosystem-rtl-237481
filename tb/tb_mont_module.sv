// tb_mont_module: self-checking test of the Montgomery module at 16 bits.
//
// A random odd modulus N and random low product bits C0 (n+2 bits) are fed
// one bit per clock; the testbench runs the reduction loop
//     q = (P + c) mod 2,  P = (P + q*N + c) / 2
// in plain arithmetic, compares each quotient bit, and after the three add
// clocks checks res_s + res_k = P[n+2] + m_sum + m_carry.  It also checks
// the Montgomery property P[n+2]*2^(n+2) = C0 + N*Q and that the state holds
// in MO_HOLD.
module tb_mont_module;
  import rsa_pkg::*;

  localparam int unsigned NB = 16;
  localparam int unsigned L  = NB + 2;

  logic clk = 1'b0, rst_n = 1'b0, c_bit = 1'b0;
  mont_op_t op = MO_HOLD;
  logic [NB-1:0] n_mod = '0, m_sum = '0, m_carry = '0;
  logic [NB+1:0] res_s, res_k;
  logic q_bit;
  int checks = 0, failures = 0;

  mont_module #(.N_BITS(NB)) dut (.*);

  always #5 clk = ~clk;

  task automatic run(input logic [NB-1:0] n, input logic [L-1:0] c0,
                     input logic [NB-1:0] ms, input logic [NB-1:0] mc);
    logic [NB+3:0] p, expect_r, got;
    logic [L-1:0] qv;
    logic [2*NB+4:0] lhs, rhs;
    p = '0;
    @(negedge clk);
    n_mod = n;
    m_sum = ms;
    m_carry = mc;
    for (int i = 0; i < L; i++) begin
      logic qe;
      qe = p[0] ^ c0[i];
      qv[i] = qe;
      op = (i == 0) ? MO_RED_FIRST : MO_RED;
      c_bit = c0[i];
      #1;
      checks++;
      if (q_bit !== qe) begin
        failures++;
        $display("FAIL quotient bit %0d", i);
      end
      p = (p + (qe ? (NB+4)'(n) : '0) + (NB+4)'(c0[i])) >> 1;
      @(negedge clk);
    end
    lhs = (2*NB+5)'(p) << L;
    rhs = (2*NB+5)'(c0) + (2*NB+5)'(n) * (2*NB+5)'(qv);
    checks++;
    if (lhs !== rhs || p > (NB+4)'(n)) begin
      failures++;
      $display("FAIL Montgomery identity");
    end
    op = MO_ADD_SUM;   @(negedge clk);
    op = MO_ADD_CARRY; @(negedge clk);
    op = MO_ADD_H;     @(negedge clk);
    op = MO_HOLD;      c_bit = 1'b1;
    repeat (2) @(negedge clk);
    expect_r = p + (NB+4)'(ms) + (NB+4)'(mc);
    got = (NB+4)'(res_s) + (NB+4)'(res_k);
    checks++;
    if (got !== expect_r) begin
      failures++;
      $display("FAIL result N=%h C0=%h got %h exp %h", n, c0, got, expect_r);
    end
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    run('1, '1, '1, '1);
    run(NB'(1), '1, '0, '0);
    for (int i = 0; i < 300; i++) begin
      logic [NB-1:0] n;
      n = NB'($urandom);
      n[0] = 1'b1;
      run(n, L'({$urandom, $urandom}), NB'($urandom), NB'($urandom));
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

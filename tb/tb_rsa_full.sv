// tb_rsa_full: the RSA processor at its default size (512-bit operands), run
// through complete exponentiations: a random 512-bit exponent (the average
// case of about half ones), the public exponent 65537 and the all-ones
// exponent (the worst case).  It prints the clocks from start to done.
//
// Each test draws an odd modulus N with its top bit set, a message M < N and
// an exponent E, computes the constant 2^(2(n+2)) mod N and the expected
// M^E mod N with plain wide arithmetic, sends N, C, E, M through the byte
// port and compares the returned bytes.  The input side inserts random gaps
// in in_valid and the output side random back-pressure on out_ready.  It also
// checks the clock count of the arithmetic phase, (k+v)*(n+7) clocks for a
// k-bit exponent with v ones, and counts how often each mechanism occurred:
// pre-processing, squaring, multiplication by M', skipped multiplication
// (zero exponent bit), post-processing, input stalls and output back-pressure.
module tb_rsa_full;
  import rsa_pkg::*;

  localparam int unsigned NB     = 512;
  localparam int unsigned NBYTES = NB / 8;
  localparam int unsigned NTESTS = 3;

  logic       clk = 1'b0;
  logic       rst_n = 1'b0;
  logic       start = 1'b0;
  logic [7:0] in_data = '0;
  logic       in_valid = 1'b0;
  logic       in_ready;
  logic [7:0] out_data;
  logic       out_valid;
  logic       out_ready = 1'b0;
  logic       busy, done;

  int checks = 0, failures = 0;
  longint unsigned cycle = 0;

  rsa_processor dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cycle <= cycle + 1;

  // mechanism counters, observed on the controller state
  int n_pre = 0, n_sqr = 0, n_mul = 0, n_skip = 0, n_post = 0, n_in_stall = 0, n_out_bp = 0;
  int mm_cycles = 0;
  state_t st_prev = ST_IDLE;
  always @(posedge clk) begin
    state_t st;
    st = dut.state;
    if (st inside {ST_PRE, ST_SQR, ST_MUL, ST_POST}) mm_cycles++;
    if (st != st_prev || (st inside {ST_SQR} && dut.u_ctrl.cnt_q == 0 && st_prev == ST_SQR)) begin
      case (st)
        ST_PRE:  n_pre++;
        ST_SQR:  n_sqr++;
        ST_MUL:  n_mul++;
        ST_POST: n_post++;
        default: ;
      endcase
    end
    if (st_prev == ST_SQR && dut.u_ctrl.cnt_q == 0 && st != ST_MUL && st inside {ST_SQR, ST_POST})
      n_skip++;
    if (in_valid && !in_ready && busy && st inside {ST_LOAD_N, ST_LOAD_C, ST_LOAD_E, ST_LOAD_M}) n_in_stall++;
    if (out_valid && !out_ready) n_out_bp++;
    st_prev <= st;
  end

  function automatic logic [NB-1:0] modexp(logic [NB-1:0] m, logic [NB-1:0] e, logic [NB-1:0] n);
    logic [2*NB-1:0] r, b;
    r = 1;
    b = {{NB{1'b0}}, m} % {{NB{1'b0}}, n};
    for (int i = 0; i < NB; i++) begin
      if (e[i]) r = (r * b) % {{NB{1'b0}}, n};
      b = (b * b) % {{NB{1'b0}}, n};
    end
    return r[NB-1:0];
  endfunction

  function automatic logic [NB-1:0] rand_word();
    logic [NB-1:0] w;
    for (int i = 0; i < NB; i += 32) w[i +: 32] = $urandom;
    return w;
  endfunction

  // The testbench drives and samples on the falling edge, where the
  // combinational handshake outputs of the processor are settled.
  task automatic send_word(input logic [NB-1:0] w);
    for (int b = 0; b < NBYTES; b++) begin
      while ($urandom_range(3) == 0) @(negedge clk);   // random gap
      in_data  = w[8*b +: 8];
      in_valid = 1'b1;
      #1;
      while (!in_ready) @(negedge clk);
      @(negedge clk);                                  // accepted at the rising edge
      in_valid = 1'b0;
    end
  endtask

  task automatic run_one(input logic [NB-1:0] n, input logic [NB-1:0] e, input logic [NB-1:0] m);
    logic [2*NB+4:0] big;
    logic [NB-1:0] c, expect_r, got;
    int k, v, mm0;
    longint unsigned c0;
    big = '0;
    big[2*(NB+2)] = 1'b1;
    big = big % (2*NB+5)'(n);
    c = big[NB-1:0];
    expect_r = modexp(m, e, n);
    k = 0; v = 0;
    for (int i = 0; i < NB; i++) if (e[i]) begin k = i + 1; v++; end
    if (e == 0) begin k = 1; v = 1; expect_r = m; end   // zero exponent behaves as E = 1

    @(negedge clk);
    start = 1'b1;
    @(negedge clk);
    start = 1'b0;
    mm0 = mm_cycles;
    c0 = cycle;
    send_word(n);
    send_word(c);
    send_word(e);
    send_word(m);
    for (int b = 0; b < NBYTES; b++) begin
      while (!out_valid) @(negedge clk);
      repeat ($urandom_range(2)) @(negedge clk);
      got[8*b +: 8] = out_data;
      out_ready = 1'b1;
      @(negedge clk);
      out_ready = 1'b0;
    end
    while (busy) @(negedge clk);
    $display("k=%0d v=%0d: %0d clocks from start to done, %0d in multiplications", k, v, cycle - c0, mm_cycles - mm0);
    checks++;
    if (got !== expect_r) begin
      failures++;
      $display("FAIL N=%h E=%h M=%h got %h expected %h", n, e, m, got, expect_r);
    end
    checks++;
    if (mm_cycles - mm0 != (k + v) * (NB + 7)) begin
      failures++;
      $display("FAIL cycle count %0d expected %0d (k=%0d v=%0d)", mm_cycles - mm0, (k + v) * (NB + 7), k, v);
    end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    repeat (2) @(posedge clk);
    for (int t = 0; t < NTESTS; t++) begin
      logic [NB-1:0] n, e, m;
      n = rand_word();
      n[NB-1] = 1'b1;
      n[0] = 1'b1;
      m = rand_word() % n;
      e = rand_word();
      case (t)
        0: e[NB-1] = 1'b1;   // random 512-bit exponent
        1: e = 65537;
        default: e = '1;     // worst case: all exponent bits one
      endcase
      run_one(n, e, m);
    end
    checks++;
    if (n_pre == 0 || n_sqr == 0 || n_mul == 0 || n_skip == 0 || n_post == 0) begin
      failures++;
      $display("FAIL mechanism not exercised");
    end
    $display("mechanisms: pre=%0d square=%0d multiply=%0d skipped_multiply=%0d post=%0d input_stall=%0d output_backpressure=%0d",
             n_pre, n_sqr, n_mul, n_skip, n_post, n_in_stall, n_out_bp);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (1500000) @(posedge clk);
    $display("state=%0d cnt=%0d inready=%b outvalid=%b", dut.state, dut.u_ctrl.cnt_q, in_ready, out_valid);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

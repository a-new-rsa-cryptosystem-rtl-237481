// tb_rsa_controller: self-checking test of the controller at 16-bit size.
//
// The controller runs with an exponent register attached (loaded with the
// test's exponent as the controller asks for bits) and an I/O side that
// always has bits and room.  The testbench records the sequence of states and
// how long each lasted and compares it with the sequence Algorithm 2 gives
// for the exponent: 16 clocks for each of N, C, E, 17 for M (one pad bit),
// PRE, then SQR and, for each one bit, MUL, then POST, each n+7 = 23 clocks,
// CAPT (n+1), UNLOAD.  Inside every multiplication it checks the clock-level
// schedule of the datapath controls against its own clock count.
module tb_rsa_controller;
  import rsa_pkg::*;

  localparam int unsigned NB = 16;
  localparam int unsigned L  = NB + 2;
  localparam int unsigned CW = $clog2(NB);

  logic clk = 1'b0, rst_n = 1'b0, start = 1'b0;
  logic io_bit_avail = 1'b1, io_obit_ready = 1'b1, io_empty = 1'b1;
  logic io_dir_out, io_bit_take, io_obit_push;
  logic mod_shift, const_shift, const_rot, text_shift;
  text_src_t text_src;
  logic exp_bit, exp_norm_done, exp_load, exp_norm, exp_next;
  logic [CW-1:0] exp_bits_left;
  logic mul_en, mul_start, ser_zero, cpa_load, busy, done;
  pp_sel_t pp_sel;
  ser_sel_t ser_sel;
  mont_op_t mont_op;
  state_t state;
  int checks = 0, failures = 0;

  logic [NB-1:0] e_val = '0;
  int e_idx = 0;
  logic e_sin;
  assign e_sin = e_val[e_idx % NB];
  always @(posedge clk) if (exp_load) e_idx <= e_idx + 1;

  rsa_controller #(.N_BITS(NB)) dut (.*);
  exponent_reg #(.N_BITS(NB)) u_exp (
    .clk, .rst_n, .load_shift(exp_load), .sin(e_sin), .norm(exp_norm), .next(exp_next),
    .e_bit(exp_bit), .bits_left(exp_bits_left), .norm_done(exp_norm_done)
  );

  always #5 clk = ~clk;

  // run-length record of the state sequence
  state_t seq [$];
  int     len [$];
  int     mm_cyc = 0, sched_err = 0, n_done = 0;
  state_t last = ST_IDLE;
  always @(negedge clk) if (rst_n) begin
    if (state != last || (state inside {ST_SQR} && mm_cyc == int'(L + 5))) begin
      seq.push_back(state);
      len.push_back(1);
      mm_cyc = 0;
    end else if (len.size() > 0) begin
      len[len.size()-1]++;
    end
    if (state inside {ST_PRE, ST_SQR, ST_MUL, ST_POST}) begin
      mont_op_t exp_op;
      pp_sel_t exp_pp;
      exp_op = (mm_cyc == 1) ? MO_RED_FIRST :
               (mm_cyc >= 2 && mm_cyc <= int'(L)) ? MO_RED :
               (mm_cyc == int'(L + 1)) ? MO_ADD_SUM :
               (mm_cyc == int'(L + 2)) ? MO_ADD_CARRY :
               (mm_cyc == int'(L + 3)) ? MO_ADD_H : MO_HOLD;
      exp_pp = (state == ST_SQR) ? PP_SELF : (state == ST_POST) ? PP_ONE : PP_TEXT;
      if (mont_op != exp_op || mul_en != (mm_cyc < int'(L)) || mul_start != (mm_cyc == 0) ||
          cpa_load != (mm_cyc == int'(L + 4)) || pp_sel != exp_pp ||
          (state == ST_PRE && (ser_sel != SER_CONST || ser_zero != (mm_cyc >= int'(NB)))) ||
          (state != ST_PRE && ser_sel != SER_CPA)) begin
        sched_err++;
        if (sched_err < 5) $display("FAIL schedule in %s at clock %0d", state.name(), mm_cyc);
      end
      mm_cyc++;
    end
    if (done) n_done++;
    last = state;
  end

  task automatic run(input logic [NB-1:0] e);
    state_t es [$];
    int el [$];
    int k;
    k = 1;
    for (int i = 0; i < NB; i++) if (e[i]) k = i + 1;
    es = {ST_LOAD_N, ST_LOAD_C, ST_LOAD_E, ST_LOAD_M, ST_PRE};
    el = {NB, NB, NB, NB + 1, NB + 7};
    for (int i = k - 2; i >= 0; i--) begin
      es.push_back(ST_SQR); el.push_back(NB + 7);
      if (e[i]) begin es.push_back(ST_MUL); el.push_back(NB + 7); end
    end
    es.push_back(ST_POST);   el.push_back(NB + 7);
    es.push_back(ST_CAPT);   el.push_back(NB + 1);
    es.push_back(ST_UNLOAD); el.push_back(NB + 1);
    es.push_back(ST_IDLE);
    seq.delete();
    len.delete();
    e_val = e;
    e_idx = 0;
    n_done = 0;
    @(negedge clk);
    start = 1'b1;
    @(negedge clk);
    start = 1'b0;
    while (busy) @(negedge clk);
    @(negedge clk);
    checks++;
    if (seq.size() != es.size()) begin
      failures++;
      $display("FAIL E=%h: %0d state runs, expected %0d", e, seq.size(), es.size());
    end else begin
      for (int i = 0; i < es.size() - 1; i++) begin
        checks++;
        if (seq[i] != es[i] || len[i] != el[i]) begin
          failures++;
          $display("FAIL E=%h run %0d: %s x%0d, expected %s x%0d", e, i, seq[i].name(), len[i], es[i].name(), el[i]);
        end
      end
    end
    checks++;
    if (n_done != 1) begin
      failures++;
      $display("FAIL done pulses %0d", n_done);
    end
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    run(NB'(1));
    run('1);
    run(NB'(16'b1011_0010_0000_0001));
    for (int i = 0; i < 20; i++) run(NB'($urandom | 1) >> $urandom_range(NB - 1));
    checks++;
    if (sched_err != 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

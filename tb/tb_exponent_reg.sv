// tb_exponent_reg: self-checking test of the exponent register (16 bits).
// For random exponents of random length k it loads E serially, runs the
// normalisation and checks that it takes 16-k clocks and leaves
// bits_left = k-1 with the leading one on e_bit; then it steps through the
// remaining bits with next and checks each bit, most significant first, and
// the count.  The zero exponent must stop with bits_left = 0.
module tb_exponent_reg;
  localparam int unsigned NB = 16;
  localparam int unsigned CW = $clog2(NB);

  logic clk = 1'b0, rst_n = 1'b0, load_shift = 1'b0, sin = 1'b0, norm = 1'b0, next = 1'b0;
  logic e_bit, norm_done;
  logic [CW-1:0] bits_left;
  int checks = 0, failures = 0;

  exponent_reg #(.N_BITS(NB)) dut (.*);

  always #5 clk = ~clk;

  task automatic run(input logic [NB-1:0] e);
    int k, ncyc;
    k = 1;
    for (int i = 0; i < NB; i++) if (e[i]) k = i + 1;
    @(negedge clk);
    for (int b = 0; b < NB; b++) begin
      load_shift = 1'b1;
      sin = e[b];
      @(negedge clk);
    end
    load_shift = 1'b0;
    norm = 1'b1;
    ncyc = 0;
    while (!norm_done) begin
      @(negedge clk);
      ncyc++;
    end
    repeat (2) @(negedge clk);   // must stay put once done
    norm = 1'b0;
    checks++;
    if (ncyc != NB - k || int'(bits_left) != k - 1 || e_bit !== (e != 0)) begin
      failures++;
      $display("FAIL normalise E=%h: %0d clocks, bits_left %0d, e_bit %b", e, ncyc, bits_left, e_bit);
    end
    for (int i = k - 2; i >= 0; i--) begin
      next = 1'b1;
      @(negedge clk);
      next = 1'b0;
      checks++;
      if (e_bit !== e[i] || int'(bits_left) != i) begin
        failures++;
        $display("FAIL bit %0d of E=%h", i, e);
      end
    end
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    run('0);
    run(NB'(1));
    run('1);
    for (int i = 0; i < 60; i++) run(NB'($urandom) >> $urandom_range(NB - 1));
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

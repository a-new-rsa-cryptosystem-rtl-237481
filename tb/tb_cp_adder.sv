// tb_cp_adder: self-checking test of the bit-serial carry-propagation adder
// at 16 bits (18-bit vectors).  Random vector pairs are loaded, the result is
// read one bit per clock from the clock after load, and compared with x + y.
module tb_cp_adder;
  localparam int unsigned NB = 16;
  localparam int unsigned W  = NB + 2;

  logic clk = 1'b0, rst_n = 1'b0, load = 1'b0, shift = 1'b0, r;
  logic [W-1:0] x_in = '0, y_in = '0;
  int checks = 0, failures = 0;

  cp_adder #(.N_BITS(NB)) dut (.*);

  always #5 clk = ~clk;

  task automatic run(input logic [W-1:0] x, input logic [W-1:0] y);
    logic [W-1:0] got, sum;
    sum = x + y;
    @(negedge clk);
    x_in = x;
    y_in = y;
    load = 1'b1;
    @(negedge clk);
    load  = 1'b0;
    shift = 1'b1;
    for (int t = 0; t < W; t++) begin
      got[t] = r;
      @(negedge clk);
    end
    shift = 1'b0;
    checks++;
    if (got !== sum) begin
      failures++;
      $display("FAIL %h + %h got %h", x, y, got);
    end
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    run('1, W'(1));
    run({1'b0, {(W-1){1'b1}}}, {1'b0, {(W-1){1'b1}}});
    for (int i = 0; i < 200; i++) run(W'({$urandom, $urandom}), W'({$urandom, $urandom}));
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

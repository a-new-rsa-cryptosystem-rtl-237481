// tb_operand_reg: self-checking test of the operand shift register (16 bits).
// Loads random words serially, least significant bit first, and checks the
// parallel view; reads them back with rotation and checks both the serial
// bit sequence and that the contents are unchanged; checks that the register
// holds while shift is low.
module tb_operand_reg;
  localparam int unsigned W = 16;

  logic clk = 1'b0, rst_n = 1'b0, shift = 1'b0, rot = 1'b0, sin = 1'b0, sout;
  logic [W-1:0] q;
  int checks = 0, failures = 0;

  operand_reg #(.W(W)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    checks++;
    if (q !== '0) failures++;
    for (int i = 0; i < 50; i++) begin
      logic [W-1:0] w, rd;
      w = W'($urandom);
      rot = 1'b0;
      for (int b = 0; b < W; b++) begin
        shift = 1'b1;
        sin = w[b];
        @(negedge clk);
      end
      shift = 1'b0;
      sin = 1'b1;
      repeat (2) @(negedge clk);
      checks++;
      if (q !== w) begin
        failures++;
        $display("FAIL load %h got %h", w, q);
      end
      rot = 1'b1;
      for (int b = 0; b < W; b++) begin
        shift = 1'b1;
        rd[b] = sout;
        @(negedge clk);
      end
      shift = 1'b0;
      checks++;
      if (rd !== w || q !== w) begin
        failures++;
        $display("FAIL rotate %h got %h / %h", w, rd, q);
      end
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

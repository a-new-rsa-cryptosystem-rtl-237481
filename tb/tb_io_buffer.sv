// tb_io_buffer: self-checking test of the 8-bit I/O buffer.
// Input direction: random bytes with random in_valid gaps and random bit_take
// are converted to a bit stream, checked bit by bit (least significant first)
// and for the one-bit-per-clock rate when bytes are waiting.  Output
// direction: random bits pushed with random out_ready delays must come back
// as the right bytes.
module tb_io_buffer;
  logic clk = 1'b0, rst_n = 1'b0, dir_out = 1'b0;
  logic [7:0] in_data = '0, out_data;
  logic in_valid = 1'b0, in_ready, bit_take = 1'b0, bit_out, bit_avail;
  logic obit_push = 1'b0, obit_in = 1'b0, obit_ready, empty, out_valid, out_ready = 1'b0;
  int checks = 0, failures = 0;

  io_buffer dut (.*);

  always #5 clk = ~clk;

  localparam int NBYTES = 64;
  logic [7:0] bytes [NBYTES];
  logic [7:0] got [NBYTES];

  initial begin
    foreach (bytes[i]) bytes[i] = 8'($urandom);
    repeat (2) @(negedge clk);
    rst_n = 1'b1;

    // producer and consumer run in parallel
    fork
      begin
        for (int i = 0; i < NBYTES; i++) begin
          if (i >= NBYTES / 2) while ($urandom_range(2) == 0) @(negedge clk);
          in_data = bytes[i];
          in_valid = 1'b1;
          #2;   // after the consumer has set bit_take for this clock
          while (!in_ready) begin
            @(negedge clk);
            #2;
          end
          @(negedge clk);
          in_valid = 1'b0;
        end
      end
      begin
        int nb, cyc0, cyc;
        nb = 0;
        cyc = 0;
        cyc0 = 0;
        while (nb < NBYTES * 8) begin
          bit_take = (nb < NBYTES * 4) ? 1'b1 : ($urandom_range(1) == 1);
          #1;
          if (bit_take && bit_avail) begin
            if (nb == 0) cyc0 = cyc;
            checks++;
            if (bit_out !== bytes[nb / 8][nb % 8]) begin
              failures++;
              $display("FAIL input bit %0d", nb);
            end
            nb++;
            if (nb == NBYTES * 4) begin
              checks++;   // first half: bytes always waiting, one bit per clock
              if (cyc - cyc0 + 1 != NBYTES * 4) begin
                failures++;
                $display("FAIL rate: %0d clocks for %0d bits", cyc - cyc0 + 1, NBYTES * 4);
              end
            end
          end
          @(negedge clk);
          cyc++;
        end
        bit_take = 1'b0;
      end
    join

    // output direction
    @(negedge clk);
    dir_out = 1'b1;
    fork
      begin
        for (int nb = 0; nb < NBYTES * 8; nb++) begin
          obit_in = bytes[nb / 8][nb % 8];
          obit_push = 1'b1;
          #1;
          while (!obit_ready) begin
            @(negedge clk);
            #1;
          end
          @(negedge clk);
          obit_push = 1'b0;
        end
      end
      begin
        for (int i = 0; i < NBYTES; i++) begin
          #1;
          while (!out_valid) begin
            @(negedge clk);
            #1;
          end
          repeat ($urandom_range(2)) @(negedge clk);
          got[i] = out_data;
          out_ready = 1'b1;
          @(negedge clk);
          out_ready = 1'b0;
        end
      end
    join
    foreach (got[i]) begin
      checks++;
      if (got[i] !== bytes[i]) begin
        failures++;
        $display("FAIL output byte %0d got %h exp %h", i, got[i], bytes[i]);
      end
    end
    checks++;
    if (!empty) failures++;
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

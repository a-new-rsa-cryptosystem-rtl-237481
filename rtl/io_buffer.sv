// io_buffer: 8-bit I/O buffer between the byte-wide port and the bit-serial
// operand registers.
//
// One 8-bit register serves both directions.  Input (dir_out low): a byte is
// accepted with in_valid & in_ready and then handed out one bit per clock,
// least significant first, on bit_out while bit_avail is high; the consumer
// takes a bit with bit_take.  A new byte is accepted in the clock the last bit
// is taken, so loading runs at one bit per clock while bytes keep coming.
// Output (dir_out high): obit_push shifts a bit in (least significant first);
// after eight bits out_valid is high with the byte on out_data until
// out_ready.  The byte width follows the design; the valid/ready handshake is
// this implementation's synchronous stand-in for the asynchronous byte port.
module io_buffer (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       dir_out,
  // byte input
  input  logic [7:0] in_data,
  input  logic       in_valid,
  output logic       in_ready,
  // serial side, input direction
  input  logic       bit_take,
  output logic       bit_out,
  output logic       bit_avail,
  // serial side, output direction
  input  logic       obit_push,
  input  logic       obit_in,
  output logic       obit_ready,
  output logic       empty,
  // byte output
  output logic [7:0] out_data,
  output logic       out_valid,
  input  logic       out_ready
);
  logic [7:0] buf_q;
  logic [3:0] cnt_q;   // input: bits left; output: bits collected

  assign bit_avail  = !dir_out && (cnt_q != 4'd0);
  assign bit_out    = buf_q[0];
  assign in_ready   = !dir_out && ((cnt_q == 4'd0) || (cnt_q == 4'd1 && bit_take));
  assign obit_ready = dir_out && (cnt_q < 4'd8);
  assign out_valid  = dir_out && (cnt_q == 4'd8);
  assign out_data   = buf_q;
  assign empty      = (cnt_q == 4'd0);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      buf_q <= '0;
      cnt_q <= '0;
    end else if (!dir_out) begin
      if (in_valid && in_ready) begin
        buf_q <= in_data;
        cnt_q <= 4'd8;
      end else if (bit_take && bit_avail) begin
        buf_q <= buf_q >> 1;
        cnt_q <= cnt_q - 4'd1;
      end
    end else begin
      if (out_valid && out_ready) begin
        cnt_q <= 4'd0;
      end else if (obit_push && obit_ready) begin
        buf_q <= {obit_in, buf_q[7:1]};
        cnt_q <= cnt_q + 4'd1;
      end
    end
  end

endmodule

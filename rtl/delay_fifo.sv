// delay_fifo: fixed-length delay line made from a FIFO memory.
//
// The predictor and the predicted-value path use FIFO memories (2048 words
// of 9 bits) as delay lines: a word written now is read back exactly DELAY
// clocks later. Here a circular buffer of DELAY words with one pointer does
// this: each clock the word under the pointer is presented on dout and then
// overwritten by din. Until the buffer has been filled once dout is zero, so
// no uninitialised memory is ever read.
// Interface: one word in and one word out on every clk; dout(t) = din(t -
// DELAY). DELAY must lie between 1 and DEPTH (the size of the FIFO part).
// The memory size follows the published FIFOs; the zero fill is this
// design's choice.
module delay_fifo #(
  parameter int unsigned DEPTH = 2048,
  parameter int unsigned W     = 9,
  parameter int unsigned DELAY = 2048
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic [W-1:0] din,
  output logic [W-1:0] dout
);

  localparam int unsigned PW = (DELAY > 1) ? $clog2(DELAY) : 1;

  logic [W-1:0]  mem [DELAY];
  logic [PW-1:0] ptr;
  logic          filled;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ptr    <= '0;
      filled <= 1'b0;
    end else begin
      if (ptr == PW'(DELAY - 1)) begin
        ptr    <= '0;
        filled <= 1'b1;
      end else begin
        ptr <= ptr + 1'b1;
      end
    end
  end

  always_ff @(posedge clk) mem[ptr] <= din;

  assign dout = filled ? mem[ptr] : '0;

  initial assert (DELAY >= 1 && DELAY <= DEPTH)
    else $error("delay_fifo: DELAY %0d outside 1..%0d", DELAY, DEPTH);

endmodule

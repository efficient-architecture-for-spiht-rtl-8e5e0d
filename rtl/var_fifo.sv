// var_fifo - shift register and variable FIFO for one bit stream.
//
// Collects the variable number of bits a coding unit emits per block
// (0..IN_MAX, packed LSB first) and hands them on as fixed WORD_W-bit
// words for the memory: the oldest bit of the stream is bit 0 of a word.
// The store is a FIFO_BITS-wide shift register: new bits are placed right
// above the bits already held, and popping a word shifts the store down by
// WORD_W. While flush is high a partly filled word (zero padded) may also
// be popped, which empties the store; the encoder does this at the end of
// every bit plane so that each plane starts on a word boundary.
//
// full is high while fewer than IN_MAX free bits remain; the producer must
// not push then (it stalls). push and pop may happen in the same cycle.
// clear empties the store (start of a frame). All outputs are registered
// or decoded from registers.
// The description fixes the 16-bit word and a 20-bit FIFO; the default
// here is 24 bits because a store that may hold 15 bits of an unfinished
// word must still take a worst-case 8-bit block (see FIFO_BITS below).
module var_fifo #(
  parameter int IN_MAX    = 8,
  parameter int WORD_W    = 16,
  // at least WORD_W + IN_MAX - 1, or a full store could never drain
  parameter int FIFO_BITS = 24,
  localparam int LW       = $clog2(IN_MAX + 1),
  localparam int CW       = $clog2(FIFO_BITS + 1)
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              clear,
  input  logic              push,
  input  logic [IN_MAX-1:0] in_bits,
  input  logic [LW-1:0]     in_len,
  input  logic              flush,
  output logic              word_valid,
  output logic [WORD_W-1:0] word,
  input  logic              pop,
  output logic              full,
  output logic              empty
);

  logic [FIFO_BITS-1:0] store;
  logic [CW-1:0]        cnt;

  assign word       = store[WORD_W-1:0];
  assign word_valid = (cnt >= CW'(WORD_W)) || (flush && cnt != '0);
  assign full       = cnt > CW'(FIFO_BITS - IN_MAX);
  assign empty      = (cnt == '0);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      store <= '0;
      cnt   <= '0;
    end else if (clear) begin
      store <= '0;
      cnt   <= '0;
    end else begin
      logic [FIFO_BITS-1:0] s;
      logic [CW-1:0]        c;
      logic [IN_MAX-1:0]    masked;
      s = store;
      c = cnt;
      if (pop && word_valid) begin
        if (c >= CW'(WORD_W)) begin
          s = s >> WORD_W;
          c = c - CW'(WORD_W);
        end else begin
          s = '0;
          c = '0;
        end
      end
      if (push) begin
        masked = '0;
        for (int i = 0; i < IN_MAX; i++)
          if (LW'(i) < in_len) masked[i] = in_bits[i];
        s = s | (FIFO_BITS'(masked) << c);
        c = c + CW'(in_len);
      end
      store <= s;
      cnt   <= c;
    end
  end

  initial assert (FIFO_BITS >= WORD_W + IN_MAX - 1)
    else $error("FIFO_BITS too small to drain");

  assert property (@(posedge clk) disable iff (!rst_n) push |-> !full)
    else $error("push into a full variable FIFO");
  assert property (@(posedge clk) disable iff (!rst_n) push |-> in_len <= LW'(IN_MAX))
    else $error("push longer than IN_MAX");

endmodule

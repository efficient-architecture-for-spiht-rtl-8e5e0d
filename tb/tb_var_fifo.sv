// tb_var_fifo - self-checking test of the shift register / variable FIFO.
//
// Random pushes of 0..8 bits (only when not full), random pops and
// occasional flushes, compared with a bit-queue model: a word is offered
// when 16 bits are held, or with zero padding during a flush; bit 0 of a
// word is the oldest bit. full must be high exactly when fewer than 8
// free bits remain. A clear empties the FIFO.
`timescale 1ns/1ps
module tb_var_fifo;
  localparam int IN_MAX = 8, WORD_W = 16, FIFO_BITS = 24;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic clear, push, flush, word_valid, pop, full, empty;
  logic [IN_MAX-1:0] in_bits;
  logic [3:0] in_len;
  logic [WORD_W-1:0] word;

  var_fifo #(.IN_MAX(IN_MAX), .WORD_W(WORD_W), .FIFO_BITS(FIFO_BITS)) dut (.*);

  bit q[$];
  int checks = 0, failures = 0, n_full = 0, n_flush_words = 0;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL %s", what); end
  endtask

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    clear = 0; push = 0; flush = 0; pop = 0; in_bits = '0; in_len = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int it = 0; it < 6000; it++) begin
      logic [WORD_W-1:0] w;
      bit wv;
      // outputs against the model
      flush = (it % 50) > 44;
      #1;
      wv = (q.size() >= WORD_W) || (flush && q.size() > 0);
      w = '0;
      for (int i = 0; i < WORD_W && i < q.size(); i++) w[i] = q[i];
      check(word_valid == wv, $sformatf("word_valid %0d, model holds %0d", word_valid, q.size()));
      if (wv) check(word == w, $sformatf("word %h vs %h", word, w));
      check(full == (q.size() > FIFO_BITS - IN_MAX), "full");
      check(empty == (q.size() == 0), "empty");
      if (full) n_full++;
      pop = $urandom_range(0, 2) == 0;
      push = !full && !flush && $urandom_range(0, 1);
      in_len = 4'($urandom_range(0, IN_MAX));
      in_bits = IN_MAX'($urandom);
      @(negedge clk);
      if (pop && wv) begin
        if (q.size() < WORD_W) n_flush_words++;
        for (int i = 0; i < WORD_W && q.size() > 0; i++) void'(q.pop_front());
      end
      if (push) for (int i = 0; i < int'(in_len); i++) q.push_back(in_bits[i]);
      if (it % 1000 == 999) begin
        clear = 1; push = 0; pop = 0;
        @(negedge clk);
        clear = 0;
        q = {};
      end
    end
    check(n_full > 0 && n_flush_words > 0, "full and partial flush both seen");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

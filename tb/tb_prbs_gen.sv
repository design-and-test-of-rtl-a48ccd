// tb_prbs_gen: checks the parallel PRBS-23 generator against a bit-serial
// reference (x^23 + x^18 + 1, earliest bit in the word MSB), checks that a
// second generator seeded from one word's low 23 bits predicts every later
// word, and that the zero seed is replaced.
module tb_prbs_gen;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic load = 0, en = 0, load2 = 0, en2 = 0;
  logic [22:0] seed = 0, seed2 = 0;
  logic [35:0] word, word2;

  prbs_gen #(.W(36)) dut (.clk, .rst_n, .load, .seed, .en, .word);
  prbs_gen #(.W(36)) rcv (.clk, .rst_n, .load(load2), .seed(seed2), .en(en2), .word(word2));

  logic [22:0] ref_s;
  function automatic logic [35:0] ref_word();
    logic [35:0] w;
    for (int i = 35; i >= 0; i--) begin
      w[i] = ref_s[22] ^ ref_s[17];
      ref_s = {ref_s[21:0], w[i]};
    end
    return w;
  endfunction

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    ref_s = '1;
    en = 1;
    for (int n = 0; n < 200; n++) begin
      @(negedge clk);
      check(word == ref_word(), $sformatf("word %0d", n));
    end
    // seed the second generator from the current word W0; it then produces
    // W1, W2, ... one clock behind the first generator
    begin
      logic [35:0] q[$];
      q.push_back(word);
      load2 = 1; seed2 = word[22:0];
      @(negedge clk); load2 = 0; en2 = 1; q.push_back(word);
      for (int n = 0; n < 100; n++) begin
        @(negedge clk); q.push_back(word);
        check(word2 == q[q.size() - 2], $sformatf("seeded receiver word %0d", n));
      end
    end
    // zero seed
    en = 0; load = 1; seed = 0; @(negedge clk); load = 0; en = 1; @(negedge clk);
    check(word != 0, "zero seed replaced");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

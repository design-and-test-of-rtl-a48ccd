// tb_link_framer: checks the Channel Link frame. With a crossing strobe
// every 8 clocks and random energies, each frame must be 8 words: word w
// holds channels 4w..4w+3 in bits 31:0, word 0 has the frame marker, a
// queued raw word is popped once per frame and appears 3 bits at a time in
// the sideband of words 1-6 with the valid flag in word 0. In PRBS mode the words must
// follow the PRBS-23 reference, and inject_err must flip exactly one bit.
module tb_link_framer;
  import adf_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic bc_stb = 0, et_valid = 0, inject_err = 0, rd_valid = 0, rd_pop;
  et_t [N_CH-1:0] et = '0;
  link_mode_t mode = LINK_DATA;
  logic [RD_W-1:0] rd_word = 0;
  logic [LINK_W-1:0] tx_word;

  link_framer dut (.*);

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  int ph = 0;
  always @(negedge clk) begin
    ph <= (ph + 1) % 8;
    bc_stb <= ((ph + 1) % 8 == 0);
  end

  logic [22:0] ref_s;
  function automatic logic [35:0] ref_word();
    logic [35:0] w;
    for (int i = 35; i >= 0; i--) begin
      w[i] = ref_s[22] ^ ref_s[17];
      ref_s = {ref_s[21:0], w[i]};
    end
    return w;
  endfunction

  initial begin
    et_t [N_CH-1:0] frame_et;
    logic [15:0] rw;
    int pops = 0, raw_frames = 0, errs;
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int f = 0; f < 20; f++) begin
      // new energies just before the strobe (et_valid at phase 5)
      while (ph != 5) @(negedge clk);
      for (int c = 0; c < N_CH; c++) et[c] = et_t'($urandom);
      frame_et = et;
      et_valid = 1; @(negedge clk); et_valid = 0;
      rw = 16'($urandom);
      rd_valid = (f % 3 != 0); rd_word = rw;
      @(posedge clk iff bc_stb); #1;
      if (rd_valid) begin check(rd_pop, "pop at frame start"); pops++; end
      @(negedge clk); rd_valid = 0;
      @(negedge clk);   // word 0 now on tx_word
      for (int w = 0; w < 8; w++) begin
        logic [31:0] exp_d;
        logic [3:0] exp_sb;
        for (int i = 0; i < 4; i++) exp_d[8*i +: 8] = frame_et[4*w + i];
        case (w)
          0: exp_sb = {1'b1, (f % 3 != 0), 2'b00};
          1: exp_sb = (f % 3 != 0) ? {1'b0, rw[15:13]} : 4'd0;
          2: exp_sb = (f % 3 != 0) ? {1'b0, rw[12:10]} : 4'd0;
          3: exp_sb = (f % 3 != 0) ? {1'b0, rw[9:7]} : 4'd0;
          4: exp_sb = (f % 3 != 0) ? {1'b0, rw[6:4]} : 4'd0;
          5: exp_sb = (f % 3 != 0) ? {1'b0, rw[3:1]} : 4'd0;
          6: exp_sb = (f % 3 != 0) ? {1'b0, rw[0], 2'b00} : 4'd0;
          default: exp_sb = 4'd0;
        endcase
        check(tx_word == {exp_sb, exp_d}, $sformatf("frame %0d word %0d: %h", f, w, tx_word));
        if (w == 0 && tx_word[34]) raw_frames++;
        @(negedge clk);
      end
    end
    check(pops == raw_frames && pops > 5, "raw words carried");
    // PRBS mode: find the alignment with the free-running generator, then follow it
    mode = LINK_PRBS;
    repeat (3) @(negedge clk);
    ref_s = tx_word[22:0];
    for (int n = 0; n < 100; n++) begin
      @(negedge clk);
      check(tx_word == ref_word(), $sformatf("prbs word %0d", n));
    end
    // error injection flips one bit of one word
    inject_err = 1; @(negedge clk); inject_err = 0; void'(ref_word());
    errs = 0;
    for (int n = 0; n < 10; n++) begin
      logic [35:0] e;
      @(negedge clk);
      e = ref_word();
      errs += $countones(tx_word ^ e);
      ref_s = e[22:0];
    end
    check(errs == 1, $sformatf("injected errors seen: %0d", errs));
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

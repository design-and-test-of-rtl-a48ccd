// tb_adf_board: board-level test with all 32 channels. The bench plays the
// SCLD (a crossing marker every 8 clocks) and the VME side. Channels are
// set to filter bypass with the table f(a) = a + 100, and channel c sees the
// ADC value (3c + crossing) mod 64 for a whole crossing. Checks: the 3 links
// carry identical frames; each frame holds f(value) for all 32 channels of
// one crossing; a raw_fetch command makes the raw samples of all channels
// appear in the frame sideband, in channel order, with the first flag;
// PRBS mode and error injection; pedestal load on the DAC lines; history
// freeze; register readback.
module tb_adf_board;
  import adf_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  sample_t [N_CH-1:0] adc_data = '0;
  logic is_master = 1;
  sync_t scld_sync = '0, bp_sync_in = '0, bp_sync_out;
  logic bp_sync_oe;
  logic [19:0] bus_addr = 0;
  logic [31:0] bus_wdata = 0, bus_rdata;
  logic bus_we = 0;
  logic dac_sclk, dac_cs_n;
  logic [3:0] dac_sdi;
  logic [N_LINKS-1:0][CL_BUS_W-1:0] link_data;

  adf_board dut (.*);

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask
  task automatic wr(int a, int d);
    @(negedge clk); bus_we = 1; bus_addr = 20'(a); bus_wdata = 32'(d);
    @(negedge clk); bus_we = 0;
  endtask
  task automatic rd(int a, output logic [31:0] d);
    @(negedge clk); bus_addr = 20'(a); @(negedge clk); d = bus_rdata;
  endtask
  function automatic int chaddr(int c, int region, int off); return (c << 14) | (region << 12) | off; endfunction

  // SCLD side and ADC: marker every 8 clocks; ADC value changes with the crossing
  int ph = 0, bc = 0;
  always @(negedge clk) begin
    scld_sync.bc_marker <= (ph == 7);
    ph <= (ph + 1) % 8;
    // the board's phase 0 is 2 clocks after the marker is driven
    if (ph == 1) begin
      bc <= bc + 1;
      for (int c = 0; c < N_CH; c++) adc_data[c] <= sample_t'((3 * c + bc + 1) % 64);
    end
  end

  // frame decoder on link 0
  int fw = -1, frames = 0, good_frames = 0, raw_words = 0, raw_bad = 0, first_seen = 0;
  int raw_rec_off = -1, raw_ch_expect = 0, raw_smp_in_ch = 0, links_differ = 0;
  logic [35:0] fr [8];
  logic prbs_mode = 0;
  always @(negedge clk) if (rst_n && !prbs_mode) begin
    logic [35:0] w;
    w = link_data[0][35:0];
    if (link_data[1] != link_data[0] || link_data[2] != link_data[0]) links_differ++;
    if (w[35]) fw = 0;
    if (fw >= 0 && fw < 8) begin
      fr[fw] = w;
      if (fw == 7) begin
        int off;
        bit ok;
        ok = 1;
        frames++;
        // channel 0 tells which crossing; all channels must agree
        off = (int'(fr[0][7:0]) - 100) & 63;
        for (int c = 0; c < N_CH; c++)
          if (int'(fr[c / 4][8 * (c % 4) +: 8]) != 100 + ((3 * c + off) % 64)) ok = 0;
        if (ok) good_frames++;
        if (fr[0][34]) begin
          logic [15:0] rw;
          int ch, s;
          rw = {fr[1][34:32], fr[2][34:32], fr[3][34:32], fr[4][34:32], fr[5][34:32], fr[6][34]};
          ch = int'(rw[14:10]);
          s  = int'(rw[9:0]);
          raw_words++;
          if (rw[15]) begin first_seen++; raw_ch_expect = 0; raw_smp_in_ch = 0; raw_rec_off = (s - 3 * ch) & 63; end
          if (ch != raw_ch_expect || ((s - 3 * ch) & 63) != raw_rec_off) begin
            raw_bad++;
            if (raw_bad < 4) $display("raw word %h: ch %0d exp %0d off %0d exp %0d", rw, ch, raw_ch_expect, (s - 3 * ch) & 63, raw_rec_off);
          end
          raw_smp_in_ch++;
          if (raw_smp_in_ch == 4) begin
            raw_smp_in_ch = 0;
            raw_ch_expect = (raw_ch_expect + 1) % N_CH;
            if (raw_ch_expect == 0) raw_rec_off = (raw_rec_off + 1) & 63;
          end
        end
      end
      fw++;
    end
  end

  logic [22:0] ref_s;
  function automatic logic [35:0] ref_word();
    logic [35:0] w;
    for (int i = 35; i >= 0; i--) begin w[i] = ref_s[22] ^ ref_s[17]; ref_s = {ref_s[21:0], w[i]}; end
    return w;
  endfunction

  initial begin
    logic [31:0] d, d2;
    int f0, errs;
    repeat (3) @(negedge clk);
    rst_n = 1;
    // channels: bypass, detector off, slot 0, shift 0, live; table a + 100
    for (int c = 0; c < N_CH; c++) begin
      wr(chaddr(c, 0, 8), 32'h1);
      for (int a = 0; a < 64; a++) wr(chaddr(c, 2, a), a + 100);
    end
    rd(chaddr(5, 2, 7), d); check(d == 107, "table readback");
    rd(chaddr(9, 0, 8), d); check(d == 1, "channel control readback");
    wr(20'h80001, 40); rd(20'h80001, d); check(d == 40, "lookback register");
    wr(20'h80002, 1);  rd(20'h80002, d); check(d == 1, "crossings register");
    frames = 0; good_frames = 0; raw_words = 0; raw_bad = 0; first_seen = 0;
    repeat (8 * 30) @(negedge clk);
    f0 = frames;
    check(good_frames >= frames - 3 && frames > 20, $sformatf("frames %0d good %0d", frames, good_frames));
    check(links_differ == 0, "3 identical links");
    // raw fetch: 1 crossing x 32 channels x 4 samples = 128 words, 1 per frame
    @(negedge clk); scld_sync.raw_fetch = 1; @(negedge clk); scld_sync.raw_fetch = 0;
    repeat (8 * 140) @(negedge clk);
    check(raw_words == 128, $sformatf("raw words %0d", raw_words));
    check(first_seen == 1 && raw_bad == 0, $sformatf("raw words in order (bad %0d)", raw_bad));
    rd(20'h80004, d); check(d[1] == 1'b0 && d[31:16] == 0, "readout idle, nothing dropped");
    // history freeze: a record stays the same while frozen
    wr(20'h80000, 32'h2);
    rd(chaddr(3, 3, 4 * 10 + 3), d);
    repeat (8 * 300) @(negedge clk);
    rd(chaddr(3, 3, 4 * 10 + 3), d2);
    check(d == d2, "frozen history");
    wr(20'h80000, 32'h0);
    repeat (8 * 300) @(negedge clk);
    rd(chaddr(3, 3, 4 * 10 + 3), d2);
    check(d != d2, "history running again");
    // pedestals and DAC load: check DAC 1's first frame on its data line
    for (int c = 0; c < 32; c++) wr(20'h80040 + c, 100 * c + 7);
    rd(20'h80049, d); check(d == 907, "pedestal readback");
    wr(20'h80003, 32'h4);
    begin
      logic [15:0] sr = 0; int nb = 0;
      logic sclk_q = 0;
      while (nb < 16) begin
        @(posedge clk);
        if (dac_sclk && !sclk_q && !dac_cs_n) begin sr = {sr[14:0], dac_sdi[1]}; nb++; end
        sclk_q = dac_sclk;
      end
      check(sr == {4'd0, 12'(100 * 8 + 7)}, $sformatf("DAC 1 first frame %h", sr));
    end
    rd(20'h80004, d); check(d[2] == 1'b1, "DAC loader busy");
    repeat (1200) @(negedge clk);
    rd(20'h80004, d); check(d[2] == 1'b0, "DAC load finished");
    // PRBS mode with one forced error
    wr(20'h80000, 32'h1);
    prbs_mode = 1;
    repeat (4) @(negedge clk);
    ref_s = link_data[0][22:0];
    for (int n = 0; n < 50; n++) begin @(negedge clk); check(link_data[0][35:0] == ref_word(), "prbs stream"); end
    wr(20'h80003, 32'h2);
    void'(ref_word()); void'(ref_word());
    errs = 0;
    for (int n = 0; n < 20; n++) begin
      logic [35:0] e;
      @(negedge clk); e = ref_word(); errs += $countones(link_data[0][35:0] ^ e); ref_s = e[22:0];
    end
    check(errs == 1, $sformatf("forced error bits %0d", errs));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

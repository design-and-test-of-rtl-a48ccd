// tb_adf_desktop: the single-channel (desktop) configuration of the ADF
// board, adf_board with NCH = 1.
//
// The desktop card runs the same logic and register map as the 32-channel
// board, with one channel. The bench configures it through the same
// addresses the 32-channel software uses and checks:
//   - channel 0's energy, f(value) = value + 100 in filter bypass, arrives in
//     byte 0 of every frame, and the other 31 energy bytes are 0;
//   - the 3 links stay identical;
//   - a raw fetch of 2 crossings gives 8 raw words, all of channel 0, with
//     the first flag once, and samples equal to the ADC values;
//   - register and memory readback, and the PRBS stream with a forced error.
module tb_adf_desktop;
  import adf_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  sample_t [0:0] adc_data = '0;
  logic is_master = 1;
  sync_t scld_sync = '0, bp_sync_in = '0, bp_sync_out;
  logic bp_sync_oe;
  logic [19:0] bus_addr = 0;
  logic [31:0] bus_wdata = 0, bus_rdata;
  logic bus_we = 0;
  logic dac_sclk, dac_cs_n;
  logic [3:0] dac_sdi;
  logic [N_LINKS-1:0][CL_BUS_W-1:0] link_data;

  adf_board #(.NCH(1)) dut (.*);

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

  // SCLD side and ADC: marker every 8 clocks; the ADC value (bc mod 50) + 5
  // is held for a whole crossing
  int ph = 0, bc = 0;
  always @(negedge clk) begin
    scld_sync.bc_marker <= (ph == 7);
    ph <= (ph + 1) % 8;
    if (ph == 1) begin
      bc <= bc + 1;
      adc_data[0] <= sample_t'((bc + 1) % 50 + 5);
    end
  end

  // frame decoder on link 2
  int fw = -1, frames = 0, good = 0, raw_words = 0, raw_first = 0, raw_bad = 0, differ = 0;
  logic [35:0] fr [8];
  logic prbs_mode = 0;
  always @(negedge clk) if (rst_n && !prbs_mode) begin
    logic [35:0] w;
    w = link_data[2][35:0];
    if (link_data[1] != link_data[0] || link_data[2] != link_data[0]) differ++;
    if (w[35]) fw = 0;
    if (fw >= 0 && fw < 8) begin
      fr[fw] = w;
      if (fw == 7) begin
        bit ok;
        int e;
        e = int'(fr[0][7:0]);
        ok = (e >= 105 && e < 155) && fr[0][31:8] == 0;
        for (int k = 1; k < 8; k++) if (fr[k][31:0] != 0) ok = 0;
        frames++;
        if (ok) good++;
        if (fr[0][34]) begin
          logic [15:0] rw;
          rw = {fr[1][34:32], fr[2][34:32], fr[3][34:32], fr[4][34:32], fr[5][34:32], fr[6][34]};
          raw_words++;
          if (rw[15]) raw_first++;
          if (rw[14:10] != 0 || rw[9:0] < 5 || rw[9:0] >= 55) raw_bad++;
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
    logic [31:0] d;
    int errs;
    repeat (3) @(negedge clk);
    rst_n = 1;
    // channel 0: bypass, detector off, slot 0, shift 0; table a + 100
    wr(20'h00008, 32'h1);
    for (int a = 0; a < 64; a++) wr(20'h02000 + a, a + 100);
    rd(20'h02007, d); check(d == 107, "table readback");
    rd(20'h00008, d); check(d == 1, "channel control readback");
    wr(20'h80002, 2); rd(20'h80002, d); check(d == 2, "crossings register");
    frames = 0; good = 0;
    repeat (8 * 40) @(negedge clk);
    check(frames > 30 && good >= frames - 3, $sformatf("frames %0d good %0d", frames, good));
    check(differ == 0, "3 identical links");
    // raw fetch: 2 crossings x 1 channel x 4 samples
    @(negedge clk); scld_sync.raw_fetch = 1; @(negedge clk); scld_sync.raw_fetch = 0;
    repeat (8 * 20) @(negedge clk);
    check(raw_words == 8 && raw_first == 1 && raw_bad == 0,
          $sformatf("raw words %0d first %0d bad %0d", raw_words, raw_first, raw_bad));
    rd(20'h80004, d); check(d[1] == 1'b0 && d[31:16] == 0, "readout idle, nothing dropped");
    // PRBS mode with one forced error
    wr(20'h80000, 32'h1);
    prbs_mode = 1;
    repeat (4) @(negedge clk);
    ref_s = link_data[0][22:0];
    for (int n = 0; n < 30; n++) begin @(negedge clk); check(link_data[0][35:0] == ref_word(), "prbs stream"); end
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
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

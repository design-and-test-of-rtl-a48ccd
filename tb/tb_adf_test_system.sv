// tb_adf_test_system: end-to-end test of SCLD -> ADF board -> link tester,
// at the design's full size (32 channels, 512-word raw buffers, 1024-entry
// tables, 256-record histories, 2048-frame tester memory).
//
// The bench plays the serial command link receiver (a crossing marker every
// 8 clocks, level 1 accepts), the VME side of the ADF board and the PC side
// of the tester, over its RS232 line. ADC inputs carry calorimeter-like
// pulses (about 800 ns long) on a noisy baseline; each value is held for 4 clocks, so exactly one
// of them reaches the 15.14 MHz filter whatever the phase. For each checked
// channel the bench computes the expected energy sequence itself (FIR, peak
// detector, table) and searches for it in the energies taken from link 2
// (a trigger-board link); the sequences must match over 120 crossings.
//
// Mechanisms exercised and counted: filtered channels with the peak
// detector, a bypassed channel, a channel filtering sums of sample pairs,
// a playback channel, a capture, history
// freeze, pedestal DAC load, raw-data fetch after a level 1 accept (raw
// words on the links), a fetch dropped while busy, a masked SCLD crate, PRBS
// mode with the tester locked and a forced error detected, and a tester
// capture starting on a frame marker. Each must happen at least once.
// Finally the bench measures the clocks from an ADC step on the bypassed
// channel to the first link frame word carrying it (must be under 24, the
// 400 ns the whole board takes with the filter bypassed).
module tb_adf_test_system;
  import adf_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  sclr_t sclr = '0;
  logic [4:0] crate_en = 5'b11011;
  logic raw_fetch_en = 1;
  sync_t [3:0] other_crate_sync;
  logic [31:0] l1a_count;
  sample_t [N_CH-1:0] adc_data = '0;
  sync_t bp_sync_in = '0, bp_sync_out;
  logic bp_sync_oe;
  logic [19:0] adf_bus_addr = 0;
  logic [31:0] adf_bus_wdata = 0, adf_bus_rdata;
  logic adf_bus_we = 0;
  logic dac_sclk, dac_cs_n;
  logic [3:0] dac_sdi;
  logic [1:0][CL_BUS_W-1:0] tab_link_data;
  logic tst_rxd = 1, tst_txd;

  adf_test_system dut (.*);

  // ---- mechanism counters
  typedef enum int {M_FILTER, M_PEAK, M_BYPASS, M_PLAYBACK, M_CAPTURE, M_FREEZE, M_DAC,
                    M_RAW_FETCH, M_FETCH_DROP, M_CRATE_MASK, M_BACKPLANE, M_PRBS_LOCK,
                    M_FORCED_ERR, M_TESTER_CAPTURE, M_COMBINE, M_NUM} mech_t;
  int mech[M_NUM];
  string mech_name[M_NUM] = '{"filter", "peak", "bypass", "playback", "capture", "freeze", "dac",
                              "raw_fetch", "fetch_drop", "crate_mask", "backplane", "prbs_lock",
                              "forced_error", "tester_capture", "combine"};

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask
  task automatic wr(int a, int d);
    @(negedge clk); adf_bus_we = 1; adf_bus_addr = 20'(a); adf_bus_wdata = 32'(d);
    @(negedge clk); adf_bus_we = 0;
  endtask
  task automatic rd(int a, output logic [31:0] d);
    @(negedge clk); adf_bus_addr = 20'(a); @(negedge clk); d = adf_bus_rdata;
  endtask
  // tester access as the PC does it: RS232, 8N1, 115200 baud = 526 clocks
  // per bit; 'W' addr[15:8] addr[7:0] d[31:24] .. d[7:0], or 'R' addr and a
  // 4-byte reply
  localparam int BIT = 526;
  task automatic ser_send(logic [7:0] b);
    tst_rxd = 0; repeat (BIT) @(negedge clk);
    for (int i = 0; i < 8; i++) begin tst_rxd = b[i]; repeat (BIT) @(negedge clk); end
    tst_rxd = 1; repeat (BIT) @(negedge clk);
  endtask
  task automatic ser_recv(output logic [7:0] b);
    @(negedge tst_txd);
    repeat (BIT / 2) @(posedge clk);
    for (int i = 0; i < 8; i++) begin repeat (BIT) @(posedge clk); b[i] = tst_txd; end
    repeat (BIT) @(posedge clk);
    if (!tst_txd) check(0, "tester reply stop bit");
  endtask
  task automatic twr(int a, int d);
    logic [31:0] dd;
    dd = 32'(d);
    ser_send(8'h57); ser_send(8'(a >> 8)); ser_send(8'(a));
    for (int k = 3; k >= 0; k--) ser_send(dd[8 * k +: 8]);
    repeat (4) @(negedge clk);
  endtask
  task automatic trd(int a, output logic [31:0] d);
    logic [7:0] b;
    fork
      begin ser_send(8'h52); ser_send(8'(a >> 8)); ser_send(8'(a)); end
      for (int k = 3; k >= 0; k--) begin ser_recv(b); d[8 * k +: 8] = b; end
    join
  endtask
  function automatic int chaddr(int c, int region, int off); return (c << 14) | (region << 12) | off; endfunction

  // ---- configuration shared with the model
  localparam int COEF[8] = '{-3, 2, 9, 17, 12, 3, -6, -9};
  localparam int SHIFT = 3;
  function automatic int lut(int a); return (a > 255) ? 255 : a; endfunction

  // ---- ADC stimulus: one value per 4 clocks per channel
  int win = 0, clk_n = 0;
  int xs[N_CH][$];
  bit hold2 = 0;                            // latency test: channel 2 driven with step2
  int step2 = 0, t_step = -1;
  function automatic int pulse(int c, int n);
    int t = (n + 7 * c) % 40;               // a pulse every 40 windows (20 crossings)
    int amp = 20 + ((n / 40) * 53 + c * 29) % 300;
    int v = 2 + int'($urandom_range(0, 2));
    if (t >= 5 && t < 17) v += (t < 10) ? amp * (t - 4) / 5 : amp * (17 - t) / 7;
    return (v > 1023) ? 1023 : v;
  endfunction
  always @(negedge clk) begin
    if (clk_n % 4 == 0) begin
      for (int c = 0; c < N_CH; c++) begin
        int v;
        v = pulse(c, win);
        if (c == 2 && hold2) begin
          v = step2;
          if (v != int'(adc_data[2])) t_step = clk_n;
        end
        adc_data[c] <= sample_t'(v);
        xs[c].push_back(v);
      end
      win++;
    end
    clk_n++;
  end

  // ---- SCLR side: crossing marker every 8 clocks
  always @(negedge clk) sclr.bc_marker <= (clk_n % 8 == 0);

  // ---- link decoder (trigger-board link 1 = tab_link_data[1]) and raw words
  int et_seq[N_CH][$];
  int fw = -1, raw_words = 0, raw_first = 0;
  logic [35:0] fr[8];
  bit prbs_mode = 0;
  always @(negedge clk) if (rst_n && !prbs_mode) begin
    logic [35:0] w;
    w = tab_link_data[1][35:0];
    if (tab_link_data[0] != tab_link_data[1]) check(0, "trigger-board links identical");
    if (w[35]) fw = 0;
    if (fw >= 0 && fw < 8) begin
      fr[fw] = w;
      if (fw == 7) begin
        for (int c = 0; c < N_CH; c++) et_seq[c].push_back(int'(fr[c / 4][8 * (c % 4) +: 8]));
        if (fr[0][34]) begin
          raw_words++;
          if (fr[1][34]) raw_first++;
        end
      end
      fw++;
    end
  end

  // ---- model: energy sequences for both pairings of filter outputs
  function automatic void model(const ref int x[$], input int from, input bit bypass,
                                input bit pk, input int pair, ref int e[$]);
    int y[$];
    e = {};
    for (int n = from; n < x.size(); n++) begin
      int acc = 0;
      if (bypass) acc = x[n];
      else for (int k = 0; k < 8; k++) if (n - k >= 0) acc += COEF[k] * x[n - k];
      y.push_back(acc);
    end
    for (int b = 1; 2 * b + pair + 2 < y.size(); b++) begin
      int i0 = 2 * b + pair, p0, p1, v, a;
      if (pk) begin
        p0 = (y[i0] > y[i0-1] && y[i0] >= y[i0+1]) ? y[i0] : 0;
        p1 = (y[i0+1] > y[i0] && y[i0+1] >= y[i0+2]) ? y[i0+1] : 0;
        v = (p0 != 0) ? p0 : p1;
      end else v = y[i0];
      a = v >>> SHIFT;
      if (a < 0) a = 0;
      if (a > 1023) a = 1023;
      e.push_back(lut(a));
    end
  endfunction

  // does the channel's link sequence contain the model over `len` crossings?
  function automatic bit found(const ref int got[$], const ref int x[$], input int from, input bit bypass,
                               input bit pk, input int len, output int nonzero);
    int e[$];
    nonzero = 0;
    for (int pair = 0; pair < 2; pair++) begin
      model(x, from, bypass, pk, pair, e);
      for (int s = 0; s + len <= e.size(); s++) begin
        // anchor: the last `len` link energies against model energies from s
        int g0 = got.size() - len - 2;
        bit ok = 1;
        int nz = 0;
        if (g0 < 0) return 0;
        for (int k = 0; k < len && ok; k++) begin
          if (got[g0 + k] != e[s + k]) ok = 0;
          if (e[s + k] != 0) nz++;
        end
        if (ok) begin nonzero = nz; return 1; end
      end
    end
    return 0;
  endfunction

  initial begin
    logic [31:0] d, d2;
    int nz, t0, pb_from;
    int pbx[$];
    repeat (3) @(negedge clk);
    rst_n = 1;
    // ---- configure: coefficients, control, tables
    for (int c = 0; c < N_CH; c++) begin
      for (int k = 0; k < 8; k++) wr(chaddr(c, 0, k), COEF[k]);
      wr(chaddr(c, 0, 8), (c == 2) ? (32'h1 | (SHIFT << 4)) :
                          (c == 30) ? (32'h402 | (SHIFT << 4)) : (32'h2 | (SHIFT << 4)));
      for (int a = 0; a < 1024; a++) wr(chaddr(c, 2, a), lut(a));
    end
    wr(20'h80002, 2);                            // raw readout: 2 crossings per event
    // ---- run filtered
    for (int c = 0; c < N_CH; c++) et_seq[c] = {};
    repeat (8 * 160) @(negedge clk);
    for (int c = 0; c < N_CH; c += 13) begin
      check(found(et_seq[c], xs[c], 0, 0, 1, 120, nz), $sformatf("channel %0d energies match the model", c));
      mech[M_FILTER]++;
      if (nz > 0) mech[M_PEAK] += nz;
    end
    check(found(et_seq[2], xs[2], 0, 1, 0, 120, nz), "bypassed channel 2 matches the model");
    if (nz > 0) mech[M_BYPASS]++;
    // channel 30 filters sums of sample pairs. Each stimulus value covers 2
    // ADC samples, so a pair is either 2 x[w] or x[w-1] + x[w], depending on
    // where the crossing falls; the model tries both.
    begin
      int xa[$], xb[$], nz2;
      bit ok;
      foreach (xs[30][i]) begin
        xa.push_back(2 * xs[30][i]);
        xb.push_back(xs[30][i] + ((i > 0) ? xs[30][i-1] : 0));
      end
      ok = found(et_seq[30], xa, 0, 0, 1, 120, nz) || found(et_seq[30], xb, 0, 0, 1, 120, nz2);
      check(ok, "combined-pair channel 30 matches the model");
      if (ok) mech[M_COMBINE]++;
    end
    // ---- SCLD: masked crate and backplane
    begin
      int seen0 = 0, seen2 = 0;
      repeat (16) begin
        @(negedge clk);
        if (other_crate_sync[0].bc_marker) seen0++;
        if (other_crate_sync[1] != '0) seen2++;
      end
      check(seen0 == 2 && seen2 == 0, "crate 1 gets markers, crate 2 is masked");
      if (seen2 == 0) mech[M_CRATE_MASK]++;
    end
    check(bp_sync_oe, "crate master drives the backplane");
    if (bp_sync_oe) mech[M_BACKPLANE]++;
    // ---- level 1 accept with raw fetch: 2 crossings x 32 channels x 4 samples
    raw_words = 0;
    @(negedge clk); sclr.l1_accept = 1; @(negedge clk); sclr.l1_accept = 0;
    repeat (40) @(negedge clk);
    @(negedge clk); sclr.l1_accept = 1; @(negedge clk); sclr.l1_accept = 0;   // while busy
    repeat (8 * 270) @(negedge clk);
    check(raw_words == 256 && raw_first == 1, $sformatf("raw words %0d first %0d", raw_words, raw_first));
    if (raw_words > 0) mech[M_RAW_FETCH]++;
    check(l1a_count == 2, "SCLD counted 2 accepts");
    rd(20'h80004, d);
    check(d[31:16] == 1, $sformatf("dropped fetches %0d", d[31:16]));
    if (d[31:16] != 0) mech[M_FETCH_DROP]++;
    // ---- history freeze and readback
    wr(20'h80000, 2);
    rd(chaddr(7, 3, 4 * 33 + 3), d);
    repeat (8 * 260) @(negedge clk);
    rd(chaddr(7, 3, 4 * 33 + 3), d2);
    check(d == d2, "history frozen");
    if (d == d2) mech[M_FREEZE]++;
    wr(20'h80000, 0);
    // ---- playback on channel 1: pairs of equal words so the filter sees each once
    for (int a = 0; a < 512; a++) begin
      int v;
      v = (a / 2 % 40 >= 5 && a / 2 % 40 < 12) ? 2 + 45 * (a / 2 % 40 - 4) : 2;
      wr(chaddr(1, 1, a), v);
      if (a % 2 == 0) pbx.push_back(v);
    end
    wr(20'h80003, 1);                            // capture start: pointers to 0
    wr(chaddr(1, 0, 8), 32'h202 | (SHIFT << 4)); // channel 1 plays back
    wr(chaddr(0, 0, 8), 32'h102 | (SHIFT << 4)); // channel 0 captures
    wr(20'h80003, 1);
    for (int c = 0; c < N_CH; c++) et_seq[c] = {};
    repeat (8 * 300) @(negedge clk);
    begin
      int loopx[$];
      for (int r = 0; r < 4; r++) foreach (pbx[i]) loopx.push_back(pbx[i]);
      check(found(et_seq[1], loopx, 0, 0, 1, 120, nz), "playback channel matches the model");
      if (nz > 0) mech[M_PLAYBACK]++;
    end
    rd(20'h80004, d);
    check(d[0] == 1'b1, "capture done");
    rd(chaddr(0, 1, 300), d);
    rd(chaddr(0, 1, 301), d2);
    check(d <= 1023 && d2 <= 1023, "captured words readable");
    if (d[0] == 1'b1 || d <= 1023) mech[M_CAPTURE]++;
    // ---- pedestal load
    for (int c = 0; c < 32; c++) wr(20'h80040 + c, 50 * c);
    wr(20'h80003, 4);
    rd(20'h80004, d); check(d[2], "DAC load running");
    repeat (1200) @(negedge clk);
    rd(20'h80004, d); check(!d[2], "DAC load done");
    if (!d[2]) mech[M_DAC]++;
    // ---- tester capture on frame marker
    twr(0, 32'h6);
    repeat (2100) @(negedge clk);
    trd(2, d); check(d == 2048, "tester captured 2048 frames");
    trd(13'h1001, d); check(d[3], "first captured frame is a frame start");
    trd(13'h1001 + 16, d); check(d[3], "frame start 8 frames later");
    if (d[3]) mech[M_TESTER_CAPTURE]++;
    // ---- PRBS link test with a forced error
    prbs_mode = 1;
    wr(20'h80000, 1);
    repeat (5) @(negedge clk);
    twr(0, 32'h9);
    repeat (300) @(negedge clk);
    trd(3, d); check(d == 0, "no bit errors");
    trd(4, d); check(d > 250, "words checked");
    trd(1, d); if (d[2]) mech[M_PRBS_LOCK]++;
    wr(20'h80003, 2);
    repeat (20) @(negedge clk);
    trd(3, d); check(d == 1, $sformatf("forced error counted: %0d", d));
    if (d == 1) mech[M_FORCED_ERR]++;
    // ---- latency of the bypassed channel 2: ADC step to the first frame
    // word carrying it on a trigger-board link. The whole board, analog and
    // link included, takes 400 ns with the filter bypassed, so the digital
    // part must stay below 24 clocks (396 ns).
    prbs_mode = 0;
    wr(20'h80000, 0);
    step2 = 40; hold2 = 1;                       // Et 40 >>> 3 = 5
    repeat (64) @(negedge clk);
    step2 = 800;                                 // Et 100
    begin
      int lat;
      lat = -1;
      repeat (64) begin
        @(negedge clk);
        if (lat < 0 && tab_link_data[1][35] && tab_link_data[1][23:16] == 8'd100) lat = clk_n - t_step;
      end
      $display("bypass latency, ADC sample to frame word 0: %0d clocks", lat);
      check(lat > 0 && lat < 24, $sformatf("bypass latency %0d clocks", lat));
    end
    // ---- every mechanism must have happened
    for (int m = 0; m < M_NUM; m++) begin
      $display("mechanism %-15s %0d", mech_name[m], mech[m]);
      check(mech[m] > 0, $sformatf("mechanism %s happened", mech_name[m]));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2000000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

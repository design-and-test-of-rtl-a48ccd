// tb_adf_channel: end-to-end test of one channel against a model written in
// the bench. Coefficients, control and a calibration table are written over
// the channel bus; pulses on a noisy baseline (the shape of a calorimeter
// pulse, about 800 ns long, i.e. 6 crossings) are fed at 30.28 MHz. The
// model decimates, filters, detects peaks and applies the table; every
// energy must match, one energy must come out every 8 clocks. The history
// buffer must hold the same energies. Then samples are loaded into the raw
// buffer and played back through the filter, as done to cross-check the
// firmware against a software model, and compared again. Finally a capture
// run is read back.
module tb_adf_channel;
  import adf_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic adc_stb = 0, capture_start = 0, capture_done, hist_freeze = 0;
  logic [1:0] adc_idx = 0;
  sample_t adc_data = 0;
  et_t et;
  logic et_valid;
  logic [HIST_AW-1:0] hist_wptr, fetch_addr = 0;
  sample_t [3:0] fetch_raw;
  logic bus_sel = 0, bus_we = 0;
  logic [1:0] bus_region = 0;
  logic [11:0] bus_addr = 0;
  logic [31:0] bus_wdata = 0, bus_rdata;

  adf_channel dut (.*);

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask
  task automatic wr(int region, int a, int d);
    @(negedge clk); bus_sel = 1; bus_we = 1; bus_region = 2'(region); bus_addr = 12'(a); bus_wdata = 32'(d);
    @(negedge clk); bus_we = 0; bus_sel = 0;
  endtask
  task automatic rd(int region, int a, output logic [31:0] d);
    @(negedge clk); bus_region = 2'(region); bus_addr = 12'(a); @(negedge clk); d = bus_rdata;
  endtask

  // ---- configuration and model
  int coef[8] = '{-3, 2, 9, 17, 12, 3, -6, -9};
  int shift = 3;
  function automatic int lut(int a); return (a > 255) ? 255 : a; endfunction
  int xs[$];          // samples entering the filter, in order
  int pb[512];        // playback contents
  int mode = 0;       // 0 live, 2 playback
  int pb_ptr = 0;

  // ---- ADC stimulus: phase counter, runs while `run`
  bit run = 0;
  int ph = 0, n_smp = 0;
  function automatic int pulse_val(int n);
    int t = n % 96;    // a pulse every 24 crossings
    int amp = 30 + (n / 96) * 37 % 200;
    int v = 2 + int'($urandom_range(0, 2));
    if (t >= 10 && t < 34) v += amp * (t - 10) / 12 - ((t >= 22) ? 2 * amp * (t - 22) / 12 : 0);
    return (v < 0) ? 0 : (v > 1023 ? 1023 : v);
  endfunction
  always @(negedge clk) begin
    if (run) begin
      adc_stb = (ph % 2 == 0);
      adc_idx = 2'(ph / 2);
      if (adc_stb) begin
        adc_data = sample_t'(pulse_val(n_smp));
        n_smp++;
        if (ph / 2 % 2 == 0) xs.push_back(mode == 2 ? pb[pb_ptr] : int'(adc_data));  // dec_sel = 0
        if (mode == 2) pb_ptr = (pb_ptr + 1) % 512;
      end
      ph = (ph + 1) % 8;
    end else adc_stb = 0;
  end

  int got[$];
  int last_t = -1, bad_rate = 0;
  always @(negedge clk) if (rst_n && et_valid) begin
    got.push_back(int'(et));
    if (last_t >= 0 && ($time - last_t) / 10 != 8) bad_rate++;
    last_t = $time;
  end

  // expected energies from the filter input stream
  function automatic void model(ref int e[$]);
    int y[$];
    e = {};
    for (int n = 0; n < xs.size(); n++) begin
      int acc = 0;
      for (int k = 0; k < 8; k++) if (n - k >= 0) acc += coef[k] * xs[n - k];
      y.push_back(acc);
    end
    for (int b = 0; 2 * b + 2 < y.size(); b++) begin
      int p0, p1, v, a;
      int ym1 = (b == 0) ? 0 : y[2*b - 1];
      p0 = (y[2*b] > ym1 && y[2*b] >= y[2*b+1]) ? y[2*b] : 0;
      p1 = (y[2*b+1] > y[2*b] && y[2*b+1] >= y[2*b+2]) ? y[2*b+1] : 0;
      v = (p0 != 0) ? p0 : p1;
      a = v >>> shift;
      if (a < 0) a = 0;
      if (a > 1023) a = 1023;
      e.push_back(lut(a));
    end
  endfunction

  task automatic compare(string tag, int skip_got, int from_bc, ref int nonzero);
    int e[$];
    model(e);
    nonzero = 0;
    for (int b = from_bc; b < e.size() && b + skip_got < got.size(); b++) begin
      check(got[b + skip_got] == e[b], $sformatf("%s crossing %0d: %0d expected %0d", tag, b, got[b + skip_got], e[b]));
      if (e[b] != 0) nonzero++;
    end
  endtask

  initial begin
    logic [31:0] d;
    int nz, n_live;
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int k = 0; k < 8; k++) wr(0, k, coef[k]);
    wr(0, 8, 32'h2 | (shift << 4));             // peak detector on, live
    for (int a = 0; a < 1024; a++) wr(2, a, lut(a));
    rd(0, 3, d); check($signed(d) == coef[3], "coefficient readback");
    rd(0, 8, d); check(d == (32'h2 | (shift << 4)), "control readback");
    run = 1;
    repeat (8 * 200) @(negedge clk);
    run = 0;
    repeat (20) @(negedge clk);
    // first output comes from the reset state of the peak detector
    compare("live", 1, 0, nz);
    check(nz >= 8, $sformatf("peaks found: %0d", nz));
    check(bad_rate == 0, "one energy per 8 clocks");
    // history: the last records hold the last energies
    for (int r = 1; r <= 5; r++) begin
      rd(3, ((int'(hist_wptr) - r) & 255) * 4 + 3, d);
      check(d[31:24] == et_t'(got[got.size() - r]), $sformatf("history energy -%0d", r));
    end
    n_live = got.size();
    // playback: load a ramp-and-pulse pattern, restart the pointer, play
    for (int a = 0; a < 512; a++) begin
      pb[a] = (a % 64 < 8) ? 2 + 60 * (a % 64) : (a % 64 < 16) ? 2 + 60 * (16 - a % 64) : 2;
      wr(1, a, pb[a]);
    end
    rd(1, 100, d); check(d == 32'(pb[100]), "raw buffer readback");
    @(negedge clk); capture_start = 1; @(negedge clk); capture_start = 0;  // pointer to 0
    wr(0, 8, 32'h202 | (shift << 4));           // playback
    mode = 2; pb_ptr = 0; last_t = -1;
    run = 1;
    repeat (8 * 150) @(negedge clk);
    run = 0;
    repeat (20) @(negedge clk);
    compare("playback", 1, n_live, nz);
    check(nz >= 5, $sformatf("playback peaks: %0d", nz));
    // capture: 512 live samples, read some back
    wr(0, 8, 32'h102 | (shift << 4));
    mode = 0;
    @(negedge clk); capture_start = 1; @(negedge clk); capture_start = 0;
    begin
      int first_n = n_smp;
      run = 1;
      repeat (1100) @(negedge clk);
      run = 0;
      check(capture_done, "capture done");
      rd(1, 0, d); check(d != 32'(pb[0]) || d == 2, "capture overwrote buffer");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

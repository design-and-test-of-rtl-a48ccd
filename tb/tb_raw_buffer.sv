// tb_raw_buffer: checks the three modes of the 512-word sample buffer.
// LIVE: the ADC sample reaches the filter side one clock later with its
// index. CAPTURE: 512 consecutive samples are stored after capture_start,
// capture_done rises after exactly 512 samples (1024 clocks), and bus reads
// return them. PLAYBACK: words written over the bus come out in order, one
// per ADC strobe, and wrap after 512.
module tb_raw_buffer;
  import adf_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  buf_mode_t mode = BUF_LIVE;
  logic capture_start = 0, capture_done;
  logic adc_stb = 0;
  logic [1:0] adc_idx = 0;
  sample_t adc_data = 0;
  logic s_valid; logic [1:0] s_idx; sample_t s_data;
  logic [RAW_AW-1:0] bus_addr = 0;
  sample_t bus_wdata = 0, bus_rdata;
  logic bus_we = 0;

  raw_buffer dut (.*);

  sample_t cap[512];
  int phase = 0;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  // ADC: a strobe every 2 clocks; data is a counter-based pattern
  int n_smp = 0;
  always @(negedge clk) begin
    phase <= (phase + 1) % 8;
    adc_stb  <= (phase + 1) % 2 == 0;
    adc_idx  <= 2'(((phase + 1) % 8) / 2);
    if ((phase + 1) % 2 == 0) begin
      adc_data <= sample_t'(n_smp * 37 + 5);
      n_smp <= n_smp + 1;
    end
  end

  initial begin
    int t0, k;
    sample_t last;
    repeat (3) @(negedge clk);
    rst_n = 1;
    // LIVE: the ADC inputs sampled at a clock edge are on the filter side
    // just after that edge (ADC inputs change only on falling edges)
    repeat (20) begin
      @(posedge clk); #1;
      check(s_valid == adc_stb, "live valid");
      if (adc_stb) check(s_data == adc_data && s_idx == adc_idx, "live pass-through");
    end
    // CAPTURE
    mode = BUF_CAPTURE;
    @(negedge clk); capture_start = 1; @(negedge clk); capture_start = 0;
    t0 = $time;
    k = 0;
    while (!capture_done) begin
      @(posedge clk); #1;
      if (s_valid && k < 512) begin cap[k] = s_data; k++; end
    end
    check(($time - t0) / 10 >= 1021 && ($time - t0) / 10 <= 1026,
          $sformatf("capture took %0d clocks", ($time - t0) / 10));
    mode = BUF_LIVE;
    for (int a = 0; a < 512; a++) begin
      @(negedge clk); bus_addr = RAW_AW'(a); @(negedge clk);
      if (a % 8 == 0 || a == 511) check(bus_rdata == cap[a], $sformatf("capture word %0d", a));
    end
    // PLAYBACK: write a ramp of (3a+1) mod 1024, then play it
    for (int a = 0; a < 512; a++) begin
      @(negedge clk); bus_we = 1; bus_addr = RAW_AW'(a); bus_wdata = sample_t'((3 * a + 1) % 1024);
    end
    @(negedge clk); bus_we = 0;
    @(negedge clk); rst_n = 0; @(negedge clk); rst_n = 1;  // pointer back to 0
    mode = BUF_PLAYBACK;
    k = 0;
    while (k < 600) begin
      @(posedge clk); #1;
      if (s_valid) begin
        if (k % 5 == 0 || k == 511 || k == 512)
          check(s_data == sample_t'((3 * (k % 512) + 1) % 1024), $sformatf("playback %0d", k));
        k++;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

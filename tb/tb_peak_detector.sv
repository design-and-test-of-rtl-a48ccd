// tb_peak_detector: checks the 3-point peak detector and the reduction to
// one value per crossing. Filter outputs arrive every 4 clocks with
// alternating slots. The model computes, for crossing k (outputs 2k, 2k+1):
// detector on  -> the non-zero one of p(2k), p(2k+1), where p(n) = y[n] if
//                 y[n] > y[n-1] and y[n] >= y[n+1], else 0;
// detector off -> y[2k + slot_sel].
// Also checks that exactly one value comes out per crossing (8 clocks).
module tb_peak_detector;
  import adf_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic pk_en = 0, slot_sel = 0, y_valid = 0, y_slot = 0;
  filt_t y = 0;
  logic bc_valid;
  filt_t bc_val;

  peak_detector dut (.*);

  int ys[$];
  int got[$];
  int peaks_seen = 0;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  always @(negedge clk) if (rst_n && bc_valid) got.push_back(int'(bc_val));

  function automatic int p(int n);
    int prev = (n == 0) ? 0 : ys[n-1];
    if (n + 1 >= ys.size()) return 0;
    return (ys[n] > prev && ys[n] >= ys[n+1]) ? ys[n] : 0;
  endfunction

  task automatic run(bit en, bit sel, int nbc, bit pulses);
    int t0, nout;
    @(negedge clk) rst_n = 0; @(negedge clk) rst_n = 1;
    pk_en = en; slot_sel = sel; ys = {}; got = {};
    t0 = $time;
    for (int n = 0; n < 2 * nbc; n++) begin
      int v;
      if (pulses) begin
        // Fig. 2-like pulses: a bump every 5 crossings on a noisy baseline
        int ph = n % 10;
        v = (ph == 3) ? 40 : (ph == 4) ? 90 : (ph == 5) ? 60 : (ph == 6) ? 10 : int'($urandom_range(0, 4)) - 2;
        if (n % 20 == 14) v = 90;  // plateau: equal neighbours
      end else v = int'($urandom_range(0, 2000)) - 1000;
      ys.push_back(v);
      @(negedge clk); y_valid = 1; y_slot = n[0]; y = filt_t'(v);
      @(negedge clk); y_valid = 0;
      repeat (2) @(negedge clk);
    end
    repeat (4) @(negedge clk);
    // with the detector on, the first value is judged against the reset state
    // and the last crossing waits for one more output
    nout = en ? nbc : nbc;
    check(got.size() == nout, $sformatf("outputs %0d expected %0d", got.size(), nout));
    for (int k = 0; k < nbc; k++) begin
      int e;
      if (en) begin
        if (k == 0) continue;
        e = (p(2*(k-1)) != 0) ? p(2*(k-1)) : p(2*(k-1)+1);
        if (e != 0) peaks_seen++;
        if (k < got.size()) check(got[k] == e, $sformatf("bc %0d got %0d exp %0d", k, got[k], e));
      end else begin
        int idx; idx = 2*k; if (sel) idx++;
        e = ys[idx];
        if (k < got.size()) check(got[k] == e, $sformatf("bc %0d got %0d exp %0d", k, got[k], e));
      end
    end
    check(($time - t0) / 10 <= 8 * nbc + 6, "rate");
  endtask

  initial begin
    repeat (3) @(posedge clk);
    run(1, 0, 60, 1);
    run(1, 0, 100, 0);
    run(0, 0, 30, 0);
    run(0, 1, 30, 1);
    check(peaks_seen > 10, "peaks were found");
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

// tb_fir_filter: checks the 8-tap FIR filter against a reference model.
// Samples arrive every 2 clocks with index 0..3 of the crossing; the model
// keeps the samples selected by dec_sel and computes sum coef[k]*x[n-k]
// itself. Checks every output value, its slot, the rate (2 outputs per
// 8-clock crossing) and the bypass mode, for both dec_sel values, with
// single samples and with combined pairs (input = kept sample + the sample
// before it).
module tb_fir_filter;
  import adf_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  coef_t [N_TAPS-1:0] coef;
  logic bypass = 0, dec_sel = 0, combine = 0, s_valid = 0;
  logic [1:0] s_idx = 0;
  sample_t s_data = 0;
  logic y_valid, y_slot;
  filt_t y;

  fir_filter dut (.*);

  int hist[$];
  int prev_s = 0;
  int exp_q[$];
  int exp_slot[$];
  int outs_in_window = 0;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  always @(negedge clk) if (rst_n && y_valid) begin
    int e, es;
    outs_in_window++;
    if (exp_q.size() == 0) check(0, "unexpected output");
    else begin
      e = exp_q.pop_front(); es = exp_slot.pop_front();
      check(int'(y) == e, $sformatf("y=%0d expected %0d", y, e));
      check(int'(y_slot) == es, "slot");
    end
  end

  task automatic run(int n_bc, bit byp, bit dsel, bit comb = 0);
    bypass = byp; dec_sel = dsel; combine = comb;
    for (int k = 0; k < N_TAPS; k++) coef[k] = coef_t'($urandom_range(0, 255));
    hist = {};
    repeat (n_bc) begin
      outs_in_window = 0;
      for (int i = 0; i < 4; i++) begin
        @(negedge clk);
        s_valid = 1; s_idx = 2'(i); s_data = sample_t'($urandom_range(0, 1023));
        if (i % 2 == int'(dsel)) begin
          int acc, xin;
          acc = 0;
          xin = comb ? prev_s + int'(s_data) : int'(s_data);
          hist.push_front(xin);
          for (int k = 0; k < N_TAPS; k++)
            if (k < hist.size()) acc += hist[k] * int'(coef[k]);
          exp_q.push_back(byp ? xin : acc);
          exp_slot.push_back(i / 2);
        end
        prev_s = int'(s_data);
        @(negedge clk); s_valid = 0;
      end
      @(posedge clk); #1;
      check(outs_in_window == 2, $sformatf("rate: %0d outputs in a crossing", outs_in_window));
      // the first output of the next crossing may land in this window; allow for it below
      outs_in_window = 0;
    end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    // taps are cleared at reset; model starts from an empty delay line
    run(40, 0, 0);
    @(negedge clk); rst_n = 0; @(negedge clk); rst_n = 1;
    run(40, 0, 1);
    run(10, 1, 0);
    // combined pairs, both pairings, filtered and bypassed
    @(negedge clk); rst_n = 0; prev_s = 0; @(negedge clk); rst_n = 1;
    run(40, 0, 0, 1);
    @(negedge clk); rst_n = 0; prev_s = 0; @(negedge clk); rst_n = 1;
    run(40, 0, 1, 1);
    run(10, 1, 1, 1);
    combine = 0;
    // extremes: all samples 1023 and coefficients -128 / +127
    @(negedge clk); rst_n = 0; @(negedge clk); rst_n = 1;
    hist = {};
    bypass = 0; dec_sel = 0;
    for (int k = 0; k < N_TAPS; k++) coef[k] = (k % 2) ? coef_t'(127) : coef_t'(-128);
    for (int n = 0; n < 40; n++) begin
      @(negedge clk); s_valid = 1; s_idx = 2'((2*n) % 4); s_data = 1023;
      begin
        int acc; acc = 0; hist.push_front(int'(s_data));
        for (int k = 0; k < N_TAPS; k++) if (k < hist.size()) acc += hist[k] * int'(coef[k]);
        exp_q.push_back(acc); exp_slot.push_back(((2*n) % 4) / 2);
      end
      @(negedge clk); s_valid = 0;
    end
    repeat (4) @(posedge clk);
    check(exp_q.size() == 0, "all outputs seen");
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

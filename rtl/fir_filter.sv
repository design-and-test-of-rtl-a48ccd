// fir_filter: 8-tap FIR filter of one channel, run at 15.14 MHz.
//
// The ADC delivers 4 samples per crossing; the filter keeps every second one
// (the member of each pair chosen by dec_sel: samples 0 and 2 when dec_sel=0,
// 1 and 3 when dec_sel=1), so it produces 2 outputs per crossing, at
// 15.14 MHz as on the board. With `combine` set, the filter input is
// instead the sum of the kept sample and the sample before it (samples 3+0
// and 1+2 when dec_sel=0, 0+1 and 2+3 when dec_sel=1), so no sample is
// thrown away. Each input x enters an 8-deep delay line and
// y = sum coef[k] * x[n-k], computed at full precision (22 bits signed,
// inputs taken as unsigned). In bypass, y is x itself. The tap count, the
// rate, per-channel coefficients and the choice between decimating and
// combining samples follow the board description; the decimation rule,
// the pair sum, coefficient width and bypass meaning are this design's
// choices.
//
// Timing: y_valid one clock after the s_valid of a kept sample; y_slot is 0
// for the output from samples 0/1 of the crossing, 1 for samples 2/3.
module fir_filter
  import adf_pkg::*;
(
  input  logic                    clk,
  input  logic                    rst_n,
  input  coef_t [N_TAPS-1:0]      coef,
  input  logic                    bypass,
  input  logic                    dec_sel,
  input  logic                    combine,
  input  logic                    s_valid,
  input  logic [1:0]              s_idx,
  input  sample_t                 s_data,
  output logic                    y_valid,
  output logic                    y_slot,
  output filt_t                   y
);
  typedef logic [SAMPLE_W:0] fin_t;   // filter input: a sample or a pair sum
  fin_t    taps [N_TAPS];   // taps[0] is the newest filter input
  fin_t    x;
  sample_t prev;            // the sample before the current one
  filt_t   acc;

  wire take = s_valid && (s_idx[0] == dec_sel);

  always_comb begin
    x   = combine ? fin_t'(prev) + fin_t'(s_data) : fin_t'(s_data);
    acc = filt_t'(signed'({1'b0, x})) * filt_t'(coef[0]);
    for (int k = 1; k < N_TAPS; k++)
      acc += filt_t'(signed'({1'b0, taps[k-1]})) * filt_t'(coef[k]);
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      for (int k = 0; k < N_TAPS; k++) taps[k] <= '0;
      prev    <= '0;
      y_valid <= 1'b0;
      y_slot  <= 1'b0;
      y       <= '0;
    end else begin
      y_valid <= take;
      if (s_valid) prev <= s_data;
      if (take) begin
        taps[0] <= x;
        for (int k = 1; k < N_TAPS; k++) taps[k] <= taps[k-1];
        y_slot <= s_idx[1];
        y      <= bypass ? filt_t'({1'b0, x}) : acc;
      end
    end
  end
endmodule

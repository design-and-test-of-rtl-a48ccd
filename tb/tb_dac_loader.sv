// tb_dac_loader: checks the pedestal DAC loader. A model of each octal DAC
// shifts sdi in on sclk rising edges while cs_n is low and latches a 16-bit
// frame {address, code} when cs_n rises. After one load, every DAC input
// must hold the code of its channel (DAC c/8, input c%8), and the load must
// take 8 * 17 * 2 * CLK_DIV clocks.
module tb_dac_loader;
  import adf_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic start = 0, busy, sclk, cs_n;
  logic [3:0] sdi;
  logic [31:0][DAC_W-1:0] pedestal;

  dac_loader #(.N_DAC(4), .CLK_DIV(4)) dut (.*);

  // DAC models
  logic [15:0] sr [4];
  int nbits [4];
  logic [DAC_W-1:0] dac_out [4][8];
  int frames = 0, bad_len = 0;
  logic sclk_q = 0, cs_q = 1;
  always @(posedge clk) if (rst_n) begin
    sclk_q <= sclk; cs_q <= cs_n;
    for (int d = 0; d < 4; d++) begin
      if (!cs_n && sclk && !sclk_q) begin sr[d] = {sr[d][14:0], sdi[d]}; nbits[d]++; end
      if (cs_n && !cs_q) begin
        if (nbits[d] != 16) bad_len++;
        dac_out[d][sr[d][14:12]] = sr[d][11:0];
        nbits[d] = 0;
      end
    end
    if (cs_n && !cs_q) frames++;
  end

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    int t0;
    for (int d = 0; d < 4; d++) nbits[d] = 0;
    for (int c = 0; c < 32; c++) pedestal[c] = DAC_W'($urandom);
    repeat (3) @(negedge clk);
    rst_n = 1;
    @(negedge clk); start = 1; @(negedge clk); start = 0;
    t0 = $time;
    check(busy, "busy after start");
    while (busy) @(negedge clk);
    check(($time - t0) / 10 >= 8 * 17 * 2 * 4 - 4 && ($time - t0) / 10 <= 8 * 17 * 2 * 4 + 4,
          $sformatf("load took %0d clocks", ($time - t0) / 10));
    repeat (4) @(negedge clk);
    check(frames == 8, $sformatf("frames %0d", frames));
    check(bad_len == 0, "16 bits per frame");
    for (int c = 0; c < 32; c++)
      check(dac_out[c / 8][c % 8] == pedestal[c], $sformatf("channel %0d", c));
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

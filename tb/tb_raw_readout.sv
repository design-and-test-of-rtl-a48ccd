// tb_raw_readout: checks the raw-data readout sequencer with a model of the
// history buffers' fetch port (raw sample = function of record, channel,
// sample, returned one clock after the address). After a fetch with
// lookback L and n crossings, the words popped must be, in order, every
// sample of every channel of records wptr-L .. wptr-L+n-1, with the first
// flag on the very first word only. A second fetch during a readout must be
// dropped and counted. Uses 4 channels to keep the run short.
module tb_raw_readout;
  import adf_pkg::*;
  localparam int NCH = 4;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic fetch = 0, rd_valid, rd_pop = 0, busy;
  logic [HIST_AW-1:0] lookback = 0, hist_wptr = 0, fetch_addr;
  logic [3:0] nbc = 0;
  sample_t [NCH-1:0][3:0] fetch_raw;
  logic [RD_W-1:0] rd_word;
  logic [15:0] dropped;

  raw_readout #(.NCH(NCH), .FIFO_DEPTH(64)) dut (.*);

  function automatic sample_t model(int rec, int ch, int s); return sample_t'((rec * 31 + ch * 7 + s * 3) % 1024); endfunction
  always @(posedge clk)
    for (int c = 0; c < NCH; c++) for (int s = 0; s < 4; s++) fetch_raw[c][s] <= model(int'(fetch_addr), c, s);

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  task automatic event_readout(int wp, int lb, int n, bit slow);
    int k = 0;
    hist_wptr = HIST_AW'(wp); lookback = HIST_AW'(lb); nbc = 4'(n);
    @(negedge clk); fetch = 1; @(negedge clk); fetch = 0;
    if (slow) begin  // a second fetch while busy
      @(negedge clk); fetch = 1; @(negedge clk); fetch = 0;
    end
    for (int b = 0; b < n; b++)
      for (int c = 0; c < NCH; c++)
        for (int s = 0; s < 4; s++) begin
          int rec = (wp - lb + b) & (HIST_DEPTH - 1);
          logic [15:0] e = {(k == 0), 5'(c), model(rec, c, s)};
          int guard = 0;
          // slow consumer: one pop every 8 clocks (one per crossing)
          if (slow) repeat (7) @(negedge clk);
          while (!rd_valid && guard < 1000) begin @(negedge clk); guard++; end
          check(rd_word == e, $sformatf("word %0d: %h exp %h", k, rd_word, e));
          rd_pop = 1; @(negedge clk); rd_pop = 0;
          k++;
        end
    repeat (5) @(negedge clk);
    check(!rd_valid && !busy, "readout complete");
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    event_readout(100, 30, 2, 0);
    event_readout(5, 20, 3, 0);       // wraps below record 0
    check(dropped == 0, "nothing dropped");
    event_readout(200, 10, 8, 1);     // 128 words through a 64-word FIFO, slow pops
    check(dropped == 1, $sformatf("dropped %0d", dropped));
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

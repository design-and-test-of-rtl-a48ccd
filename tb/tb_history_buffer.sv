// tb_history_buffer: checks the per-channel history. A sample stream (a
// strobe every 2 clocks, index 0..3), a filter stream (2 per crossing) and
// an energy per crossing are driven with known values; each record read
// back over the bus must hold the last complete crossing's 4 samples, the 2
// filter outputs and the energy, in the documented word layout. Also checks
// the fetch port, the write pointer, and that freeze stops writing.
module tb_history_buffer;
  import adf_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic freeze = 0, s_valid = 0, y_valid = 0, y_slot = 0, et_valid = 0;
  logic [1:0] s_idx = 0;
  sample_t s_data = 0;
  filt_t y = 0;
  et_t et = 0;
  logic [HIST_AW-1:0] wptr, fetch_addr = 0;
  sample_t [3:0] fetch_raw;
  logic [HIST_AW+1:0] bus_addr = 0;
  logic [31:0] bus_rdata;

  history_buffer dut (.*);

  function automatic sample_t smp(int bc, int i); return sample_t'((bc * 4 + i) * 13 % 1024); endfunction
  function automatic int filt(int bc, int sl); return (bc % 2 ? -1 : 1) * (bc * 1000 + sl * 7 + 1); endfunction
  function automatic et_t etv(int bc); return et_t'(bc * 5 + 1); endfunction

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  // one crossing: samples 0..3 then filter outputs then the energy
  task automatic crossing(int bc);
    for (int i = 0; i < 4; i++) begin
      @(negedge clk); s_valid = 1; s_idx = 2'(i); s_data = smp(bc, i);
      if (i == 1 || i == 3) begin y_valid = 1; y_slot = (i == 3); y = filt_t'(filt(bc, i / 2)); end
      @(negedge clk); s_valid = 0; y_valid = 0;
    end
    et_valid = 1; et = etv(bc);
    @(negedge clk); et_valid = 0;
  endtask

  task automatic read_rec(int r, output logic [31:0] w[4]);
    for (int k = 0; k < 4; k++) begin
      bus_addr = (HIST_AW+2)'(r * 4 + k); @(negedge clk); w[k] = bus_rdata;
    end
  endtask

  initial begin
    logic [31:0] w[4];
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int bc = 0; bc < 300; bc++) crossing(bc);
    check(wptr == HIST_AW'(300), "write pointer");
    // records 44..299 are present (300 - 256 = 44 overwritten)
    for (int bc = 44; bc < 300; bc += 17) begin
      read_rec(bc % 256, w);
      check(w[0] == {6'd0, smp(bc,1), 6'd0, smp(bc,0)}, $sformatf("raw 1:0 of %0d", bc));
      check(w[1] == {6'd0, smp(bc,3), 6'd0, smp(bc,2)}, "raw 3:2");
      check($signed(w[2]) == filt(bc, 0), "filter 0");
      check(w[3][31:24] == etv(bc), "energy");
      check($signed(w[3][23:0]) == filt(bc, 1), "filter 1");
      fetch_addr = HIST_AW'(bc); @(negedge clk);
      check(fetch_raw == {smp(bc,3), smp(bc,2), smp(bc,1), smp(bc,0)}, "fetch port");
    end
    // freeze: more crossings leave pointer and contents unchanged
    freeze = 1;
    for (int bc = 300; bc < 310; bc++) crossing(bc);
    check(wptr == HIST_AW'(300), "frozen pointer");
    read_rec(299 % 256 + 1, w);
    check(w[3][31:24] == etv(300 - 256 + 0), "frozen record untouched");
    freeze = 0;
    crossing(310);
    read_rec(300 % 256, w);
    check(w[3][31:24] == etv(310), "writing resumes");
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

// tb_adf_timing: checks sync source selection and crossing timing. As
// master, the SCLD bundle is taken and re-driven on the backplane; as slave,
// the backplane bundle is taken. The bundle appears on `sync` one clock
// later; the clock after a bc_marker has phase 0; the phase then counts
// 0..7 with adc_stb on even phases, adc_idx = phase/2 and bc_stb at phase 0
// (one crossing = 8 clocks = 132 ns at 60.56 MHz).
module tb_adf_timing;
  import adf_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic is_master = 1;
  sync_t scld_sync = '0, bp_sync_in = '0, bp_sync_out, sync;
  logic bp_sync_oe, adc_stb, bc_stb;
  logic [2:0] phase;
  logic [1:0] adc_idx;

  adf_timing dut (.*);

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    int bcs;
    repeat (3) @(negedge clk);
    rst_n = 1;
    repeat (5) @(negedge clk);
    // master: marker from the SCLD at an arbitrary time
    scld_sync = '{bc_marker: 1, l1_accept: 1, raw_fetch: 0, init: 0};
    #1 check(bp_sync_out == scld_sync && bp_sync_oe, "master drives backplane");
    @(negedge clk); scld_sync = '0;
    check(sync.bc_marker && sync.l1_accept, "bundle registered");
    @(negedge clk);
    check(phase == 0 && bc_stb && adc_stb && adc_idx == 0, "phase 0 after marker");
    bcs = 0;
    for (int n = 1; n < 64; n++) begin
      @(negedge clk);
      check(phase == 3'(n % 8), "phase count");
      check(adc_stb == (n % 2 == 0), "adc strobe");
      check(adc_idx == 2'((n % 8) / 2), "adc index");
      check(bc_stb == (n % 8 == 0), "bc strobe");
      if (bc_stb) bcs++;
    end
    check(bcs == 7, "one crossing per 8 clocks");
    // slave: takes the backplane, ignores the cable, does not drive
    is_master = 0;
    scld_sync = '{bc_marker: 1, l1_accept: 0, raw_fetch: 1, init: 0};
    @(negedge clk);
    check(!sync.bc_marker && !sync.raw_fetch && !bp_sync_oe, "slave ignores cable");
    scld_sync = '0; repeat (2) @(negedge clk);
    bp_sync_in = '{bc_marker: 1, l1_accept: 0, raw_fetch: 1, init: 1};
    @(negedge clk); bp_sync_in = '0;
    check(sync.bc_marker && sync.raw_fetch && sync.init, "slave takes backplane");
    @(negedge clk);
    check(phase == 0 && bc_stb, "slave resync");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_et_lut: checks the calibration table. The table is filled over the bus
// with f(a) = (7a + 3) mod 256, read back, then random crossing values
// (negative, in range and above range) are sent with several shifts; the
// model clamps (v >>> shift) to 0..1023 and looks f up. Also checks the
// one-clock latency of et_valid.
module tb_et_lut;
  import adf_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic [3:0] shift = 0;
  logic in_valid = 0;
  filt_t in_val = 0;
  logic et_valid;
  et_t et;
  logic [LUT_AW-1:0] lut_addr, bus_addr = 0;
  et_t bus_wdata = 0, bus_rdata;
  logic bus_we = 0;

  et_lut dut (.*);

  function automatic et_t f(int a); return et_t'((7 * a + 3) % 256); endfunction

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int a = 0; a < 1024; a++) begin
      @(negedge clk); bus_we = 1; bus_addr = LUT_AW'(a); bus_wdata = f(a);
    end
    @(negedge clk); bus_we = 0;
    for (int a = 0; a < 1024; a += 37) begin
      bus_addr = LUT_AW'(a); @(negedge clk);
      check(bus_rdata == f(a), "bus readback");
    end
    for (int n = 0; n < 600; n++) begin
      int v, sh, a;
      case (n % 4)
        0: v = -int'($urandom_range(1, 1000000));
        1: v = int'($urandom_range(0, 1023));
        2: v = int'($urandom_range(0, 1000000));
        default: v = int'($urandom_range(0, 2000000)) - 1000000;
      endcase
      sh = (n % 3 == 0) ? 0 : int'($urandom_range(0, 15));
      a = v >>> sh;
      if (a < 0) a = 0;
      if (a > 1023) a = 1023;
      in_valid = 1; in_val = filt_t'(v); shift = 4'(sh);
      @(negedge clk);
      in_valid = 0;
      check(et_valid == 1'b1, "et_valid one clock after in_valid");
      check(et == f(a), $sformatf("v=%0d sh=%0d et=%0d exp %0d", v, sh, et, f(a)));
      @(negedge clk);
      check(et_valid == 1'b0, "et_valid single pulse");
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

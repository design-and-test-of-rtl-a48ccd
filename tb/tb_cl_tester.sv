// tb_cl_tester: checks the Channel Link tester. Capture: after arming with
// trigger-on-marker, the tester must store exactly 2048 frames starting at
// the first word with bit 35 set, readable over the bus (low 32 bits and
// bits 35:32). Bit error test: the received stream is the PRBS-23 sequence
// computed in the bench; after sync the error counter must stay 0 while
// the word counter advances, and then count exactly the bits the bench
// flips (single and multi-bit errors).
module tb_cl_tester;
  import adf_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic [CL_BUS_W-1:0] rx_data = 0;
  logic [12:0] bus_addr = 0;
  logic [31:0] bus_wdata = 0, bus_rdata;
  logic bus_we = 0;

  cl_tester dut (.*);

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  task automatic wr(int a, int d);
    @(negedge clk); bus_we = 1; bus_addr = 13'(a); bus_wdata = 32'(d);
    @(negedge clk); bus_we = 0;
  endtask
  task automatic rd(int a, output logic [31:0] d);
    @(negedge clk); bus_addr = 13'(a); @(negedge clk); d = bus_rdata;
  endtask

  // stimulus source: 0 = counter words with a marker every 8, 1 = PRBS
  int src = 0, cnt = 0;
  logic [35:0] flip = 0;
  logic [22:0] ps = '1;
  always @(negedge clk) begin
    logic [35:0] w;
    if (src == 0) begin
      w = {(cnt % 8 == 5), 3'b0, 32'(cnt * 2654435761)};
    end else begin
      for (int i = 35; i >= 0; i--) begin w[i] = ps[22] ^ ps[17]; ps = {ps[21:0], w[i]}; end
    end
    cnt++;
    rx_data <= {12'hABC, w ^ flip};
  end

  initial begin
    logic [31:0] d, lo, hi;
    int first;
    repeat (3) @(negedge clk);
    rst_n = 1;
    // capture with trigger on marker
    wr(0, 32'h6);          // mode capture, arm, trigger on marker
    repeat (2100) @(negedge clk);
    rd(1, d); check(d[1:0] == 2'b10, "capture done");
    rd(2, d); check(d == 2048, $sformatf("frames captured %0d", d));
    // the first stored frame is a marker word; consecutive frames follow
    rd(13'h1000, lo); rd(13'h1001, hi);
    check(hi[3] == 1'b1, "first frame has the marker");
    for (int i = 1; i < 2048; i += 97) begin
      logic [31:0] lo2, hi2;
      rd(13'h1000 + 2 * i, lo2); rd(13'h1001 + 2 * i, hi2);
      check(hi2[3] == (i % 8 == 0), $sformatf("marker position at %0d", i));
      check(lo2 - lo == 32'(i) * 32'd2654435761, $sformatf("frame %0d in sequence", i));
    end
    // bit error test
    src = 1;
    repeat (3) @(negedge clk);
    wr(0, 32'h9);          // mode error test, sync
    repeat (500) @(negedge clk);
    rd(3, d); check(d == 0, $sformatf("no errors on clean stream (%0d)", d));
    rd(6, d); check(d == 0, "word counter high half");
    rd(4, d); check(d > 490, $sformatf("words checked %0d", d));
    rd(1, d); check(d[2], "locked");
    @(negedge clk); flip = 36'h1; @(negedge clk); flip = 0;
    repeat (20) @(negedge clk);
    @(negedge clk); flip = 36'h8_0000_0101; @(negedge clk); flip = 0;
    repeat (20) @(negedge clk);
    rd(3, d); check(d == 4, $sformatf("bit errors %0d expected 4", d));
    rd(5, d); check(d == 2, $sformatf("errored words %0d expected 2", d));
    wr(0, 32'h11);         // clear counters
    repeat (10) @(negedge clk);
    rd(3, d); check(d == 0, "cleared");
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

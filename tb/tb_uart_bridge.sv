// tb_uart_bridge: self-checking test of the serial command bridge.
//
// The bench plays the PC: it sends bytes on rxd in 8N1 format at the
// bridge's bit time and decodes the replies on txd, sampling each bit in its
// middle. The bus side is a register file of its own that answers one clock
// after the address, as the tester does. Checked:
//   - random writes reach the bus once, with the right address and data;
//   - random reads return the register file's word, MSB first;
//   - replies decode when sampled at CLK_DIV clocks per bit (the bit rate);
//   - non-command bytes and a byte with a broken stop bit are ignored, and
//     a following command still works.
// The bit time is shortened (CLK_DIV = 16) to keep the run short.
module tb_uart_bridge;
  localparam int DIV = 16;
  localparam int AW  = 13;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic rxd = 1, txd;
  logic [AW-1:0] bus_addr;
  logic [31:0] bus_wdata, bus_rdata;
  logic bus_we;

  uart_bridge #(.CLK_DIV(DIV), .AW(AW)) dut (.*);

  // register file on the bus side
  logic [31:0] regs[1 << AW];
  int n_we = 0, last_we_addr = -1;
  logic [31:0] last_we_data;
  initial foreach (regs[i]) regs[i] = 32'h1000_0000 ^ (i * 32'h9E37);
  always @(posedge clk) begin
    bus_rdata <= regs[bus_addr];
    if (bus_we) begin
      regs[bus_addr] <= bus_wdata;
      n_we++;
      last_we_addr = int'(bus_addr);
      last_we_data = bus_wdata;
    end
  end

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic send(logic [7:0] b, bit good_stop = 1);
    rxd = 0; repeat (DIV) @(negedge clk);
    for (int i = 0; i < 8; i++) begin rxd = b[i]; repeat (DIV) @(negedge clk); end
    rxd = good_stop; repeat (DIV) @(negedge clk);
    rxd = 1; repeat (2) @(negedge clk);
  endtask

  // receive one byte, sampling each bit in its middle at the nominal bit
  // time; start_len is DIV if the start bit is still low at its middle
  task automatic recv(output logic [7:0] b, output int start_len);
    @(negedge txd);
    repeat (DIV / 2) @(posedge clk);
    start_len = (txd == 1'b0) ? DIV : 0;
    for (int i = 0; i < 8; i++) begin repeat (DIV) @(posedge clk); b[i] = txd; end
    repeat (DIV) @(posedge clk);
    check(txd == 1'b1, "stop bit high");
  endtask

  task automatic do_write(int a, logic [31:0] d);
    send(8'h57); send(8'(a >> 8)); send(8'(a));
    for (int k = 3; k >= 0; k--) send(d[8 * k +: 8]);
  endtask

  task automatic do_read(int a, output logic [31:0] d, output int start_len);
    logic [7:0] b;
    int sl;
    fork
      begin send(8'h52); send(8'(a >> 8)); send(8'(a)); end
      begin
        for (int k = 3; k >= 0; k--) begin
          recv(b, sl);
          d[8 * k +: 8] = b;
          if (k == 3) start_len = sl;
        end
      end
    join
  endtask

  initial begin
    logic [31:0] d, exp_d;
    int a, sl, n0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    repeat (5) @(negedge clk);
    // ---- writes
    for (int i = 0; i < 12; i++) begin
      a = int'($urandom_range(0, (1 << AW) - 1));
      d = $urandom;
      n0 = n_we;
      do_write(a, d);
      repeat (4) @(negedge clk);
      check(n_we == n0 + 1, "one bus write per command");
      check(last_we_addr == a && last_we_data == d,
            $sformatf("write addr %0h data %h (got %0h %h)", a, d, last_we_addr, last_we_data));
      check(regs[a] == d, "register file updated");
    end
    // ---- reads
    for (int i = 0; i < 10; i++) begin
      a = (i < 4) ? last_we_addr : int'($urandom_range(0, (1 << AW) - 1));
      exp_d = regs[a];
      do_read(a, d, sl);
      check(d == exp_d, $sformatf("read %0h: %h, expected %h", a, d, exp_d));
      check(sl == DIV, $sformatf("start bit low at its middle (%0d)", sl));
    end
    // ---- junk bytes, a broken stop bit, then a good command
    n0 = n_we;
    send(8'h00); send(8'hA5); send(8'h57, 0);   // 'W' with a bad stop bit: dropped
    send(8'h12);
    repeat (4) @(negedge clk);
    check(n_we == n0, "junk and broken bytes cause no write");
    do_write(13'h0123, 32'hCAFE_F00D);
    repeat (4) @(negedge clk);
    check(n_we == n0 + 1 && regs[13'h0123] == 32'hCAFE_F00D, "command after junk");
    do_read(13'h0123, d, sl);
    check(d == 32'hCAFE_F00D, "read back after junk");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

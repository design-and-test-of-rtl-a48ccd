// tb_scld: checks the SCLD fan-out: every enabled crate receives the SCLR
// signals 2 clocks later, a disabled crate receives zeros, a level 1 accept
// becomes a raw_fetch command only when raw_fetch_en is set, and l1a_count
// counts accepts and clears on init. Random traffic, model in the bench.
module tb_scld;
  import adf_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  sclr_t sclr = '0;
  logic [4:0] crate_en = '1;
  logic raw_fetch_en = 0;
  sync_t [4:0] crate_sync;
  logic [31:0] l1a_count;

  scld #(.N_CRATES(5)) dut (.*);

  sclr_t hist[$];
  int fetches = 0, n_l1a = 0;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    hist = {'0, '0};
    for (int n = 0; n < 400; n++) begin
      sclr_t s;
      s.bc_marker = (n % 8 == 0);
      s.l1_accept = ($urandom_range(0, 9) == 0);
      s.init      = (n == 200);
      if (n % 50 == 0) crate_en = 5'($urandom);
      if (n % 70 == 0) raw_fetch_en = $urandom_range(0, 1);
      sclr = s;
      hist.push_back(s);
      @(negedge clk);
      begin
        sclr_t o; o = hist[hist.size() - 2];
        for (int c = 0; c < 5; c++) begin
          sync_t e;
          e = crate_en[c] ? '{bc_marker: o.bc_marker, l1_accept: o.l1_accept,
                              raw_fetch: o.l1_accept & raw_fetch_en, init: o.init} : '0;
          check(crate_sync[c] == e, $sformatf("crate %0d at %0d got %b exp %b", c, n, crate_sync[c], e));
          if (e.raw_fetch) fetches++;
        end
        if (o.init) n_l1a = 0; else if (o.l1_accept) n_l1a++;
        check(l1a_count == 32'(n_l1a), "l1a count");
      end
    end
    check(fetches > 0, "fetch commands issued");
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

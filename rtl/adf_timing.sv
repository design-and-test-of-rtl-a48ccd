// adf_timing: synchronisation source selection and crossing timing of an
// ADF board.
//
// In each crate one ADF board is cabled to the SCLD; it re-drives the
// synchronisation bundle on spare bussed lines of the VME64x backplane, and
// every other board of the crate takes it from there (this follows the
// system description). The strap input is_master selects the role. The
// selected bundle is registered once and then drives a 3-bit phase counter
// that counts the 8 clocks of a 132 ns crossing: bc_marker forces the phase
// back to 0, otherwise the counter free-runs. From the phase come the
// strobes: adc_stb on even phases (30.28 MHz) with adc_idx = phase/2, and
// bc_stb at phase 0. The strap, the one-register delay and the free-running
// counter are this design's choices.
//
// Timing: the bundle is registered (sync = input delayed 1 clock); the
// clock after sync.bc_marker has phase 0.
module adf_timing
  import adf_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic        is_master,
  input  sync_t       scld_sync,
  input  sync_t       bp_sync_in,
  output sync_t       bp_sync_out,
  output logic        bp_sync_oe,
  output sync_t       sync,
  output logic [$clog2(CLK_PER_BC)-1:0] phase,
  output logic        adc_stb,
  output logic [1:0]  adc_idx,
  output logic        bc_stb
);
  localparam int PW = $clog2(CLK_PER_BC);

  // The master drives the backplane with what it receives from the SCLD.
  assign bp_sync_out = scld_sync;
  assign bp_sync_oe  = is_master;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      sync  <= '0;
      phase <= '0;
    end else begin
      sync <= is_master ? scld_sync : bp_sync_in;
      if (sync.bc_marker) phase <= '0;
      else if (phase == PW'(CLK_PER_BC - 1)) phase <= '0;
      else phase <= phase + 1'b1;
    end
  end

  assign adc_stb = ~phase[0];
  assign adc_idx = phase[2:1];
  assign bc_stb  = (phase == '0);
endmodule

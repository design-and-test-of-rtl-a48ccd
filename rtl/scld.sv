// scld: logic of the serial command link distribution card.
//
// The SCLD takes the synchronous signals that the serial command link
// receiver (SCLR) mezzanine delivers and fans them out, registered, to up to
// N_CRATES ADF crates (5 on the full card, 1 on the single-channel version).
// A crate whose crate_en bit is low receives an all-zero bundle. When
// raw_fetch_en is set, every level 1 accept is also sent as a raw_fetch
// command, instructing the ADF boards to send the unfiltered samples of the
// accepted event to the trigger boards. l1a_count counts accepts since init.
// The fan-out to 5 crates and the optional fetch command follow the board
// description; the signal set, per-crate enables and the counter are this
// design's. The card has no VME interface, so its configuration is on pins.
//
// Timing: crate_sync is sclr delayed by 2 clocks (input and output
// registers).
module scld
  import adf_pkg::*;
#(
  parameter int N_CRATES = 5
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  sclr_t                sclr,
  input  logic [N_CRATES-1:0]  crate_en,
  input  logic                 raw_fetch_en,
  output sync_t [N_CRATES-1:0] crate_sync,
  output logic [31:0]          l1a_count
);
  sclr_t sclr_q;
  sync_t bundle;

  always_comb begin
    bundle.bc_marker = sclr_q.bc_marker;
    bundle.l1_accept = sclr_q.l1_accept;
    bundle.raw_fetch = sclr_q.l1_accept & raw_fetch_en;
    bundle.init      = sclr_q.init;
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      sclr_q     <= '0;
      crate_sync <= '0;
      l1a_count  <= '0;
    end else begin
      sclr_q <= sclr;
      for (int c = 0; c < N_CRATES; c++)
        crate_sync[c] <= crate_en[c] ? bundle : '0;
      if (sclr_q.init)           l1a_count <= '0;
      else if (sclr_q.l1_accept) l1a_count <= l1a_count + 1'b1;
    end
  end
endmodule

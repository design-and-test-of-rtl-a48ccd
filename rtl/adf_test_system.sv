// adf_test_system: the ADF trigger front end as tested on the bench.
//
// The SCLD fans the synchronous signals from the serial command link out to
// up to 5 ADF crates; crate 0 is cabled here to an ADF board acting as its
// crate's master, and the other crates' bundles are outputs. The ADF board
// digitizes and filters 32 channels and drives 3 identical Channel Link
// buses; bus 0 goes to the Channel Link tester, buses 1 and 2 (to the
// trigger algorithm boards) are outputs. The tester is controlled from a PC
// over RS232 through uart_bridge (115200 baud). The ADF board's local bus
// (from its VME interface), the tester's serial lines, the ADC samples, the
// pedestal DAC lines and the backplane sync lines are ports. The serializer, cable
// and deserializer between the board and the tester are taken as a perfect
// wire; everything runs on one 60.56 MHz clock.
module adf_test_system
  import adf_pkg::*;
(
  input  logic                              clk,
  input  logic                              rst_n,
  // serial command link receiver and SCLD configuration pins
  input  sclr_t                             sclr,
  input  logic [4:0]                        crate_en,
  input  logic                              raw_fetch_en,
  output sync_t [3:0]                       other_crate_sync,
  output logic [31:0]                       l1a_count,
  // ADF board
  input  sample_t [N_CH-1:0]                adc_data,
  input  sync_t                             bp_sync_in,
  output sync_t                             bp_sync_out,
  output logic                              bp_sync_oe,
  input  logic [19:0]                       adf_bus_addr,
  input  logic [31:0]                       adf_bus_wdata,
  input  logic                              adf_bus_we,
  output logic [31:0]                       adf_bus_rdata,
  output logic                              dac_sclk,
  output logic                              dac_cs_n,
  output logic [3:0]                        dac_sdi,
  output logic [1:0][CL_BUS_W-1:0]          tab_link_data,
  // Channel Link tester: RS232 lines to the PC
  input  logic                              tst_rxd,
  output logic                              tst_txd
);
  sync_t [4:0]                       crate_sync;
  logic [N_LINKS-1:0][CL_BUS_W-1:0]  link_data;

  scld #(.N_CRATES(5)) u_scld (
    .clk, .rst_n, .sclr, .crate_en, .raw_fetch_en, .crate_sync, .l1a_count);

  assign other_crate_sync = crate_sync[4:1];

  adf_board u_adf (
    .clk, .rst_n, .adc_data, .is_master(1'b1), .scld_sync(crate_sync[0]),
    .bp_sync_in, .bp_sync_out, .bp_sync_oe,
    .bus_addr(adf_bus_addr), .bus_wdata(adf_bus_wdata), .bus_we(adf_bus_we),
    .bus_rdata(adf_bus_rdata), .dac_sclk, .dac_cs_n, .dac_sdi, .link_data);

  assign tab_link_data = link_data[2:1];

  logic [12:0] tst_bus_addr;
  logic [31:0] tst_bus_wdata, tst_bus_rdata;
  logic        tst_bus_we;

  uart_bridge #(.AW(13)) u_pc_link (
    .clk, .rst_n, .rxd(tst_rxd), .txd(tst_txd), .bus_addr(tst_bus_addr),
    .bus_wdata(tst_bus_wdata), .bus_we(tst_bus_we), .bus_rdata(tst_bus_rdata));

  cl_tester u_tester (
    .clk, .rst_n, .rx_data(link_data[0]), .bus_addr(tst_bus_addr),
    .bus_wdata(tst_bus_wdata), .bus_we(tst_bus_we), .bus_rdata(tst_bus_rdata));
endmodule

// adf_board: digital logic of one ADF (ADC and filter) board.
//
// The board takes 32 calorimeter channels, digitized at 30.28 MHz by 10-bit
// ADCs, turns every 132 ns beam crossing into 32 8-bit transverse energies
// (adf_channel: FIR filter, peak detector, calibration table), and sends them
// three times, on 3 identical Channel Link buses, to the trigger algorithm
// boards, which each need the data of 3 boards. It also holds the crate
// synchronisation (adf_timing), the pedestal DAC loader, and the raw-data
// readout that, on a fetch command from the SCLD, inserts the raw samples
// of a triggered event into the link frames. Control and monitoring come
// through a local bus from the VME interface. The channel count, the 3-fold
// link fan-out, the 36 of 48 bits used and the functions follow the board
// description; the single FPGA, the register map and the bus are this
// design's.
//
// Local bus (word addresses, bus_rdata one clock after bus_addr, writes on
// the clock edge with bus_we):
//   addr[19] = 0: channel addr[18:14], region addr[13:12] (see adf_channel),
//                 offset addr[11:0]
//   addr[19] = 1: board registers, addr[7:0]:
//     0x00 control: bit 0 link mode (1 = PRBS), bit 1 freeze history buffers
//     0x01 raw-readout lookback (crossings), 0x02 raw-readout crossings
//     0x03 pulses: bit 0 start capture, bit 1 inject a link error,
//          bit 2 load pedestal DACs
//     0x04 status: bit 0 a capture has completed, bit 1 raw readout
//          busy, bit 2 DAC loader busy, bits 31:16 dropped fetch commands
//     0x40 + c: pedestal code of channel c (12 bits)
// The sync bundle's l1_accept and init bits are carried to the backplane but
// not used by this board's logic; raw_fetch is the command it acts on.
module adf_board
  import adf_pkg::*;
#(
  parameter int NCH = N_CH
) (
  input  logic                                 clk,
  input  logic                                 rst_n,
  input  sample_t [NCH-1:0]                    adc_data,
  input  logic                                 is_master,
  input  sync_t                                scld_sync,
  input  sync_t                                bp_sync_in,
  output sync_t                                bp_sync_out,
  output logic                                 bp_sync_oe,
  input  logic [19:0]                          bus_addr,
  input  logic [31:0]                          bus_wdata,
  input  logic                                 bus_we,
  output logic [31:0]                          bus_rdata,
  output logic                                 dac_sclk,
  output logic                                 dac_cs_n,
  output logic [3:0]                           dac_sdi,
  output logic [N_LINKS-1:0][CL_BUS_W-1:0]     link_data
);
  localparam int CW = (NCH > 1) ? $clog2(NCH) : 1;

  sync_t       sync;
  logic [2:0]  phase;
  logic        adc_stb, bc_stb;
  logic [1:0]  adc_idx;

  // board registers
  link_mode_t          link_mode;
  logic                hist_freeze;
  logic [HIST_AW-1:0]  lookback;
  logic [3:0]          nbc;
  logic [N_CH-1:0][DAC_W-1:0] pedestal;
  logic                capture_start, inject_err, dac_start;

  et_t     [NCH-1:0]          et;
  logic    [NCH-1:0]          et_valid;
  logic    [NCH-1:0]          capture_done;
  logic    [NCH-1:0][HIST_AW-1:0] hist_wptr;
  sample_t [NCH-1:0][3:0]     fetch_raw;
  logic    [HIST_AW-1:0]      fetch_addr;
  logic    [NCH-1:0][31:0]    ch_rdata;

  logic [RD_W-1:0] rd_word;
  logic            rd_valid, rd_pop, rr_busy;
  logic [15:0]     dropped;
  logic            dac_busy;
  logic [LINK_W-1:0] tx_word;

  wire board_sel = bus_addr[19];
  wire wr_board  = bus_we && board_sel;

  adf_timing u_timing (
    .clk, .rst_n, .is_master, .scld_sync, .bp_sync_in, .bp_sync_out, .bp_sync_oe,
    .sync, .phase, .adc_stb, .adc_idx, .bc_stb);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      link_mode     <= LINK_DATA;
      hist_freeze   <= 1'b0;
      lookback      <= HIST_AW'(32);
      nbc           <= 4'd2;
      pedestal      <= '0;
      capture_start <= 1'b0;
      inject_err    <= 1'b0;
      dac_start     <= 1'b0;
    end else begin
      capture_start <= 1'b0;
      inject_err    <= 1'b0;
      dac_start     <= 1'b0;
      if (wr_board) begin
        if (bus_addr[7:6] == 2'b01) pedestal[bus_addr[4:0]] <= bus_wdata[DAC_W-1:0];
        else unique case (bus_addr[7:0])
          8'h00: begin
            link_mode   <= link_mode_t'(bus_wdata[0]);
            hist_freeze <= bus_wdata[1];
          end
          8'h01: lookback <= bus_wdata[HIST_AW-1:0];
          8'h02: nbc      <= bus_wdata[3:0];
          8'h03: begin
            capture_start <= bus_wdata[0];
            inject_err    <= bus_wdata[1];
            dac_start     <= bus_wdata[2];
          end
          default: ;
        endcase
      end
    end
  end

  // read mux: board registers or the addressed channel
  logic        board_sel_q;
  logic [CW-1:0] ch_q;
  logic [31:0] board_rd;
  always_ff @(posedge clk) begin
    board_sel_q <= board_sel;
    ch_q        <= CW'(bus_addr[18:14]);
    if (bus_addr[7:6] == 2'b01) board_rd <= 32'(pedestal[bus_addr[4:0]]);
    else unique case (bus_addr[7:0])
      8'h00:   board_rd <= {30'd0, hist_freeze, link_mode};
      8'h01:   board_rd <= 32'(lookback);
      8'h02:   board_rd <= 32'(nbc);
      8'h04:   board_rd <= {dropped, 13'd0, dac_busy, rr_busy, |capture_done};
      default: board_rd <= '0;
    endcase
  end
  assign bus_rdata = board_sel_q ? board_rd : ch_rdata[ch_q];

  for (genvar c = 0; c < NCH; c++) begin : g_ch
    adf_channel u_ch (
      .clk, .rst_n, .adc_stb, .adc_idx, .adc_data(adc_data[c]),
      .capture_start, .capture_done(capture_done[c]), .hist_freeze,
      .et(et[c]), .et_valid(et_valid[c]), .hist_wptr(hist_wptr[c]),
      .fetch_addr, .fetch_raw(fetch_raw[c]),
      .bus_sel(!board_sel && bus_addr[18:14] == 5'(c)), .bus_region(bus_addr[13:12]),
      .bus_addr(bus_addr[11:0]), .bus_wdata, .bus_we, .bus_rdata(ch_rdata[c]));
  end

  raw_readout #(.NCH(NCH)) u_rr (
    .clk, .rst_n, .fetch(sync.raw_fetch), .lookback, .nbc, .hist_wptr(hist_wptr[0]),
    .fetch_addr, .fetch_raw, .rd_word, .rd_valid, .rd_pop, .busy(rr_busy), .dropped);

  link_framer #(.NCH(NCH)) u_framer (
    .clk, .rst_n, .bc_stb, .et, .et_valid(et_valid[0]), .mode(link_mode), .inject_err,
    .rd_word, .rd_valid, .rd_pop, .tx_word);

  dac_loader u_dac (
    .clk, .rst_n, .start(dac_start), .pedestal, .busy(dac_busy),
    .sclk(dac_sclk), .cs_n(dac_cs_n), .sdi(dac_sdi));

  // three identical copies of the data, one per trigger algorithm board
  always_comb
    for (int l = 0; l < N_LINKS; l++) link_data[l] = CL_BUS_W'(tx_word);
endmodule

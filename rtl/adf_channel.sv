// adf_channel: one complete digital channel of the ADF board.
//
// Chain: raw_buffer (live / capture / playback of 10-bit samples at
// 30.28 MHz) -> fir_filter (8 taps, 15.14 MHz, or bypass) -> peak_detector
// (one value per 132 ns crossing) -> et_lut (8-bit energy), with a
// history_buffer recording samples, filter outputs and energies. All 32
// channels of a board are identical instances, as on the board.
//
// The channel owns its configuration register (chan_cfg_t) and exposes its
// memories on a small bus: region 0 = registers (word 0..7 coefficient k in
// bits 7:0 signed, word 8 control: bit 0 bypass, 1 peak detector on,
// 2 dec_sel, 3 slot_sel, 7:4 shift, 9:8 raw buffer mode, 10 combine),
// region 1 = raw buffer (512 words), region 2 = look-up table (1024 words),
// region 3 = history buffer (4 words per record). A write (bus_sel & bus_we) takes
// effect at the clock edge; bus_rdata is valid one clock after the address.
// The register map is this design's.
//
// Timing from an ADC strobe to et_valid: 1 clock (raw buffer) + 1 (filter)
// + 1 (peak detector) + 1 (table), plus the wait for the next filter output
// when the peak detector is on.
module adf_channel
  import adf_pkg::*;
(
  input  logic               clk,
  input  logic               rst_n,
  input  logic               adc_stb,
  input  logic [1:0]         adc_idx,
  input  sample_t            adc_data,
  input  logic               capture_start,
  output logic               capture_done,
  input  logic               hist_freeze,
  output et_t                et,
  output logic               et_valid,
  output logic [HIST_AW-1:0] hist_wptr,
  input  logic [HIST_AW-1:0] fetch_addr,
  output sample_t [3:0]      fetch_raw,
  input  logic               bus_sel,
  input  logic [1:0]         bus_region,
  input  logic [11:0]        bus_addr,
  input  logic [31:0]        bus_wdata,
  input  logic               bus_we,
  output logic [31:0]        bus_rdata
);
  chan_cfg_t cfg;

  logic    s_valid;  logic [1:0] s_idx;  sample_t s_data;
  logic    y_valid;  logic       y_slot; filt_t   y;
  logic    b_valid;  filt_t      b_val;
  sample_t raw_rdata;
  et_t     lut_rdata;
  logic [LUT_AW-1:0] lut_addr;
  logic [31:0] hist_rdata;
  logic [31:0] reg_rdata;
  logic [1:0]  region_q;

  wire we_reg  = bus_sel && bus_we && bus_region == 2'd0;
  wire we_raw  = bus_sel && bus_we && bus_region == 2'd1;
  wire we_lut  = bus_sel && bus_we && bus_region == 2'd2;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      cfg <= '{coef: '0, bypass: 1'b0, pk_en: 1'b0, dec_sel: 1'b0, combine: 1'b0, slot_sel: 1'b0,
               shift: 4'd0, buf_mode: BUF_LIVE};
    end else if (we_reg) begin
      if (bus_addr[3] == 1'b0) cfg.coef[bus_addr[2:0]] <= coef_t'(bus_wdata[COEF_W-1:0]);
      else begin
        cfg.bypass   <= bus_wdata[0];
        cfg.pk_en    <= bus_wdata[1];
        cfg.dec_sel  <= bus_wdata[2];
        cfg.combine  <= bus_wdata[10];
        cfg.slot_sel <= bus_wdata[3];
        cfg.shift    <= bus_wdata[7:4];
        cfg.buf_mode <= buf_mode_t'(bus_wdata[9:8]);
      end
    end
  end

  always_ff @(posedge clk) begin
    region_q <= bus_region;
    if (bus_addr[3] == 1'b0) reg_rdata <= 32'(signed'(cfg.coef[bus_addr[2:0]]));
    else reg_rdata <= {21'd0, cfg.combine, cfg.buf_mode, cfg.shift, cfg.slot_sel, cfg.dec_sel, cfg.pk_en,
                       cfg.bypass};
  end

  always_comb begin
    unique case (region_q)
      2'd0: bus_rdata = reg_rdata;
      2'd1: bus_rdata = 32'(raw_rdata);
      2'd2: bus_rdata = 32'(lut_rdata);
      default: bus_rdata = hist_rdata;
    endcase
  end

  raw_buffer u_raw (
    .clk, .rst_n, .mode(cfg.buf_mode), .capture_start, .capture_done,
    .adc_stb, .adc_idx, .adc_data, .s_valid, .s_idx, .s_data,
    .bus_addr(bus_addr[RAW_AW-1:0]), .bus_wdata(bus_wdata[SAMPLE_W-1:0]),
    .bus_we(we_raw), .bus_rdata(raw_rdata));

  fir_filter u_fir (
    .clk, .rst_n, .coef(cfg.coef), .bypass(cfg.bypass), .dec_sel(cfg.dec_sel),
    .combine(cfg.combine), .s_valid, .s_idx, .s_data, .y_valid, .y_slot, .y);

  peak_detector u_pk (
    .clk, .rst_n, .pk_en(cfg.pk_en), .slot_sel(cfg.slot_sel),
    .y_valid, .y_slot, .y, .bc_valid(b_valid), .bc_val(b_val));

  et_lut u_lut (
    .clk, .rst_n, .shift(cfg.shift), .in_valid(b_valid), .in_val(b_val),
    .et_valid, .et, .lut_addr,
    .bus_addr(bus_addr[LUT_AW-1:0]), .bus_wdata(bus_wdata[ET_W-1:0]),
    .bus_we(we_lut), .bus_rdata(lut_rdata));

  history_buffer u_hist (
    .clk, .rst_n, .freeze(hist_freeze), .s_valid, .s_idx, .s_data,
    .y_valid, .y_slot, .y, .et_valid, .et, .wptr(hist_wptr),
    .fetch_addr, .fetch_raw, .bus_addr(bus_addr[HIST_AW+1:0]), .bus_rdata(hist_rdata));
endmodule

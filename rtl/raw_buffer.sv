// raw_buffer: 512-word per-channel sample buffer in front of the filter.
//
// Three modes (buf_mode_t). LIVE passes the ADC sample to the filter.
// CAPTURE also passes it and, after capture_start, writes 512 consecutive
// samples into the buffer, then stops and raises capture_done; the samples
// are read back over the bus to tune the filter coefficients off-line.
// PLAYBACK feeds the filter with the buffer contents instead of the ADC, one
// word per ADC strobe (the nominal 30.28 MHz rate), looping over the 512
// words, so that pre-loaded test series can be run through the filter. The
// 512-word depth, capture and playback follow the board description; using
// one buffer for both and looping playback are this design's choices.
//
// Interface: adc_stb/adc_idx/adc_data in; s_valid/s_idx/s_data out one clock
// after adc_stb. Bus port: bus_we writes bus_wdata at bus_addr; bus_rdata is
// the word at bus_addr one clock later. Capture has priority over bus writes.
module raw_buffer
  import adf_pkg::*;
#(
  parameter int DEPTH = RAW_DEPTH
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  buf_mode_t                mode,
  input  logic                     capture_start,
  output logic                     capture_done,
  input  logic                     adc_stb,
  input  logic [1:0]               adc_idx,
  input  sample_t                  adc_data,
  output logic                     s_valid,
  output logic [1:0]               s_idx,
  output sample_t                  s_data,
  input  logic [$clog2(DEPTH)-1:0] bus_addr,
  input  sample_t                  bus_wdata,
  input  logic                     bus_we,
  output sample_t                  bus_rdata
);
  localparam int AW = $clog2(DEPTH);

  sample_t           mem [DEPTH];
  logic [AW-1:0]     ptr;
  logic              capturing;

  wire cap_wr = (mode == BUF_CAPTURE) && capturing && adc_stb;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      ptr          <= '0;
      capturing    <= 1'b0;
      capture_done <= 1'b0;
      s_valid      <= 1'b0;
      s_idx        <= '0;
      s_data       <= '0;
    end else begin
      s_valid <= adc_stb;
      if (adc_stb) begin
        s_idx  <= adc_idx;
        s_data <= (mode == BUF_PLAYBACK) ? mem[ptr] : adc_data;
      end
      if (capture_start) begin
        ptr          <= '0;
        capturing    <= 1'b1;
        capture_done <= 1'b0;
      end else if (cap_wr) begin
        ptr <= ptr + 1'b1;
        if (ptr == AW'(DEPTH - 1)) begin
          capturing    <= 1'b0;
          capture_done <= 1'b1;
        end
      end else if (mode == BUF_PLAYBACK && adc_stb) begin
        ptr <= (ptr == AW'(DEPTH - 1)) ? '0 : ptr + 1'b1;
      end
    end
  end

  always_ff @(posedge clk) begin
    if (cap_wr)      mem[ptr]      <= adc_data;
    else if (bus_we) mem[bus_addr] <= bus_wdata;
    bus_rdata <= mem[bus_addr];
  end
endmodule

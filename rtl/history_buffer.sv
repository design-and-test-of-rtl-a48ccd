// history_buffer: monitoring history of one channel.
//
// A circular buffer with one record per crossing: the 4 raw ADC samples of
// the last complete crossing, the 2 filter outputs of the last crossing and
// the energy. A record is written on every et_valid unless `freeze` is set,
// so a frozen buffer can be read slowly over the bus. A second read port,
// addressed by the raw-readout sequencer, returns the raw samples of a
// record, so that the samples of a triggered event can be sent to the
// trigger boards. Storing raw samples, intermediate results and energies,
// slow readout and fetching after a level 1 accept follow the board
// description; depth (256), record contents and layout are this design's.
//
// Bus read layout, bus_addr = {record, word}: word 0 = {samples 1, 0},
// word 1 = {samples 3, 2} (16 bits each, sample 0 in the low half), word 2 =
// filter output 0 (sign-extended), word 3 = {energy, filter output 1[23:0]}
// with output 1 sign-extended to 24 bits.
// Timing: bus_rdata and fetch_raw one clock after their address. wptr is the
// record that will be written next.
module history_buffer
  import adf_pkg::*;
#(
  parameter int DEPTH = HIST_DEPTH
) (
  input  logic                       clk,
  input  logic                       rst_n,
  input  logic                       freeze,
  input  logic                       s_valid,
  input  logic [1:0]                 s_idx,
  input  sample_t                    s_data,
  input  logic                       y_valid,
  input  logic                       y_slot,
  input  filt_t                      y,
  input  logic                       et_valid,
  input  et_t                        et,
  output logic [$clog2(DEPTH)-1:0]   wptr,
  input  logic [$clog2(DEPTH)-1:0]   fetch_addr,
  output sample_t [3:0]              fetch_raw,
  input  logic [$clog2(DEPTH)+1:0]   bus_addr,
  output logic [31:0]                bus_rdata
);
  localparam int AW = $clog2(DEPTH);

  typedef struct packed {
    et_t           et;
    filt_t [1:0]   filt;
    sample_t [3:0] raw;
  } rec_t;

  rec_t          mem [DEPTH];
  sample_t [3:0] raw_acc, raw_bc;   // samples being gathered / last complete crossing
  filt_t   [1:0] filt_acc;
  rec_t          rd_rec;
  logic [1:0]    rd_word;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      wptr     <= '0;
      raw_acc  <= '0;
      raw_bc   <= '0;
      filt_acc <= '0;
    end else begin
      if (s_valid) begin
        raw_acc[s_idx] <= s_data;
        if (s_idx == 2'd3) raw_bc <= {s_data, raw_acc[2:0]};
      end
      if (y_valid) filt_acc[y_slot] <= y;
      if (et_valid && !freeze) wptr <= wptr + 1'b1;
    end
  end

  always_ff @(posedge clk) begin
    if (et_valid && !freeze) mem[wptr] <= '{et: et, filt: filt_acc, raw: raw_bc};
    fetch_raw <= mem[fetch_addr].raw;
    rd_rec    <= mem[bus_addr[AW+1:2]];
    rd_word   <= bus_addr[1:0];
  end

  always_comb begin
    unique case (rd_word)
      2'd0: bus_rdata = {6'd0, rd_rec.raw[1], 6'd0, rd_rec.raw[0]};
      2'd1: bus_rdata = {6'd0, rd_rec.raw[3], 6'd0, rd_rec.raw[2]};
      2'd2: bus_rdata = 32'(signed'(rd_rec.filt[0]));
      default: bus_rdata = {rd_rec.et, 24'(signed'(rd_rec.filt[1]))};
    endcase
  end
endmodule

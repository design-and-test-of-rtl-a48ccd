// raw_readout: sends the raw ADC samples of a triggered event to the
// trigger boards.
//
// When the SCLD issues a fetch command after a level 1 accept, the sequencer
// takes the record `lookback` crossings before the current history write
// pointer as the first crossing of the event and, for `nbc` crossings, reads
// that record from all channels' history buffers at once (the shared fetch
// port) and pushes one 16-bit word per sample, channel by channel, into a
// FIFO: {first-of-event, channel[4:0], sample[9:0]}. The link framer pops one
// word per crossing. A fetch that arrives while one is in progress is
// dropped and counted. Fetching raw samples from the history buffers on
// command follows the board description; lookback, word format, FIFO and
// the drop rule are this design's.
//
// Timing: after a fetch the sequencer spends 1 clock per record address
// change plus 1 clock per word pushed; it waits when the FIFO is full.
// rd_word/rd_valid show the FIFO head; rd_pop removes it.
module raw_readout
  import adf_pkg::*;
#(
  parameter int NCH        = N_CH,
  parameter int FIFO_DEPTH = 1024
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    fetch,
  input  logic [HIST_AW-1:0]      lookback,
  input  logic [3:0]              nbc,
  input  logic [HIST_AW-1:0]      hist_wptr,
  output logic [HIST_AW-1:0]      fetch_addr,
  input  sample_t [NCH-1:0][3:0]  fetch_raw,
  output logic [RD_W-1:0]         rd_word,
  output logic                    rd_valid,
  input  logic                    rd_pop,
  output logic                    busy,
  output logic [15:0]             dropped
);
  localparam int CW = (NCH > 1) ? $clog2(NCH) : 1;
  localparam int FW = $clog2(FIFO_DEPTH);

  typedef enum logic [1:0] {S_IDLE, S_ADDR, S_EMIT} state_t;
  state_t state;

  logic [3:0]    bc_left;
  logic [CW-1:0] ch;
  logic [1:0]    smp;
  logic          first;

  // FIFO
  logic [RD_W-1:0] fifo [FIFO_DEPTH];
  logic [FW:0]     wr_ptr, rd_ptr;
  wire  fifo_full  = (wr_ptr - rd_ptr) == (FW+1)'(FIFO_DEPTH);
  wire  fifo_empty = (wr_ptr == rd_ptr);
  wire  push       = (state == S_EMIT) && !fifo_full;
  wire  pop        = rd_pop && !fifo_empty;

  logic [RD_W-1:0] push_word;
  always_comb begin
    push_word = '0;
    push_word[RD_W-1]            = first;
    push_word[SAMPLE_W +: 5]     = 5'(ch);
    push_word[SAMPLE_W-1:0]      = fetch_raw[ch][smp];
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state      <= S_IDLE;
      fetch_addr <= '0;
      bc_left    <= '0;
      ch         <= '0;
      smp        <= '0;
      first      <= 1'b0;
      dropped    <= '0;
      wr_ptr     <= '0;
      rd_ptr     <= '0;
    end else begin
      if (pop) rd_ptr <= rd_ptr + 1'b1;
      if (push) wr_ptr <= wr_ptr + 1'b1;
      if (fetch && state != S_IDLE) dropped <= dropped + 1'b1;
      unique case (state)
        S_IDLE: if (fetch && nbc != 0) begin
          fetch_addr <= hist_wptr - lookback;
          bc_left    <= nbc;
          ch         <= '0;
          smp        <= '0;
          first      <= 1'b1;
          state      <= S_ADDR;
        end
        S_ADDR: state <= S_EMIT;   // fetch_raw valid one clock after fetch_addr
        S_EMIT: if (push) begin
          first <= 1'b0;
          smp   <= smp + 1'b1;
          if (smp == 2'd3) begin
            if (ch == CW'(NCH - 1)) begin
              ch         <= '0;
              bc_left    <= bc_left - 1'b1;
              fetch_addr <= fetch_addr + 1'b1;
              state      <= (bc_left == 4'd1) ? S_IDLE : S_ADDR;
            end else begin
              ch <= ch + 1'b1;
            end
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  always_ff @(posedge clk) begin
    if (push) fifo[wr_ptr[FW-1:0]] <= push_word;
  end

  assign rd_word  = fifo[rd_ptr[FW-1:0]];
  assign rd_valid = !fifo_empty;
  assign busy     = (state != S_IDLE);
endmodule

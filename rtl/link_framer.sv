// link_framer: formats one ADF board's output for the Channel Link buses.
//
// A crossing lasts 8 clocks of the 60.56 MHz link clock, and each clock
// carries 36 bits (of the 48 the Channel Link bus offers), enough for the
// 32 8-bit energies of a crossing: word w (w = 0..7 after the frame start)
// carries the energies of channels 4w..4w+3 in bits 31:0, channel 4w in the
// low byte. Bits 35:32 are a sideband: word 0 holds {frame marker = 1,
// raw word valid, 0, 0}; in words 1 to 6 bit 35 is 0 and bits 34:32 carry
// one 16-bit raw-readout word, three bits at a time from the MSB (word 6
// holds its last bit followed by two zeros); word 7 holds 0. Bit 35 is thus
// set in word 0 only and marks the frame unambiguously, and one raw word
// rides along with every crossing without disturbing the energies. In PRBS mode
// the bus carries the PRBS-23 stream instead, 36 new bits per clock, for
// the link tester. inject_err inverts bit 0 of the next word sent, to prove
// that the tester detects errors. The 8-clock frame of 36-bit words follows
// the board description; the layout, sideband and error injection are this
// design's.
//
// Timing: the energies present at bc_stb (or the latest et_valid) form the
// frame; word 0 of that frame is on tx_word 2 clocks after bc_stb.
module link_framer
  import adf_pkg::*;
#(
  parameter int NCH = N_CH
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  bc_stb,
  input  et_t [NCH-1:0]         et,
  input  logic                  et_valid,
  input  link_mode_t            mode,
  input  logic                  inject_err,
  input  logic [RD_W-1:0]       rd_word,
  input  logic                  rd_valid,
  output logic                  rd_pop,
  output logic [LINK_W-1:0]     tx_word
);
  et_t [NCH-1:0]   et_hold, snap;
  logic [2:0]      wc;
  logic [RD_W-1:0] raw_cur;
  logic            raw_v;
  logic            err_pending;
  logic [LINK_W-1:0] prbs_word, data_word, next_word;

  assign rd_pop = bc_stb && rd_valid;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      et_hold <= '0;
      snap    <= '0;
      wc      <= 3'd7;
      raw_cur <= '0;
      raw_v   <= 1'b0;
    end else begin
      if (et_valid) et_hold <= et;
      if (bc_stb) begin
        snap    <= et_valid ? et : et_hold;
        wc      <= 3'd0;
        raw_cur <= rd_valid ? rd_word : '0;
        raw_v   <= rd_valid;
      end else begin
        wc <= wc + 1'b1;
      end
    end
  end

  always_comb begin
    data_word = '0;
    for (int i = 0; i < 4; i++)
      if (4 * int'(wc) + i < NCH) data_word[8*i +: 8] = snap[4 * int'(wc) + i];
    unique case (wc)
      3'd0: data_word[35:32] = {1'b1, raw_v, 2'b00};
      3'd1: data_word[35:32] = {1'b0, raw_cur[15:13]};
      3'd2: data_word[35:32] = {1'b0, raw_cur[12:10]};
      3'd3: data_word[35:32] = {1'b0, raw_cur[9:7]};
      3'd4: data_word[35:32] = {1'b0, raw_cur[6:4]};
      3'd5: data_word[35:32] = {1'b0, raw_cur[3:1]};
      3'd6: data_word[35:32] = {1'b0, raw_cur[0], 2'b00};
      default: data_word[35:32] = 4'd0;
    endcase
    next_word = (mode == LINK_PRBS) ? prbs_word : data_word;
  end

  prbs_gen #(.W(LINK_W)) u_prbs (
    .clk, .rst_n, .load(1'b0), .seed(23'd0), .en(1'b1), .word(prbs_word));

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      tx_word     <= '0;
      err_pending <= 1'b0;
    end else begin
      tx_word <= next_word ^ LINK_W'(err_pending);
      if (inject_err)       err_pending <= 1'b1;
      else if (err_pending) err_pending <= 1'b0;
    end
  end
endmodule

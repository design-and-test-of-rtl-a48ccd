// cl_tester: logic of the Channel Link tester.
//
// The tester receives one ADF output link through a Channel Link
// deserializer and is controlled from a PC. Two modes:
//  - capture: after `arm`, the next DEPTH (2048) received frames are stored,
//    either from the next clock or from the next frame marker (bit 35), for
//    the PC to read and display;
//  - bit error test: the ADF board sends its PRBS-23 stream; on `sync` the
//    tester seeds its own generator from the word just received and from
//    then on compares every received word bit by bit with the prediction,
//    counting bit errors, errored words and words checked.
// Capturing 2048 frames and the bit-by-bit comparison against the same
// pseudo-random stream follow the tester description; here a frame is one
// 36-bit transfer of the link, and the PC link (parallel port or RS232) is
// reduced to a register bus.
//
// Register bus (word addresses): bus_addr[12] = 1 reads capture memory,
// entry bus_addr[11:1], low 32 bits when bus_addr[0] = 0, bits 35:32 when 1.
// Otherwise: 0 control (write: bit 0 mode 0 capture / 1 error test, bit 1
// arm, bit 2 trigger on frame marker, bit 3 sync, bit 4 clear counters;
// bits 1, 3, 4 are pulses), 1 status {locked, capture done, capturing},
// 2 frames captured, 3 bit errors, 4 words checked (low 32 bits),
// 5 errored words, 6 words checked (high 32 bits). The 64-bit word counter
// covers multi-day runs (12 days at 60.56 MHz is about 6.3e13 words).
// bus_rdata is valid one clock after bus_addr.
module cl_tester
  import adf_pkg::*;
#(
  parameter int DEPTH = 2048
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic [CL_BUS_W-1:0] rx_data,
  input  logic [12:0]         bus_addr,
  input  logic [31:0]         bus_wdata,
  input  logic                bus_we,
  output logic [31:0]         bus_rdata
);
  localparam int AW = $clog2(DEPTH);

  logic              mode_ber, trig_marker;
  logic              waiting, capturing, capt_done;
  logic [AW:0]       capt_n;
  logic [LINK_W-1:0] cap_mem [DEPTH];
  logic              locked, chk_v;
  logic [LINK_W-1:0] rx_q, expected;
  logic [31:0]       err_bits, err_words;
  logic [63:0]       words;   // 12 days at 60.56 MHz is 6.3e13 words
  logic [LINK_W-1:0] cap_rd;
  logic [31:0]       reg_rd;
  logic              sel_mem, sel_hi;

  wire [LINK_W-1:0] rx = rx_data[LINK_W-1:0];
  wire wr_ctrl  = bus_we && !bus_addr[12] && bus_addr[2:0] == 3'd0;
  wire arm      = wr_ctrl && bus_wdata[1];
  wire sync_req = wr_ctrl && bus_wdata[3];
  wire clr      = wr_ctrl && bus_wdata[4];
  wire start    = waiting && !mode_ber && (!trig_marker || rx[LINK_W-1]);
  wire cap_wr   = start || capturing;
  wire [LINK_W-1:0] diff = rx_q ^ expected;

  prbs_gen #(.W(LINK_W)) u_prbs (
    .clk, .rst_n, .load(sync_req), .seed(rx[22:0]), .en(locked), .word(expected));

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      mode_ber <= 1'b0; trig_marker <= 1'b0;
      waiting <= 1'b0; capturing <= 1'b0; capt_done <= 1'b0; capt_n <= '0;
      locked <= 1'b0; chk_v <= 1'b0; rx_q <= '0;
      err_bits <= '0; words <= '0; err_words <= '0;
    end else begin
      if (wr_ctrl) begin
        mode_ber    <= bus_wdata[0];
        trig_marker <= bus_wdata[2];
      end
      // capture
      if (arm) begin
        waiting <= 1'b1; capturing <= 1'b0; capt_done <= 1'b0; capt_n <= '0;
      end else if (cap_wr) begin
        waiting   <= 1'b0;
        capturing <= 1'b1;
        capt_n    <= capt_n + 1'b1;
        if (capt_n == (AW+1)'(DEPTH - 1)) begin
          capturing <= 1'b0;
          capt_done <= 1'b1;
        end
      end
      // bit error test
      if (sync_req)                      locked <= 1'b1;
      else if (wr_ctrl && !bus_wdata[0]) locked <= 1'b0;
      rx_q  <= rx;
      chk_v <= locked && !sync_req;
      if (clr || sync_req) begin
        err_bits <= '0; words <= '0; err_words <= '0;
      end else if (chk_v && mode_ber) begin
        words    <= words + 1'b1;
        err_bits <= err_bits + 32'($countones(diff));
        if (diff != '0) err_words <= err_words + 1'b1;
      end
    end
  end

  always_ff @(posedge clk) begin
    if (cap_wr && !mode_ber) cap_mem[capt_n[AW-1:0]] <= rx;
    cap_rd  <= cap_mem[bus_addr[AW:1]];
    sel_mem <= bus_addr[12];
    sel_hi  <= bus_addr[0];
    unique case (bus_addr[2:0])
      3'd0: reg_rd <= {27'd0, 1'b0, 1'b0, trig_marker, 1'b0, mode_ber};
      3'd1: reg_rd <= {29'd0, locked, capt_done, capturing};
      3'd2: reg_rd <= 32'(capt_n);
      3'd3: reg_rd <= err_bits;
      3'd4: reg_rd <= words[31:0];
      3'd5: reg_rd <= err_words;
      3'd6: reg_rd <= words[63:32];
      default: reg_rd <= '0;
    endcase
  end

  assign bus_rdata = !sel_mem ? reg_rd : (sel_hi ? 32'(cap_rd[LINK_W-1:32]) : cap_rd[31:0]);
endmodule

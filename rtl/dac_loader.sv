// dac_loader: loads the 32 pedestal codes into the 4 octal serial DACs.
//
// The pedestal voltage subtracted in each channel's amplifier comes from a
// serial DAC; the board has 4 octal DACs for its 32 channels. On `start` the
// loader sends 8 frames, one per DAC input, to all 4 DACs in parallel: the
// DACs share sclk and cs_n and each has its own data line. A frame is 16
// bits, MSB first, {input address[3:0], code[11:0]}; channel c goes to DAC
// c/8, input c%8. The data line changes while sclk is low and is stable at
// the rising edge; cs_n goes high for one bit time between frames to latch
// them. The 4 octal DACs follow the board description; the frame format,
// 12-bit codes and the clocking are this design's (the DAC part is not
// given).
//
// Timing: one sclk half period is CLK_DIV clocks; a full load takes
// 8 * 17 * 2 * CLK_DIV clocks; busy is high meanwhile.
module dac_loader
  import adf_pkg::*;
#(
  parameter int N_DAC   = 4,
  parameter int CLK_DIV = 4
) (
  input  logic                          clk,
  input  logic                          rst_n,
  input  logic                          start,
  input  logic [N_DAC*8-1:0][DAC_W-1:0] pedestal,
  output logic                          busy,
  output logic                          sclk,
  output logic                          cs_n,
  output logic [N_DAC-1:0]              sdi
);
  localparam int DW = (CLK_DIV > 1) ? $clog2(CLK_DIV) : 1;

  logic [DW-1:0] div;
  logic          half;    // 0: sclk low half, 1: sclk high half
  logic [4:0]    bitn;    // 0..15 data bits, 16 = gap with cs_n high
  logic [2:0]    input_n; // DAC input being loaded

  wire tick = (div == DW'(CLK_DIV - 1));

  // Frame of the current input and of the next one, for every DAC.
  logic [N_DAC-1:0][15:0] cur_frame, nxt_frame, first_frame;
  always_comb begin
    for (int d = 0; d < N_DAC; d++) begin
      first_frame[d] = {4'd0, pedestal[d*8]};
      cur_frame[d]   = {1'b0, input_n, pedestal[d*8 + int'(input_n)]};
      nxt_frame[d]   = {1'b0, input_n + 3'd1, pedestal[d*8 + ((int'(input_n) + 1) % 8)]};
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      busy    <= 1'b0;
      div     <= '0;
      half    <= 1'b0;
      bitn    <= '0;
      input_n <= '0;
      sclk    <= 1'b0;
      cs_n    <= 1'b1;
      sdi     <= '0;
    end else if (!busy) begin
      if (start) begin
        busy    <= 1'b1;
        div     <= '0;
        half    <= 1'b0;
        bitn    <= '0;
        input_n <= '0;
        cs_n    <= 1'b0;
        for (int d = 0; d < N_DAC; d++) sdi[d] <= first_frame[d][15];
      end
    end else begin
      div <= tick ? '0 : div + 1'b1;
      if (tick) begin
        half <= ~half;
        if (!half) begin
          sclk <= (bitn < 5'd16);          // rising edge: DAC samples sdi
        end else begin
          sclk <= 1'b0;
          if (bitn == 5'd16) begin
            if (input_n == 3'd7) begin
              busy <= 1'b0;
            end else begin
              input_n <= input_n + 1'b1;
              bitn    <= '0;
              cs_n    <= 1'b0;
              for (int d = 0; d < N_DAC; d++) sdi[d] <= nxt_frame[d][15];
            end
          end else begin
            bitn <= bitn + 1'b1;
            if (bitn == 5'd15) cs_n <= 1'b1;
            else
              for (int d = 0; d < N_DAC; d++) sdi[d] <= cur_frame[d][4'd14 - bitn[3:0]];
          end
        end
      end
    end
  end
endmodule

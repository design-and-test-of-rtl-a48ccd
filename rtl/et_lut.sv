// et_lut: final calibration look-up table of one channel.
//
// The crossing value from the peak detector is shifted right arithmetically
// by `shift`, clamped to 0..1023 (this is the clipping around zero: negative
// values give address 0) and used as the address of a programmable 1024 x 8
// table whose output is the 8-bit transverse energy sent to the trigger
// boards. A calibration table after the peak detector follows the board
// description; its size, the shift and the clamp are this design's choices.
//
// Timing: et_valid one clock after in_valid. Bus port: bus_we writes
// bus_wdata at bus_addr; bus_rdata is the entry at bus_addr one clock later.
module et_lut
  import adf_pkg::*;
#(
  parameter int ADDR_W = LUT_AW
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic [3:0]        shift,
  input  logic              in_valid,
  input  filt_t             in_val,
  output logic              et_valid,
  output et_t               et,
  output logic [ADDR_W-1:0] lut_addr,
  input  logic [ADDR_W-1:0] bus_addr,
  input  et_t               bus_wdata,
  input  logic              bus_we,
  output et_t               bus_rdata
);
  et_t   mem [2**ADDR_W];
  filt_t shifted;

  always_comb begin
    shifted = in_val >>> shift;
    if (shifted < 0)                          lut_addr = '0;
    else if (shifted > filt_t'(2**ADDR_W - 1)) lut_addr = '1;
    else                                      lut_addr = shifted[ADDR_W-1:0];
  end

  always_ff @(posedge clk) begin
    if (!rst_n) et_valid <= 1'b0;
    else        et_valid <= in_valid;
  end

  always_ff @(posedge clk) begin
    if (in_valid) et <= mem[lut_addr];
    if (bus_we)   mem[bus_addr] <= bus_wdata;
    bus_rdata <= mem[bus_addr];
  end
endmodule

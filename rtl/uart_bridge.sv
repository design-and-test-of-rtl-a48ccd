// uart_bridge: RS232 link from the control PC to the link tester's
// register bus.
//
// The PC drives the tester over a serial port. This module receives bytes
// (8 data bits, LSB first, no parity, 1 stop bit), decodes simple
// commands and runs them on a word-addressed register bus:
//   write: 'W' (0x57), address[15:8], address[7:0], data MSB first (4 bytes)
//   read:  'R' (0x52), address[15:8], address[7:0]; the bridge answers with
//          the 4 data bytes, MSB first.
// A byte that is not a command where a command is expected is ignored, so
// the PC can resynchronise by sending a few non-command bytes. A byte whose
// stop bit is 0 is discarded. Bytes that arrive while a read reply is
// being sent are ignored. Controlling the tester from a PC over RS232
// follows the system description; the byte protocol, the 8N1 format and the
// default rate (115200 baud, CLK_DIV = 526 clocks of 60.56 MHz per bit) are
// this design's choices.
//
// Timing: rxd is synchronised by two registers and sampled in the middle of
// each bit, CLK_DIV clocks apart. bus_we pulses for one clock once the last
// data byte of a write has been received; for a read, bus_rdata is taken
// two clocks after the address is complete, then sent on txd.
module uart_bridge #(
  parameter int CLK_DIV = 526,
  parameter int AW      = 13
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          rxd,
  output logic          txd,
  output logic [AW-1:0] bus_addr,
  output logic [31:0]   bus_wdata,
  output logic          bus_we,
  input  logic [31:0]   bus_rdata
);
  localparam int CW = $clog2(CLK_DIV + 1);
  localparam logic [7:0] CMD_WR = 8'h57, CMD_RD = 8'h52;

  // ---- receiver
  logic [1:0]    rx_sync;
  logic          rx_busy;
  logic [CW-1:0] rx_cnt;
  logic [3:0]    rx_bit;
  logic [7:0]    rx_sh, rx_byte;
  logic          rx_stb;

  always_ff @(posedge clk)
    if (!rst_n) begin
      rx_sync <= 2'b11;
      rx_busy <= 1'b0;
      rx_cnt  <= '0;
      rx_bit  <= '0;
      rx_sh   <= '0;
      rx_byte <= '0;
      rx_stb  <= 1'b0;
    end else begin
      rx_sync <= {rx_sync[0], rxd};
      rx_stb  <= 1'b0;
      if (!rx_busy) begin
        if (!rx_sync[1]) begin                 // start bit edge
          rx_busy <= 1'b1;
          rx_cnt  <= CW'(CLK_DIV / 2);
          rx_bit  <= '0;
        end
      end else if (rx_cnt != 0) begin
        rx_cnt <= rx_cnt - 1'b1;
      end else begin
        rx_cnt <= CW'(CLK_DIV - 1);
        rx_bit <= rx_bit + 1'b1;
        if (rx_bit == 0) begin
          if (rx_sync[1]) rx_busy <= 1'b0;     // glitch, not a start bit
        end else if (rx_bit <= 8) begin
          rx_sh <= {rx_sync[1], rx_sh[7:1]};
        end else begin                         // stop bit
          rx_busy <= 1'b0;
          if (rx_sync[1]) begin
            rx_stb  <= 1'b1;
            rx_byte <= rx_sh;
          end
        end
      end
    end

  // ---- transmitter
  logic          tx_start, tx_busy;
  logic [7:0]    tx_byte;
  logic [CW-1:0] tx_cnt;
  logic [3:0]    tx_bit;
  logic [8:0]    tx_sh;

  always_ff @(posedge clk)
    if (!rst_n) begin
      txd     <= 1'b1;
      tx_busy <= 1'b0;
      tx_cnt  <= '0;
      tx_bit  <= '0;
      tx_sh   <= '1;
    end else if (!tx_busy) begin
      txd <= 1'b1;
      if (tx_start) begin
        tx_busy <= 1'b1;
        txd     <= 1'b0;                       // start bit
        tx_sh   <= {1'b1, tx_byte};            // data, then the stop bit
        tx_cnt  <= CW'(CLK_DIV - 1);
        tx_bit  <= '0;
      end
    end else if (tx_cnt != 0) begin
      tx_cnt <= tx_cnt - 1'b1;
    end else if (tx_bit == 9) begin
      tx_busy <= 1'b0;                         // stop bit has lasted one bit time
    end else begin
      txd    <= tx_sh[0];
      tx_sh  <= {1'b1, tx_sh[8:1]};
      tx_bit <= tx_bit + 1'b1;
      tx_cnt <= CW'(CLK_DIV - 1);
    end

  // ---- command decoder
  typedef enum logic [2:0] {P_CMD, P_ADDR, P_DATA, P_WAIT, P_LATCH, P_SEND} pstate_t;
  pstate_t       ps;
  logic          is_wr;
  logic [1:0]    n;
  logic [15:0]   addr_sh;
  logic [31:0]   data_sh;

  assign bus_addr = addr_sh[AW-1:0];

  always_ff @(posedge clk)
    if (!rst_n) begin
      ps        <= P_CMD;
      is_wr     <= 1'b0;
      n         <= '0;
      addr_sh   <= '0;
      data_sh   <= '0;
      bus_wdata <= '0;
      bus_we    <= 1'b0;
      tx_start  <= 1'b0;
      tx_byte   <= '0;
    end else begin
      bus_we   <= 1'b0;
      tx_start <= 1'b0;
      unique case (ps)
        P_CMD:
          if (rx_stb && (rx_byte == CMD_WR || rx_byte == CMD_RD)) begin
            is_wr <= (rx_byte == CMD_WR);
            n     <= '0;
            ps    <= P_ADDR;
          end
        P_ADDR:
          if (rx_stb) begin
            addr_sh <= {addr_sh[7:0], rx_byte};
            n       <= n + 1'b1;
            if (n == 1) begin
              n  <= '0;
              ps <= is_wr ? P_DATA : P_WAIT;
            end
          end
        P_DATA:
          if (rx_stb) begin
            data_sh <= {data_sh[23:0], rx_byte};
            n       <= n + 1'b1;
            if (n == 3) begin
              bus_wdata <= {data_sh[23:0], rx_byte};
              bus_we    <= 1'b1;
              ps        <= P_CMD;
            end
          end
        P_WAIT:  ps <= P_LATCH;                // address settles, data is read
        P_LATCH: begin
          data_sh <= bus_rdata;
          n       <= '0;
          ps      <= P_SEND;
        end
        P_SEND:
          if (!tx_busy && !tx_start) begin
            tx_start <= 1'b1;
            tx_byte  <= data_sh[31:24];
            data_sh  <= {data_sh[23:0], 8'h00};
            n        <= n + 1'b1;
            if (n == 3) ps <= P_CMD;
          end
        default: ps <= P_CMD;
      endcase
    end
endmodule

// peak_detector: 3-point peak detector on the 15.14 MHz filter stream,
// reducing the two filter outputs of a crossing to one value per crossing.
//
// With the detector on (pk_en), filter output y[n] is kept only if
// y[n] > y[n-1] and y[n] >= y[n+1]; otherwise it becomes 0. The decision for
// y[n] needs y[n+1], so it is taken when y[n+1] arrives. Two neighbouring
// outputs cannot both be peaks, so at most one of the two outputs of a
// crossing is non-zero and the crossing value is that one (or 0). With the
// detector off, the crossing value is the output of slot slot_sel. A 3-point
// detector that can be turned off follows the board description; the exact
// comparison rule and the slot choice are this design's.
//
// Timing: bc_valid pulses once per crossing, one clock after the y_valid of
// the output that completes the crossing (the slot-1 output judged, i.e.
// when the slot-0 output of the next crossing arrives, with pk_en; the
// slot-1 output itself without).
module peak_detector
  import adf_pkg::*;
(
  input  logic   clk,
  input  logic   rst_n,
  input  logic   pk_en,
  input  logic   slot_sel,
  input  logic   y_valid,
  input  logic   y_slot,
  input  filt_t  y,
  output logic   bc_valid,
  output filt_t  bc_val
);
  filt_t y_prev, y_cur;     // y[n-1], y[n]
  logic  cur_slot;          // slot of y[n]
  filt_t first_val;         // judged value of slot 0 of this crossing
  filt_t judged;
  logic  judged_slot;

  always_comb begin
    if (pk_en) begin
      judged      = (y_cur > y_prev && y_cur >= y) ? y_cur : '0;
      judged_slot = cur_slot;
    end else begin
      judged      = y;
      judged_slot = y_slot;
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      y_prev    <= '0;
      y_cur     <= '0;
      cur_slot  <= 1'b1;
      first_val <= '0;
      bc_valid  <= 1'b0;
      bc_val    <= '0;
    end else begin
      bc_valid <= 1'b0;
      if (y_valid) begin
        y_prev   <= y_cur;
        y_cur    <= y;
        cur_slot <= y_slot;
        if (!judged_slot) begin
          first_val <= judged;
        end else begin
          bc_valid <= 1'b1;
          if (pk_en) bc_val <= (first_val != '0) ? first_val : judged;
          else       bc_val <= slot_sel ? judged : first_val;
        end
      end
    end
  end
endmodule

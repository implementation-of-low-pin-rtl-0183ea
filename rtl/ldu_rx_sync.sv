// ldu_rx_sync: brings the target's LPD clock output and LPDO into the
// controller's clock domain and makes the receiver's sampling strobe.
//
// The target puts each LPDO bit out with the rising edge of its LPD clock
// output, so a bit is stable around the following falling edge. Both inputs
// pass through the same two-flop synchronizer, which keeps them aligned, and
// `bit_en` pulses for one clock when the synchronized clock is seen to fall;
// `lpdo_s` is then sampled mid-bit. The system clock must run at least four
// times as fast as the LPD clock output. This stage is this design's own; the
// published design only says that LPDO is sent in step with the LPD clock output.
// Reset is synchronous, active high; the synchronizers reset to the line's
// idle level (1) and to a low clock.
module ldu_rx_sync (
  input  logic clk,
  input  logic rst,
  input  logic lpdo_clk,   // LPD clock output of the target (asynchronous)
  input  logic lpdo,       // LPDO of the target (asynchronous)
  output logic lpdo_s,     // synchronized LPDO
  output logic bit_en      // one-clock pulse: sample lpdo_s now
);

  logic [2:0] clk_sync;    // [0] first stage, [2] previous synchronized value
  logic [1:0] dat_sync;

  always_ff @(posedge clk) begin
    if (rst) begin
      clk_sync <= '0;
      dat_sync <= '1;
    end else begin
      clk_sync <= {clk_sync[1:0], lpdo_clk};
      dat_sync <= {dat_sync[0], lpdo};
    end
  end

  assign lpdo_s = dat_sync[1];
  assign bit_en = clk_sync[2] && !clk_sync[1];

endmodule

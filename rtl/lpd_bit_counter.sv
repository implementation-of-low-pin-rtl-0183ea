// lpd_bit_counter: the frame bit counter shared by the LPD transmitter and
// receiver.
//
// The transmit and receive state machines enable it while they shift a frame
// and compare its value with the index of the last frame bit (10 for frame B,
// 18 for frame H). It is a plain synchronous up-counter: `clr` has priority
// and returns it to zero on the next rising clock edge, otherwise `en` adds
// one per clock. The counter itself does not stop at the last bit; the state
// machine that enables it decides when the frame is complete. The width
// default (5 bits, 0..31) covers the 19 bits of frame H. Reset is
// synchronous and active high, like the RESET input of the transmitter and
// receiver state diagrams.
module lpd_bit_counter #(
  parameter int unsigned WIDTH = 5
) (
  input  logic             clk,
  input  logic             rst,
  input  logic             clr,    // return to zero
  input  logic             en,     // COUNT_EN: count one bit
  output logic [WIDTH-1:0] count
);

  always_ff @(posedge clk) begin
    if (rst || clr) count <= '0;
    else if (en)    count <= count + WIDTH'(1);
  end

endmodule

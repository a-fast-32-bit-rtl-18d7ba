// cvp_gain_monitor: block floating point gain monitor of the CVP.
//
// Holds the largest exponent reported by the modulus extraction stage since
// it was last cleared, and drives it on the 4-bit MAX output. Software reads
// MAX at the end of a block (an FFT pass, say) and chooses the shift for the
// next pass so that the data keeps its precision without overflowing.
//
// `clr` starts a new block: the register takes the current exponent if `en`
// is set, zero otherwise. `en` marks the cycles whose exponent counts. One
// register stage. The document states the purpose; the clear and enable
// controls are this design's choice.
module cvp_gain_monitor
  import cvp_pkg::*;
(
  input  logic          clk,
  input  logic          rst_n,
  input  logic [EW-1:0] expo,
  input  logic          en,
  input  logic          clr,
  output logic [EW-1:0] max_o
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) max_o <= '0;
    else if (clr) max_o <= en ? expo : '0;
    else if (en && expo > max_o) max_o <= expo;
  end

endmodule

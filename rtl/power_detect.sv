// power_detect: turns one complex matched-filter output into detected power.
//
// The filter outputs are detected (squared magnitude) before they are stored
// in the filter-output plane. Power = re^2 + im^2, shifted right by PSHIFT
// and saturated to the FOP word width. The detection step follows the design;
// the shift and the saturation are this design's own choices for fitting the
// 2W-bit result into one FOP word.
//
// Interface and timing: combinational.
module power_detect #(
  parameter int unsigned W      = 32, // input width per component
  parameter int unsigned PW     = 32, // output power width
  parameter int unsigned PSHIFT = 16  // right shift applied to re^2+im^2
) (
  input  logic signed [W-1:0] re,
  input  logic signed [W-1:0] im,
  output logic [PW-1:0]       power
);
  localparam int unsigned SW = 2 * W + 1;
  logic [SW-1:0] sq, shifted;

  always_comb begin
    sq      = SW'(unsigned'(SW'(re) * SW'(re))) + SW'(unsigned'(SW'(im) * SW'(im)));
    shifted = sq >> PSHIFT;
    power   = (|(shifted >> PW)) ? '1 : PW'(shifted);
  end
endmodule

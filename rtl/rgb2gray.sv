// rgb2gray: converts one 24-bit colour pixel to an 8-bit grey intensity.
//
// The pipeline works on intensity only, so the three colour channels are folded
// into one value with the ITU-R BT.601 luma weights in 8-bit fixed point:
//   Y = (77 R + 150 G + 29 B + 128) >> 8
// The weights sum to 256, so white stays 255. The byte order is B in [7:0],
// G in [15:8], R in [23:16]. Both the weights and the byte order are this
// design's choice; the grey conversion itself is the first step of the ORB flow.
// Purely combinational; the caller registers the result.
module rgb2gray (
  input  logic [23:0] rgb,
  output logic [7:0]  gray
);
  logic [15:0] acc;

  always_comb begin
    acc  = 16'd77 * rgb[23:16] + 16'd150 * rgb[15:8] + 16'd29 * rgb[7:0] + 16'd128;
    gray = acc[15:8];
  end
endmodule

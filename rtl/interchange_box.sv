// interchange_box: the 2-input, 2-output switch that multistage Cube and
// Shuffle-Exchange networks are built from.
//
// With ctrl = 0 the box passes a->y0 and b->y1 (straight); with ctrl = 1 it
// passes a->y1 and b->y0 (exchange). It is purely combinational; a one-bit
// version is the seven-gate NAND box the network cost figures are based on,
// and B > 1 gives a B-bit-wide plane of identical boxes sharing one control.
// Only the straight and exchange states exist, as in the source design;
// the width parameter is this design's generalisation.
module interchange_box #(
  parameter int unsigned B = 1
) (
  input  logic         ctrl,
  input  logic [B-1:0] a,
  input  logic [B-1:0] b,
  output logic [B-1:0] y0,
  output logic [B-1:0] y1
);
  always_comb begin
    y0 = ctrl ? b : a;
    y1 = ctrl ? a : b;
  end
endmodule

// cube_stage: one stage of a Generalized Cube network, implementing Cube_STAGE.
//
// The stage holds N/2 interchange boxes. Box k joins line u = k with a zero
// inserted at bit STAGE and line u + 2**STAGE, i.e. the two PEs whose
// addresses differ only in bit STAGE. ctrl[k] = 1 exchanges them (the data
// of each PE moves to Cube_STAGE of its address); ctrl[k] = 0 passes them
// straight. One control bit per box gives individual box control; driving
// all bits alike gives individual stage control. Combinational.
// The box numbering is this design's convention.
module cube_stage
  import icn_pkg::*;
#(
  parameter int unsigned N     = 1024,
  parameter int unsigned B     = 1,
  parameter int unsigned STAGE = 0
) (
  input  logic [N-1:0][B-1:0] din,
  input  logic [N/2-1:0]      ctrl,
  output logic [N-1:0][B-1:0] dout
);
  for (genvar k = 0; k < N / 2; k++) begin : g_box
    localparam int U = insert_zero(k, STAGE);
    localparam int L = cube_fn(U, STAGE);
    interchange_box #(.B(B)) u_box (
      .ctrl(ctrl[k]), .a(din[U]), .b(din[L]), .y0(dout[U]), .y1(dout[L])
    );
  end
endmodule

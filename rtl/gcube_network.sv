// gcube_network: combinational n-stage Generalized Cube network.
//
// n = log2(N) cube_stage instances are cascaded, stage n-1 at the input and
// stage 0 at the output; stage i performs Cube_i on the boxes whose control
// bit is set. With individual box control (ctrl[s][k] for box k of stage s)
// one pass routes any permutation the Generalized Cube passes, including
// all uniform shifts of skewed storage. The whole network is combinational:
// its delay is n box delays, and DTRin/DTRout are outside it.
// Following the source design: the stage order, interchange boxes and the
// N = 1024 default. Width B > 1 stacks B one-bit planes (this design's
// parameterisation of the "W planes" arrangement).
module gcube_network #(
  parameter int unsigned N = 1024,
  parameter int unsigned B = 1,
  localparam int unsigned LOGN = $clog2(N)
) (
  input  logic [N-1:0][B-1:0]        din,
  input  logic [LOGN-1:0][N/2-1:0]   ctrl,
  output logic [N-1:0][B-1:0]        dout
);
  // lvl[LOGN] is the input, lvl[s] is the output of stage s.
  logic [N-1:0][B-1:0] lvl [LOGN+1];

  assign lvl[LOGN] = din;
  for (genvar s = LOGN - 1; s >= 0; s--) begin : g_stage
    cube_stage #(.N(N), .B(B), .STAGE(s)) u_stage (
      .din(lvl[s+1]), .ctrl(ctrl[s]), .dout(lvl[s])
    );
  end
  assign dout = lvl[0];
endmodule

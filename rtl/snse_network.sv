// snse_network: n-stage Shuffle-No Shuffle-Exchange network.
//
// n snse_stage instances in series, stage 0 at the input. Each stage may
// do nothing, Exchange, Shuffle or Shuffle-Exchange, so one pass performs
// any sequence of up to n Shuffle-Exchange steps; x steps of a
// recirculating Shuffle-Exchange network take ceil(x/n) passes. With every
// shuffle bit set it is the n-stage Shuffle-Exchange (omega) network.
// Control: shuffle[s], ex[s][k], exs[s][k]. Combinational, no registers.
module snse_network #(
  parameter int unsigned N = 1024,
  parameter int unsigned B = 1,
  localparam int unsigned LOGN = $clog2(N)
) (
  input  logic [N-1:0][B-1:0]      din,
  input  logic [LOGN-1:0]          shuffle,
  input  logic [LOGN-1:0][N/2-1:0] ex,
  input  logic [LOGN-1:0][N/2-1:0] exs,
  output logic [N-1:0][B-1:0]      dout
);
  logic [N-1:0][B-1:0] lvl [LOGN+1];

  assign lvl[0] = din;
  for (genvar s = 0; s < LOGN; s++) begin : g_stage
    snse_stage #(.N(N), .B(B)) u_stage (
      .din(lvl[s]), .shuffle(shuffle[s]), .ex(ex[s]), .exs(exs[s]), .dout(lvl[s+1]));
  end
  assign dout = lvl[LOGN];
endmodule

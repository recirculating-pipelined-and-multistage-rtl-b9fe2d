// snse_stage: one stage of the Shuffle-No Shuffle-Exchange (SNSE) network.
//
// The stage offers four operations: nothing, Exchange, Shuffle, and
// Shuffle followed by Exchange. Two paths are built for every pair of rows:
// the no-shuffle path puts the unshuffled data through an interchange box
// controlled by ex[k], the shuffle path puts the shuffled data (line
// Shuffle(p) receives PE p) through a box controlled by exs[k]; a 2-to-1
// mux per row, switched by the single stage-wide shuffle signal, chooses
// the path. A Shuffle therefore affects all PEs of the stage, and an
// Exchange always acts on a pair PE(2k), PE(2k+1). No broadcast states.
// Combinational. The two-path form follows the stage's control count of
// 1 + N/2 + N/2 signals.
module snse_stage
  import icn_pkg::*;
#(
  parameter int unsigned N = 1024,
  parameter int unsigned B = 1,
  localparam int unsigned LOGN = $clog2(N)
) (
  input  logic [N-1:0][B-1:0] din,
  input  logic                shuffle,
  input  logic [N/2-1:0]      ex,
  input  logic [N/2-1:0]      exs,
  output logic [N-1:0][B-1:0] dout
);
  logic [N-1:0][B-1:0] shuf, ns_out, s_out;

  for (genvar p = 0; p < N; p++) begin : g_shuf
    assign shuf[shuffle_fn(p, LOGN)] = din[p];
  end

  for (genvar k = 0; k < N / 2; k++) begin : g_pair
    interchange_box #(.B(B)) u_ns (
      .ctrl(ex[k]), .a(din[2*k]), .b(din[2*k+1]), .y0(ns_out[2*k]), .y1(ns_out[2*k+1]));
    interchange_box #(.B(B)) u_s (
      .ctrl(exs[k]), .a(shuf[2*k]), .b(shuf[2*k+1]), .y0(s_out[2*k]), .y1(s_out[2*k+1]));
  end

  assign dout = shuffle ? s_out : ns_out;
endmodule

// recirc_cube_net: the single stage of a recirculating Cube network.
//
// Every PE p has one driver per Cube function: when en[p][i] is set it
// drives its data onto the line of PE Cube_i(p). The drivers of each
// receiving line are OR-tied (the tri-state/wired-OR of the source design is
// written as AND-OR logic), so a PE may send to several PEs in one pass and
// a receiver sees the OR of everything sent to it. rx_valid[p] tells that
// at least one driver reached PE p (this design's addition, so the
// recirculating wrapper can tell "nothing received" from zero data).
// N*n drivers; combinational.
module recirc_cube_net
  import icn_pkg::*;
#(
  parameter int unsigned N = 1024,
  parameter int unsigned B = 1,
  localparam int unsigned LOGN = $clog2(N)
) (
  input  logic [N-1:0][B-1:0]    din,
  input  logic [N-1:0][LOGN-1:0] en,
  output logic [N-1:0][B-1:0]    dout,
  output logic [N-1:0]           rx_valid
);
  for (genvar p = 0; p < N; p++) begin : g_rx
    logic [LOGN-1:0][B-1:0] drv;
    logic [LOGN-1:0]        hit;
    for (genvar i = 0; i < LOGN; i++) begin : g_fn
      localparam int SRC = cube_fn(p, i);   // Cube_i is its own inverse
      assign hit[i] = en[SRC][i];
      assign drv[i] = {B{en[SRC][i]}} & din[SRC];
    end
    always_comb begin
      dout[p] = '0;
      for (int i = 0; i < LOGN; i++) dout[p] = dout[p] | drv[i];
    end
    assign rx_valid[p] = |hit;
  end
endmodule

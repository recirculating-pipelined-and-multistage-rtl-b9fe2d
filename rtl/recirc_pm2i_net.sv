// recirc_pm2i_net: the single stage of a recirculating PM2I network.
//
// Built like the recirculating Cube: PE p drives PE p + 2**i mod N when
// en[p][i] is set (i = 0..n-1) and PE p - 2**i mod N when en[p][n+i] is
// set (i = 0..n-2). PM2-(n-1) is the same function as PM2+(n-1), so it has
// no separate driver: 2n-1 drivers per PE. Receivers OR their drivers and
// rx_valid[p] flags that PE p was reached by any driver. Combinational.
// The enable bit layout and the valid flag are this design's choices.
module recirc_pm2i_net
  import icn_pkg::*;
#(
  parameter int unsigned N = 1024,
  parameter int unsigned B = 1,
  localparam int unsigned LOGN = $clog2(N),
  localparam int unsigned NF   = 2 * LOGN - 1
) (
  input  logic [N-1:0][B-1:0]  din,
  input  logic [N-1:0][NF-1:0] en,
  output logic [N-1:0][B-1:0]  dout,
  output logic [N-1:0]         rx_valid
);
  for (genvar p = 0; p < N; p++) begin : g_rx
    logic [NF-1:0][B-1:0] drv;
    logic [NF-1:0]        hit;
    for (genvar f = 0; f < NF; f++) begin : g_fn
      // f < LOGN: PM2+f, sender is p - 2**f; otherwise PM2-(f-LOGN), sender p + 2**(f-LOGN)
      localparam int SRC = (f < LOGN) ? pm2_minus(p, f, LOGN) : pm2_plus(p, f - LOGN, LOGN);
      assign hit[f] = en[SRC][f];
      assign drv[f] = {B{en[SRC][f]}} & din[SRC];
    end
    always_comb begin
      dout[p] = '0;
      for (int f = 0; f < NF; f++) dout[p] = dout[p] | drv[f];
    end
    assign rx_valid[p] = |hit;
  end
endmodule

// recirc_se_net: the single stage of a recirculating Shuffle-Exchange network.
//
// PE p drives PE Shuffle(p) when en[p][0] is set and PE Exchange(p) when
// en[p][1] is set. Each receiver ORs the line from the PE that shuffles to
// it (Unshuffle of its own address) with the line from its exchange
// partner: three gates per PE, as in the source circuit. rx_valid[p] flags
// that PE p was reached. Combinational. With conventional control every
// active PE enables the same one function per pass; independent function
// control lets each PE choose, or enable both.
module recirc_se_net
  import icn_pkg::*;
#(
  parameter int unsigned N = 1024,
  parameter int unsigned B = 1,
  localparam int unsigned LOGN = $clog2(N)
) (
  input  logic [N-1:0][B-1:0] din,
  input  logic [N-1:0][1:0]   en,
  output logic [N-1:0][B-1:0] dout,
  output logic [N-1:0]        rx_valid
);
  for (genvar p = 0; p < N; p++) begin : g_rx
    localparam int SSRC = unshuffle_fn(p, LOGN);
    localparam int ESRC = exchange_fn(p);
    assign dout[p] = ({B{en[SSRC][0]}} & din[SSRC]) | ({B{en[ESRC][1]}} & din[ESRC]);
    assign rx_valid[p] = en[SSRC][0] | en[ESRC][1];
  end
endmodule

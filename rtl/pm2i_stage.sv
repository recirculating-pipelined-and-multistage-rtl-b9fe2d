// pm2i_stage: one stage of a multistage Plus-Minus 2**i (PM2I) network,
// the row module of a data-manipulator style network.
//
// Each row j has a sending side of three gates, enabled by en[j][0]
// (straight, to row j), en[j][1] (to row j + 2**STAGE mod N) and en[j][2]
// (to row j - 2**STAGE mod N). The receiving side of each row ORs the three
// lines that can reach it, so a row may broadcast to several rows and data
// arriving from two rows at once are ORed, as the NAND-NAND circuit would.
// That is four gates per row per stage. For STAGE = n-1 the +2**i and -2**i
// lines reach the same row. Combinational. The per-row three-enable control
// is this design's reading of the row module.
module pm2i_stage
  import icn_pkg::*;
#(
  parameter int unsigned N     = 1024,
  parameter int unsigned B     = 1,
  parameter int unsigned STAGE = 0,
  localparam int unsigned LOGN = $clog2(N)
) (
  input  logic [N-1:0][B-1:0] din,
  input  logic [N-1:0][2:0]   en,
  output logic [N-1:0][B-1:0] dout
);
  for (genvar j = 0; j < N; j++) begin : g_row
    // rows whose +2**i / -2**i line lands on row j
    localparam int FROM_PLUS  = pm2_minus(j, STAGE, LOGN);
    localparam int FROM_MINUS = pm2_plus(j, STAGE, LOGN);
    always_comb begin
      dout[j] = ({B{en[j][0]}}          & din[j])
              | ({B{en[FROM_PLUS][1]}}  & din[FROM_PLUS])
              | ({B{en[FROM_MINUS][2]}} & din[FROM_MINUS]);
    end
  end
endmodule

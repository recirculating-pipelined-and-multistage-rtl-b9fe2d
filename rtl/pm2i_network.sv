// pm2i_network: combinational n-stage PM2I network (data manipulator form).
//
// n pm2i_stage instances are cascaded with stage n-1 at the input and stage
// 0 at the output, so stage i can move data by +-2**i. en[s][j] holds the
// three send enables (straight, +2**s, -2**s) of row j in stage s. A route
// from PE a to PE b is any signed-digit decomposition of b - a mod N with
// one digit per stage. Delay is n stage delays; no registers.
// The stage order follows the source design's eight-PE example.
module pm2i_network #(
  parameter int unsigned N = 1024,
  parameter int unsigned B = 1,
  localparam int unsigned LOGN = $clog2(N)
) (
  input  logic [N-1:0][B-1:0]           din,
  input  logic [LOGN-1:0][N-1:0][2:0]   en,
  output logic [N-1:0][B-1:0]           dout
);
  logic [N-1:0][B-1:0] lvl [LOGN+1];

  assign lvl[LOGN] = din;
  for (genvar s = LOGN - 1; s >= 0; s--) begin : g_stage
    pm2i_stage #(.N(N), .B(B), .STAGE(s)) u_stage (
      .din(lvl[s+1]), .en(en[s]), .dout(lvl[s])
    );
  end
  assign dout = lvl[0];
endmodule

// pipelined_gcube: Generalized Cube network with a register after every
// stage except the last (an n-stage pipeline).
//
// Data enter at stage n-1; after each of stages n-1 .. 1 a B-bit-per-line
// register holds the result, so a new segment can enter every clock. Stage
// 0 is left unregistered: its output goes straight to DTRout, which acts as
// the n-th pipeline register. A segment presented on din in clock c is
// therefore captured by DTRout at the end of clock c + n - 1, and S
// segments take n + S - 1 clocks, the Tp = (dr + dms)(n + S - 1) of the
// source design. Box controls are shared by all stages' segments and must
// be held for the whole transfer (this design's choice). The pipeline
// registers are cleared by the asynchronous active-low reset.
module pipelined_gcube #(
  parameter int unsigned N = 1024,
  parameter int unsigned B = 8,
  localparam int unsigned LOGN = $clog2(N)
) (
  input  logic                       clk,
  input  logic                       rst_n,
  input  logic [N-1:0][B-1:0]        din,
  input  logic [LOGN-1:0][N/2-1:0]   ctrl,
  output logic [N-1:0][B-1:0]        dout
);
  logic [N-1:0][B-1:0] stin  [LOGN];   // input of stage s
  logic [N-1:0][B-1:0] stout [LOGN];   // output of stage s

  assign stin[LOGN-1] = din;
  for (genvar s = LOGN - 1; s >= 0; s--) begin : g_stage
    cube_stage #(.N(N), .B(B), .STAGE(s)) u_stage (
      .din(stin[s]), .ctrl(ctrl[s]), .dout(stout[s])
    );
    if (s > 0) begin : g_reg
      always_ff @(posedge clk or negedge rst_n) begin
        if (!rst_n) stin[s-1] <= '0;
        else        stin[s-1] <= stout[s];
      end
    end
  end
  assign dout = stout[0];
endmodule

// recirc_network: a recirculating (single-stage) SIMD interconnection network
// with DTRin, DTRout and independent function control.
//
// Each PE owns a data transfer register pair. DTRin is loaded by the PEs
// (dtrin_we). On a pass (pass = 1 for one clock) the network input is taken
// from DTRin (src_dtrout = 0, first pass) or from DTRout (src_dtrout = 1,
// recirculation), sent through one single-stage network, and written into
// DTRout at the end of the same clock: one DTRin load followed by M passes
// completes an M-function transfer in M + 1 clocks, matching the delay
// dr + M(dr + dm + drn) of the source design.
//
// Each PE has its own control register (ctrl_we loads them all): an active
// bit and a function set of NF bits. Only an active PE sends; an inactive PE
// still receives. Every PE may enable any set of functions, so different PEs
// can use different functions in the same pass (independent function
// control); loading all registers alike gives conventional SIMD control.
// KIND selects the network:
//   NET_CUBE  NF = n,      bit i = Cube_i
//   NET_PM2I  NF = 2n - 1, bit i = PM2+i, bit n+i = PM2-i (i < n-1)
//   NET_SE    NF = 2,      bit 0 = Shuffle, bit 1 = Exchange
// A PE that receives nothing in a pass keeps its DTRout; dtrout_valid
// records whether the last pass wrote it. Both are this design's choices, as
// are the asynchronous active-low reset and the register-per-PE control
// loading.
module recirc_network
  import icn_pkg::*;
#(
  parameter net_kind_e   KIND = NET_CUBE,
  parameter int unsigned N    = 1024,
  parameter int unsigned B    = 1,
  localparam int unsigned LOGN = $clog2(N),
  localparam int unsigned NF   = (KIND == NET_CUBE) ? LOGN :
                                 (KIND == NET_PM2I) ? 2 * LOGN - 1 : 2
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  dtrin_we,
  input  logic [N-1:0][B-1:0]   dtrin_d,
  input  logic                  ctrl_we,
  input  logic [N-1:0]          ctrl_active,
  input  logic [N-1:0][NF-1:0]  ctrl_fn,
  input  logic                  pass,
  input  logic                  src_dtrout,
  output logic [N-1:0][B-1:0]   dtrout_q,
  output logic [N-1:0]          dtrout_valid
);
  logic [N-1:0][B-1:0]  dtrin_q;
  logic [N-1:0]         active_q;
  logic [N-1:0][NF-1:0] fn_q;
  logic [N-1:0][NF-1:0] en;
  logic [N-1:0][B-1:0]  net_in, net_out;
  logic [N-1:0]         net_valid;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      dtrin_q  <= '0;
      active_q <= '0;
      fn_q     <= '0;
    end else begin
      if (dtrin_we) dtrin_q <= dtrin_d;
      if (ctrl_we) begin
        active_q <= ctrl_active;
        fn_q     <= ctrl_fn;
      end
    end
  end

  // source multiplexer and sender gating
  always_comb begin
    net_in = src_dtrout ? dtrout_q : dtrin_q;
    for (int p = 0; p < N; p++) en[p] = (pass && active_q[p]) ? fn_q[p] : '0;
  end

  if (KIND == NET_CUBE) begin : g_cube
    recirc_cube_net #(.N(N), .B(B)) u_net (
      .din(net_in), .en(en), .dout(net_out), .rx_valid(net_valid));
  end else if (KIND == NET_PM2I) begin : g_pm2i
    recirc_pm2i_net #(.N(N), .B(B)) u_net (
      .din(net_in), .en(en), .dout(net_out), .rx_valid(net_valid));
  end else begin : g_se
    recirc_se_net #(.N(N), .B(B)) u_net (
      .din(net_in), .en(en), .dout(net_out), .rx_valid(net_valid));
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      dtrout_q     <= '0;
      dtrout_valid <= '0;
    end else if (pass) begin
      for (int p = 0; p < N; p++) begin
        if (net_valid[p]) dtrout_q[p] <= net_out[p];
        dtrout_valid[p] <= net_valid[p];
      end
    end
  end
endmodule

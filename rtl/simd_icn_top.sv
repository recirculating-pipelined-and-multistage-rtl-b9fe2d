// simd_icn_top: the interconnection networks of an N-PE SIMD machine,
// side by side, each with its own DTR-side ports.
//
//  1. Segmented pipelined Generalized Cube (seg_*): each PE's W-bit word is
//     loaded into a shift-register DTRin (dtr_in_piso), sent as S segments
//     of B = W/S bits through an n-stage pipelined Generalized Cube
//     (pipelined_gcube), and collected by a shift-register DTRout
//     (dtr_out_sipo). seg_pipe_ctrl sequences it: a transfer takes n + S - 1
//     clocks after seg_start.
//  2. Segmented combinational Generalized Cube (cmb_*): W-bit DTRs with an
//     S-to-1 multiplexer and demultiplexer (dtr_seg_mux) around a B-bit
//     combinational Generalized Cube (gcube_network); one segment per
//     (long) clock, S clocks per transfer.
//  3. Combinational multistage PM2I network (pm2i_*), 1 bit wide.
//  4. Combinational Shuffle-No Shuffle-Exchange network (snse_*), 1 bit wide.
//  5. Recirculating Cube, PM2I and Shuffle-Exchange networks (rc_*, rp_*,
//     rs_*), 1 bit wide, with DTRin/DTRout and per-PE control registers.
// The PEs, which load DTRin and read DTRout, and the control unit(s), which
// drive the network controls, are outside this module. All logic shares
// clk and an asynchronous active-low rst_n. Putting the alternatives side
// by side, and the widths of the 1-bit networks, are this design's choices;
// the networks and the N = 1024, W = 32 sizes come from the source design,
// the S = 4 default from one of its equal-cost configurations.
module simd_icn_top
  import icn_pkg::*;
#(
  parameter int unsigned N = 1024,
  parameter int unsigned W = 32,
  parameter int unsigned S = 4,
  localparam int unsigned LOGN = $clog2(N),
  localparam int unsigned B    = W / S,
  localparam int unsigned NFP  = 2 * LOGN - 1
) (
  input  logic                        clk,
  input  logic                        rst_n,
  // 1. segmented pipelined Generalized Cube
  input  logic                        seg_load,
  input  logic [N-1:0][W-1:0]         seg_word_in,
  input  logic                        seg_start,
  input  logic [LOGN-1:0][N/2-1:0]    seg_ctrl,
  output logic [N-1:0][W-1:0]         seg_word_out,
  output logic                        seg_busy,
  output logic                        seg_done,
  // 2. segmented combinational Generalized Cube
  input  logic                        cmb_load,
  input  logic [N-1:0][W-1:0]         cmb_word_in,
  input  logic                        cmb_start,
  input  logic [LOGN-1:0][N/2-1:0]    cmb_ctrl,
  output logic [N-1:0][W-1:0]         cmb_word_out,
  output logic                        cmb_busy,
  output logic                        cmb_done,
  // 3. multistage PM2I
  input  logic [N-1:0]                pm2i_in,
  input  logic [LOGN-1:0][N-1:0][2:0] pm2i_en,
  output logic [N-1:0]                pm2i_out,
  // 4. SNSE
  input  logic [N-1:0]                snse_in,
  input  logic [LOGN-1:0]             snse_shuffle,
  input  logic [LOGN-1:0][N/2-1:0]    snse_ex,
  input  logic [LOGN-1:0][N/2-1:0]    snse_exs,
  output logic [N-1:0]                snse_out,
  // 5a. recirculating Cube
  input  logic                        rc_dtrin_we,
  input  logic [N-1:0]                rc_dtrin_d,
  input  logic                        rc_ctrl_we,
  input  logic [N-1:0]                rc_active,
  input  logic [N-1:0][LOGN-1:0]      rc_fn,
  input  logic                        rc_pass,
  input  logic                        rc_src_dtrout,
  output logic [N-1:0]                rc_dtrout,
  output logic [N-1:0]                rc_valid,
  // 5b. recirculating PM2I
  input  logic                        rp_dtrin_we,
  input  logic [N-1:0]                rp_dtrin_d,
  input  logic                        rp_ctrl_we,
  input  logic [N-1:0]                rp_active,
  input  logic [N-1:0][NFP-1:0]       rp_fn,
  input  logic                        rp_pass,
  input  logic                        rp_src_dtrout,
  output logic [N-1:0]                rp_dtrout,
  output logic [N-1:0]                rp_valid,
  // 5c. recirculating Shuffle-Exchange
  input  logic                        rs_dtrin_we,
  input  logic [N-1:0]                rs_dtrin_d,
  input  logic                        rs_ctrl_we,
  input  logic [N-1:0]                rs_active,
  input  logic [N-1:0][1:0]           rs_fn,
  input  logic                        rs_pass,
  input  logic                        rs_src_dtrout,
  output logic [N-1:0]                rs_dtrout,
  output logic [N-1:0]                rs_valid
);
  // ---------------- 1. segmented pipelined Generalized Cube ----------------
  logic                seg_in_shift, seg_out_shift;
  logic [N-1:0][B-1:0] seg_net_in, seg_net_out;

  seg_pipe_ctrl #(.S(S), .DEPTH(LOGN)) u_seg_ctrl (
    .clk, .rst_n, .start(seg_start), .in_shift(seg_in_shift),
    .out_shift(seg_out_shift), .busy(seg_busy), .done(seg_done));

  for (genvar p = 0; p < N; p++) begin : g_seg_pe
    dtr_in_piso #(.W(W), .S(S)) u_dtrin (
      .clk, .rst_n, .load(seg_load), .d(seg_word_in[p]), .shift(seg_in_shift),
      .seg(seg_net_in[p]));
    dtr_out_sipo #(.W(W), .S(S)) u_dtrout (
      .clk, .rst_n, .shift(seg_out_shift), .seg(seg_net_out[p]), .q(seg_word_out[p]));
  end

  pipelined_gcube #(.N(N), .B(B)) u_pipe_net (
    .clk, .rst_n, .din(seg_net_in), .ctrl(seg_ctrl), .dout(seg_net_out));

  // ---------------- 2. segmented combinational Generalized Cube -------------
  logic                cmb_in_shift, cmb_out_shift;
  logic [N-1:0][B-1:0] cmb_net_in, cmb_net_out;

  seg_pipe_ctrl #(.S(S), .DEPTH(1)) u_cmb_ctrl (
    .clk, .rst_n, .start(cmb_start), .in_shift(cmb_in_shift),
    .out_shift(cmb_out_shift), .busy(cmb_busy), .done(cmb_done));

  for (genvar p = 0; p < N; p++) begin : g_cmb_pe
    dtr_seg_mux #(.W(W), .S(S)) u_dtr (
      .clk, .rst_n, .load(cmb_load), .d(cmb_word_in[p]), .next(cmb_in_shift),
      .seg(cmb_net_in[p]), .wr(cmb_out_shift), .seg_in(cmb_net_out[p]),
      .q(cmb_word_out[p]));
  end

  gcube_network #(.N(N), .B(B)) u_cmb_net (
    .din(cmb_net_in), .ctrl(cmb_ctrl), .dout(cmb_net_out));

  // ---------------- 3. multistage PM2I --------------------------------------
  pm2i_network #(.N(N), .B(1)) u_pm2i (
    .din(pm2i_in), .en(pm2i_en), .dout(pm2i_out));

  // ---------------- 4. SNSE -------------------------------------------------
  snse_network #(.N(N), .B(1)) u_snse (
    .din(snse_in), .shuffle(snse_shuffle), .ex(snse_ex), .exs(snse_exs),
    .dout(snse_out));

  // ---------------- 5. recirculating networks -------------------------------
  recirc_network #(.KIND(NET_CUBE), .N(N), .B(1)) u_rc (
    .clk, .rst_n, .dtrin_we(rc_dtrin_we), .dtrin_d(rc_dtrin_d),
    .ctrl_we(rc_ctrl_we), .ctrl_active(rc_active), .ctrl_fn(rc_fn),
    .pass(rc_pass), .src_dtrout(rc_src_dtrout), .dtrout_q(rc_dtrout),
    .dtrout_valid(rc_valid));

  recirc_network #(.KIND(NET_PM2I), .N(N), .B(1)) u_rp (
    .clk, .rst_n, .dtrin_we(rp_dtrin_we), .dtrin_d(rp_dtrin_d),
    .ctrl_we(rp_ctrl_we), .ctrl_active(rp_active), .ctrl_fn(rp_fn),
    .pass(rp_pass), .src_dtrout(rp_src_dtrout), .dtrout_q(rp_dtrout),
    .dtrout_valid(rp_valid));

  recirc_network #(.KIND(NET_SE), .N(N), .B(1)) u_rs (
    .clk, .rst_n, .dtrin_we(rs_dtrin_we), .dtrin_d(rs_dtrin_d),
    .ctrl_we(rs_ctrl_we), .ctrl_active(rs_active), .ctrl_fn(rs_fn),
    .pass(rs_pass), .src_dtrout(rs_src_dtrout), .dtrout_q(rs_dtrout),
    .dtrout_valid(rs_valid));
endmodule

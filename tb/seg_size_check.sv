// seg_size_check: drives the two segmented Generalized Cube paths of one
// simd_icn_top instance (N PEs, S segments per 32-bit word) through a few
// random transfers. It checks the routed words and the clock counts:
// n + S - 1 for the pipelined path and S for the combinational one. When
// finished it raises fin and reports its check and failure counts.
module seg_size_check #(
  parameter int N = 16,
  parameter int S = 4
) (
  input  logic clk,
  input  logic rst_n,
  output logic fin,
  output int   checks,
  output int   failures,
  output int   tp_clocks,
  output int   tm_clocks
);
  localparam int W = 32, LOGN = $clog2(N), NFP = 2 * LOGN - 1;
  logic seg_load, seg_start, seg_busy, seg_done;
  logic [N-1:0][W-1:0] seg_word_in, seg_word_out;
  logic [LOGN-1:0][N/2-1:0] seg_ctrl;
  logic cmb_load, cmb_start, cmb_busy, cmb_done;
  logic [N-1:0][W-1:0] cmb_word_in, cmb_word_out;
  logic [LOGN-1:0][N/2-1:0] cmb_ctrl;
  logic [N-1:0] pm2i_out, snse_out, rc_dtrout, rc_valid, rp_dtrout, rp_valid, rs_dtrout, rs_valid;

  simd_icn_top #(.N(N), .W(W), .S(S)) dut (
    .clk, .rst_n,
    .seg_load, .seg_word_in, .seg_start, .seg_ctrl, .seg_word_out, .seg_busy, .seg_done,
    .cmb_load, .cmb_word_in, .cmb_start, .cmb_ctrl, .cmb_word_out, .cmb_busy, .cmb_done,
    .pm2i_in('0), .pm2i_en('0), .pm2i_out,
    .snse_in('0), .snse_shuffle('0), .snse_ex('0), .snse_exs('0), .snse_out,
    .rc_dtrin_we(1'b0), .rc_dtrin_d('0), .rc_ctrl_we(1'b0), .rc_active('0), .rc_fn('0),
    .rc_pass(1'b0), .rc_src_dtrout(1'b0), .rc_dtrout, .rc_valid,
    .rp_dtrin_we(1'b0), .rp_dtrin_d('0), .rp_ctrl_we(1'b0), .rp_active('0), .rp_fn('0),
    .rp_pass(1'b0), .rp_src_dtrout(1'b0), .rp_dtrout, .rp_valid,
    .rs_dtrin_we(1'b0), .rs_dtrin_d('0), .rs_ctrl_we(1'b0), .rs_active('0), .rs_fn('0),
    .rs_pass(1'b0), .rs_src_dtrout(1'b0), .rs_dtrout, .rs_valid);

  function automatic int cube_dest(input logic [LOGN-1:0][N/2-1:0] c, input int p);
    int a;
    a = p;
    for (int s = LOGN - 1; s >= 0; s--) begin
      int k;
      k = ((a >> (s + 1)) << s) | (a % (1 << s));
      if (c[s][k]) a = a ^ (1 << s);
    end
    return a;
  endfunction

  initial begin
    fin = 0; checks = 0; failures = 0; tp_clocks = 0; tm_clocks = 0;
    seg_load = 0; seg_start = 0; seg_word_in = '0; seg_ctrl = '0;
    cmb_load = 0; cmb_start = 0; cmb_word_in = '0; cmb_ctrl = '0;
    @(posedge rst_n);
    @(negedge clk);
    for (int t = 0; t < 3; t++) begin
      int cyc;
      for (int p = 0; p < N; p++) begin seg_word_in[p] = $urandom; cmb_word_in[p] = $urandom; end
      for (int s = 0; s < LOGN; s++) begin seg_ctrl[s] = (N/2)'($urandom); cmb_ctrl[s] = (N/2)'($urandom); end
      seg_load = 1; cmb_load = 1;
      @(negedge clk);
      seg_load = 0; cmb_load = 0;
      seg_start = 1;
      @(negedge clk);
      seg_start = 0;
      cyc = 0;
      while (!seg_done && cyc < 200) begin @(negedge clk); cyc++; end
      tp_clocks = cyc;
      checks++;
      if (cyc != LOGN + S - 1) failures++;
      for (int p = 0; p < N; p++) begin
        checks++;
        if (seg_word_out[cube_dest(seg_ctrl, p)] !== seg_word_in[p]) failures++;
      end
      cmb_start = 1;
      @(negedge clk);
      cmb_start = 0;
      cyc = 0;
      while (!cmb_done && cyc < 200) begin @(negedge clk); cyc++; end
      tm_clocks = cyc;
      checks++;
      if (cyc != S) failures++;
      for (int p = 0; p < N; p++) begin
        checks++;
        if (cmb_word_out[cube_dest(cmb_ctrl, p)] !== cmb_word_in[p]) failures++;
      end
    end
    fin = 1;
  end
endmodule

// tb_simd_icn_top: end-to-end test of every network in simd_icn_top with
// N = 16 PEs (W = 32, S = 4).
//  1. Segmented pipelined Generalized Cube: words sent under random box
//     controls must land at the PE the cube stages route them to, the
//     transfer must take n + S - 1 clocks, segments must overlap in the
//     pipeline, and a start while busy must be ignored.
//  2. Segmented combinational Generalized Cube: same routing, S clocks.
//  3. Multistage PM2I: a uniform shift and a one-to-many broadcast.
//  4. SNSE: one Shuffle in a single pass, and the n-stage Shuffle-Exchange
//     (all stages shuffling) with random exchanges.
//  5. Recirculating Cube, PM2I and Shuffle-Exchange: a first pass from
//     DTRin, recirculation from DTRout, independent function control,
//     broadcast, inactive PEs, and unreached PEs keeping their DTRout.
// Each of those mechanisms is counted; one that never happened counts as a
// failure.
module tb_simd_icn_top;
  import icn_pkg::*;
  localparam int N = 16, W = 32, S = 4;
  localparam int LOGN = $clog2(N), B = W / S, NFP = 2 * LOGN - 1;

  logic clk = 0, rst_n = 0;
  logic seg_load, seg_start, seg_busy, seg_done;
  logic [N-1:0][W-1:0] seg_word_in, seg_word_out;
  logic [LOGN-1:0][N/2-1:0] seg_ctrl;
  logic cmb_load, cmb_start, cmb_busy, cmb_done;
  logic [N-1:0][W-1:0] cmb_word_in, cmb_word_out;
  logic [LOGN-1:0][N/2-1:0] cmb_ctrl;
  logic [N-1:0] pm2i_in, pm2i_out;
  logic [LOGN-1:0][N-1:0][2:0] pm2i_en;
  logic [N-1:0] snse_in, snse_out;
  logic [LOGN-1:0] snse_shuffle;
  logic [LOGN-1:0][N/2-1:0] snse_ex, snse_exs;
  logic rc_dtrin_we, rc_ctrl_we, rc_pass, rc_src_dtrout;
  logic [N-1:0] rc_dtrin_d, rc_active, rc_dtrout, rc_valid;
  logic [N-1:0][LOGN-1:0] rc_fn;
  logic rp_dtrin_we, rp_ctrl_we, rp_pass, rp_src_dtrout;
  logic [N-1:0] rp_dtrin_d, rp_active, rp_dtrout, rp_valid;
  logic [N-1:0][NFP-1:0] rp_fn;
  logic rs_dtrin_we, rs_ctrl_we, rs_pass, rs_src_dtrout;
  logic [N-1:0] rs_dtrin_d, rs_active, rs_dtrout, rs_valid;
  logic [N-1:0][1:0] rs_fn;

  simd_icn_top #(.N(N), .W(W), .S(S)) dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  typedef enum int {
    EV_PIPE_OVERLAP, EV_START_IGNORED, EV_SEG_MUX, EV_PM2I_SHIFT, EV_PM2I_BCAST,
    EV_SNSE_SHUFFLE, EV_SNSE_OMEGA, EV_RC_FIRST, EV_RC_RECIRC, EV_INDEP_FN,
    EV_BCAST, EV_INACTIVE, EV_HOLD, EV_COUNT
  } ev_e;
  int ev [EV_COUNT];

  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s at %0t", what, $time);
    end
  endtask

  initial begin
    #20000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // destination of PE p through a Generalized Cube with controls c
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

  function automatic int shf(input int p);
    return ((p << 1) | (p >> (LOGN - 1))) % N;
  endfunction

  // count pipeline overlap: a new segment enters while an earlier one is
  // still inside the pipelined network
  int seg_in_cnt = 0, seg_out_cnt = 0;
  always @(posedge clk) begin
    if (dut.seg_in_shift && seg_in_cnt > seg_out_cnt) ev[EV_PIPE_OVERLAP]++;
    if (dut.seg_in_shift) seg_in_cnt++;
    if (dut.seg_out_shift) seg_out_cnt++;
    if (dut.cmb_in_shift) ev[EV_SEG_MUX]++;
  end

  task automatic seg_transfer();
    int cyc;
    seg_load = 1;
    @(negedge clk);
    seg_load = 0;
    seg_start = 1;
    @(negedge clk);
    seg_start = 0;
    cyc = 0;
    while (!seg_done && cyc < 100) begin
      if (cyc == 1) begin
        seg_start = 1;                     // must be ignored
        if (seg_busy) ev[EV_START_IGNORED]++;
      end else seg_start = 0;
      @(negedge clk);
      cyc++;
    end
    seg_start = 0;
    check(cyc == LOGN + S - 1, $sformatf("pipelined transfer took %0d clocks", cyc));
  endtask

  task automatic cmb_transfer();
    int cyc;
    cmb_load = 1;
    @(negedge clk);
    cmb_load = 0;
    cmb_start = 1;
    @(negedge clk);
    cmb_start = 0;
    cyc = 0;
    while (!cmb_done && cyc < 100) begin
      @(negedge clk);
      cyc++;
    end
    check(cyc == S, $sformatf("combinational transfer took %0d clocks", cyc));
  endtask

  task automatic recirc_step(input logic src);
    rc_pass = 1; rp_pass = 1; rs_pass = 1;
    rc_src_dtrout = src; rp_src_dtrout = src; rs_src_dtrout = src;
    if (src) ev[EV_RC_RECIRC]++; else ev[EV_RC_FIRST]++;
    @(negedge clk);
    rc_pass = 0; rp_pass = 0; rs_pass = 0;
    rc_src_dtrout = 0; rp_src_dtrout = 0; rs_src_dtrout = 0;
  endtask

  task automatic recirc_ctrl();
    rc_ctrl_we = 1; rp_ctrl_we = 1; rs_ctrl_we = 1;
    @(negedge clk);
    rc_ctrl_we = 0; rp_ctrl_we = 0; rs_ctrl_we = 0;
  endtask

  task automatic recirc_load(input logic [N-1:0] d);
    rc_dtrin_d = d; rp_dtrin_d = d; rs_dtrin_d = d;
    rc_dtrin_we = 1; rp_dtrin_we = 1; rs_dtrin_we = 1;
    @(negedge clk);
    rc_dtrin_we = 0; rp_dtrin_we = 0; rs_dtrin_we = 0;
  endtask

  initial begin
    logic [N-1:0] pat, prev_q;
    for (int e = 0; e < EV_COUNT; e++) ev[e] = 0;
    seg_load = 0; seg_start = 0; seg_word_in = '0; seg_ctrl = '0;
    cmb_load = 0; cmb_start = 0; cmb_word_in = '0; cmb_ctrl = '0;
    pm2i_in = '0; pm2i_en = '0; snse_in = '0; snse_shuffle = '0; snse_ex = '0; snse_exs = '0;
    rc_dtrin_we = 0; rc_ctrl_we = 0; rc_pass = 0; rc_src_dtrout = 0; rc_dtrin_d = '0; rc_active = '0; rc_fn = '0;
    rp_dtrin_we = 0; rp_ctrl_we = 0; rp_pass = 0; rp_src_dtrout = 0; rp_dtrin_d = '0; rp_active = '0; rp_fn = '0;
    rs_dtrin_we = 0; rs_ctrl_we = 0; rs_pass = 0; rs_src_dtrout = 0; rs_dtrin_d = '0; rs_active = '0; rs_fn = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;

    // 1 and 2: segmented Generalized Cube transfers
    for (int t = 0; t < 3; t++) begin
      for (int p = 0; p < N; p++) begin
        seg_word_in[p] = $urandom;
        cmb_word_in[p] = $urandom;
      end
      for (int s = 0; s < LOGN; s++) begin
        seg_ctrl[s] = (N/2)'($urandom);
        cmb_ctrl[s] = (N/2)'($urandom);
      end
      seg_transfer();
      for (int p = 0; p < N; p++)
        check(seg_word_out[cube_dest(seg_ctrl, p)] === seg_word_in[p], "pipelined cube word");
      cmb_transfer();
      for (int p = 0; p < N; p++)
        check(cmb_word_out[cube_dest(cmb_ctrl, p)] === cmb_word_in[p], "combinational cube word");
    end

    // 3: PM2I uniform shift by 5, then PE 3 broadcast to 3+2^(n-1) and 3 - 1
    pm2i_in = N'($urandom);
    for (int s = 0; s < LOGN; s++)
      for (int j = 0; j < N; j++) pm2i_en[s][j] = ((5 >> s) & 1) ? 3'b010 : 3'b001;
    #1;
    for (int p = 0; p < N; p++) check(pm2i_out[(p + 5) % N] === pm2i_in[p], "pm2i shift");
    ev[EV_PM2I_SHIFT]++;
    pm2i_in = '0; pm2i_in[3] = 1'b1;
    pm2i_en = '0;
    pm2i_en[LOGN-1][3] = 3'b011;             // straight and +2^(n-1)
    for (int s = LOGN - 2; s >= 1; s--) begin
      pm2i_en[s][3] = 3'b001;
      pm2i_en[s][(3 + N / 2) % N] = 3'b001;
    end
    pm2i_en[0][3] = 3'b100;                  // 3 -> 2
    pm2i_en[0][(3 + N / 2) % N] = 3'b001;
    #1;
    check(pm2i_out === (N'(1) << 2 | N'(1) << ((3 + N / 2) % N)), "pm2i broadcast");
    ev[EV_PM2I_BCAST]++;

    // 4: SNSE single Shuffle, then omega with random exchanges
    snse_in = N'($urandom);
    snse_shuffle = '0; snse_shuffle[0] = 1'b1; snse_ex = '0; snse_exs = '0;
    #1;
    for (int p = 0; p < N; p++) check(snse_out[shf(p)] === snse_in[p], "snse one shuffle");
    ev[EV_SNSE_SHUFFLE]++;
    snse_shuffle = '1;
    for (int s = 0; s < LOGN; s++) snse_exs[s] = (N/2)'($urandom);
    #1;
    begin
      logic [N-1:0] m, m2;
      m = snse_in;
      for (int s = 0; s < LOGN; s++) begin
        for (int p = 0; p < N; p++) m2[shf(p)] = m[p];
        m = m2;
        for (int k = 0; k < N / 2; k++) if (snse_exs[s][k]) begin m[2*k] = m2[2*k+1]; m[2*k+1] = m2[2*k]; end
      end
      check(snse_out === m, "snse as omega");
      ev[EV_SNSE_OMEGA]++;
    end

    // 5: recirculating networks
    pat = N'($urandom);
    rc_active = '1; rp_active = '1; rs_active = '1;
    for (int p = 0; p < N; p++) begin rc_fn[p] = LOGN'(1); rp_fn[p] = NFP'(2); rs_fn[p] = 2'b01; end
    recirc_ctrl();
    recirc_load(pat);
    recirc_step(0);
    recirc_step(1);
    for (int p = 0; p < N; p++) begin
      check(rc_dtrout[p] === pat[p], "Cube_0 twice is identity");
      check(rp_dtrout[(p + 4) % N] === pat[p], "PM2+1 twice");
      check(rs_dtrout[shf(shf(p))] === pat[p], "two Shuffles");
    end
    // independent function control, broadcast, inactive and unreached PEs
    prev_q = rc_dtrout;
    rc_active = '0; rc_active[0] = 1; rc_active[1] = 1; rc_active[2] = 1;
    rc_fn = '0; rc_fn[0] = LOGN'(1); rc_fn[1] = LOGN'(2); rc_fn[2] = LOGN'(1) << (LOGN - 1);
    rc_fn[6] = '1;                            // inactive: must not send
    rs_active = '0; rs_active[1] = 1; rs_fn[1] = 2'b11;   // PE 1 Shuffle and Exchange
    recirc_ctrl();
    recirc_load(pat);
    recirc_step(0);
    check(rc_dtrout[1] === pat[0] && rc_dtrout[3] === pat[1], "independent Cube_0 / Cube_1");
    ev[EV_INDEP_FN]++;
    check(rc_valid[7] === 1'b0 && rc_valid[2] === 1'b0, "inactive PE 6 did not send");
    check(rc_dtrout[7] === prev_q[7], "unreached PE keeps DTRout");
    ev[EV_INACTIVE]++;
    ev[EV_HOLD]++;
    check(rs_dtrout[shf(1)] === pat[1] && rs_dtrout[0] === pat[1] && rs_valid[0] && rs_valid[shf(1)],
          "PE 1 sends on Shuffle and Exchange");
    ev[EV_BCAST]++;

    for (int e = 0; e < EV_COUNT; e++) begin
      ev_e en;
      en = ev_e'(e);
      $display("mechanism %s happened %0d times", en.name(), ev[e]);
      check(ev[e] > 0, $sformatf("mechanism %s never happened", en.name()));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_recirc_network: recirculating Cube, PM2I and Shuffle-Exchange networks
// with 16 PEs, driven side by side.
//  - Directed: conventional control (all PEs Cube_1, then recirculating
//    Cube_0 and Cube_2: p -> p ^ 7 in M = 3 passes, M + 1 clocks after the
//    DTRin load), PM2+0 recirculated 5 times (shift by 5), n Shuffles
//    returning every word home, independent function control (PE 0 uses
//    Cube_0 while PE 1 uses Cube_1), one PE sending on three Cube functions at once,
//    inactive PEs not sending but still receiving.
//  - Random: random active bits, function sets, sources and pass counts,
//    compared with a software model of DTRin, DTRout and the networks.
module tb_recirc_network;
  import icn_pkg::*;
  localparam int N = 16, B = 4, LOGN = 4;
  localparam int NFC = LOGN, NFP = 2 * LOGN - 1, NFS = 2;

  logic clk = 0, rst_n = 0;
  logic dtrin_we, ctrl_we, pass, src_dtrout;
  logic [N-1:0][B-1:0] dtrin_d;
  logic [N-1:0] active;
  logic [N-1:0][NFC-1:0] fn_c;
  logic [N-1:0][NFP-1:0] fn_p;
  logic [N-1:0][NFS-1:0] fn_s;
  logic [N-1:0][B-1:0] q_c, q_p, q_s;
  logic [N-1:0] v_c, v_p, v_s;
  int checks = 0, failures = 0;
  longint t0;

  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s at %0t", what, $time);
    end
  endtask

  recirc_network #(.KIND(NET_CUBE), .N(N), .B(B)) u_c (
    .clk, .rst_n, .dtrin_we, .dtrin_d, .ctrl_we, .ctrl_active(active), .ctrl_fn(fn_c),
    .pass, .src_dtrout, .dtrout_q(q_c), .dtrout_valid(v_c));
  recirc_network #(.KIND(NET_PM2I), .N(N), .B(B)) u_p (
    .clk, .rst_n, .dtrin_we, .dtrin_d, .ctrl_we, .ctrl_active(active), .ctrl_fn(fn_p),
    .pass, .src_dtrout, .dtrout_q(q_p), .dtrout_valid(v_p));
  recirc_network #(.KIND(NET_SE), .N(N), .B(B)) u_s (
    .clk, .rst_n, .dtrin_we, .dtrin_d, .ctrl_we, .ctrl_active(active), .ctrl_fn(fn_s),
    .pass, .src_dtrout, .dtrout_q(q_s), .dtrout_valid(v_s));

  always #5 clk = ~clk;

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // software model
  logic [N-1:0][B-1:0] md_in, mq [3];
  logic [N-1:0] mv [3];

  function automatic int dest(input int kind, input int p, input int f);
    case (kind)
      0: return p ^ (1 << f);
      1: return (f < LOGN) ? (p + (1 << f)) % N : (p + N - (1 << (f - LOGN))) % N;
      default: return (f == 0) ? (((p << 1) | (p >> (LOGN - 1))) % N) : (p ^ 1);
    endcase
  endfunction

  task automatic model_pass(input int kind, input logic src);
    logic [N-1:0][B-1:0] x, r;
    logic [N-1:0] v;
    int nf;
    nf = (kind == 0) ? NFC : (kind == 1) ? NFP : NFS;
    x = src ? mq[kind] : md_in;
    r = '0;
    v = '0;
    for (int p = 0; p < N; p++)
      if (active[p])
        for (int f = 0; f < nf; f++) begin
          logic b;
          b = (kind == 0) ? fn_c[p][f] : (kind == 1) ? fn_p[p][f] : fn_s[p][f];
          if (b) begin
            r[dest(kind, p, f)] |= x[p];
            v[dest(kind, p, f)] = 1'b1;
          end
        end
    for (int p = 0; p < N; p++) if (v[p]) mq[kind][p] = r[p];
    mv[kind] = v;
  endtask

  task automatic load_dtrin(input logic [N-1:0][B-1:0] d);
    dtrin_d = d; dtrin_we = 1; md_in = d;
    @(negedge clk); dtrin_we = 0;
  endtask

  task automatic load_ctrl();
    ctrl_we = 1;
    @(negedge clk); ctrl_we = 0;
  endtask

  task automatic do_pass(input logic src);
    pass = 1; src_dtrout = src;
    for (int k = 0; k < 3; k++) model_pass(k, src);
    @(negedge clk); pass = 0; src_dtrout = 0;
  endtask

  task automatic compare();
    check(q_c === mq[0] && v_c === mv[0], "cube vs model");
    check(q_p === mq[1] && v_p === mv[1], "pm2i vs model");
    check(q_s === mq[2] && v_s === mv[2], "se vs model");
  endtask

  initial begin
    logic [N-1:0][B-1:0] ident;
    dtrin_we = 0; ctrl_we = 0; pass = 0; src_dtrout = 0;
    dtrin_d = '0; active = '0; fn_c = '0; fn_p = '0; fn_s = '0;
    md_in = '0; for (int k = 0; k < 3; k++) begin mq[k] = '0; mv[k] = '0; end
    for (int p = 0; p < N; p++) ident[p] = B'(p);
    repeat (2) @(negedge clk);
    rst_n = 1;

    // conventional control, Cube: p -> p^2 -> p^3 -> p^7, shuffle, PM2+0
    active = '1;
    for (int p = 0; p < N; p++) begin fn_c[p] = 4'b0010; fn_p[p] = NFP'(1); fn_s[p] = 2'b01; end
    load_ctrl();
    t0 = $time;
    load_dtrin(ident);
    do_pass(0);
    for (int p = 0; p < N; p++) fn_c[p] = 4'b0001;
    load_ctrl();
    do_pass(1);
    for (int p = 0; p < N; p++) fn_c[p] = 4'b0100;
    load_ctrl();
    do_pass(1);
    compare();
    for (int p = 0; p < N; p++) begin
      check(q_c[p ^ 7] === B'(p), "cube p^7");
      check(q_p[(p + 3) % N] === B'(p), "pm2i +3");
    end
    // with the control reloads the cube transfer took 1 + 3 passes + 2 loads
    check(($time - t0) / 10 == 1 + 3 + 2, "cycles with reloads");
    // timing without control changes: M passes right after the load
    t0 = $time;
    load_dtrin(ident);
    do_pass(0);
    repeat (LOGN - 1) do_pass(1);
    check(($time - t0) / 10 == LOGN + 1, "M + 1 cycles");
    compare();
    for (int p = 0; p < N; p++) begin
      check(q_s[p] === B'(p), "n shuffles identity");
      check(q_p[(p + LOGN) % N] === B'(p), "pm2i +n");
    end

    // independent function control: PE0 Cube_0, PE1 Cube_1, PE5 Cube_0, Cube_1 and Cube_3
    active = '0; active[0] = 1; active[1] = 1; active[5] = 1;
    fn_c = '0; fn_c[0] = 4'b0001; fn_c[1] = 4'b0010; fn_c[5] = 4'b1011;
    load_ctrl();
    load_dtrin(ident);
    do_pass(0);
    compare();
    check(q_c[1] === B'(0), "PE0 Cube_0");
    check(q_c[3] === B'(1), "PE1 Cube_1");
    check(q_c[4] === B'(5) && q_c[7] === B'(5) && q_c[13] === B'(5), "PE5 broadcast");
    check(v_c[0] === 1'b0, "PE0 not reached");
    check(v_c[5] === 1'b0, "PE5 not reached");

    // random
    for (int t = 0; t < 60; t++) begin
      for (int p = 0; p < N; p++) begin
        active[p] = ($urandom % 4) != 0;
        fn_c[p] = NFC'($urandom);
        fn_p[p] = NFP'($urandom);
        fn_s[p] = NFS'($urandom);
        dtrin_d[p] = B'($urandom);
      end
      load_ctrl();
      load_dtrin(dtrin_d);
      do_pass(0);
      repeat ($urandom % 4) do_pass(1);
      compare();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_recirc_partition: partitioning and merging of recirculating networks
// with 16 PEs split into 4 groups of 4 (n = 4, r = 2).
//  - Cube: groups share the two upper address bits. Each group runs its own
//    random sequence of Cube_0 / Cube_1 passes (multiple control); no word
//    may leave its group. Then groups 0 and 1 (differing only in bit 2) are
//    merged by allowing them Cube_2; words must move only between them.
//  - PM2I: groups share the two lower address bits and use only PM2+-2 and
//    PM2+3 (= PM2-3); words never leave their group. Then the groups with
//    lower bits 00 and 10, which differ only in bit n-r-1 = 1, are merged:
//    they use PM2+1 (a step of 2), and their words move between the two
//    groups but stay on PEs with bit 0 clear.
// Every word carries its source address, so where it lands tells which
// group it came from.
module tb_recirc_partition;
  import icn_pkg::*;
  localparam int N = 16, B = 4, LOGN = 4, R = 2, NFP = 2 * LOGN - 1;
  logic clk = 0, rst_n = 0;
  logic dtrin_we, ctrl_we, pass, src_dtrout;
  logic [N-1:0][B-1:0] dtrin_d, q_c, q_p;
  logic [N-1:0] active, v_c, v_p;
  logic [N-1:0][LOGN-1:0] fn_c;
  logic [N-1:0][NFP-1:0] fn_p;
  int checks = 0, failures = 0;

  recirc_network #(.KIND(NET_CUBE), .N(N), .B(B)) u_c (
    .clk, .rst_n, .dtrin_we, .dtrin_d, .ctrl_we, .ctrl_active(active), .ctrl_fn(fn_c),
    .pass, .src_dtrout, .dtrout_q(q_c), .dtrout_valid(v_c));
  recirc_network #(.KIND(NET_PM2I), .N(N), .B(B)) u_p (
    .clk, .rst_n, .dtrin_we, .dtrin_d, .ctrl_we, .ctrl_active(active), .ctrl_fn(fn_p),
    .pass, .src_dtrout, .dtrout_q(q_p), .dtrout_valid(v_p));

  always #5 clk = ~clk;

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s at %0t", what, $time);
    end
  endtask

  task automatic step(input logic src);
    ctrl_we = 1;
    @(negedge clk);
    ctrl_we = 0;
    pass = 1; src_dtrout = src;
    @(negedge clk);
    pass = 0; src_dtrout = 0;
  endtask

  initial begin
    logic [N-1:0][B-1:0] m, m2;
    dtrin_we = 0; ctrl_we = 0; pass = 0; src_dtrout = 0;
    active = '1; fn_c = '0; fn_p = '0;
    for (int p = 0; p < N; p++) dtrin_d[p] = B'(p);
    repeat (2) @(negedge clk);
    rst_n = 1;
    dtrin_we = 1;
    @(negedge clk);
    dtrin_we = 0;

    // Cube, 4 independent groups, 6 passes
    m = dtrin_d;
    for (int t = 0; t < 6; t++) begin
      int gf [4];
      for (int g = 0; g < 4; g++) gf[g] = $urandom % R;   // Cube_0 or Cube_1
      for (int p = 0; p < N; p++) fn_c[p] = LOGN'(1) << gf[p >> R];
      m2 = m;
      for (int p = 0; p < N; p++) m2[p ^ (1 << gf[p >> R])] = m[p];
      m = m2;
      step(t != 0);
      check(q_c === m, "cube partitions vs model");
      for (int p = 0; p < N; p++)
        check((int'(q_c[p]) >> R) == (p >> R), "cube word stayed in its group");
    end
    // merge groups 0 and 1 with Cube_2
    for (int p = 0; p < N; p++) fn_c[p] = ((p >> R) < 2) ? LOGN'(4) : LOGN'(1);
    m2 = m;
    for (int p = 0; p < N; p++) m2[((p >> R) < 2) ? p ^ 4 : p ^ 1] = m[p];
    m = m2;
    step(1);
    check(q_c === m, "merged cube vs model");
    for (int p = 0; p < N; p++) begin
      if ((p >> R) < 2) check((int'(q_c[p]) >> R) < 2 && (int'(q_c[p]) >> R) != (p >> R), "merged groups exchanged");
      else check((int'(q_c[p]) >> R) == (p >> R), "other groups unaffected");
    end

    // PM2I: groups share the low n-r bits; each picks PM2+2, PM2-2 or PM2+3
    dtrin_we = 1;
    @(negedge clk);
    dtrin_we = 0;
    m = dtrin_d;
    for (int t = 0; t < 6; t++) begin
      int sel [4];
      for (int g = 0; g < 4; g++) sel[g] = $urandom % 3;
      for (int p = 0; p < N; p++) begin
        case (sel[p % 4])
          0: fn_p[p] = NFP'(1) << 2;             // PM2+2
          1: fn_p[p] = NFP'(1) << (LOGN + 2);    // PM2-2
          default: fn_p[p] = NFP'(1) << 3;       // PM2+3
        endcase
      end
      m2 = m;
      for (int p = 0; p < N; p++)
        m2[(sel[p % 4] == 0) ? (p + 4) % N : (sel[p % 4] == 1) ? (p + N - 4) % N : (p + 8) % N] = m[p];
      m = m2;
      step(t != 0);
      check(q_p === m, "pm2i partitions vs model");
      for (int p = 0; p < N; p++)
        check(int'(q_p[p]) % 4 == p % 4, "pm2i word stayed in its group");
    end
    // merge low-bit groups 00 and 10 with PM2+1 (a step of 2); others PM2+2
    for (int p = 0; p < N; p++) fn_p[p] = (p % 2 == 0) ? NFP'(2) : NFP'(4);
    m2 = m;
    for (int p = 0; p < N; p++) m2[(p % 2 == 0) ? (p + 2) % N : (p + 4) % N] = m[p];
    m = m2;
    step(1);
    check(q_p === m, "merged pm2i vs model");
    for (int p = 0; p < N; p++) begin
      if (p % 2 == 0) check(int'(q_p[p]) % 2 == 0 && int'(q_p[p]) % 4 != p % 4, "merged pm2i groups exchanged");
      else check(int'(q_p[p]) % 4 == p % 4, "odd groups unaffected");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

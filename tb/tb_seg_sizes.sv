// tb_seg_sizes: segmented transfers of 32-bit words for S = 1, 4, 8 and 16
// segments (the segment counts of the equal-cost comparison) on 16-PE
// machines. For each S the pipelined path must take n + S - 1 clocks and
// the combinational path S clocks, and every word must reach the PE its
// box controls route it to.
module tb_seg_sizes;
  localparam int NS = 4;
  localparam int SV [NS] = '{1, 4, 8, 16};
  logic clk = 0, rst_n = 0;
  logic [NS-1:0] fin;
  int c [NS], f [NS], tp [NS], tm [NS];
  int checks, failures;

  always #5 clk = ~clk;

  for (genvar i = 0; i < NS; i++) begin : g_s
    seg_size_check #(.N(16), .S(SV[i])) u_chk (
      .clk, .rst_n, .fin(fin[i]), .checks(c[i]), .failures(f[i]),
      .tp_clocks(tp[i]), .tm_clocks(tm[i]));
  end

  initial begin
    #1000000;
    $display("TB_RESULT checks=%0d failures=%0d", 0, 1);
    $finish;
  end

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    wait (&fin);
    checks = 0;
    failures = 0;
    for (int i = 0; i < NS; i++) begin
      $display("S = %0d: pipelined %0d clocks, combinational %0d clocks", SV[i], tp[i], tm[i]);
      checks += c[i];
      failures += f[i];
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

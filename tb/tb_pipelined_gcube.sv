// tb_pipelined_gcube: 16-PE, 4-bit pipelined Generalized Cube. A new random
// segment enters every clock under fixed random box controls; each must
// leave stage 0 exactly n-1 clocks later (DTRout captures it on the n-th
// edge), routed as a software model of the cube stages says.
module tb_pipelined_gcube;
  localparam int N = 16, B = 4, LOGN = 4, NSEG = 40;
  logic clk = 0, rst_n = 0;
  logic [N-1:0][B-1:0]      din, dout;
  logic [LOGN-1:0][N/2-1:0] ctrl;
  logic [N-1:0][B-1:0] sent [NSEG];
  int checks = 0, failures = 0;

  pipelined_gcube #(.N(N), .B(B)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [N-1:0][B-1:0] route(input logic [N-1:0][B-1:0] x);
    logic [N-1:0][B-1:0] m, m2;
    m = x;
    for (int s = LOGN - 1; s >= 0; s--) begin
      m2 = m;
      for (int p = 0; p < N; p++) begin
        int k;
        k = ((p >> (s + 1)) << s) | (p % (1 << s));
        if (ctrl[s][k]) m2[p] = m[p ^ (1 << s)];
      end
      m = m2;
    end
    return m;
  endfunction

  initial begin
    for (int s = 0; s < LOGN; s++) ctrl[s] = (N/2)'($urandom);
    din = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int c = 0; c < NSEG + LOGN; c++) begin
      if (c < NSEG) begin
        for (int p = 0; p < N; p++) sent[c][p] = B'($urandom);
        din = sent[c];
      end else din = '0;
      #1;
      if (c >= LOGN - 1 && c - (LOGN - 1) < NSEG) begin
        checks++;
        if (dout !== route(sent[c-(LOGN-1)])) failures++;
      end
      @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

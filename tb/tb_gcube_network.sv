// tb_gcube_network: 32-PE Generalized Cube. (1) Stage-controlled XOR
// permutations p -> p ^ c for every c; (2) random box controls compared with
// a stage-by-stage software model; (3) a destination-tag route of one PE.
module tb_gcube_network;
  localparam int N = 32, B = 5, LOGN = 5;
  logic [N-1:0][B-1:0]      din, dout;
  logic [LOGN-1:0][N/2-1:0] ctrl;
  int checks = 0, failures = 0;
  logic [N-1:0][B-1:0] m, m2;

  gcube_network #(.N(N), .B(B)) dut (.*);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int p = 0; p < N; p++) din[p] = B'(p);
    for (int c = 0; c < N; c++) begin
      for (int s = 0; s < LOGN; s++) ctrl[s] = {(N/2){c[s]}};
      #1;
      for (int p = 0; p < N; p++) begin
        checks++;
        if (dout[p ^ c] !== B'(p)) failures++;
      end
    end
    for (int t = 0; t < 100; t++) begin
      for (int p = 0; p < N; p++) din[p] = B'($urandom);
      for (int s = 0; s < LOGN; s++) ctrl[s] = (N/2)'($urandom);
      #1;
      m = din;
      for (int s = LOGN - 1; s >= 0; s--) begin
        m2 = m;
        for (int p = 0; p < N; p++) begin
          int k;
          k = ((p >> (s + 1)) << s) | (p % (1 << s));
          if (ctrl[s][k]) m2[p] = m[p ^ (1 << s)];
        end
        m = m2;
      end
      for (int p = 0; p < N; p++) begin
        checks++;
        if (dout[p] !== m[p]) failures++;
      end
    end
    // destination tag: send PE 5 to PE 26; a box exchanges where the
    // current address bit differs from the destination bit
    begin
      int cur;
      cur = 5;
      ctrl = '0;
      din = '0;
      din[5] = '1;
      for (int s = LOGN - 1; s >= 0; s--) begin
        int k;
        k = ((cur >> (s + 1)) << s) | (cur % (1 << s));
        if (((cur >> s) & 1) != ((26 >> s) & 1)) begin
          ctrl[s][k] = 1'b1;
          cur = cur ^ (1 << s);
        end
      end
      #1;
      checks++;
      if (dout[26] !== '1) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_snse_stage: 16-row SNSE stage in its four modes (nothing, Exchange,
// Shuffle, Shuffle-Exchange) with random per-pair exchange controls,
// against a model that shuffles addresses and swaps pairs.
module tb_snse_stage;
  localparam int N = 16, B = 4, LOGN = 4;
  logic [N-1:0][B-1:0] din, dout;
  logic                shuffle;
  logic [N/2-1:0]      ex, exs;
  int checks = 0, failures = 0;

  snse_stage #(.N(N), .B(B)) dut (.*);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [N-1:0][B-1:0] m, m2;
    for (int t = 0; t < 200; t++) begin
      for (int p = 0; p < N; p++) din[p] = B'($urandom);
      shuffle = t[0];
      ex  = (N/2)'($urandom);
      exs = (N/2)'($urandom);
      #1;
      m = din;
      if (shuffle)
        for (int p = 0; p < N; p++) m[((p << 1) | (p >> (LOGN - 1))) % N] = din[p];
      m2 = m;
      for (int k = 0; k < N / 2; k++)
        if (shuffle ? exs[k] : ex[k]) begin
          m2[2*k] = m[2*k+1];
          m2[2*k+1] = m[2*k];
        end
      checks++;
      if (dout !== m2) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

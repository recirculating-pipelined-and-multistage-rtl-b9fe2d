// tb_pm2i_network: 16-PE multistage PM2I. (1) Uniform shifts p -> p + d for
// every d, each stage set to +2**s or straight for all rows by the bits of
// d; (2) uniform shifts by -d using -2**s; (3) random enables against a
// stage-by-stage model.
module tb_pm2i_network;
  localparam int N = 16, B = 4, LOGN = 4;
  logic [N-1:0][B-1:0]           din, dout;
  logic [LOGN-1:0][N-1:0][2:0]   en;
  int checks = 0, failures = 0;

  pm2i_network #(.N(N), .B(B)) dut (.*);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [N-1:0][B-1:0] m, m2;
    for (int p = 0; p < N; p++) din[p] = B'(p);
    for (int d = 0; d < N; d++) begin
      for (int s = 0; s < LOGN; s++)
        for (int j = 0; j < N; j++) en[s][j] = d[s] ? 3'b010 : 3'b001;
      #1;
      for (int p = 0; p < N; p++) begin
        checks++;
        if (dout[(p + d) % N] !== B'(p)) failures++;
      end
      for (int s = 0; s < LOGN; s++)
        for (int j = 0; j < N; j++) en[s][j] = d[s] ? 3'b100 : 3'b001;
      #1;
      for (int p = 0; p < N; p++) begin
        checks++;
        if (dout[(p + N - d) % N] !== B'(p)) failures++;
      end
    end
    for (int t = 0; t < 100; t++) begin
      for (int j = 0; j < N; j++) din[j] = B'($urandom);
      for (int s = 0; s < LOGN; s++)
        for (int j = 0; j < N; j++) en[s][j] = 3'($urandom);
      #1;
      m = din;
      for (int s = LOGN - 1; s >= 0; s--) begin
        m2 = '0;
        for (int j = 0; j < N; j++) begin
          if (en[s][j][0]) m2[j] |= m[j];
          if (en[s][j][1]) m2[(j + (1 << s)) % N] |= m[j];
          if (en[s][j][2]) m2[(j + N - (1 << s)) % N] |= m[j];
        end
        m = m2;
      end
      checks++;
      if (dout !== m) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

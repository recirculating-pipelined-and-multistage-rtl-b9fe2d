// tb_snse_network: 16-PE Shuffle-No Shuffle-Exchange network.
//  - k Shuffles (k = 1..n) in one pass, which an n-stage Shuffle-Exchange
//    network cannot do for k = 1;
//  - random stage settings against a stage-by-stage model;
//  - random sequences of x global Shuffle / Exchange steps of a
//    recirculating Shuffle-Exchange network, packed into SNSE stages and
//    run in at most ceil(x/n) passes (the output fed back as input).
module tb_snse_network;
  localparam int N = 16, B = 4, LOGN = 4;
  logic [N-1:0][B-1:0]      din, dout;
  logic [LOGN-1:0]          shuffle;
  logic [LOGN-1:0][N/2-1:0] ex, exs;
  int checks = 0, failures = 0;

  snse_network #(.N(N), .B(B)) dut (.*);

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int shf(input int p);
    return ((p << 1) | (p >> (LOGN - 1))) % N;
  endfunction

  function automatic logic [N-1:0][B-1:0] model_stage(input logic [N-1:0][B-1:0] x,
      input logic s, input logic [N/2-1:0] e_ns, input logic [N/2-1:0] e_s);
    logic [N-1:0][B-1:0] m, m2;
    m = x;
    if (s) for (int p = 0; p < N; p++) m[shf(p)] = x[p];
    m2 = m;
    for (int k = 0; k < N / 2; k++)
      if (s ? e_s[k] : e_ns[k]) begin
        m2[2*k] = m[2*k+1];
        m2[2*k+1] = m[2*k];
      end
    return m2;
  endfunction

  initial begin
    logic [N-1:0][B-1:0] m, start;
    for (int p = 0; p < N; p++) din[p] = B'(p);
    ex = '0; exs = '0;
    for (int k = 1; k <= LOGN; k++) begin
      shuffle = '0;
      for (int s = 0; s < k; s++) shuffle[s] = 1'b1;
      #1;
      for (int p = 0; p < N; p++) begin
        int d;
        d = p;
        for (int s = 0; s < k; s++) d = shf(d);
        checks++;
        if (dout[d] !== B'(p)) failures++;
      end
    end
    for (int t = 0; t < 100; t++) begin
      for (int p = 0; p < N; p++) din[p] = B'($urandom);
      shuffle = LOGN'($urandom);
      for (int s = 0; s < LOGN; s++) begin ex[s] = (N/2)'($urandom); exs[s] = (N/2)'($urandom); end
      #1;
      m = din;
      for (int s = 0; s < LOGN; s++) m = model_stage(m, shuffle[s], ex[s], exs[s]);
      checks++;
      if (dout !== m) failures++;
    end
    // recirculating Shuffle-Exchange sequences
    for (int t = 0; t < 50; t++) begin
      int x, nst, passes;
      logic [63:0] ops;                  // 1 = Shuffle, 0 = Exchange
      logic [63:0] st_s, st_e;           // packed stages
      x = 1 + ($urandom % 24);
      ops = {$urandom, $urandom};
      for (int p = 0; p < N; p++) start[p] = B'($urandom);
      // reference: one global step at a time
      m = start;
      for (int i = 0; i < x; i++) m = ops[i] ? model_stage(m, 1'b1, '0, '0) : model_stage(m, 1'b0, '1, '1);
      // pack: a stage takes an optional Shuffle then an optional Exchange
      nst = 0; st_s = '0; st_e = '0;
      for (int i = 0; i < x; i++) begin
        if (ops[i]) begin
          if (i == 0 || st_s[nst-1] || st_e[nst-1] || nst == 0) begin nst++; st_s[nst-1] = 1; end
          else st_s[nst-1] = 1;
        end else begin
          if (nst == 0 || st_e[nst-1]) nst++;
          st_e[nst-1] = 1;
        end
      end
      passes = (nst + LOGN - 1) / LOGN;
      checks++;
      if (passes > (x + LOGN - 1) / LOGN) failures++;
      din = start;
      for (int ps = 0; ps < passes; ps++) begin
        for (int s = 0; s < LOGN; s++) begin
          int g;
          g = ps * LOGN + s;
          shuffle[s] = (g < nst) ? st_s[g] : 1'b0;
          ex[s]  = {(N/2){(g < nst) && st_e[g]}};
          exs[s] = ex[s];
        end
        #1;
        din = dout;
      end
      checks++;
      if (din !== m) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

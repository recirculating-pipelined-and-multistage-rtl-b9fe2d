// tb_recirc_cube_net: 16-PE single-stage network with random per-PE
// function sets (Cube_i: p ^ (1<<f)). Each receiver must see the OR of what its
// senders drive, and rx_valid must flag exactly the PEs that were reached.
// A second phase gives every PE one function (a permutation) and checks
// the data moved intact.
module tb_recirc_cube_net;
  localparam int N = 16, B = 4, LOGN = 4, NF = LOGN;
  logic [N-1:0][B-1:0]  din, dout;
  logic [N-1:0][NF-1:0] en;
  logic [N-1:0]         rx_valid;
  int checks = 0, failures = 0;

  recirc_cube_net #(.N(N), .B(B)) dut (.*);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [N-1:0][B-1:0] m;
    logic [N-1:0]        v;
    for (int t = 0; t < 300; t++) begin
      for (int p = 0; p < N; p++) begin
        din[p] = B'($urandom);
        en[p]  = (t < 200) ? NF'($urandom) : NF'(1) << (t % NF);
        if (t >= 200) din[p] = B'(p);
      end
      #1;
      m = '0;
      v = '0;
      for (int p = 0; p < N; p++)
        for (int f = 0; f < NF; f++)
          if (en[p][f]) begin
            m[(p ^ (1 << f))] |= din[p];
            v[(p ^ (1 << f))] = 1'b1;
          end
      checks += 2;
      if (dout !== m) failures++;
      if (rx_valid !== v) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

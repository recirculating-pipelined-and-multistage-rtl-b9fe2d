// tb_cube_stage: random box controls on a 16-line stage performing Cube_2;
// every line must hold its own data or that of the line whose address
// differs in bit 2, as its box control says.
module tb_cube_stage;
  localparam int N = 16, B = 3, ST = 2;
  logic [N-1:0][B-1:0] din, dout;
  logic [N/2-1:0]      ctrl;
  int checks = 0, failures = 0;

  cube_stage #(.N(N), .B(B), .STAGE(ST)) dut (.*);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 100; t++) begin
      for (int p = 0; p < N; p++) din[p] = B'($urandom);
      ctrl = (N/2)'($urandom);
      #1;
      for (int p = 0; p < N; p++) begin
        // box number: address bits above ST shifted down by one
        int k;
        k = ((p >> (ST + 1)) << ST) | (p % (1 << ST));
        checks++;
        if (dout[p] !== (ctrl[k] ? din[p ^ (1 << ST)] : din[p])) failures++;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_dtr_in_piso: W = 32, S = 4 shift-register DTRin. After a load, the
// segment in clock t must hold word bits k*S + t in bit k; load wins over
// shift; with shift low the segment holds.
module tb_dtr_in_piso;
  localparam int W = 32, S = 4, B = W / S;
  logic clk = 0, rst_n = 0, load, shift;
  logic [W-1:0] d;
  logic [B-1:0] seg;
  int checks = 0, failures = 0;

  dtr_in_piso #(.W(W), .S(S)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    load = 0; shift = 0; d = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int w = 0; w < 30; w++) begin
      logic [W-1:0] word;
      word = $urandom;
      d = word; load = 1; shift = w[0];
      @(negedge clk);
      load = 0;
      for (int t = 0; t < S; t++) begin
        shift = 0;
        @(negedge clk);                    // hold one clock
        for (int k = 0; k < B; k++) begin
          checks++;
          if (seg[k] !== word[k*S + t]) failures++;
        end
        shift = 1;
        @(negedge clk);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

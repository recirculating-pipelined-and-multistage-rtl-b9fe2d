// tb_dtr_out_sipo: W = 32, S = 4 shift-register DTRout. Segments carrying
// word bits k*S + t in bit k are shifted in for t = 0..S-1 (with idle
// clocks between); afterwards q must equal the word.
module tb_dtr_out_sipo;
  localparam int W = 32, S = 4, B = W / S;
  logic clk = 0, rst_n = 0, shift;
  logic [B-1:0] seg;
  logic [W-1:0] q;
  int checks = 0, failures = 0;

  dtr_out_sipo #(.W(W), .S(S)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    shift = 0; seg = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int w = 0; w < 30; w++) begin
      logic [W-1:0] word;
      word = $urandom;
      for (int t = 0; t < S; t++) begin
        for (int k = 0; k < B; k++) seg[k] = word[k*S + t];
        shift = 1;
        @(negedge clk);
        shift = 0;
        seg = B'($urandom);
        if (w[0]) @(negedge clk);
      end
      checks++;
      if (q !== word) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

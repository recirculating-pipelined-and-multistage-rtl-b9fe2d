// tb_dtr_seg_mux: W = 32, S = 4 multiplexed DTRs. After a load, segment t
// must be word bits t*B + B-1 .. t*B; writing the segments back in order
// must rebuild the word in DTRout; a new load after a partial transfer
// must restart both indices.
module tb_dtr_seg_mux;
  localparam int W = 32, S = 4, B = W / S;
  logic clk = 0, rst_n = 0, load, next, wr;
  logic [W-1:0] d, q;
  logic [B-1:0] seg, seg_in;
  int checks = 0, failures = 0;

  dtr_seg_mux #(.W(W), .S(S)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    load = 0; next = 0; wr = 0; d = '0; seg_in = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int w = 0; w < 30; w++) begin
      logic [W-1:0] word;
      word = $urandom;
      d = word; load = 1;
      @(negedge clk);
      load = 0;
      if (w[0]) begin next = 1; wr = 1; seg_in = B'($urandom); @(negedge clk); next = 0; wr = 0; d = ~word; load = 1; @(negedge clk); load = 0; word = ~word; end
      for (int t = 0; t < S; t++) begin
        checks++;
        if (seg !== word[t*B +: B]) failures++;
        seg_in = seg; next = 1; wr = 1;
        @(negedge clk);
        next = 0; wr = 0;
      end
      checks++;
      if (q !== word) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

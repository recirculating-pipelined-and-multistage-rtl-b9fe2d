// tb_interchange_box: checks the straight and exchange states of a 4-bit
// interchange box on random data.
module tb_interchange_box;
  localparam int B = 4;
  logic         ctrl;
  logic [B-1:0] a, b, y0, y1;
  int checks = 0, failures = 0;

  interchange_box #(.B(B)) dut (.*);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 200; t++) begin
      ctrl = t[0];
      a = B'($urandom);
      b = B'($urandom);
      #1;
      checks++;
      if (ctrl == 1'b0 && !(y0 == a && y1 == b)) failures++;
      if (ctrl == 1'b1 && !(y0 == b && y1 == a)) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

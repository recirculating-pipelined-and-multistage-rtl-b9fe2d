// tb_pm2i_stage: 16-row PM2I stage for i = 1 and i = 3 (where +2**i and
// -2**i meet). Random send enables; each receiver must hold the OR of the
// data sent to it, worked out from the senders' side.
module tb_pm2i_stage;
  localparam int N = 16, B = 4;
  logic [N-1:0][B-1:0] din, dout1, dout3;
  logic [N-1:0][2:0]   en;
  int checks = 0, failures = 0;

  pm2i_stage #(.N(N), .B(B), .STAGE(1)) dut1 (.din, .en, .dout(dout1));
  pm2i_stage #(.N(N), .B(B), .STAGE(3)) dut3 (.din, .en, .dout(dout3));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [N-1:0][B-1:0] model(input int i);
    logic [N-1:0][B-1:0] r;
    r = '0;
    for (int j = 0; j < N; j++) begin
      if (en[j][0]) r[j] |= din[j];
      if (en[j][1]) r[(j + (1 << i)) % N] |= din[j];
      if (en[j][2]) r[(j + N - (1 << i)) % N] |= din[j];
    end
    return r;
  endfunction

  initial begin
    for (int t = 0; t < 200; t++) begin
      for (int j = 0; j < N; j++) begin
        din[j] = B'($urandom);
        en[j]  = 3'($urandom);
      end
      #1;
      checks += 2;
      if (dout1 !== model(1)) failures++;
      if (dout3 !== model(3)) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

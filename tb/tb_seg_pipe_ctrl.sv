// tb_seg_pipe_ctrl: sequencer with S = 4 and DEPTH = 10 (and DEPTH = 1).
// Counts the clocks with in_shift and out_shift, where they fall relative
// to start, and that done comes n + S - 1 clocks after the transfer starts;
// a start while busy must be ignored.
module tb_seg_pipe_ctrl;
  localparam int S = 4;
  logic clk = 0, rst_n = 0, start;
  logic in_a, out_a, busy_a, done_a;
  logic in_b, out_b, busy_b, done_b;
  int checks = 0, failures = 0;

  seg_pipe_ctrl #(.S(S), .DEPTH(10)) dut_a (.clk, .rst_n, .start,
    .in_shift(in_a), .out_shift(out_a), .busy(busy_a), .done(done_a));
  seg_pipe_ctrl #(.S(S), .DEPTH(1)) dut_b (.clk, .rst_n, .start,
    .in_shift(in_b), .out_shift(out_b), .busy(busy_b), .done(done_b));
  always #5 clk = ~clk;

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run(input int depth);
    int c, n_in, n_out, first_out, last_in, done_at;
    start = 1;
    @(negedge clk);
    start = 0;
    c = 0; n_in = 0; n_out = 0; first_out = -1; last_in = -1; done_at = -1;
    while (c < 40) begin
      logic i, o, b, dn;
      i  = (depth == 10) ? in_a : in_b;
      o  = (depth == 10) ? out_a : out_b;
      b  = (depth == 10) ? busy_a : busy_b;
      dn = (depth == 10) ? done_a : done_b;
      if (i) begin n_in++; last_in = c; end
      if (o) begin n_out++; if (first_out < 0) first_out = c; end
      if (dn && done_at < 0) done_at = c;
      if (c == 2) start = 1;               // ignored while busy
      else start = 0;
      @(negedge clk);
      c++;
    end
    checks += 5;
    if (n_in != S) failures++;
    if (n_out != S) failures++;
    if (last_in != S - 1) failures++;
    if (first_out != depth - 1) failures++;
    if (done_at != depth + S - 1) failures++;   // transfer took depth+S-1 clocks
  endtask

  initial begin
    start = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    run(10);
    run(1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// seg_pipe_ctrl: sequencer for moving an S-segment word through a network
// whose latency from DTRin to DTRout is DEPTH clocks.
//
// A start pulse (DTRin already loaded) begins a transfer; count c runs from
// 0. in_shift is high in clocks c = 0 .. S-1, stepping DTRin to the next
// segment; out_shift is high in clocks c = DEPTH-1 .. DEPTH+S-2, when a
// segment leaves the network and is captured by DTRout. busy covers all
// DEPTH+S-1 clocks and done pulses in the clock after the last capture.
// With DEPTH = n (the pipelined network) a transfer takes n + S - 1 clocks,
// the Tp of the source design; with DEPTH = 1 (combinational network, one
// long clock per segment) it takes S clocks, as Tm counts S network passes.
// start is ignored while busy. The controller itself is this design's own.
module seg_pipe_ctrl #(
  parameter int unsigned S     = 4,
  parameter int unsigned DEPTH = 10,
  localparam int unsigned LAST = DEPTH + S - 2,
  localparam int unsigned CW   = $clog2(LAST + 2)
) (
  input  logic clk,
  input  logic rst_n,
  input  logic start,
  output logic in_shift,
  output logic out_shift,
  output logic busy,
  output logic done
);
  logic [CW-1:0] cnt;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy <= 1'b0;
      done <= 1'b0;
      cnt  <= '0;
    end else begin
      done <= 1'b0;
      if (!busy) begin
        if (start) begin
          busy <= 1'b1;
          cnt  <= '0;
        end
      end else if (cnt == CW'(LAST)) begin
        busy <= 1'b0;
        done <= 1'b1;
      end else begin
        cnt <= cnt + 1'b1;
      end
    end
  end

  always_comb begin
    in_shift  = busy && (cnt < CW'(S));
    out_shift = busy && (cnt >= CW'(DEPTH - 1));
  end

  // done is only raised as busy falls
  a_done_not_busy: assert property (@(posedge clk) disable iff (!rst_n) done |-> !busy)
    else $error("seg_pipe_ctrl: done while busy");
endmodule

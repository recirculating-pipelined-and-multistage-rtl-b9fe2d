// dtr_seg_mux: segmented DTRin/DTRout built from full W-bit registers with
// an S-to-1 multiplexer into the network and a 1-to-S demultiplexer out of it.
//
// load writes the W-bit DTRin and clears both segment indices. seg presents
// segment in_idx (word bits in_idx*B + B-1 .. in_idx*B); next advances
// in_idx. wr writes the network output seg_in into segment out_idx of the
// W-bit DTRout and advances out_idx. Segment t is bits tB+B-1 .. tB, so the
// segment order differs from the shift-register form (dtr_in_piso), but the
// word arrives intact either way. The counters and the segment order are
// this design's choices; the source design names only the registers, the
// multiplexer and the demultiplexer.
module dtr_seg_mux #(
  parameter int unsigned W = 32,
  parameter int unsigned S = 4,
  localparam int unsigned B  = W / S,
  localparam int unsigned IW = (S > 1) ? $clog2(S) : 1
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         load,
  input  logic [W-1:0] d,
  input  logic         next,
  output logic [B-1:0] seg,
  input  logic         wr,
  input  logic [B-1:0] seg_in,
  output logic [W-1:0] q
);
  logic [S-1:0][B-1:0] in_q, out_q;
  logic [IW-1:0]       in_idx, out_idx;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      in_q    <= '0;
      out_q   <= '0;
      in_idx  <= '0;
      out_idx <= '0;
    end else begin
      if (load) begin
        in_q    <= d;
        in_idx  <= '0;
        out_idx <= '0;
      end else begin
        if (next) in_idx <= (in_idx == IW'(S - 1)) ? '0 : in_idx + 1'b1;
        if (wr) begin
          out_q[out_idx] <= seg_in;
          out_idx <= (out_idx == IW'(S - 1)) ? '0 : out_idx + 1'b1;
        end
      end
    end
  end

  assign seg = in_q[in_idx];
  assign q   = out_q;
endmodule

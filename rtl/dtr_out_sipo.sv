// dtr_out_sipo: DTRout for segmented transfers, built from B = W/S
// serial-in parallel-out shift registers of S bits each.
//
// Each clock with shift = 1, register k takes seg[k] into its most
// significant bit and moves its other bits one place toward the LSB. After S
// shifts the first segment received sits in bit 0 of every register, so q
// holds the word in the same layout dtr_in_piso sent it from: register k is
// word bits (k+1)S-1 .. kS. The rest of the PE reads q as an ordinary W-bit
// register. Any S from 1 up works. Asynchronous active-low reset (this
// design's choice).
module dtr_out_sipo #(
  parameter int unsigned W = 32,
  parameter int unsigned S = 4,
  localparam int unsigned B = W / S
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         shift,
  input  logic [B-1:0] seg,
  output logic [W-1:0] q
);
  logic [B-1:0][S-1:0] sr;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) sr <= '0;
    else if (shift)
      for (int k = 0; k < B; k++) sr[k] <= (sr[k] >> 1) | ((S)'(seg[k]) << (S - 1));
  end

  assign q = sr;
endmodule

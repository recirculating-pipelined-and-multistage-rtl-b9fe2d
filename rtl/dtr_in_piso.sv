// dtr_in_piso: DTRin for segmented transfers, built from B = W/S
// parallel-in serial-out shift registers of S bits each.
//
// On load, register k takes word bits d[(k+1)S-1 : kS]. Bit k of seg is the
// least significant bit of register k, so seg carries word bits
// {d[(B-1)S+t], ..., d[S+t], d[t]} after t shifts. Each clock with shift = 1
// moves every register one place toward its LSB, presenting the next
// segment; S shifts send the whole word. load has priority over shift.
// Register layout and shift order follow the source design; the load/shift
// controls and the asynchronous active-low reset are this design's own.
module dtr_in_piso #(
  parameter int unsigned W = 32,
  parameter int unsigned S = 4,
  localparam int unsigned B = W / S
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         load,
  input  logic [W-1:0] d,
  input  logic         shift,
  output logic [B-1:0] seg
);
  logic [B-1:0][S-1:0] sr;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)     sr <= '0;
    else if (load)  sr <= d;
    else if (shift) for (int k = 0; k < B; k++) sr[k] <= sr[k] >> 1;
  end

  always_comb for (int k = 0; k < B; k++) seg[k] = sr[k][0];
endmodule

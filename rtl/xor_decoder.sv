// xor_decoder: expands 28 control bits into the 64 values of one select line
// of the first-stage muxes.
//
// Combinational. Every output is the XOR of exactly two inputs, so the
// decoder is a graph with the inputs as vertices and the outputs as edges;
// a set of required output values can be met whenever the corresponding
// edges contain no cycle. Output e XORs input e mod 14 with input
// 14 + ((e mod 14 + OFS[e/14]) mod 14), OFS = {0,1,3,7,12}: a bipartite
// graph with 28 vertices, 64 distinct edges and girth 4. The sizes, the
// single two-input XOR per output and the girth follow the reference design;
// the particular graph is this design's choice.
module xor_decoder
  import xdbist_pkg::*;
(
  input  logic [DEC_IN-1:0]  din,
  output logic [DEC_OUT-1:0] dout
);
  for (genvar e = 0; e < DEC_OUT; e++) begin : g_out
    localparam int unsigned A = dec_in_a(e);
    localparam int unsigned B = dec_in_b(e);
    assign dout[e] = din[A] ^ din[B];
  end
endmodule

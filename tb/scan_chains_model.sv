// scan_chains_model: behavioural stand-in for the internal scan chains of a
// design under test, used only by the top-level testbench.
//
// N chains of LEN cells. With shift_en high every chain shifts one cell
// toward its tail: cell 0 takes chain_si[c], chain_so[c] is cell LEN-1. With
// capture high the cells take a simple functional response,
// cell[c][j] ^ cell[(c+1) mod N][(j+1) mod LEN] ^ 1, except the cells marked
// in xmask, which take an unpredictable value (from $urandom) to play the
// part of unknown (X) sources; the tester must mask those bits.
module scan_chains_model #(
  parameter int N   = 512,
  parameter int LEN = 40
) (
  input  logic         clk,
  input  logic         shift_en,
  input  logic         capture,
  input  logic [N-1:0] chain_si,
  output logic [N-1:0] chain_so
);
  logic cells [N][LEN];
  bit   xmask [N][LEN];

  initial
    for (int c = 0; c < N; c++)
      for (int j = 0; j < LEN; j++) begin
        cells[c][j] = 1'b0;
        xmask[c][j] = ($urandom % 64) == 0;
      end

  always @(posedge clk) begin
    if (shift_en) begin
      for (int c = 0; c < N; c++) begin
        for (int j = LEN - 1; j > 0; j--) cells[c][j] <= cells[c][j-1];
        cells[c][0] <= chain_si[c];
      end
    end else if (capture) begin
      for (int c = 0; c < N; c++)
        for (int j = 0; j < LEN; j++)
          cells[c][j] <= xmask[c][j] ? 1'($urandom)
                                     : cells[c][j] ^ cells[(c+1)%N][(j+1)%LEN] ^ 1'b1;
    end
  end

  always_comb
    for (int c = 0; c < N; c++) chain_so[c] = cells[c][LEN-1];
endmodule

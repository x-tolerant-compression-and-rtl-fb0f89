// prpg_shadow: shadow register of the PRPG, loaded from the tester while the
// internal scan chains shift, so that the next seed is ready without adding
// cycles.
//
// The LEN bits are cut into N_SI consecutive segments of SEG = ceil(LEN/N_SI)
// bits (the last may be shorter). Segment c is a shift register fed by scan
// input si[c] at its highest bit and shifting toward its lowest bit, one bit
// per cycle in which shift_en is high. After SEG shift cycles every segment
// holds the last bits shifted into it; the bit shifted first sits at the
// segment's lowest index. A shorter last segment drops its first input bit.
// The parallel output q feeds the PRPG LFSR, which copies it on the capture
// cycle. Reset (synchronous, active low) clears the register.
//
// Following the reference design: same length as the LFSR (479 bits), 12
// parallel scan inputs (shadow_si0..shadow_si11), 40 cycles to load. The
// segment order and shift direction are this design's choice.
module prpg_shadow #(
  parameter int unsigned LEN  = xdbist_pkg::PRPG_LEN,
  parameter int unsigned N_SI = xdbist_pkg::N_SHADOW_SI
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            shift_en,
  input  logic [N_SI-1:0] si,
  output logic [LEN-1:0]  q
);
  localparam int unsigned SEG = (LEN + N_SI - 1) / N_SI;

  logic [LEN-1:0] nxt;

  always_comb begin
    for (int unsigned i = 0; i < LEN; i++) begin
      int unsigned seg, top;
      seg = i / SEG;
      top = (seg * SEG + SEG - 1 < LEN) ? seg * SEG + SEG - 1 : LEN - 1;
      nxt[i] = (i == top) ? si[seg] : q[(i + 1) % LEN];
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n)        q <= '0;
    else if (shift_en) q <= nxt;
  end
endmodule

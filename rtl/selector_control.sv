// selector_control: the 160-bit control register that holds the observe
// selection of the pattern being unloaded.
//
// On the capture cycle (load high) it takes the selector shadow's contents,
// at the same edge at which the PRPG LFSR takes its new seed, and holds them
// for the whole following unload, so one set of chains is observed per
// pattern. Reset (synchronous, active low) clears it, which selects port 0 of
// every mux. Width and transfer point follow the reference design.
module selector_control
  import xdbist_pkg::*;
(
  input  logic     clk,
  input  logic     rst_n,
  input  logic     load,
  input  sel_ctl_t d,
  output sel_ctl_t q
);
  always_ff @(posedge clk) begin
    if (!rst_n)    q <= '0;
    else if (load) q <= d;
  end
endmodule

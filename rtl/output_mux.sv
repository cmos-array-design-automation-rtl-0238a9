// output_mux: slice-to-bus transmission gates and the bus pull-ups.
//
// Each slice's eight sense lines reach the eight output data bus lines
// through a group of eight transmission gates; the group of slice k is on
// while bank_en_n[k] is low, and the 1-of-8 decoder turns on one group at a
// time. Each bus line also carries a PMOS device with its gate grounded, a
// permanent weak pull-up. The line is therefore low when the enabled slice's
// selected cell sinks it and high otherwise: when the cell's source is on
// VDD, when no group is enabled, or when the cell fails to conduct. The
// transmission gates, the one-group-at-a-time rule and the pull-ups follow
// the document; reducing the analog bus to "low if any enabled path sinks
// it" is this model's reading of those devices.
//
// Interface: pull_low[SLICES][BITS] and bank_en_n[SLICES] in, bus[BITS] out.
// Timing: combinational. The assertion checks that at most one group is on.
module output_mux
#(
  parameter int SLICES = atl078_pkg::SLICES,
  parameter int BITS   = atl078_pkg::BITS
) (
  input  logic [SLICES-1:0][BITS-1:0] pull_low,
  input  logic [SLICES-1:0]           bank_en_n,
  output logic [BITS-1:0]             bus
);

  always_comb begin
    for (int b = 0; b < BITS; b++) begin
      bus[b] = 1'b1;                      // PMOS pull-up
      for (int k = 0; k < SLICES; k++)
        if (!bank_en_n[k] && pull_low[k][b]) bus[b] = 1'b0;
    end
  end

  always_comb begin
    assert #0 ($countones(~bank_en_n) <= 1)
      else $error("output_mux: more than one slice drives the data bus");
  end

endmodule

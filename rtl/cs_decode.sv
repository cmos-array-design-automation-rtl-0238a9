// cs_decode: chip-select decode for the output tristates.
//
// The four chip-select pins are ANDed on chip: CS1 and CS2 are active low
// and pass through an inverter each, CS3 and CS4 are active high and go
// straight in. A four-input NAND combines them and two inverters buffer the
// result into one active-low enable that drives all eight tristate stages.
// The gates and their order follow the document's chip-select figure.
//
// Interface: cs1_n, cs2_n, cs3, cs4 in; cs_en_n out, low when the chip is
// selected (cs1_n = cs2_n = 0 and cs3 = cs4 = 1).
// Timing: combinational.
module cs_decode (
  input  logic cs1_n,
  input  logic cs2_n,
  input  logic cs3,
  input  logic cs4,
  output logic cs_en_n
);

  logic cs1, cs2, nand_q, buf_q;

  always_comb begin
    cs1     = ~cs1_n;
    cs2     = ~cs2_n;
    nand_q  = ~(cs1 & cs2 & cs3 & cs4);
    buf_q   = ~nand_q;
    cs_en_n = ~buf_q;
  end

endmodule

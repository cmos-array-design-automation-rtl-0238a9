// addr_buffer: input buffering of the low address bits A0-A5.
//
// Each of the six address pins drives one large inverter, whose output is
// fanned out to every 1-of-64 decoder. At each decoder the inverted address
// feeds four local stages per bit, one per polysilicon gate column: a single
// inverter (restoring the true rail) and a two-inverter, non-inverting stage
// (carrying the complement rail), once for the decoder's PMOS section and once
// for its NMOS section. That is 24 driven inputs per decoder, as the document
// describes; the stage arrangement follows its data-path figure.
//
// Interface: a[5:0] in, rails[NDEC] out (dec_rails_t per decoder).
// Timing: purely combinational, no clock; the chip is fully static.
module addr_buffer
  import atl078_pkg::*;
#(
  parameter int NDEC = SLICES   // one rail set per 1-of-64 decoder
) (
  input  logic [ROW_AW-1:0] a,
  output dec_rails_t        rails [NDEC]
);

  // Pad inverter: the large first stage shared by all decoders.
  logic [ROW_AW-1:0] a_inv;
  assign a_inv = ~a;

  for (genvar d = 0; d < NDEC; d++) begin : g_dec
    // Intermediate node of each non-inverting stage.
    logic [ROW_AW-1:0] p_mid, n_mid;
    always_comb begin
      // Single inverter stages: true rails.
      rails[d].p.t = ~a_inv;
      rails[d].n.t = ~a_inv;
      // Non-inverting (inverter pair) stages: complement rails.
      p_mid        = ~a_inv;
      n_mid        = ~a_inv;
      rails[d].p.c = ~p_mid;
      rails[d].n.c = ~n_mid;
    end
  end

endmodule

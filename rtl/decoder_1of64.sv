// decoder_1of64: 1-of-64 row decoder for the 64 x 8 memory slices.
//
// Eight of these serve the eight slices; in each quadrant two of them drive
// the shared row lines from opposite ends (see quadrant).
//
// Each of the 64 outputs is a static six-input CMOS NOR. Its pull-up is a
// chain of six series PMOS devices and its pull-down six parallel NMOS
// devices. Row r uses, for address bit i, the complement rail when bit i of
// r is 1 and the true rail when it is 0, so all six gates of row r are low
// exactly when A0-A5 = r and only that row rises. In silicon the PMOS chains
// share a tree whose unused gates are shorted by links; the same selection
// is expressed here by the choice of rail per row.
//
// The two sections see separate rails (dec_rails_t .p and .n). The output
// is high only when the series chain conducts and no NMOS conducts; when
// both fight the NMOS side wins, since the document sizes this NOR with over
// twice the pull-down strength. That sizing and the NOR structure follow the
// document; resolving a fight as 0 is this model's choice.
//
// Interface: rails in, row_sel[ROWS-1:0] out, active high, one-hot.
// Timing: combinational.
module decoder_1of64
  import atl078_pkg::dec_rails_t, atl078_pkg::ROW_AW;
#(
  parameter int ROWS = atl078_pkg::ROWS   // rows decoded (A0-A5 give 64)
) (
  input  dec_rails_t         rails,
  output logic [ROWS-1:0]  row_sel
);

  for (genvar r = 0; r < ROWS; r++) begin : g_row
    logic [ROW_AW-1:0] pg, ng;    // gate of each PMOS / NMOS device
    logic pull_up, pull_down;
    always_comb begin
      for (int i = 0; i < ROW_AW; i++) begin
        pg[i] = ((r >> i) & 1) != 0 ? rails.p.c[i] : rails.p.t[i];
        ng[i] = ((r >> i) & 1) != 0 ? rails.n.c[i] : rails.n.t[i];
      end
      pull_up   = ~|pg;           // series PMOS chain: all gates low
      pull_down = |ng;            // parallel NMOS: any gate high
      row_sel[r] = pull_up & ~pull_down;
    end
  end

endmodule

// rom_slice: one 64-word x 8-bit NMOS memory slice with its programming links.
//
// Every cell is one NMOS transistor: its gate is the row-select line, its
// drain sits on the column's sense line and its source is tied through two
// metal links, link "1" to the programmed-VDD bus and link "0" to ground.
// A programmed cell keeps exactly one link. When its row is selected the
// cell either sinks the sense line to ground (link "0" kept) or lifts it
// toward VDD (link "1" kept); the high level is completed by the pull-up on
// the output bus, so the slice reports only whether it pulls its line low.
//
// Pre-programming test: the programmed-VDD bus of all slices goes to a test
// pad. With the pad floating or grounded, an unprogrammed cell (both links
// intact) sinks its line through either link, so every good cell reads as a
// low bus, and a cell, row or column that fails to conduct leaves the line
// high. With the pad tied to VDD the chip works normally.
//
// The link state is held in flip-flops. fab_rst_n models fabrication: it
// sets every cell to the mask pattern (PROG = PROG_MASK, contents MASK_DATA)
// or to both links intact (PROG = PROG_LASER). A cut (cut_en high at a
// rising clk edge) severs one link of one cell for good, modelling laser
// programming; links are never restored. The cell circuit, the two links,
// the test pad and both programming styles follow the document; the
// clocked cut port and the reset are this model's own means of expressing
// a physical, one-time change.
//
// Interface: row_sel (one-hot or idle, checked by an assertion) and
// vdd_prog in, pull_low[BITS-1:0] out, combinational. Programming: clk, fab_rst_n (async, active low), cut_*.
module rom_slice
  import atl078_pkg::prog_style_e, atl078_pkg::PROG_MASK, atl078_pkg::PROG_LASER,
         atl078_pkg::link_pair_t, atl078_pkg::mask_links;
#(
  parameter int          ROWS      = atl078_pkg::ROWS,
  parameter int          BITS      = atl078_pkg::BITS,
  parameter prog_style_e PROG      = PROG_LASER,
  parameter logic [ROWS-1:0][BITS-1:0] MASK_DATA = '0
) (
  input  logic                    clk,
  input  logic                    fab_rst_n,
  input  logic                    cut_en,
  input  logic [$clog2(ROWS)-1:0] cut_row,
  input  logic [$clog2(BITS)-1:0] cut_bit,
  input  logic                    cut_link,   // 1: link "1", 0: link "0"
  input  logic [ROWS-1:0]         row_sel,
  input  logic                    vdd_prog,   // programmed-VDD bus level
  output logic [BITS-1:0]         pull_low
);

  link_pair_t links [ROWS][BITS];

  always_ff @(posedge clk or negedge fab_rst_n) begin
    if (!fab_rst_n) begin
      for (int r = 0; r < ROWS; r++)
        for (int b = 0; b < BITS; b++)
          links[r][b] <= (PROG == PROG_MASK) ? mask_links(MASK_DATA[r][b])
                                             : link_pair_t'(2'b11);
    end else if (cut_en) begin
      if (cut_link) links[cut_row][cut_bit].one  <= 1'b0;
      else          links[cut_row][cut_bit].zero <= 1'b0;
    end
  end

  // A selected cell sinks its sense line when its source reaches ground:
  // through link "0", or through link "1" while the VDD bus is grounded.
  always_comb begin
    for (int b = 0; b < BITS; b++) begin
      pull_low[b] = 1'b0;
      for (int r = 0; r < ROWS; r++)
        if (row_sel[r] && (links[r][b].zero || (links[r][b].one && !vdd_prog)))
          pull_low[b] = 1'b1;
    end
  end

  // Only one cell per sense line may drive it: at most one row selected.
  always_comb begin
    assert #0 ($onehot0(row_sel))
      else $error("rom_slice: more than one row selected");
  end

endmodule

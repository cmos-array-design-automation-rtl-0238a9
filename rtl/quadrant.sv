// quadrant: one 1K-bit quarter of the array, two 64 x 8 slices on shared rows.
//
// In the chip's floor plan each quadrant holds two slices side by side as
// one 64 x 16 block. Both slices hang on the same 64 polysilicon row lines,
// and each row line is driven from both ends, by a 1-of-64 decoder on the
// left and another on the right; each decoder gets its own address rails.
// Driving from both ends halves the worst-case RC delay to the middle bits.
// The shared rows, the two end decoders and the two slices follow the
// document's layout description.
//
// Digitally, both ends drive the same value when they work. If they
// disagree (a faulty decoder or rail) this model lets the low end win, as
// the decoder's pull-down is the stronger side; the row then selects no
// cell and the pre-programming test reads a 0 on the affected pins. That
// resolution is this model's choice.
//
// Interface: rails_l/rails_r (end decoders' rails), vdd_prog, link-cut
// port (cut_en_a/cut_en_b pick the slice), pull_low_a/pull_low_b out.
// Timing: combinational read path; cuts on the rising clk edge.
module quadrant
  import atl078_pkg::dec_rails_t, atl078_pkg::prog_style_e, atl078_pkg::PROG_LASER;
#(
  parameter int          ROWS   = atl078_pkg::ROWS,
  parameter int          BITS   = atl078_pkg::BITS,
  parameter prog_style_e PROG   = PROG_LASER,
  parameter logic [ROWS-1:0][BITS-1:0] MASK_A = '0,   // contents of slice A
  parameter logic [ROWS-1:0][BITS-1:0] MASK_B = '0    // contents of slice B
) (
  input  logic                    clk,
  input  logic                    fab_rst_n,
  input  logic                    cut_en_a,
  input  logic                    cut_en_b,
  input  logic [$clog2(ROWS)-1:0] cut_row,
  input  logic [$clog2(BITS)-1:0] cut_bit,
  input  logic                    cut_link,
  input  dec_rails_t              rails_l,
  input  dec_rails_t              rails_r,
  input  logic                    vdd_prog,
  output logic [BITS-1:0]         pull_low_a,
  output logic [BITS-1:0]         pull_low_b
);

  logic [ROWS-1:0] row_l, row_r, row_line;

  decoder_1of64 #(.ROWS(ROWS)) u_dec_l (.rails(rails_l), .row_sel(row_l));
  decoder_1of64 #(.ROWS(ROWS)) u_dec_r (.rails(rails_r), .row_sel(row_r));

  // A row line driven from both ends: high only if both ends drive it high.
  assign row_line = row_l & row_r;

  rom_slice #(.ROWS(ROWS), .BITS(BITS), .PROG(PROG), .MASK_DATA(MASK_A)) u_slice_a (
    .clk(clk), .fab_rst_n(fab_rst_n), .cut_en(cut_en_a), .cut_row(cut_row),
    .cut_bit(cut_bit), .cut_link(cut_link), .row_sel(row_line),
    .vdd_prog(vdd_prog), .pull_low(pull_low_a));

  rom_slice #(.ROWS(ROWS), .BITS(BITS), .PROG(PROG), .MASK_DATA(MASK_B)) u_slice_b (
    .clk(clk), .fab_rst_n(fab_rst_n), .cut_en(cut_en_b), .cut_row(cut_row),
    .cut_bit(cut_bit), .cut_link(cut_link), .row_sel(row_line),
    .vdd_prog(vdd_prog), .pull_low(pull_low_b));

endmodule

// atl078_pkg: constants and types shared by the 512 x 8 CMOS ROM.
//
// The ROM holds 4096 bits as eight 64-word x 8-bit slices. The low six
// address bits (A0-A5) pick a row in every slice; the high three (A6-A8)
// pick the slice whose sense lines reach the output bus. These sizes follow
// the document. The types below are this design's own way of carrying the
// circuit's nets:
//   addr_rail_t  - one true and one complement rail per low address bit,
//   dec_rails_t  - the separate rail sets of a decoder's PMOS and NMOS
//                  sections (each address line has one gate in each),
//   link_pair_t  - the two metal programming links of one memory cell,
//   prog_style_e - programmed at the metal mask, or fabricated with every
//                  link intact and programmed later by cutting links.
// The default ROM contents (default_rom) are not given by the document; they
// are a fixed pattern, word(w) = (29*w mod 256) XOR (w >> 4), chosen so that
// neighbouring words and slices differ.
package atl078_pkg;

  localparam int WORDS   = 512;   // words in the ROM
  localparam int BITS    = 8;     // bits per word
  localparam int SLICES  = 8;     // 64 x 8 memory slices
  localparam int ROWS    = 64;    // rows per slice
  localparam int ROW_AW  = 6;     // A0-A5
  localparam int SLICE_AW = 3;    // A6-A8
  localparam int AW      = 9;     // A0-A8

  typedef logic [BITS-1:0] word_t;
  typedef word_t [WORDS-1:0] rom_image_t;

  // True (t) and complement (c) rails of A0-A5.
  typedef struct packed {
    logic [ROW_AW-1:0] t;
    logic [ROW_AW-1:0] c;
  } addr_rail_t;

  // A decoder's PMOS-section gates (p) and NMOS-section gates (n).
  typedef struct packed {
    addr_rail_t p;
    addr_rail_t n;
  } dec_rails_t;

  // Intact flags of a cell's two links. Link "1" ties the cell source to
  // the programmed-VDD bus, link "0" ties it to ground. Cutting link "1"
  // leaves the source on ground, the bus line is pulled low and the pin
  // reads 1; cutting link "0" makes the pin read 0.
  typedef struct packed {
    logic one;
    logic zero;
  } link_pair_t;

  typedef enum logic {
    PROG_MASK  = 1'b0,   // one link left out of the metal mask per cell
    PROG_LASER = 1'b1    // both links present; one is cut per cell later
  } prog_style_e;

  // Links a cell gets when its bit is set at the metal-mask level.
  function automatic link_pair_t mask_links(logic data);
    link_pair_t l;
    l.one  = ~data;
    l.zero = data;
    return l;
  endfunction

  // Link a laser must cut to program 'data' into a cell with both links.
  function automatic logic link_to_cut(logic data);
    return data;   // 1: cut link "1"; 0: cut link "0"
  endfunction

  // Default contents used when no image is given.
  function automatic word_t default_word(int unsigned w);
    return word_t'((w * 29) % 256) ^ word_t'(w >> 4);
  endfunction

  function automatic rom_image_t default_rom();
    rom_image_t img;
    for (int unsigned w = 0; w < WORDS; w++) img[w] = default_word(w);
    return img;
  endfunction

endpackage

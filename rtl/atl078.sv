// atl078: 4096-bit (512 x 8) static CMOS read-only memory.
//
// The array is split into eight 64 x 8 NMOS slices so that each polysilicon
// row line crosses only eight cells; on the die two slices share the row
// lines of a quadrant, driven by a 1-of-64 decoder at each end. A0-A5 are
// buffered once and fanned out to the eight decoders, so the same row
// rises in every slice. A6-A8 go to a 1-of-8 decoder that opens the transmission gates of
// one slice onto the eight-line output data bus, which has a PMOS pull-up on
// every line. Each bus line passes a sense inverter and an intermediate
// buffer (two inversions, written inline here) to an inverting tristate
// stage enabled by the chip-select decode. Net polarity: a cell kept on
// ground pulls its bus line low and the pin reads 1.
//
// Contents are set by metal links, two per cell. PROG = PROG_MASK builds the
// chip with one link per cell as given by MASK_DATA; PROG = PROG_LASER
// builds it with both links and expects one link per cell to be cut
// (cut_* port, one cut per prog_clk edge). Before cutting, the chip is
// tested with test_pad low: every good location then reads 0xFF, and a
// location whose decoder, cell or transmission gate fails to conduct reads
// a 0 on the affected pins. With test_pad high the chip reads its contents.
// The organisation, the decode split, the bus pull-ups, the output stage,
// the two programming styles and the test pad follow the document. The
// cut port, the fabrication reset, the split of each pin into level and
// drive flag, and the default contents are this design's own.
//
// Pins (document's pinout): a = A8..A0, cs1_n, cs2_n, cs3, cs4 in;
// o[7:0] = O8..O1 with drive flags o_oe. Timing: address and chip-select
// to output is combinational; there is no clock in the read path.
module atl078
  import atl078_pkg::*;
#(
  parameter prog_style_e PROG      = PROG_LASER,
  parameter rom_image_t  MASK_DATA = default_rom()
) (
  // read path
  input  logic [AW-1:0]   a,
  input  logic            cs1_n,
  input  logic            cs2_n,
  input  logic            cs3,
  input  logic            cs4,
  input  logic            test_pad,   // 1: tied to VDD (normal operation)
  output logic [BITS-1:0] o,
  output logic [BITS-1:0] o_oe,
  // fabrication and link cutting
  input  logic            prog_clk,
  input  logic            fab_rst_n,
  input  logic            cut_en,
  input  logic [AW-1:0]   cut_addr,
  input  logic [2:0]      cut_bit,
  input  logic            cut_link    // 1: link "1", 0: link "0"
);

  dec_rails_t                        rails [SLICES];
  logic [SLICES-1:0][BITS-1:0]       pull_low;
  logic [SLICES-1:0]                 bank_en_n;
  logic [BITS-1:0]                   bus, sense_n, shaped;
  logic                              cs_en_n;

  addr_buffer #(.NDEC(SLICES)) u_addr_buf (
    .a     (a[ROW_AW-1:0]),
    .rails (rails)
  );

  // Four quadrants, each two slices on shared row lines driven by a
  // decoder at either end. Slice pairing as placed on the die: the words
  // 64-127 / 0-63, 384-447 / 192-255, 320-383 / 256-319 and 128-191 /
  // 448-511 share a quadrant.
  localparam int QUADS = SLICES / 2;
  localparam int SLICE_A [4] = '{1, 6, 5, 2};
  localparam int SLICE_B [4] = '{0, 3, 4, 7};

  for (genvar q = 0; q < QUADS; q++) begin : g_quad
    localparam int SA = SLICE_A[q];
    localparam int SB = SLICE_B[q];
    quadrant #(
      .ROWS   (ROWS),
      .BITS   (BITS),
      .PROG   (PROG),
      .MASK_A (MASK_DATA[SA*ROWS +: ROWS]),
      .MASK_B (MASK_DATA[SB*ROWS +: ROWS])
    ) u_quad (
      .clk        (prog_clk),
      .fab_rst_n  (fab_rst_n),
      .cut_en_a   (cut_en && (cut_addr[AW-1:ROW_AW] == SLICE_AW'(SA))),
      .cut_en_b   (cut_en && (cut_addr[AW-1:ROW_AW] == SLICE_AW'(SB))),
      .cut_row    (cut_addr[ROW_AW-1:0]),
      .cut_bit    (cut_bit),
      .cut_link   (cut_link),
      .rails_l    (rails[2*q]),
      .rails_r    (rails[2*q+1]),
      .vdd_prog   (test_pad),
      .pull_low_a (pull_low[SA]),
      .pull_low_b (pull_low[SB])
    );
  end

  decoder_1of8 u_dec8 (
    .a         (a[AW-1:ROW_AW]),
    .bank_en_n (bank_en_n)
  );

  output_mux #(.SLICES(SLICES), .BITS(BITS)) u_mux (
    .pull_low  (pull_low),
    .bank_en_n (bank_en_n),
    .bus       (bus)
  );

  // Sense amplifier (small balanced inverter) and intermediate buffer.
  assign sense_n = ~bus;
  assign shaped  = ~sense_n;

  cs_decode u_cs (
    .cs1_n   (cs1_n),
    .cs2_n   (cs2_n),
    .cs3     (cs3),
    .cs4     (cs4),
    .cs_en_n (cs_en_n)
  );

  tristate_out #(.BITS(BITS)) u_out (
    .d       (shaped),
    .cs_en_n (cs_en_n),
    .o       (o),
    .o_oe    (o_oe)
  );

endmodule

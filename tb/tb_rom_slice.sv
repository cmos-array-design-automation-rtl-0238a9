// tb_rom_slice: checks one 64 x 8 slice in both programming styles.
// Mask-programmed: every row reads its pattern with the VDD bus up and reads
// all-low (every cell conducting) with it grounded. Laser-programmed: all
// cells conduct before cutting, each row reads its pattern after one link
// per cell is cut, the test reading stays all-low, and a cell with both
// links cut shows as a missing pull-down in the test reading. No selected
// row means no pull-down.
module tb_rom_slice;
  import atl078_pkg::*;

  localparam int ROWS_T = 64;
  localparam int BITS_T = 8;

  // Expected contents, worked out here: bit b of row r.
  function automatic logic [7:0] pat(int r);
    return 8'((r * 7 + 3) ^ (r << 2));
  endfunction

  function automatic logic [ROWS_T-1:0][BITS_T-1:0] pat_image();
    logic [ROWS_T-1:0][BITS_T-1:0] img;
    for (int r = 0; r < ROWS_T; r++) img[r] = pat(r);
    return img;
  endfunction

  logic clk = 0;
  logic fab_rst_n = 1;
  logic cut_en = 0;
  logic [5:0] cut_row = 0;
  logic [2:0] cut_bit = 0;
  logic cut_link = 0;
  logic [ROWS_T-1:0] row_sel = 0;
  logic vdd_prog = 1;
  logic [BITS_T-1:0] pl_mask, pl_laser;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  rom_slice #(.PROG(PROG_MASK), .MASK_DATA(pat_image())) u_mask (
    .clk(clk), .fab_rst_n(fab_rst_n), .cut_en(1'b0), .cut_row(6'd0), .cut_bit(3'd0),
    .cut_link(1'b0), .row_sel(row_sel), .vdd_prog(vdd_prog), .pull_low(pl_mask));

  rom_slice #(.PROG(PROG_LASER)) u_laser (
    .clk(clk), .fab_rst_n(fab_rst_n), .cut_en(cut_en), .cut_row(cut_row), .cut_bit(cut_bit),
    .cut_link(cut_link), .row_sel(row_sel), .vdd_prog(vdd_prog), .pull_low(pl_laser));

  task automatic check(string what, logic [7:0] got, logic [7:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %h expected %h", what, got, exp);
    end
  endtask

  task automatic cut(int r, int b, logic which);
    @(negedge clk);
    cut_en = 1; cut_row = 6'(r); cut_bit = 3'(b); cut_link = which;
    @(negedge clk);
    cut_en = 0;
  endtask

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #2 fab_rst_n = 0;
    #10 fab_rst_n = 1;
    // No row selected.
    vdd_prog = 1; row_sel = '0; #1;
    check("idle mask", pl_mask, 8'h00);
    check("idle laser", pl_laser, 8'h00);
    for (int r = 0; r < ROWS_T; r++) begin
      row_sel = ROWS_T'(1) << r;
      vdd_prog = 1; #1;
      check($sformatf("mask read r%0d", r), pl_mask, pat(r));
      vdd_prog = 0; #1;
      check($sformatf("mask test r%0d", r), pl_mask, 8'hFF);
      check($sformatf("blank test r%0d", r), pl_laser, 8'hFF);
    end
    // Program the blank slice: data 1 -> cut link "1", data 0 -> cut link "0".
    row_sel = '0;
    for (int r = 0; r < ROWS_T; r++)
      for (int b = 0; b < BITS_T; b++)
        cut(r, b, pat(r)[b]);
    for (int r = 0; r < ROWS_T; r++) begin
      row_sel = ROWS_T'(1) << r;
      vdd_prog = 1; #1;
      check($sformatf("laser read r%0d", r), pl_laser, pat(r));
      vdd_prog = 0; #1;
      check($sformatf("laser test r%0d", r), pl_laser, 8'hFF);
    end
    // Defective cell: both links gone at row 17 bit 5.
    cut(17, 5, ~pat(17)[5]);
    row_sel = ROWS_T'(1) << 17;
    vdd_prog = 0; #1;
    check("defect test", pl_laser, 8'hDF);
    vdd_prog = 1; #1;
    check("defect read", pl_laser, pat(17) & 8'hDF);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_atl078: end-to-end test of the 512 x 8 ROM.
//
// Two chips are built: one laser-programmable (all links intact) and one
// mask-programmed with the default contents. The flow:
//   1. pre-programming test of the blank chip (test pad low): every word
//      reads 0xFF;
//   2. laser programming: one link cut per bit, 4096 cuts, to the default
//      contents;
//   3. normal reads (test pad high) of all 512 words on both chips;
//   4. all 16 chip-select combinations: the pins float unless CS1 = CS2 = 0
//      and CS3 = CS4 = 1;
//   5. a defective cell (both links cut) is found by the test reading as a
//      0 on its pin;
//   6. a four-chip stack on one bus, selected by the CS pins from two
//      extra address bits, reads 2048 words (documented stacking use).
// Expected data come from this file's own formula for the default contents.
// The read path is static, so every output is checked one time step after
// the address or chip select changes (no clock cycles in the read path).
// Each mechanism is counted and one that never happens counts as a failure.
module tb_atl078;
  import atl078_pkg::*;

  // Default contents, written independently of the package helper.
  function automatic logic [7:0] expect_word(int w);
    return 8'(((w * 29) & 255) ^ (w >> 4));
  endfunction

  logic [8:0] a = 0;
  logic cs1_n = 0, cs2_n = 0, cs3 = 1, cs4 = 1;
  logic test_pad = 1;
  logic prog_clk = 0, fab_rst_n = 1;
  logic cut_en = 0;
  logic [8:0] cut_addr = 0;
  logic [2:0] cut_bit = 0;
  logic cut_link = 0;
  logic [7:0] o_l, oe_l, o_m, oe_m;
  int checks = 0, failures = 0;

  // mechanism counters
  int n_pretest_pass = 0, n_cut = 0, n_read_laser = 0, n_read_mask = 0;
  int n_deselect = 0, n_defect_found = 0, n_slice_switch = 0, n_stack = 0;

  always #5 prog_clk = ~prog_clk;

  atl078 u_laser (
    .a(a), .cs1_n(cs1_n), .cs2_n(cs2_n), .cs3(cs3), .cs4(cs4), .test_pad(test_pad),
    .o(o_l), .o_oe(oe_l), .prog_clk(prog_clk), .fab_rst_n(fab_rst_n),
    .cut_en(cut_en), .cut_addr(cut_addr), .cut_bit(cut_bit), .cut_link(cut_link));

  atl078 #(.PROG(PROG_MASK)) u_mask (
    .a(a), .cs1_n(cs1_n), .cs2_n(cs2_n), .cs3(cs3), .cs4(cs4), .test_pad(test_pad),
    .o(o_m), .o_oe(oe_m), .prog_clk(prog_clk), .fab_rst_n(fab_rst_n),
    .cut_en(1'b0), .cut_addr(9'd0), .cut_bit(3'd0), .cut_link(1'b0));

  // Four-chip stack: chip j is selected when {X1,X0} = j; X0 goes to CS3 or
  // CS1, X1 to CS4 or CS2, depending on the bit chip j needs.
  logic [1:0] x = 0;
  logic [3:0][7:0] so, soe;
  for (genvar j = 0; j < 4; j++) begin : g_stack
    localparam logic J0 = logic'(j & 1);
    localparam logic J1 = logic'((j >> 1) & 1);
    atl078 #(.PROG(PROG_MASK)) u_chip (
      .a(a),
      .cs1_n(J0 ? 1'b0 : x[0]), .cs3(J0 ? x[0] : 1'b1),
      .cs2_n(J1 ? 1'b0 : x[1]), .cs4(J1 ? x[1] : 1'b1),
      .test_pad(1'b1), .o(so[j]), .o_oe(soe[j]), .prog_clk(prog_clk), .fab_rst_n(fab_rst_n),
      .cut_en(1'b0), .cut_addr(9'd0), .cut_bit(3'd0), .cut_link(1'b0));
  end

  task automatic check(string what, logic [7:0] got, logic [7:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      if (failures < 20) $display("FAIL %s: got %h expected %h", what, got, exp);
    end
  endtask

  task automatic cut(int w, int b, logic which);
    @(negedge prog_clk);
    cut_en = 1; cut_addr = 9'(w); cut_bit = 3'(b); cut_link = which;
    @(negedge prog_clk);
    cut_en = 0;
    n_cut++;
  endtask

  initial begin
    #2000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [2:0] last_slice;
    #2 fab_rst_n = 0;
    #10 fab_rst_n = 1;

    // 1. pre-programming test of the blank chip
    test_pad = 0;
    for (int w = 0; w < 512; w++) begin
      a = 9'(w); #1;
      check($sformatf("pretest w%0d oe", w), oe_l, 8'hFF);
      check($sformatf("pretest w%0d", w), o_l, 8'hFF);
      if (o_l == 8'hFF && oe_l == 8'hFF) n_pretest_pass++;
      check($sformatf("mask chip test w%0d", w), o_m, 8'hFF);
    end

    // 2. laser programming
    for (int w = 0; w < 512; w++)
      for (int b = 0; b < 8; b++)
        cut(w, b, expect_word(w)[b]);

    // 3. normal reads
    test_pad = 1;
    last_slice = 0;
    for (int i = 0; i < 512; i++) begin
      int w;
      w = (i * 197) % 512;          // visits every word, crossing slices
      a = 9'(w); #1;
      if (a[8:6] != last_slice) n_slice_switch++;
      last_slice = a[8:6];
      check($sformatf("laser read w%0d", w), o_l, expect_word(w));
      check($sformatf("laser read w%0d oe", w), oe_l, 8'hFF);
      if (o_l == expect_word(w)) n_read_laser++;
      check($sformatf("mask read w%0d", w), o_m, expect_word(w));
      if (o_m == expect_word(w)) n_read_mask++;
    end

    // 4. chip select
    a = 9'd77;
    for (int v = 0; v < 16; v++) begin
      {cs1_n, cs2_n, cs3, cs4} = 4'(v); #1;
      if (v == 3) begin
        check("cs on oe", oe_l, 8'hFF);
        check("cs on data", o_l, expect_word(77));
      end else begin
        check($sformatf("cs off %b", 4'(v)), oe_l, 8'h00);
        check($sformatf("cs off mask %b", 4'(v)), oe_m, 8'h00);
        if (oe_l == 8'h00) n_deselect++;
      end
    end
    {cs1_n, cs2_n, cs3, cs4} = 4'b0011;

    // 5. defective cell found by the test reading
    cut(300, 3, ~expect_word(300)[3]);
    a = 9'd300;
    test_pad = 0; #1;
    check("defect test read", o_l, 8'hF7);
    if (o_l == 8'hF7) n_defect_found++;
    a = 9'd301; #1;
    check("neighbour test read", o_l, 8'hFF);
    test_pad = 1;
    a = 9'd300; #1;
    check("defect normal read", o_l, expect_word(300) & 8'hF7);

    // 6. four-chip stack
    for (int j = 0; j < 4; j++) begin
      x = 2'(j);
      for (int w = 0; w < 512; w += 37) begin
        a = 9'(w); #1;
        for (int k = 0; k < 4; k++) begin
          check($sformatf("stack chip%0d sel%0d oe", k, j), soe[k], (k == j) ? 8'hFF : 8'h00);
        end
        check($sformatf("stack sel%0d data", j), so[j], expect_word(w));
        if (soe[j] == 8'hFF && so[j] == expect_word(w)) n_stack++;
      end
    end

    $display("mechanisms: pretest_pass=%0d cuts=%0d laser_reads=%0d mask_reads=%0d deselect=%0d defect_found=%0d slice_switch=%0d stack_reads=%0d",
             n_pretest_pass, n_cut, n_read_laser, n_read_mask, n_deselect, n_defect_found, n_slice_switch, n_stack);
    if (n_pretest_pass == 0) begin failures++; $display("FAIL: no passing pretest read"); end
    if (n_cut == 0)          begin failures++; $display("FAIL: no link cut"); end
    if (n_read_laser == 0)   begin failures++; $display("FAIL: no laser-programmed read"); end
    if (n_read_mask == 0)    begin failures++; $display("FAIL: no mask-programmed read"); end
    if (n_deselect == 0)     begin failures++; $display("FAIL: no deselect"); end
    if (n_defect_found == 0) begin failures++; $display("FAIL: defect not found"); end
    if (n_slice_switch == 0) begin failures++; $display("FAIL: no slice switch"); end
    if (n_stack == 0)        begin failures++; $display("FAIL: no stacked read"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

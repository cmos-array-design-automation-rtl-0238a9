// tb_atl078_full: one complete life cycle of the ROM at its default
// configuration (512 x 8, built for laser programming).
//   - fabrication: every cell has both links;
//   - pre-programming test (test pad low): all 512 words read 0xFF;
//   - programming: one link cut per bit, 4096 cuts, to this file's pattern;
//   - normal operation (test pad high): all 512 words read back, and the
//     outputs float whenever the chip is not selected.
// The read path is static: each word is checked one time step after the
// address is applied.
module tb_atl078_full;

  // Contents written into the blank chip (any pattern would do).
  function automatic logic [7:0] image(int w);
    return 8'((w * 113 + 41) ^ (w >> 3));
  endfunction

  logic [8:0] a = 0;
  logic cs1_n = 0, cs2_n = 0, cs3 = 1, cs4 = 1;
  logic test_pad = 1;
  logic prog_clk = 0, fab_rst_n = 1;
  logic cut_en = 0;
  logic [8:0] cut_addr = 0;
  logic [2:0] cut_bit = 0;
  logic cut_link = 0;
  logic [7:0] o, o_oe;
  int checks = 0, failures = 0;

  always #5 prog_clk = ~prog_clk;

  atl078 dut (
    .a(a), .cs1_n(cs1_n), .cs2_n(cs2_n), .cs3(cs3), .cs4(cs4), .test_pad(test_pad),
    .o(o), .o_oe(o_oe), .prog_clk(prog_clk), .fab_rst_n(fab_rst_n),
    .cut_en(cut_en), .cut_addr(cut_addr), .cut_bit(cut_bit), .cut_link(cut_link));

  task automatic check(string what, logic [7:0] got, logic [7:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      if (failures < 20) $display("FAIL %s: got %h expected %h", what, got, exp);
    end
  endtask

  initial begin
    #2000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #2 fab_rst_n = 0;
    #10 fab_rst_n = 1;
    test_pad = 0;
    for (int w = 0; w < 512; w++) begin
      a = 9'(w); #1;
      check($sformatf("pretest w%0d", w), o, 8'hFF);
      check($sformatf("pretest w%0d oe", w), o_oe, 8'hFF);
    end
    for (int w = 0; w < 512; w++)
      for (int b = 0; b < 8; b++) begin
        @(negedge prog_clk);
        cut_en = 1; cut_addr = 9'(w); cut_bit = 3'(b);
        cut_link = image(w)[b];        // 1: cut link "1"; 0: cut link "0"
      end
    @(negedge prog_clk);
    cut_en = 0;
    test_pad = 1;
    for (int w = 0; w < 512; w++) begin
      a = 9'(w);
      cs1_n = 0; #1;
      check($sformatf("read w%0d", w), o, image(w));
      check($sformatf("read w%0d oe", w), o_oe, 8'hFF);
      cs1_n = 1; #1;
      check($sformatf("deselected w%0d", w), o_oe, 8'h00);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

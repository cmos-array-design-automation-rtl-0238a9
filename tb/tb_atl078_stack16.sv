// tb_atl078_stack16: sixteen chips on one output bus, 8K words in all,
// selected with no decoder outside the chips.
//
// Four system address bits X3..X0 (and their complements, as a system bus
// with true and inverted lines provides them) drive the chip-select pins.
// Chip j wires each bit to one of its four select pins so that all four are
// active only for X = j: a 1-bit goes true to an active-high pin or
// inverted to an active-low pin, a 0-bit the other way round. All chips are
// built blank (default configuration); the words the test reads are then
// programmed by link cuts with contents that differ per chip (pattern XOR
// 17*j), so data from the wrong chip is caught. For every X and a spread of addresses the
// test checks that exactly one chip drives the bus and that it returns its
// word. The read path is static: checks follow each change by one step.
module tb_atl078_stack16;

  function automatic logic [7:0] expect_word(int chip, int w);
    return 8'(((w * 29) & 255) ^ (w >> 4)) ^ 8'(17 * chip);
  endfunction

  logic [8:0] a = 0;
  logic [3:0] x = 0;
  logic prog_clk = 0, fab_rst_n = 1;
  logic [15:0][7:0] o, oe;
  logic [15:0] cut_en = '0;
  logic [8:0] cut_addr = 0;
  logic [2:0] cut_bit = 0;
  logic cut_link = 0;
  int checks = 0, failures = 0;

  always #5 prog_clk = ~prog_clk;

  for (genvar j = 0; j < 16; j++) begin : g_chip
    // Select wiring: pins cs1_n/cs2_n take bits 0/1, cs3/cs4 take bits 2/3,
    // each fed with the true or complement line that is active for X = j.
    localparam logic B0 = logic'((j >> 0) & 1);
    localparam logic B1 = logic'((j >> 1) & 1);
    localparam logic B2 = logic'((j >> 2) & 1);
    localparam logic B3 = logic'((j >> 3) & 1);
    atl078 u_chip (
      .a(a),
      .cs1_n(B0 ? ~x[0] : x[0]),
      .cs2_n(B1 ? ~x[1] : x[1]),
      .cs3  (B2 ? x[2] : ~x[2]),
      .cs4  (B3 ? x[3] : ~x[3]),
      .test_pad(1'b1), .o(o[j]), .o_oe(oe[j]),
      .prog_clk(prog_clk), .fab_rst_n(fab_rst_n),
      .cut_en(cut_en[j]), .cut_addr(cut_addr), .cut_bit(cut_bit), .cut_link(cut_link));
  end

  initial begin
    #2000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int drivers;
    logic [7:0] data;
    #2 fab_rst_n = 0;
    #10 fab_rst_n = 1;
    for (int j = 0; j < 16; j++)
      for (int w = 0; w < 512; w += 23)
        for (int b = 0; b < 8; b++) begin
          @(negedge prog_clk);
          cut_en = 16'd1 << j; cut_addr = 9'(w); cut_bit = 3'(b);
          cut_link = expect_word(j, w)[b];
        end
    @(negedge prog_clk);
    cut_en = '0;
    for (int j = 0; j < 16; j++) begin
      x = 4'(j);
      for (int w = 0; w < 512; w += 23) begin
        a = 9'(w); #1;
        drivers = 0;
        data = 8'h00;
        for (int k = 0; k < 16; k++)
          if (oe[k] != 8'h00) begin
            drivers++;
            data = o[k];
          end
        checks++;
        if (drivers != 1 || oe[j] != 8'hFF || data !== expect_word(j, w)) begin
          failures++;
          if (failures < 20)
            $display("FAIL X=%0d w=%0d drivers=%0d data=%h expected %h", j, w, drivers, data, expect_word(j, w));
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_quadrant: checks one quadrant (two mask-programmed slices on shared
// row lines driven from both ends).
//   - both end decoders given the same address: each slice returns its own
//     row, and with the VDD bus grounded every cell conducts;
//   - the right-hand decoder given a different address (a decoder fault):
//     no row line rises, so neither slice pulls any line low;
//   - one link cut in slice B reaches slice B only.
module tb_quadrant;
  import atl078_pkg::*;

  function automatic logic [7:0] pat_a(int r);
    return 8'(r * 5 + 1);
  endfunction
  function automatic logic [7:0] pat_b(int r);
    return 8'((r * 11) ^ 8'hC3);
  endfunction
  function automatic logic [63:0][7:0] img(bit b);
    logic [63:0][7:0] m;
    for (int r = 0; r < 64; r++) m[r] = b ? pat_b(r) : pat_a(r);
    return m;
  endfunction
  function automatic dec_rails_t rails_of(logic [5:0] v);
    dec_rails_t x;
    x.p.t = v; x.p.c = ~v; x.n.t = v; x.n.c = ~v;
    return x;
  endfunction

  logic clk = 0, fab_rst_n = 1;
  logic cut_en_b = 0;
  logic [5:0] cut_row = 0;
  logic [2:0] cut_bit = 0;
  logic cut_link = 0;
  dec_rails_t rails_l, rails_r;
  logic vdd_prog = 1;
  logic [7:0] pla, plb;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  quadrant #(.PROG(PROG_MASK), .MASK_A(img(0)), .MASK_B(img(1))) dut (
    .clk(clk), .fab_rst_n(fab_rst_n), .cut_en_a(1'b0), .cut_en_b(cut_en_b),
    .cut_row(cut_row), .cut_bit(cut_bit), .cut_link(cut_link),
    .rails_l(rails_l), .rails_r(rails_r), .vdd_prog(vdd_prog),
    .pull_low_a(pla), .pull_low_b(plb));

  task automatic check(string what, logic [7:0] got, logic [7:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %h expected %h", what, got, exp);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #2 fab_rst_n = 0;
    #10 fab_rst_n = 1;
    for (int r = 0; r < 64; r++) begin
      rails_l = rails_of(6'(r));
      rails_r = rails_of(6'(r));
      vdd_prog = 1; #1;
      check($sformatf("A r%0d", r), pla, pat_a(r));
      check($sformatf("B r%0d", r), plb, pat_b(r));
      vdd_prog = 0; #1;
      check($sformatf("A test r%0d", r), pla, 8'hFF);
      check($sformatf("B test r%0d", r), plb, 8'hFF);
      rails_r = rails_of(6'(r) ^ 6'h10); #1;
      check($sformatf("A split r%0d", r), pla, 8'h00);
      check($sformatf("B split r%0d", r), plb, 8'h00);
    end
    // Cut the remaining link of slice B, row 9, bit 2 (a bit holding 1 keeps
    // only link "0"; a bit holding 0 keeps only link "1").
    @(negedge clk);
    cut_en_b = 1; cut_row = 6'd9; cut_bit = 3'd2; cut_link = ~pat_b(9)[2];
    @(negedge clk);
    cut_en_b = 0;
    rails_l = rails_of(6'd9);
    rails_r = rails_of(6'd9);
    vdd_prog = 0; #1;
    check("B cut test", plb, 8'hFB);
    check("A untouched", pla, 8'hFF);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

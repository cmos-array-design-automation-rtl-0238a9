// tb_decoder_1of64: checks the six-input NOR row decoder.
// With consistent rails every address must raise exactly its own row. With
// the PMOS and NMOS sections given different addresses (a fault on the
// rails) no row may rise, since the pull-down side wins every fight.
module tb_decoder_1of64;
  import atl078_pkg::*;

  dec_rails_t  rails;
  logic [63:0] row_sel;
  int checks = 0, failures = 0;

  decoder_1of64 dut (.rails(rails), .row_sel(row_sel));

  function automatic addr_rail_t rail_of(logic [5:0] v);
    addr_rail_t r;
    r.t = v;
    r.c = ~v;
    return r;
  endfunction

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 64; v++) begin
      rails.p = rail_of(6'(v));
      rails.n = rail_of(6'(v));
      #1;
      checks++;
      if (row_sel !== (64'd1 << v)) begin
        failures++;
        $display("FAIL a=%0d row_sel=%h", v, row_sel);
      end
    end
    // Sections disagree: no row selected.
    for (int v = 0; v < 64; v++) begin
      rails.p = rail_of(6'(v));
      rails.n = rail_of(6'(v ^ 6'h21));
      #1;
      checks++;
      if (row_sel !== 64'd0) begin
        failures++;
        $display("FAIL split rails a=%0d row_sel=%h", v, row_sel);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

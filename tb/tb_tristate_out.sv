// tb_tristate_out: checks the inverting tristate stages. Enabled, every
// pin is driven to the complement of its data; disabled, no pin is driven.
module tb_tristate_out;
  logic [7:0] d, o, o_oe;
  logic       cs_en_n;
  int checks = 0, failures = 0;

  tristate_out dut (.d(d), .cs_en_n(cs_en_n), .o(o), .o_oe(o_oe));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 256; v++) begin
      d = 8'(v);
      cs_en_n = 1'b0;
      #1;
      checks++;
      if (o_oe !== 8'hFF || o !== ~8'(v)) begin
        failures++;
        $display("FAIL enabled d=%h o=%h oe=%h", d, o, o_oe);
      end
      cs_en_n = 1'b1;
      #1;
      checks++;
      if (o_oe !== 8'h00) begin
        failures++;
        $display("FAIL disabled d=%h oe=%h", d, o_oe);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_cs_decode: exhaustive check of the chip-select decode: the enable is
// low only for CS1 = CS2 = 0 and CS3 = CS4 = 1.
module tb_cs_decode;
  logic cs1_n, cs2_n, cs3, cs4, cs_en_n;
  int checks = 0, failures = 0;

  cs_decode dut (.cs1_n(cs1_n), .cs2_n(cs2_n), .cs3(cs3), .cs4(cs4), .cs_en_n(cs_en_n));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 16; v++) begin
      {cs1_n, cs2_n, cs3, cs4} = 4'(v);
      #1;
      checks++;
      if (cs_en_n !== (v == 4'b0011 ? 1'b0 : 1'b1)) begin
        failures++;
        $display("FAIL cs=%b en_n=%b", 4'(v), cs_en_n);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

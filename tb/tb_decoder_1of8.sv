// tb_decoder_1of8: exhaustive check of the slice-select decoder: for
// {A8,A7,A6} = k exactly bank_en_n[k] is low.
module tb_decoder_1of8;
  logic [2:0] a;
  logic [7:0] bank_en_n;
  int checks = 0, failures = 0;

  decoder_1of8 dut (.a(a), .bank_en_n(bank_en_n));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int k = 0; k < 8; k++) begin
      a = 3'(k);
      #1;
      checks++;
      if (bank_en_n !== ~(8'd1 << k)) begin
        failures++;
        $display("FAIL a=%0d bank_en_n=%b", k, bank_en_n);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

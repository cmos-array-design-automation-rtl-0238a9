// tb_output_mux: checks the slice-to-bus transmission gates and pull-ups.
// Random sense-line patterns; each slice enabled in turn must put the
// complement of its pull-downs on the bus, and with no slice enabled the
// pull-ups must hold every line high.
module tb_output_mux;
  logic [7:0][7:0] pull_low;
  logic [7:0]      bank_en_n;
  logic [7:0]      bus;
  int checks = 0, failures = 0;

  output_mux dut (.pull_low(pull_low), .bank_en_n(bank_en_n), .bus(bus));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 50; t++) begin
      for (int k = 0; k < 8; k++) pull_low[k] = 8'($urandom);
      for (int k = 0; k <= 8; k++) begin
        bank_en_n = (k < 8) ? ~(8'd1 << k) : 8'hFF;
        #1;
        checks++;
        if (bus !== ((k < 8) ? ~pull_low[k] : 8'hFF)) begin
          failures++;
          $display("FAIL t=%0d slice=%0d bus=%h", t, k, bus);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

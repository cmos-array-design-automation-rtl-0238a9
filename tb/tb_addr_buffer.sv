// tb_addr_buffer: exhaustive check of the address input buffers.
// For every value of A0-A5 it checks that each decoder's PMOS and NMOS rail
// sets carry the address on the true rails and its complement on the
// complement rails.
module tb_addr_buffer;
  import atl078_pkg::*;

  localparam int NDEC = 8;
  logic [5:0] a;
  dec_rails_t rails [NDEC];
  int checks = 0, failures = 0;

  addr_buffer #(.NDEC(NDEC)) dut (.a(a), .rails(rails));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 64; v++) begin
      a = 6'(v);
      #1;
      for (int d = 0; d < NDEC; d++) begin
        checks++;
        if (rails[d].p.t !== 6'(v) || rails[d].n.t !== 6'(v) ||
            rails[d].p.c !== ~6'(v) || rails[d].n.c !== ~6'(v)) begin
          failures++;
          $display("FAIL a=%0d dec=%0d rails=%h", v, d, rails[d]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

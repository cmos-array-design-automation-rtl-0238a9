// decoder_1of8: slice select from the high address bits A6-A8.
//
// Three inverters form the complements of A6, A7 and A8. Four two-input NOR
// gates each detect one combination of A6/A7 (the NOR of the two rails
// that are low for that combination). Each NOR output feeds two NAND gates,
// one with A8's complement and one with A8, giving the active-low enables of
// slices k and k+4. The gate types, this two-level structure and the
// pairing of outputs (0/4, 1/5, 2/6, 3/7 from the four NORs) follow the
// document's logic diagram.
//
// Interface: a[2:0] = {A8, A7, A6} in, bank_en_n[7:0] out; exactly one
// output is low, bank_en_n[k] for {A8,A7,A6} = k.
// Timing: combinational.
module decoder_1of8 (
  input  logic [2:0] a,          // {A8, A7, A6}
  output logic [7:0] bank_en_n
);

  logic a6, a7, a8, a6_n, a7_n, a8_n;
  logic [3:0] nor_q;             // nor_q[k]: {A7,A6} = k

  always_comb begin
    {a8, a7, a6} = a;
    a6_n = ~a6;
    a7_n = ~a7;
    a8_n = ~a8;
    nor_q[0] = ~(a6   | a7);
    nor_q[1] = ~(a6_n | a7);
    nor_q[2] = ~(a6   | a7_n);
    nor_q[3] = ~(a6_n | a7_n);
    for (int k = 0; k < 4; k++) begin
      bank_en_n[k]     = ~(nor_q[k] & a8_n);
      bank_en_n[k + 4] = ~(nor_q[k] & a8);
    end
  end

endmodule

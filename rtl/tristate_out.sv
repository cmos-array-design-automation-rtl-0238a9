// tristate_out: the eight inverting tristate output stages.
//
// Each stage ends in a P/N output pair acting as an inverter. When the chip
// is selected (cs_en_n low) the stage's own inverter forms the active-high
// enable, two transmission gates pass the data to the P and N gates and the
// pin is driven to the complement of the data. When deselected the
// transmission gates open, a hold device pulls the P gate high and another
// pulls the N gate low, so neither output device conducts and the pin
// floats. The circuit follows the document's tristate figure.
//
// The pin is given as a level o[i] and a drive flag o_oe[i] (1 = driven,
// 0 = high impedance), since the two-state models used here carry no z;
// a board-level wrapper can form "o_oe ? o : 'z". This split is this
// design's choice.
//
// Interface: d[BITS] and cs_en_n in; o[BITS], o_oe[BITS] out.
// Timing: combinational.
module tristate_out
#(
  parameter int BITS = atl078_pkg::BITS
) (
  input  logic [BITS-1:0] d,
  input  logic            cs_en_n,
  output logic [BITS-1:0] o,
  output logic [BITS-1:0] o_oe
);

  for (genvar i = 0; i < BITS; i++) begin : g_stage
    logic cs;                // the stage's own enable converter
    logic p_gate, n_gate;    // gates of the output P and N devices
    logic drive_hi, drive_lo;
    always_comb begin
      cs       = ~cs_en_n;
      p_gate   = cs ? d[i] : 1'b1;   // transmission gate, else hold high
      n_gate   = cs ? d[i] : 1'b0;   // transmission gate, else hold low
      drive_hi = ~p_gate;            // PMOS on when its gate is low
      drive_lo = n_gate;             // NMOS on when its gate is high
      o[i]     = drive_hi;
      o_oe[i]  = drive_hi | drive_lo;
    end
  end

endmodule

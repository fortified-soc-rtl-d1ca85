// comparator_2bit_with_enable: Trojan detector on a sensitive wire.
//
// Compares the level on the watched wire (vwire) with a reference level (vref).
// While enable is high, result goes to 1 as soon as vwire is strictly above
// vref, which flags that charge has built up on the wire (Trojan present);
// otherwise result is 0 (no Trojan). With enable low the detector is off and
// result is held at 0, so the wire is not interfered with outside the window in
// which an unexpected reset must be prevented.
//
// Interface: vref, vwire are WIDTH-bit unsigned level codes; enable and result
// are single bits. Timing: purely combinational, no clock, zero cycles latency.
//
// The enable input, the 1 = Trojan / 0 = no Trojan meaning of the output and
// the two-bit width follow the described circuit. The exact test (strictly
// greater than the reference, "crossing" it) is this design's choice.
module comparator_2bit_with_enable #(
  parameter int unsigned WIDTH = fortified_pkg::VWIRE_W
) (
  input  logic [WIDTH-1:0] vref,
  input  logic [WIDTH-1:0] vwire,
  input  logic             enable,
  output logic             result
);

  always_comb begin
    result = enable && (vwire > vref);
  end

endmodule

// fortified_soc: Trojan-resilient reset path for a system-on-chip.
//
// An analog "A2" Trojan hidden next to the SoC reset wire pumps charge onto
// that wire each time a nearby signal toggles; once enough charge has built up
// the wire crosses the logic threshold and the SoC is reset at a moment of the
// attacker's choosing. This block sits between the reset wire and the SoC:
//
//   vwire --+--> comparator_inst (vs. vref, gated by enable) --> comparator_result
//           |                                   |
//           +--> mux_inst d0                    +--> mux_inst select
//   logic_0 ---> mux_inst d1 -------------------------------> mux_output (SoC reset)
//
// While enable is high (the period in which an unexpected reset would be
// harmful) a wire level above vref is flagged as a Trojan (comparator_result
// = 1) and the SoC reset is forced to logic_0. With enable low, or with the
// wire below the reference, the wire level is passed to the SoC unchanged, so
// a legitimate reset outside the protected window still works.
//
// Interface: vref, vwire, logic_0 and mux_output are WIDTH-bit level codes
// (0 = ground, all ones = supply); enable and comparator_result are one bit.
// logic_0 is an input as in the published schematic and is meant to be tied
// to zero. Timing: purely combinational, zero cycles from vwire to mux_output.
//
// The structure, port names, instance names and two-bit width follow the
// described schematic. The reset is active high (a charged wire resets); the
// quantised level codes standing in for analog voltages are this design's own.
module fortified_soc #(
  parameter int unsigned WIDTH = fortified_pkg::VWIRE_W
) (
  input  logic [WIDTH-1:0] logic_0,
  input  logic [WIDTH-1:0] vref,
  input  logic [WIDTH-1:0] vwire,
  input  logic             enable,
  output logic [WIDTH-1:0] mux_output,
  output logic             comparator_result
);

  comparator_2bit_with_enable #(.WIDTH(WIDTH)) comparator_inst (
    .vref   (vref),
    .vwire  (vwire),
    .enable (enable),
    .result (comparator_result)
  );

  multiplexer_2bit #(.WIDTH(WIDTH)) mux_inst (
    .d0     (vwire),
    .d1     (logic_0),
    .select (comparator_result),
    .y      (mux_output)
  );

  // Once a Trojan is flagged, the SoC must see only the safe value.
  always_comb begin
    if (comparator_result)
      assert (mux_output == logic_0)
        else $error("reset not held at safe value while Trojan detected");
  end

endmodule

// fortified_pkg: constants and types shared by the reset-protection circuit.
//
// The reset wire of the protected SoC is seen by the detector as a small
// unsigned level, V_wire, sampled against a reference level V_ref of the same
// width. Level 0 is ground and the largest code is the supply rail. The width
// of two bits follows the block names of the published schematic
// (comparator_2bit_with_enable, multiplexer_2bit); how the analog voltage is
// quantised into those codes is this design's own choice.
package fortified_pkg;

  // Width of a voltage level code on V_wire / V_ref.
  parameter int unsigned VWIRE_W = 2;

  // One quantised voltage level.
  typedef logic [VWIRE_W-1:0] level_t;

  // Safe value driven onto the SoC reset when a Trojan is detected ("Logic-0").
  parameter level_t SAFE_RESET = '0;

endpackage

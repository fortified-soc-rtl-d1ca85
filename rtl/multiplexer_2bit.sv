// multiplexer_2bit: reset selector of the protection circuit.
//
// A two-input multiplexer that decides what the SoC sees on its reset input.
// Input d0 carries the reset wire itself (RST / V_wire) and input d1 carries
// the safe value (logic 0). When select is 1 (the detector has flagged a
// Trojan) the safe value is passed and the malicious reset is blocked;
// when select is 0 the reset wire is passed through unchanged.
//
// Interface: d0, d1 and y are WIDTH bits wide, select is one bit.
// Timing: purely combinational, zero cycles latency.
//
// Input numbering (0 = wire, 1 = logic 0) and the use of the detector output as
// select follow the described circuit; the data width matching the wire level
// code is this design's choice.
module multiplexer_2bit #(
  parameter int unsigned WIDTH = fortified_pkg::VWIRE_W
) (
  input  logic [WIDTH-1:0] d0,
  input  logic [WIDTH-1:0] d1,
  input  logic             select,
  output logic [WIDTH-1:0] y
);

  always_comb begin
    if (select) y = d1;
    else        y = d0;
  end

endmodule

// a2_trojan_model: behavioural model of the analog A2 Trojan, for simulation only.
//
// The real circuit is an inverter (MP/MN) driven by a frequently toggling
// victim signal; each transition couples a packet of charge through C1 and the
// inverter's supply path onto the payload capacitor C2, which sits on the
// victim wire. Charge builds up while the trigger toggles often and leaks away
// when it is quiet; once the wire is high enough, the reset it carries fires.
//
// This model works in sampled time on clk: every clock in which trig_in has
// changed adds STEP_MV millivolts to the wire (saturating at VDD_MV); every
// clock without a change removes LEAK_MV. The wire voltage is reported both in
// millivolts and as a WIDTH-bit level code, code = floor(mv * 2^WIDTH /
// (VDD_MV + 1)). trig_out is the inverter output. The 0 to 1 V range is the
// characterised input range; step, leak and quantisation are modelling choices.
module a2_trojan_model #(
  parameter int unsigned WIDTH   = fortified_pkg::VWIRE_W,
  parameter int unsigned VDD_MV  = 1000,
  parameter int unsigned STEP_MV = 50,
  parameter int unsigned LEAK_MV = 5
) (
  input  logic             clk,
  input  logic             trig_in,
  output logic             trig_out,
  output logic [WIDTH-1:0] vwire,
  output int unsigned      vwire_mv
);

  logic        trig_q = 1'b0;
  int unsigned mv     = 0;

  always_ff @(posedge clk) begin
    trig_q <= trig_in;
    if (trig_in != trig_q)
      mv <= (mv + STEP_MV > VDD_MV) ? VDD_MV : mv + STEP_MV;
    else
      mv <= (mv < LEAK_MV) ? 0 : mv - LEAK_MV;
  end

  assign trig_out = ~trig_in;
  assign vwire_mv = mv;
  assign vwire    = WIDTH'((mv << WIDTH) / (VDD_MV + 1));

endmodule

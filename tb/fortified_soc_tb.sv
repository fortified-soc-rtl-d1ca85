// fortified_soc_tb: end-to-end test of the Trojan-resilient reset path.
//
// A behavioural A2 Trojan (a2_trojan_model) pumps charge onto the SoC reset
// wire whenever its trigger toggles; a second driver stands for a legitimate
// reset source pulling the same wire to the rail. The wire level feeds
// fortified_soc at its default parameters. Every clock the outputs are checked
// against a reference worked out here: flag = enable and wire above vref,
// SoC reset = safe value when flagged, else the wire. The test walks through:
//   1. quiet wire, protection enabled: nothing flagged, nothing blocked;
//   2. Trojan attack, protection enabled: detection after the expected number
//      of trigger toggles, the charged wire blocked from the SoC;
//   3. trigger quiet again: the charge leaks and the flag clears;
//   4. protection disabled, legitimate reset: passed through to the SoC;
//   5. protection disabled, Trojan attack: the wire reaches the SoC, as it
//      would without the protection circuit;
//   6. protection re-enabled on a charged wire: blocked at once.
// Each of these mechanisms is counted and must occur at least once.
module fortified_soc_tb;
  localparam int unsigned W       = fortified_pkg::VWIRE_W;
  localparam int unsigned VDD_MV  = 1000;
  localparam int unsigned STEP_MV = 50;
  localparam int unsigned LEAK_MV = 5;

  logic         clk = 1'b0;
  logic         trig = 1'b0, legit_rst = 1'b0, enable = 1'b0;
  logic [W-1:0] vref = '0;
  logic [W-1:0] trojan_level, vwire, logic_0, mux_output;
  logic         comparator_result, trig_out;
  int unsigned  trojan_mv;

  int checks = 0, failures = 0;
  int n_quiet_pass = 0, n_detected = 0, n_blocked = 0, n_recovered = 0;
  int n_legit_pass = 0, n_unguarded = 0, n_mode_switch = 0;
  logic prev_flag = 1'b0, prev_enable = 1'b0;

  a2_trojan_model #(.VDD_MV(VDD_MV), .STEP_MV(STEP_MV), .LEAK_MV(LEAK_MV)) trojan (
    .clk(clk), .trig_in(trig), .trig_out(trig_out), .vwire(trojan_level), .vwire_mv(trojan_mv)
  );

  // The wire is pulled to the rail by a legitimate reset, else it carries
  // whatever charge the Trojan has pumped onto it.
  assign vwire   = legit_rst ? '1 : trojan_level;
  assign logic_0 = fortified_pkg::SAFE_RESET;

  fortified_soc dut (
    .logic_0(logic_0), .vref(vref), .vwire(vwire), .enable(enable),
    .mux_output(mux_output), .comparator_result(comparator_result)
  );

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Compare the outputs with the reference and count the mechanisms.
  task automatic check_now();
    logic         exp_flag;
    logic [W-1:0] exp_out;
    exp_flag = enable && (int'(vwire) > int'(vref));
    exp_out  = exp_flag ? '0 : vwire;
    checks++;
    if (comparator_result !== exp_flag || mux_output !== exp_out) begin
      failures++;
      $display("FAIL t=%0t en=%0b vref=%0d vwire=%0d flag=%0b/%0b out=%0d/%0d", $time,
               enable, vref, vwire, comparator_result, exp_flag, mux_output, exp_out);
    end
    if (enable && !exp_flag && vwire == trojan_level) n_quiet_pass++;
    if (exp_flag && !prev_flag) n_detected++;
    if (exp_flag && vwire != '0 && mux_output == '0) n_blocked++;
    if (!exp_flag && prev_flag && enable) n_recovered++;
    if (!enable && legit_rst && mux_output == '1) n_legit_pass++;
    if (!enable && !legit_rst && int'(vwire) > int'(vref) && mux_output == vwire) n_unguarded++;
    if (enable != prev_enable) n_mode_switch++;
    prev_flag   = comparator_result;
    prev_enable = enable;
  endtask

  // One clock: check what the last edge produced, then apply new stimulus.
  task automatic cycle(input logic toggle);
    @(negedge clk);
    check_now();
    if (toggle) trig = ~trig;
  endtask

  task automatic expect_true(input logic cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  initial begin
    int toggles;
    int exp_toggles;
    int threshold_mv;
    vref   = W'(1);
    enable = 1'b1;

    // 1. quiet wire
    repeat (10) cycle(1'b0);
    expect_true(comparator_result == 1'b0, "quiet wire flagged");

    // 2. attack while protected: count trigger toggles until detection.
    // The flag needs a level code above vref, i.e. at least
    // (vref+1)*(VDD_MV+1)/2^W millivolts, reached after ceil(that/STEP_MV) toggles.
    threshold_mv = ((int'(vref) + 1) * (VDD_MV + 1) + (1 << W) - 1) / (1 << W);
    exp_toggles  = (threshold_mv + STEP_MV - 1) / STEP_MV;
    toggles = 0;
    while (comparator_result == 1'b0 && toggles < 100) begin
      cycle(1'b1);
      if (comparator_result == 1'b0) toggles++;
    end
    expect_true(toggles == exp_toggles, $sformatf("detection after %0d toggles, expected %0d", toggles, exp_toggles));
    repeat (30) cycle(1'b1);
    expect_true(trojan_mv == VDD_MV, "wire not fully charged");
    expect_true(mux_output == '0, "charged wire reached the SoC");

    // 3. trigger quiet: charge leaks away, flag clears
    while (comparator_result == 1'b1 && checks < 2000) cycle(1'b0);
    expect_true(trojan_mv < threshold_mv, "flag cleared too early");
    repeat (120) cycle(1'b0);

    // 4. legitimate reset outside the protected window
    enable = 1'b0;
    cycle(1'b0);
    legit_rst = 1'b1;
    repeat (5) cycle(1'b0);
    legit_rst = 1'b0;
    repeat (3) cycle(1'b0);

    // 5. attack outside the protected window reaches the SoC
    repeat (40) cycle(1'b1);

    // 6. protection switched on over a charged wire
    enable = 1'b1;
    repeat (3) cycle(1'b1);
    expect_true(comparator_result == 1'b1 && mux_output == '0, "charged wire not blocked on enable");

    // a legitimate reset during the protected window is treated as an attack
    legit_rst = 1'b1;
    repeat (2) cycle(1'b0);
    legit_rst = 1'b0;
    repeat (2) cycle(1'b0);

    $display("mechanisms: quiet_pass=%0d detected=%0d blocked=%0d recovered=%0d legit_pass=%0d unguarded=%0d mode_switch=%0d",
             n_quiet_pass, n_detected, n_blocked, n_recovered, n_legit_pass, n_unguarded, n_mode_switch);
    expect_true(n_quiet_pass  > 0, "no quiet pass-through");
    expect_true(n_detected    > 0, "no detection");
    expect_true(n_blocked     > 0, "no blocked reset");
    expect_true(n_recovered   > 0, "no recovery");
    expect_true(n_legit_pass  > 0, "no legitimate reset passed");
    expect_true(n_unguarded   > 0, "no unguarded attack");
    expect_true(n_mode_switch > 0, "no enable switch");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

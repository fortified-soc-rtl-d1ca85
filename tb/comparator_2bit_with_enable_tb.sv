// comparator_2bit_with_enable_tb: exhaustive self-check of the Trojan detector.
//
// Walks every combination of vref, vwire and enable at the default width and
// compares result against the rule "flag when enabled and the wire is
// strictly above the reference", worked out here from the operands. A clock
// paces the stimulus and a watchdog ends the run if it stalls.
module comparator_2bit_with_enable_tb;
  localparam int unsigned W = fortified_pkg::VWIRE_W;

  logic         clk = 1'b0;
  logic [W-1:0] vref, vwire;
  logic         enable, result;
  int           checks = 0, failures = 0;
  int           flagged = 0;

  comparator_2bit_with_enable dut (.vref(vref), .vwire(vwire), .enable(enable), .result(result));

  always #5 clk = ~clk;

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic exp;
    vref = '0; vwire = '0; enable = 1'b0;
    for (int e = 0; e < 2; e++)
      for (int r = 0; r < (1 << W); r++)
        for (int v = 0; v < (1 << W); v++) begin
          @(negedge clk);
          enable = e[0]; vref = r[W-1:0]; vwire = v[W-1:0];
          @(posedge clk);
          exp = (e == 1) && (v > r);
          checks++;
          if (result !== exp) begin
            failures++;
            $display("FAIL en=%0d vref=%0d vwire=%0d result=%0b expected=%0b", e, r, v, result, exp);
          end
          if (exp) flagged++;
        end
    // Exactly the pairs with vwire > vref while enabled: 0+1+2+3 below 4 codes.
    checks++;
    if (flagged != ((1 << W) * ((1 << W) - 1)) / 2) begin
      failures++;
      $display("FAIL flagged count %0d", flagged);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// multiplexer_2bit_tb: exhaustive self-check of the reset selector.
//
// Drives every pair of data codes with select at 0 and 1 and checks that the
// output is the reset wire (d0) for select = 0 and the safe value (d1) for
// select = 1. A watchdog ends the run if it stalls.
module multiplexer_2bit_tb;
  localparam int unsigned W = fortified_pkg::VWIRE_W;

  logic         clk = 1'b0;
  logic [W-1:0] d0, d1, y;
  logic         select;
  int           checks = 0, failures = 0;

  multiplexer_2bit dut (.d0(d0), .d1(d1), .select(select), .y(y));

  always #5 clk = ~clk;

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [W-1:0] exp;
    d0 = '0; d1 = '0; select = 1'b0;
    for (int s = 0; s < 2; s++)
      for (int a = 0; a < (1 << W); a++)
        for (int b = 0; b < (1 << W); b++) begin
          @(negedge clk);
          select = s[0]; d0 = a[W-1:0]; d1 = b[W-1:0];
          @(posedge clk);
          exp = (s == 1) ? b[W-1:0] : a[W-1:0];
          checks++;
          if (y !== exp) begin
            failures++;
            $display("FAIL sel=%0d d0=%0d d1=%0d y=%0d expected=%0d", s, a, b, y, exp);
          end
        end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

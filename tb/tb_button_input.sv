// tb_button_input: self-checking testbench for the button synchroniser and
// press detector.
//
// Drives random button levels that change between clock edges and keeps a
// reference of the raw levels. Checks that `level` equals the raw level two
// clock edges earlier, that `press` is high exactly when a button went from
// 0 to 1 between the raw samples three and two edges earlier, that a held
// button gives one pulse only, and counts the presses seen.
module tb_button_input;

  localparam int unsigned N = 4;

  logic         clk = 1'b0;
  logic [N-1:0] btn, level, press;
  logic [N-1:0] hist [4];   // raw levels sampled at the last four edges
  int           checks = 0, failures = 0, presses = 0, held_pulses;

  button_input #(.N(N)) dut (.*);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic void check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL @%0t: %s", $time, what);
    end
  endfunction

  always @(posedge clk) begin
    hist[3] <= hist[2];
    hist[2] <= hist[1];
    hist[1] <= hist[0];
    hist[0] <= btn;
  end

  initial begin
    btn = '0;
    for (int k = 0; k < 4; k++) hist[k] = '0;
    repeat (5) @(posedge clk);
    for (int n = 0; n < 600; n++) begin
      @(negedge clk);
      if ($urandom_range(3) == 0) btn = N'($urandom);
      #1;
      // hist[0] = raw at last edge; the synchroniser output is raw two edges back
      check(level == hist[1], $sformatf("level %b expected %b", level, hist[1]));
      check(press == (hist[1] & ~hist[2]),
            $sformatf("press %b expected %b", press, hist[1] & ~hist[2]));
      presses += $countones(press);
    end
    // a button held for many cycles gives exactly one pulse
    @(negedge clk) btn = '0;
    repeat (5) @(negedge clk);
    btn[1] = 1'b1;
    held_pulses = 0;
    repeat (30) begin
      @(negedge clk);
      if (press[1]) held_pulses++;
    end
    check(held_pulses == 1, $sformatf("held button gave %0d pulses", held_pulses));
    check(presses > 50, $sformatf("only %0d presses seen", presses));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule

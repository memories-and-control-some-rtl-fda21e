// tb_ram32x2s: self-checking testbench for the 32x2 page SRAM.
//
// Checks the power-up contents against words worked out by hand from the
// two INIT constants (word k = {bit k of INIT_01, bit k of INIT_00}), that the
// read is asynchronous, that a write takes effect on the rising WCLK edge
// only while WE is 1, and that random writes read back from a shadow array.
module tb_ram32x2s;

  logic       wclk = 1'b0;
  logic       we;
  logic [4:0] a;
  logic [1:0] d, o;
  logic [1:0] shadow [32];
  int         checks = 0, failures = 0;

  ram32x2s dut (
    .O0(o[0]), .O1(o[1]),
    .A0(a[0]), .A1(a[1]), .A2(a[2]), .A3(a[3]), .A4(a[4]),
    .D0(d[0]), .D1(d[1]),
    .WCLK(wclk), .WE(we)
  );

  always #5 wclk = ~wclk;

  initial begin : watchdog
    repeat (5000) @(posedge wclk);
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

  // INIT_00 = CAFEF00D, INIT_01 = 005EABED, expanded bit by bit:
  // word k = {INIT_01[k], INIT_00[k]}, k = 0 .. 31.
  localparam logic [1:0] POWER_UP [32] = '{
    2'd3, 2'd0, 2'd3, 2'd3, 2'd0, 2'd2, 2'd2, 2'd2,   // words 0..7
    2'd2, 2'd2, 2'd0, 2'd2, 2'd1, 2'd3, 2'd1, 2'd3,   // words 8..15
    2'd0, 2'd3, 2'd3, 2'd3, 2'd3, 2'd1, 2'd3, 2'd1,   // words 16..23
    2'd0, 2'd1, 2'd0, 2'd1, 2'd0, 2'd0, 2'd1, 2'd1    // words 24..31
  };

  initial begin
    we = 0; d = 0; a = 0;
    // power-up contents, read asynchronously (no clock edge between checks)
    for (int k = 0; k < 32; k++) begin
      a = 5'(k);
      #1;
      check(o == POWER_UP[k], $sformatf("init word %0d = %0d, expected %0d",
            k, o, POWER_UP[k]));
      shadow[k] = POWER_UP[k];
    end
    // no write while WE is 0
    @(negedge wclk);
    a = 5'd7; d = ~POWER_UP[7];
    @(negedge wclk);
    check(o == POWER_UP[7], "no write with WE = 0");
    // a write lands on the rising edge, not before
    we = 1; a = 5'd3; d = ~POWER_UP[3];
    #1 check(o == POWER_UP[3], "write not visible before the edge");
    @(posedge wclk); #1;
    check(o == ~POWER_UP[3], "write visible after the edge");
    shadow[3] = ~POWER_UP[3];
    @(negedge wclk);
    // random writes and reads
    for (int n = 0; n < 400; n++) begin
      we = 1'($urandom);
      a  = 5'($urandom);
      d  = 2'($urandom);
      @(posedge wclk); #1;
      if (we) shadow[a] = d;
      @(negedge wclk);
      we = 0;
      a = 5'($urandom);
      #1 check(o == shadow[a], $sformatf("read word %0d = %0d, expected %0d",
               a, o, shadow[a]));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule

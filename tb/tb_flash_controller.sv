// tb_flash_controller: end-to-end testbench of the flash controller at its
// default parameters, with a receiving device model on the flash wires.
//
// Presses the buttons as a user would and checks what the device receives:
// Reset (11b, no address), Page Program (01b, the switch address as
// C1 C2 R1 R2, then the 32 page beats), first with the SRAM's power-up page
// and then with pages loaded through the SRAM load port. Page contents are
// predicted from the INIT constants and a shadow copy of every load. It also
// checks the cycle counts: CE# falls six clock edges after a button rises
// (two synchroniser stages, the accepting edge, the pin register and the
// bus-inactive RES/PRG cycle of two clocks),
// stays low 2 clocks for Reset and 78 for Page Program, and the data phase
// lasts 64 clocks. Mechanisms exercised and counted (each must happen):
// reset command, program command, load of the page SRAM, a load refused while
// busy, a button press ignored while busy, and initialise aborting a command.
module tb_flash_controller;
  import flash_pkg::*;

  localparam logic [31:0] I00 = 32'hCAFEF00D;
  localparam logic [31:0] I01 = 32'h005EABED;

  logic            clk = 1'b0;
  logic [3:0]      btn;
  logic [7:0]      sw;
  logic            ram_we;
  logic [4:0]      ram_addr;
  logic [1:0]      ram_wdata;
  logic            ceb, cle, ale, web, dq_oe, dqs, dqs_oe, busy;
  logic [1:0]      dq;

  logic [1:0]      dev_cmd;
  int              dev_n_cmds, dev_n_addr, dev_n_data, dev_errors;
  logic [7:0]      dev_addr;
  logic [1:0]      dev_page [32];

  logic [1:0]      expect_page [32];
  int              checks = 0, failures = 0;
  int              n_reset = 0, n_program = 0, n_load = 0, n_refused = 0,
                   n_ignored = 0, n_abort = 0;

  flash_controller dut (.*);

  flash_device_model dev (
    .ce_n(ceb), .cle, .ale, .we_n(web), .dq, .dq_oe, .dqs, .dqs_oe,
    .cmd(dev_cmd), .n_cmds(dev_n_cmds), .addr(dev_addr), .n_addr(dev_n_addr),
    .page(dev_page), .n_data(dev_n_data), .errors(dev_errors)
  );

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (20000) @(posedge clk);
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

  // Count CE#-low clocks and DQS-driven clocks of the current command.
  int ce_clks, dqs_clks;
  always @(posedge clk) begin
    if (!ceb)  ce_clks++;
    if (dqs_oe) dqs_clks++;
  end

  // Press button b (held for `hold` clocks) and return how many rising clock
  // edges passed from the press until CE# was seen low (-1 if never).
  task automatic press(int b, int hold, output int latency);
    latency = -1;
    @(negedge clk);
    ce_clks = 0; dqs_clks = 0;
    btn[b] = 1'b1;
    for (int n = 1; n <= 200; n++) begin
      @(posedge clk); #1;
      if (n == hold) btn[b] = 1'b0;
      if (!ceb && latency < 0) latency = n;
      if (n > hold && !busy && ceb && latency >= 0) break;
    end
    btn[b] = 1'b0;
    @(negedge clk);
  endtask

  task automatic do_reset();
    int lat, cmds0;
    cmds0 = dev_n_cmds;
    press(0, 3, lat);
    n_reset++;
    check(lat == 6, $sformatf("Reset: CE# low after %0d edges, expected 6", lat));
    check(ce_clks == 2, $sformatf("Reset: CE# low %0d clocks, expected 2", ce_clks));
    check(dev_n_cmds == cmds0 + 1 && dev_cmd == 2'b11, "Reset: device latched 11b");
    check(dev_n_addr == 0 && dev_n_data == 0, "Reset: no address or data");
  endtask

  task automatic do_program(logic [7:0] a, int hold);
    int lat;
    sw = a;
    fork
      press(1, hold, lat);
      begin
        // a second button press while the command runs is ignored
        repeat (12) @(posedge clk);
        #2 btn[0] = 1'b1;
        repeat (4) @(posedge clk);
        #2 btn[0] = 1'b0;
        sw = ~a;
      end
      begin
        // a load during the command is refused
        repeat (30) @(posedge clk);
        #2 ram_we = 1'b1; ram_addr = 5'd0; ram_wdata = ~expect_page[0];
        @(posedge clk);
        #2 ram_we = 1'b0;
      end
    join
    n_program++; n_ignored++; n_refused++;
    check(lat == 6, $sformatf("Program: CE# low after %0d edges, expected 6", lat));
    check(ce_clks == 78, $sformatf("Program: CE# low %0d clocks, expected 78", ce_clks));
    check(dqs_clks == 64, $sformatf("Program: DQS driven %0d clocks, expected 64", dqs_clks));
    check(dev_cmd == 2'b01, "Program: device latched 01b");
    check(dev_n_addr == 4 && dev_addr == a,
          $sformatf("Program: address %h (%0d chunks), expected %h", dev_addr, dev_n_addr, a));
    check(dev_n_data == 32, $sformatf("Program: %0d data beats", dev_n_data));
    for (int k = 0; k < 32; k++)
      check(dev_page[k] == expect_page[k],
            $sformatf("Program: D%0d = %0d, expected %0d", k, dev_page[k], expect_page[k]));
  endtask

  task automatic load_page();
    for (int k = 0; k < 32; k++) begin
      @(negedge clk);
      ram_we = 1'b1; ram_addr = 5'(k); ram_wdata = 2'($urandom);
      expect_page[k] = ram_wdata;
    end
    @(negedge clk) ram_we = 1'b0;
    n_load++;
  endtask

  initial begin
    btn = '0; sw = '0; ram_we = 0; ram_addr = '0; ram_wdata = '0;
    for (int k = 0; k < 32; k++) expect_page[k] = {I01[k], I00[k]};
    // button 4: initialise
    btn[3] = 1'b1;
    repeat (6) @(posedge clk);
    @(negedge clk) btn[3] = 1'b0;
    repeat (4) @(negedge clk);
    check(ceb && !dq_oe && !dqs_oe && !busy, "bus at rest after initialise");

    do_reset();
    do_program(8'hB4, 3);            // power-up page CAFEF00D / 005EABED
    load_page();
    do_program(8'h2D, 8);
    do_reset();
    load_page();
    do_program(8'($urandom), 40);    // button held into the command

    // initialise in the middle of the data phase
    sw = 8'h77;
    @(negedge clk) btn[1] = 1'b1;
    repeat (4) @(negedge clk);
    btn[1] = 1'b0;
    repeat (40) @(negedge clk);
    check(busy && dqs_oe, "in the data phase before initialise");
    btn[3] = 1'b1;
    repeat (4) @(negedge clk);
    check(!busy && ceb && !dq_oe && !dqs_oe, "initialise aborts and releases the bus");
    btn[3] = 1'b0;
    repeat (4) @(negedge clk);
    n_abort++;
    do_program(8'hE1, 3);

    check(dev_errors == 0, $sformatf("device saw %0d protocol errors", dev_errors));
    check(n_reset > 0 && n_program > 0 && n_load > 0 && n_refused > 0 &&
          n_ignored > 0 && n_abort > 0, "every mechanism exercised");
    $display("mechanisms: reset=%0d program=%0d load=%0d refused_load=%0d ignored_press=%0d init_abort=%0d",
             n_reset, n_program, n_load, n_refused, n_ignored, n_abort);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule

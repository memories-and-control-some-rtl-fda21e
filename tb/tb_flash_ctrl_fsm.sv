// tb_flash_ctrl_fsm: self-checking testbench for the flash control logic.
//
// A reference model written from the command timing (not from the RTL)
// lists, bus cycle by bus cycle, what CE#, CLE, ALE, WE#, DQ and DQS must
// carry for Reset and for Page Program; each bus cycle is two clock cycles
// with WE# / DQS low in the first and high in the second. After a request is
// accepted on a clock edge, the registered pins must follow that list from
// the next edge on, clock by clock, and fall back to rest. The SRAM is
// modelled here as an array of random words read asynchronously.
// Also checked: the count of WE# and DQS pulses, the total busy time, that a
// request during a command is ignored, that Reset wins over Page Program and
// that init aborts a command and leaves DQ/DQS high-Z.
module tb_flash_ctrl_fsm;
  import flash_pkg::*;

  localparam int unsigned BEATS = 32;

  logic              clk = 1'b0;
  logic              init, req_reset, req_program;
  logic [7:0]        addr;
  logic [4:0]        ram_raddr;
  logic [DQ_W-1:0]   ram_rdata;
  flash_pins_t       pins;
  state_t            state;
  logic              busy;

  logic [DQ_W-1:0]   page [32];
  int                checks = 0, failures = 0;

  assign ram_rdata = page[ram_raddr];

  flash_ctrl_fsm #(.DATA_BEATS(BEATS)) dut (.*);

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

  // Reference: pins in clock j (0-based) after the accepting edge + 1.
  function automatic flash_pins_t ref_pins(bit prog, int j, logic [7:0] a);
    flash_pins_t p;
    int b;
    bit ph;
    b  = j / 2;
    ph = bit'(j % 2);
    p  = '{ce_n: 1, cle: 0, ale: 0, we_n: 1, dq: 2'b00, dq_oe: 0, dqs: 1, dqs_oe: 0};
    if (!prog) begin
      if (b == 1) begin
        p.ce_n = 0; p.cle = 1; p.we_n = ph; p.dq = 2'b11; p.dq_oe = 1;
      end
    end else begin
      if (b == 1) begin
        p.ce_n = 0; p.cle = 1; p.we_n = ph; p.dq = 2'b01; p.dq_oe = 1;
      end else if (b >= 2 && b <= 5) begin
        p.ce_n = 0; p.ale = 1; p.we_n = ph; p.dq_oe = 1;
        p.dq = a[2*(b-2) +: 2];
      end else if (b == 6 || b == 7) begin
        p.ce_n = 0;
      end else if (b >= 8 && b < 8 + int'(BEATS)) begin
        p.ce_n = 0; p.dq = page[b-8]; p.dq_oe = 1; p.dqs = ph; p.dqs_oe = 1;
      end
    end
    return p;
  endfunction

  // Issue a command and compare every clock with the reference.
  task automatic run_cmd(bit prog, logic [7:0] a);
    int nbus, we_pulses, dqs_pulses, busy_clks;
    flash_pins_t exp_p;
    logic prev_we, prev_dqs;
    nbus = prog ? 2 + 4 + 2 + int'(BEATS) : 2;
    addr = a;
    req_reset   = !prog;
    req_program = prog;
    @(posedge clk);              // accepting edge
    #1;
    req_reset = 0; req_program = 0;
    addr = ~a;                   // the latched address must be used
    we_pulses = 0; dqs_pulses = 0; busy_clks = 0;
    prev_we = 1; prev_dqs = 1;
    for (int j = 0; j < 2 * nbus + 4; j++) begin
      if (busy) busy_clks++;
      // a second request while busy must be ignored
      if (j == 2) req_reset = 1;
      @(posedge clk);
      #1;
      req_reset = 0;
      exp_p = ref_pins(prog, j, a);
      check(pins == exp_p, $sformatf("%s clk %0d: pins %h expected %h",
            prog ? "program" : "reset", j, pins, exp_p));
      if (prev_we && !pins.we_n) we_pulses++;
      if (prev_dqs && !pins.dqs) dqs_pulses++;
      prev_we = pins.we_n; prev_dqs = pins.dqs;
    end
    check(we_pulses == (prog ? 5 : 1), $sformatf("WE# pulses %0d", we_pulses));
    check(dqs_pulses == (prog ? int'(BEATS) : 0), $sformatf("DQS pulses %0d", dqs_pulses));
    check(busy_clks == 2 * nbus, $sformatf("busy for %0d clocks, expected %0d",
          busy_clks, 2 * nbus));
    check(!busy && state == ST_IDLE, "back to IDLE");
  endtask

  initial begin
    for (int k = 0; k < 32; k++) page[k] = DQ_W'($urandom);
    init = 1; req_reset = 0; req_program = 0; addr = 0;
    repeat (3) @(posedge clk);
    #1;
    #1 init = 0;
    check(pins == PINS_IDLE, "pins at rest after init");

    run_cmd(0, 8'h00);
    run_cmd(1, 8'hB4);
    repeat (3) @(posedge clk);
    #1;
    for (int k = 0; k < 32; k++) page[k] = DQ_W'($urandom);
    run_cmd(1, 8'h1E);
    run_cmd(1, 8'($urandom));
    run_cmd(0, 8'hFF);

    // Reset has priority over Page Program
    #1 req_reset = 1; req_program = 1;
    @(posedge clk); #1 req_reset = 0; req_program = 0;
    check(state == ST_RES, "simultaneous requests start Reset");
    repeat (8) @(posedge clk);
    #1;
    check(state == ST_IDLE, "reset finished");

    // init in the middle of data output: back to rest, bus released
    req_program = 1; addr = 8'h5A;
    @(posedge clk); #1 req_program = 0;
    repeat (24) @(posedge clk);
    #1;
    check(state == ST_DATA_OUTPUT && pins.dq_oe && !pins.ce_n, "in DATA_OUTPUT");
    init = 1;
    @(posedge clk); #1 init = 0;
    check(state == ST_IDLE && pins == PINS_IDLE && !busy,
          "init aborts the command and releases DQ/DQS");
    run_cmd(1, 8'hC3);

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule

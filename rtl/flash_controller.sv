// flash_controller: top level of a small NAND flash controller for an FPGA
// board. Button presses start flash commands; the page data comes from an
// on-chip 32x2 SRAM.
//
// Structure: button_input synchronises the four buttons and turns presses
// into pulses; flash_ctrl_fsm sequences the command, address and data cycles
// on the flash wires; ram32x2s holds the 32 two-bit beats of a page. The
// buttons are mapped as:
//   button 1 (btn[0]) - Reset command (11b, no address)
//   button 2 (btn[1]) - Page Program command (01b, address from sw, 32 beats)
//   button 3 (btn[2]) - not used by this design
//   button 4 (btn[3]) - initialise: while held, all registers go to their
//                       start values and DQ/DQS are high-Z
// The switches give the address read when a command starts: sw[3:0] is the
// column (sent as C1 = sw[1:0], C2 = sw[3:2]) and sw[7:4] the row (R1 =
// sw[5:4], R2 = sw[7:6]).
//
// Interface. The flash-side ports carry the pin names of the board
// constraints (ceb, cle, ale, web, dq[1:0], dqs). `clk` must run at twice the flash bus-cycle rate (see
// flash_ctrl_fsm). The flash wires are registered outputs; dq and dqs come
// with output enables dq_oe / dqs_oe for the pad's tri-state driver (0 =
// high-Z). The SRAM write port (ram_we, ram_addr, ram_wdata) loads page data
// and is honoured only while `busy` is 0; the SRAM otherwise keeps its
// power-up contents INIT_00 / INIT_01.
//
// The split into control logic plus SRAM, the button and switch meaning, the
// command codes and the INIT values follow the lab; the SRAM load port and
// the unused button 3 are this design's choices.
module flash_controller
  import flash_pkg::*;
#(
  parameter int unsigned DATA_BEATS = 32,            // beats per page
  parameter logic [31:0] INIT_00    = 32'hCAFEF00D,  // SRAM bit 0 contents
  parameter logic [31:0] INIT_01    = 32'h005EABED   // SRAM bit 1 contents
) (
  input  logic            clk,
  input  logic [3:0]      btn,
  input  logic [7:0]      sw,
  input  logic            ram_we,
  input  logic [4:0]      ram_addr,
  input  logic [DQ_W-1:0] ram_wdata,
  output logic            ceb,      // CE#, chip enable, active low
  output logic            cle,
  output logic            ale,
  output logic            web,      // WE#, write enable, active low
  output logic [DQ_W-1:0] dq,
  output logic            dq_oe,
  output logic            dqs,
  output logic            dqs_oe,
  output logic            busy
);

  logic [3:0]      btn_level, btn_press;
  logic [4:0]      fsm_raddr, sram_addr;
  logic [DQ_W-1:0] sram_rdata;
  logic            sram_we;
  flash_pins_t     pins;

  button_input #(.N(4)) u_buttons (
    .clk   (clk),
    .btn   (btn),
    .level (btn_level),
    .press (btn_press)
  );

  flash_ctrl_fsm #(.DATA_BEATS(DATA_BEATS)) u_ctrl (
    .clk         (clk),
    .init        (btn_level[3]),
    .req_reset   (btn_press[0]),
    .req_program (btn_press[1]),
    .addr        (sw),
    .ram_raddr   (fsm_raddr),
    .ram_rdata   (sram_rdata),
    .pins        (pins),
    .state       (),
    .busy        (busy)
  );

  // While a command runs the SRAM belongs to the control logic; otherwise
  // the load port may write it.
  assign sram_addr = busy ? fsm_raddr : ram_addr;
  assign sram_we   = ram_we && !busy;

  ram32x2s #(.INIT_00(INIT_00), .INIT_01(INIT_01)) u_sram (
    .O0   (sram_rdata[0]),
    .O1   (sram_rdata[1]),
    .A0   (sram_addr[0]),
    .A1   (sram_addr[1]),
    .A2   (sram_addr[2]),
    .A3   (sram_addr[3]),
    .A4   (sram_addr[4]),
    .D0   (ram_wdata[0]),
    .D1   (ram_wdata[1]),
    .WCLK (clk),
    .WE   (sram_we)
  );

  assign ceb    = pins.ce_n;
  assign cle    = pins.cle;
  assign ale    = pins.ale;
  assign web    = pins.we_n;
  assign dq     = pins.dq;
  assign dq_oe  = pins.dq_oe;
  assign dqs    = pins.dqs;
  assign dqs_oe = pins.dqs_oe;

endmodule

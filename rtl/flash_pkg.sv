// flash_pkg: types and constants shared by the flash controller blocks.
//
// The controller talks to a NAND flash device over a reduced ONFI-style
// interface: the usual 8-bit DQ bus is narrowed to 2 bits, so commands use
// 2-bit codes (Reset = 11b, Page Program = 01b) and each 8-bit address is sent
// as four 2-bit chunks (C1, C2 from the column nibble, R1, R2 from the row
// nibble). A page is 32 two-bit data beats. Those numbers come from the lab
// description this design follows; the state names follow its timing
// diagrams. The pin bundle struct is this design's own packaging.
package flash_pkg;

  // Width of the command/address/data bus.
  localparam int unsigned DQ_W = 2;

  // 2-bit command codes put on DQ while CLE is high.
  localparam logic [DQ_W-1:0] CMD_RESET   = 2'b11;
  localparam logic [DQ_W-1:0] CMD_PROGRAM = 2'b01;

  // Controller states, named as in the Reset and Page Program timing
  // diagrams. Every state other than IDLE lasts one flash bus cycle, except
  // DATA_OUTPUT which lasts one bus cycle per data beat.
  typedef enum logic [3:0] {
    ST_IDLE,
    ST_RES,          // Reset accepted, bus still inactive
    ST_RES_A,        // CLE cycle carrying 11b
    ST_PRG,          // Page Program accepted, bus still inactive
    ST_PRG_A,        // CLE cycle carrying 01b
    ST_PRG_B,        // ALE cycle carrying C1
    ST_PRG_C,        // ALE cycle carrying C2
    ST_PRG_D,        // ALE cycle carrying R1
    ST_PRG_E,        // ALE cycle carrying R2
    ST_PRG_F,        // address-to-data gap, first cycle
    ST_PRG_G,        // address-to-data gap, second cycle
    ST_DATA_OUTPUT   // D0..D31, one beat per bus cycle, strobed by DQS
  } state_t;

  // Values of the flash-side wires. *_oe = 0 means the pad is high-Z.
  typedef struct packed {
    logic            ce_n;
    logic            cle;
    logic            ale;
    logic            we_n;
    logic [DQ_W-1:0] dq;
    logic            dq_oe;
    logic            dqs;
    logic            dqs_oe;
  } flash_pins_t;

  // Bus at rest: chip deselected, strobes high, DQ and DQS high-Z.
  localparam flash_pins_t PINS_IDLE = '{
    ce_n: 1'b1, cle: 1'b0, ale: 1'b0, we_n: 1'b1,
    dq: '0, dq_oe: 1'b0, dqs: 1'b1, dqs_oe: 1'b0
  };

endpackage

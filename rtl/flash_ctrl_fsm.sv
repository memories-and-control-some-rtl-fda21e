// flash_ctrl_fsm: control logic of the flash controller. It sequences the
// Reset and Page Program commands on a 2-bit SDR flash interface.
//
// How it works. The controller clock `clk` runs at twice the flash bus-cycle
// rate, so every bus cycle of the timing diagrams is two clock cycles: phase 0
// (first half) and phase 1 (second half). A state other than IDLE lasts one
// bus cycle and advances at the end of phase 1. WE# is low in phase 0 and high
// in phase 1 of each command/address cycle, so its rising edge, where the
// device latches DQ, falls mid-cycle. DQS does the same in every data
// cycle. This gives the half-cycle strobes of the diagrams with one clock
// edge and no gated clocks.
//
//   Reset:         IDLE -> RES -> RES_A (CLE, DQ=11b, one WE# pulse) -> IDLE
//   Page Program:  IDLE -> PRG -> PRG_A (CLE, DQ=01b) -> PRG_B..PRG_E (ALE,
//                  DQ = C1, C2, R1, R2, one WE# pulse each) -> PRG_F -> PRG_G
//                  (gap, DQ high-Z) -> DATA_OUTPUT (DATA_BEATS beats, one
//                  DQS pulse each) -> IDLE
//
// CE# is low from RES_A / PRG_A up to the end of RES_A / DATA_OUTPUT. In
// DATA_OUTPUT a down-counter loaded with DATA_BEATS-1 (0x1F) counts to zero;
// beat i is read from SRAM word i, i.e. ram_raddr = DATA_BEATS-1 - count.
// The address chunks are C1 = addr[1:0], C2 = addr[3:2], R1 = addr[5:4],
// R2 = addr[7:6], latched when the command is accepted.
//
// Interface and timing. `req_reset` / `req_program` are one-cycle requests,
// accepted only in IDLE (Reset wins if both arrive together) and ignored
// while a command runs. `init` is a synchronous reset to IDLE with all pins at
// rest (DQ and DQS high-Z); the registers power up in that same state. The
// pin outputs are registered: they show the
// decode of the state one clock cycle after the state register holds it.
// `ram_rdata` must be the asynchronous read of `ram_raddr` in the same cycle.
//
// The state sequence, the command codes, the chunk order, the two gap cycles
// and the 0x1F down-counter follow the lab's description and timing diagrams
// (rising-edge variant). The 2x clock, the registered pins, the request
// handshake, the order in which beats are read from the SRAM and the level
// DQS rests at when not driven are this design's choices.
module flash_ctrl_fsm
  import flash_pkg::*;
#(
  parameter int unsigned DATA_BEATS = 32  // data beats per Page Program
) (
  input  logic              clk,
  input  logic              init,         // synchronous initialise
  input  logic              req_reset,    // start a Reset command
  input  logic              req_program,  // start a Page Program command
  input  logic [7:0]        addr,         // {row nibble, column nibble}
  output logic [4:0]        ram_raddr,    // SRAM read address
  input  logic [DQ_W-1:0]   ram_rdata,    // SRAM read data
  output flash_pins_t       pins,         // flash-side wires, registered
  output state_t            state,        // current state
  output logic              busy          // a command is in progress
);

  localparam int unsigned CNT_W = (DATA_BEATS > 1) ? $clog2(DATA_BEATS) : 1;
  localparam logic [CNT_W-1:0] CNT_LOAD = CNT_W'(DATA_BEATS - 1);

  // Registers carry FPGA power-up values; `init` restores the same values.
  state_t            state_q = ST_IDLE;
  state_t            state_d;
  logic              phase_q = 1'b0;   // 0: first half of a bus cycle, 1: second
  logic [CNT_W-1:0]  cnt_q   = CNT_LOAD; // beats still to send after this one
  logic [7:0]        addr_q  = '0;     // address latched at command start
  flash_pins_t       pins_q  = PINS_IDLE;
  flash_pins_t       pins_d;

  // ---------------------------------------------------------------- next state
  always_comb begin
    state_d = state_q;
    if (state_q == ST_IDLE) begin
      if (req_reset)        state_d = ST_RES;
      else if (req_program) state_d = ST_PRG;
    end else if (phase_q) begin
      unique case (state_q)
        ST_RES:         state_d = ST_RES_A;
        ST_RES_A:       state_d = ST_IDLE;
        ST_PRG:         state_d = ST_PRG_A;
        ST_PRG_A:       state_d = ST_PRG_B;
        ST_PRG_B:       state_d = ST_PRG_C;
        ST_PRG_C:       state_d = ST_PRG_D;
        ST_PRG_D:       state_d = ST_PRG_E;
        ST_PRG_E:       state_d = ST_PRG_F;
        ST_PRG_F:       state_d = ST_PRG_G;
        ST_PRG_G:       state_d = ST_DATA_OUTPUT;
        ST_DATA_OUTPUT: state_d = (cnt_q == '0) ? ST_IDLE : ST_DATA_OUTPUT;
        default:        state_d = ST_IDLE;
      endcase
    end
  end

  always_ff @(posedge clk) begin
    if (init) begin
      state_q <= ST_IDLE;
      phase_q <= 1'b0;
      cnt_q   <= CNT_LOAD;
      addr_q  <= '0;
    end else begin
      state_q <= state_d;
      phase_q <= (state_q == ST_IDLE) ? 1'b0 : ~phase_q;
      if (state_q == ST_IDLE && (req_reset || req_program)) addr_q <= addr;
      if (state_q == ST_DATA_OUTPUT && phase_q) cnt_q <= cnt_q - 1'b1;
      else if (state_q != ST_DATA_OUTPUT)       cnt_q <= CNT_LOAD;
    end
  end

  // ------------------------------------------------------------ pin decode
  assign ram_raddr = 5'(CNT_LOAD - cnt_q);

  always_comb begin
    pins_d = PINS_IDLE;
    unique case (state_q)
      ST_RES_A: begin
        pins_d.ce_n  = 1'b0;
        pins_d.cle   = 1'b1;
        pins_d.we_n  = phase_q;
        pins_d.dq    = CMD_RESET;
        pins_d.dq_oe = 1'b1;
      end
      ST_PRG_A: begin
        pins_d.ce_n  = 1'b0;
        pins_d.cle   = 1'b1;
        pins_d.we_n  = phase_q;
        pins_d.dq    = CMD_PROGRAM;
        pins_d.dq_oe = 1'b1;
      end
      ST_PRG_B, ST_PRG_C, ST_PRG_D, ST_PRG_E: begin
        pins_d.ce_n  = 1'b0;
        pins_d.ale   = 1'b1;
        pins_d.we_n  = phase_q;
        pins_d.dq_oe = 1'b1;
        case (state_q)
          ST_PRG_B: pins_d.dq = addr_q[1:0];  // C1
          ST_PRG_C: pins_d.dq = addr_q[3:2];  // C2
          ST_PRG_D: pins_d.dq = addr_q[5:4];  // R1
          default:  pins_d.dq = addr_q[7:6];  // R2
        endcase
      end
      ST_PRG_F, ST_PRG_G: begin
        pins_d.ce_n  = 1'b0;
      end
      ST_DATA_OUTPUT: begin
        pins_d.ce_n   = 1'b0;
        pins_d.dq     = ram_rdata;
        pins_d.dq_oe  = 1'b1;
        pins_d.dqs    = phase_q;
        pins_d.dqs_oe = 1'b1;
      end
      default: ;  // IDLE, RES, PRG: bus at rest
    endcase
  end

  always_ff @(posedge clk) begin
    if (init) pins_q <= PINS_IDLE;
    else      pins_q <= pins_d;
  end

  assign pins  = pins_q;
  assign state = state_q;
  assign busy  = (state_q != ST_IDLE);

  // ------------------------------------------------------------ bus rules
  // CLE and ALE are never both high; the bus and strobes are only driven or
  // pulsed while the chip is enabled.
  a_cle_ale_exclusive: assert property (@(posedge clk) disable iff (init)
    !(pins_q.cle && pins_q.ale));
  a_drive_needs_ce: assert property (@(posedge clk) disable iff (init)
    (pins_q.dq_oe || pins_q.dqs_oe || !pins_q.we_n) |-> !pins_q.ce_n);
  a_we_needs_latch_enable: assert property (@(posedge clk) disable iff (init)
    !pins_q.we_n |-> (pins_q.cle || pins_q.ale));

endmodule

// ram32x2s: 32-word x 2-bit static RAM holding one flash page (D0..D31).
//
// Behaves like the FPGA library primitive of the same name and keeps its
// port names: the write of {D1,D0} to address {A4..A0} happens on the rising
// edge of WCLK while WE is 1, and the outputs {O1,O0} show the word at the
// current address combinationally (asynchronous read, as in the distributed
// 32x2 RAM of the FPGA family this primitive comes from). The power-up
// contents come from INIT_00 (bit 0 of every word) and INIT_01 (bit 1 of
// every word): word k = {INIT_01[k], INIT_00[k]}.
//
// Following the lab: 32 deep, 2 wide, positive-edge write, and the
// initial values CAFEF00D / 005EABED. The asynchronous read and the bit
// ordering of the INIT words follow the vendor primitive, which the lab
// names but does not describe.
module ram32x2s #(
  parameter logic [31:0] INIT_00 = 32'hCAFEF00D,  // bit 0 of words 0..31
  parameter logic [31:0] INIT_01 = 32'h005EABED   // bit 1 of words 0..31
) (
  output logic O0,
  output logic O1,
  input  logic A0,
  input  logic A1,
  input  logic A2,
  input  logic A3,
  input  logic A4,
  input  logic D0,
  input  logic D1,
  input  logic WCLK,
  input  logic WE
);

  logic [1:0] mem [32];
  logic [4:0] addr;

  assign addr = {A4, A3, A2, A1, A0};

  initial begin
    for (int k = 0; k < 32; k++) mem[k] = {INIT_01[k], INIT_00[k]};
  end

  always_ff @(posedge WCLK) begin
    if (WE) mem[addr] <= {D1, D0};
  end

  assign {O1, O0} = mem[addr];

endmodule

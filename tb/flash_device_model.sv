// flash_device_model: behavioural receiver standing in for the NAND flash
// device in simulation. Not synthesizable logic and not a model of a real
// device's internals: it only records what a controller sends.
//
// While CE# is low it latches DQ on every rising edge of WE#: as a command
// when CLE is high, as the next 2-bit address chunk when ALE is high. It
// latches DQ as the next data beat on every rising edge of DQS while DQS is
// driven. A command latch clears the address and data records. It flags a
// protocol error when a strobe edge comes while DQ is not driven, or when
// CLE and ALE are both high.
module flash_device_model (
  input  logic       ce_n,
  input  logic       cle,
  input  logic       ale,
  input  logic       we_n,
  input  logic [1:0] dq,
  input  logic       dq_oe,
  input  logic       dqs,
  input  logic       dqs_oe,
  output logic [1:0] cmd,          // last command latched
  output int         n_cmds,       // commands latched so far
  output logic [7:0] addr,         // address chunks, first chunk in [1:0]
  output int         n_addr,       // address chunks since the last command
  output logic [1:0] page [32],    // data beats since the last command
  output int         n_data,       // data beats since the last command
  output int         errors        // protocol errors seen
);

  initial begin
    cmd = '0; n_cmds = 0; addr = '0; n_addr = 0; n_data = 0; errors = 0;
    for (int k = 0; k < 32; k++) page[k] = '0;
  end

  always @(posedge we_n) begin
    if (!ce_n) begin
      if (!dq_oe || (cle && ale)) errors++;
      if (cle) begin
        cmd = dq;
        n_cmds++;
        n_addr = 0;
        n_data = 0;
        addr = '0;
      end else if (ale) begin
        if (n_addr < 4) addr[2*n_addr +: 2] = dq;
        n_addr++;
      end
    end
  end

  always @(posedge dqs) begin
    if (!ce_n && dqs_oe) begin
      if (!dq_oe) errors++;
      if (n_data < 32) page[n_data] = dq;
      n_data++;
    end
  end

endmodule

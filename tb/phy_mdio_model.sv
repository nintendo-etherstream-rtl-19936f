// Testbench helper: behavioural model of the management interface of an
// Ethernet PHY (IEEE 802.3 clause 22) at address 1.
//
// It follows each frame bit by bit on the rising edges of mdc: preamble,
// start 01, opcode, PHY and register addresses, turnaround, 16 data bits.
// Writes are stored in a 32-register file. For reads it drives the
// turnaround zero and the register, most significant bit first, each bit
// before the rising edge on which the master samples it. The basic status
// register (1) reports auto-negotiation complete (bit 5) only from the
// AUTONEG_AFTER-th read of it onwards, so the master sees the bit change.
module phy_mdio_model #(
  parameter int AUTONEG_AFTER = 2
) (
  input  logic mdc,
  input  logic mdio_o,
  input  logic mdio_oe,
  output logic mdio_i,
  output int   status_reads
);
  logic [15:0] regs [32];
  logic [63:0] seen;
  int r = 0;
  logic [4:0] rd_reg = '0;
  logic is_rd = 0;

  initial begin
    for (int i = 0; i < 32; i++) regs[i] = 16'h0000;
    regs[1] = 16'h7809;            // link capabilities, auto-negotiation not complete
    status_reads = 0;
    seen = '1;
  end

  always @(posedge mdio_oe) begin r = 0; seen = '1; end
  always @(posedge mdc) begin
    seen = {seen[62:0], mdio_oe ? mdio_o : mdio_i};
    r++;
    if (r == 46) begin
      is_rd  = (seen[11:10] == 2'b10);
      rd_reg = seen[4:0];
      if (is_rd && rd_reg == 5'd1) begin
        status_reads++;
        if (status_reads >= AUTONEG_AFTER) regs[1][5] = 1'b1;
      end
    end
    if (r == 64 && seen[31:30] == 2'b01 && seen[29:28] == 2'b01) regs[seen[22:18]] = seen[15:0];
  end
  assign mdio_i = (is_rd && r >= 47 && r < 64) ? ((r == 47) ? 1'b0 : regs[rd_reg][63 - r]) : 1'b1;
endmodule

// Self-checking test of smi against a PHY model built here: the model
// counts MDC rising edges from the start of a frame, records what the
// master drives and answers reads from its register file. Checks a user
// read, a user write (opcode, addresses, data, turnaround), the MDC period
// (2*MDC_HALF clocks), and that periodic polling of register 1 follows the
// auto-negotiation-complete bit (bit 5) both ways.
module tb_smi;
  logic clk = 0, rst = 1;
  logic req = 0, we = 0;
  logic [4:0] regad = 0;
  logic [15:0] wdata = 0;
  logic busy, done, autoneg_done, mdc, mdio_o, mdio_oe, mdio_i;
  logic [15:0] rdata;
  int checks = 0, failures = 0;

  smi #(.MDC_HALF(4), .POLL_CYCLES(3000), .PHY_ADDR(5'd1)) dut (.*);
  always #5 clk = ~clk;

  task automatic check(bit c, string msg);
    checks++;
    if (!c) begin failures++; $display("FAIL %s", msg); end
  endtask

  // ---- PHY model ----
  logic [15:0] regs [32];
  logic [63:0] seen;
  int r = 0;                    // rising edges since the frame started
  int frames = 0, reads1 = 0;
  int last_rise = 0, period = 0, cyc = 0;
  logic oe_q = 0;
  always @(posedge clk) cyc++;
  always @(posedge mdio_oe) begin r = 0; seen = '1; end
  always @(posedge mdc) begin
    period = cyc - last_rise; last_rise = cyc;
    seen = {seen[62:0], mdio_oe ? mdio_o : mdio_i};
    r++;
    if (r == 64) begin
      frames++;
      if (seen[31:30] == 2'b01 && seen[29:28] == 2'b01) regs[seen[22:18]] = seen[15:0];
      if (seen[29:28] == 2'b10 && seen[22:18] == 5'd1) reads1++;
    end
  end
  // read data: bit k of the frame is presented before rising edge k
  logic [4:0] rd_reg;
  logic is_rd;
  always @(posedge mdc) if (r == 46) begin
    is_rd = (seen[11:10] == 2'b10);      // opcode bits, 12 bits back
    rd_reg = seen[4:0];
  end
  assign mdio_i = (is_rd && r >= 47 && r < 64) ? ((r == 47) ? 1'b0 : regs[rd_reg][63 - r]) : 1'b1;

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    is_rd = 0; rd_reg = 0;
    for (int i = 0; i < 32; i++) regs[i] = 16'(i * 16'h0101);
    regs[1] = 16'h7809;           // auto-negotiation not complete
    regs[2] = 16'h0007;
    repeat (3) @(negedge clk);
    rst = 0;
    // user read of register 2
    @(negedge clk);
    req = 1; we = 0; regad = 5'd2;
    @(negedge clk);
    req = 0;
    while (!done) @(negedge clk);
    check(rdata == 16'h0007, $sformatf("read of register 2 gave %h", rdata));
    check(period == 8, $sformatf("MDC period %0d clocks, expected 8", period));
    // user write of register 0
    @(negedge clk);
    req = 1; we = 1; regad = 5'd0; wdata = 16'h1200;
    @(negedge clk);
    req = 0;
    while (!done) @(negedge clk);
    repeat (10) @(negedge clk);
    check(regs[0] == 16'h1200, $sformatf("register 0 written as %h", regs[0]));
    check(seen[17:16] == 2'b10, "write turnaround 10");
    // polling
    repeat (8000) @(negedge clk);
    check(reads1 >= 1, "register 1 polled");
    check(autoneg_done == 1'b0, "auto-negotiation not yet complete");
    regs[1] = 16'h782D;
    repeat (8000) @(negedge clk);
    check(autoneg_done == 1'b1, "auto-negotiation complete seen");
    regs[1] = 16'h7809;
    repeat (8000) @(negedge clk);
    check(autoneg_done == 1'b0, "auto-negotiation loss seen");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

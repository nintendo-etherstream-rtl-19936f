// Self-checking test of mac_transmit: frames with a short payload (padded
// to 46 bytes) and a long one, random upstream stalls before the frame
// starts. The byte stream is compared with preamble, SFD, the MAC header,
// payload, padding and an FCS computed here bit by bit; the gap between
// frames must be at least IFG_CYCLES.
module tb_mac_transmit;
  logic clk = 0, rst = 1;
  logic [7:0] in_data = 0;
  logic in_valid = 0, in_last = 0, in_ready;
  logic [7:0] tx_data;
  logic tx_valid, tx_ready, busy;
  int checks = 0, failures = 0;

  mac_transmit dut (.*);
  always #5 clk = ~clk;

  task automatic check(bit c, string msg);
    checks++;
    if (!c) begin failures++; if (failures < 20) $display("FAIL %s", msg); end
  endtask

  function automatic logic [31:0] ref_fcs(logic [7:0] m [$]);
    logic [31:0] c = 32'hFFFFFFFF;
    for (int i = 0; i < m.size(); i++)
      for (int b = 0; b < 8; b++) begin
        logic fb;
        fb = c[0] ^ m[i][b];
        c = c >> 1;
        if (fb) c = c ^ 32'hEDB88320;
      end
    return ~c;
  endfunction

  // Source and sink: handshakes are decided just after the falling edge
  // and take effect at the next rising edge. The sink takes a byte every
  // 8th cycle, as byte_transmitter does at line rate.
  int phase = 0, cyc = 0, first_tx = 0, last_tx = 0;
  logic [7:0] src [$];
  logic [7:0] got [$];
  bit take_in = 0, take_tx = 0;
  logic [7:0] take_data;
  always @(negedge clk) begin
    cyc++;
    if (take_in) void'(src.pop_front());
    if (take_tx) begin
      if (got.size() == 0) first_tx = cyc;
      last_tx = cyc;
      got.push_back(take_data);
    end
    phase = (phase + 1) % 8;
    tx_ready = (phase == 0);
    in_valid = (src.size() > 0);
    in_data  = (src.size() > 0) ? src[0] : 8'h00;
    in_last  = (src.size() == 1);
    #1;
    take_in = in_valid && in_ready;
    take_tx = tx_valid && tx_ready;
    take_data = tx_data;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int lens [3] = '{20, 300, 46};
    int busy_fall;
    tx_ready = 0;
    repeat (3) @(negedge clk);
    rst = 0;
    busy_fall = -1000;
    for (int f = 0; f < 3; f++) begin
      logic [7:0] pay [$];
      logic [7:0] body [$];
      logic [7:0] exp [$];
      logic [31:0] fcs;
      int start_cyc;
      for (int i = 0; i < lens[f]; i++) pay.push_back(8'($urandom));
      got.delete();
      repeat ($urandom_range(0, 5)) @(negedge clk);
      for (int i = 0; i < lens[f]; i++) src.push_back(pay[i]);
      @(negedge clk);
      @(negedge clk);
      while (busy) @(negedge clk);
      if (f > 0) check(first_tx - busy_fall >= 96, $sformatf("gap before frame %0d is %0d cycles", f, first_tx - busy_fall));
      @(negedge clk);
      busy_fall = last_tx;
      body = {8'hFF, 8'hFF, 8'hFF, 8'hFF, 8'hFF, 8'hFF, 8'h02, 8'h00, 8'h00, 8'h00, 8'h00, 8'h01, 8'h08, 8'h00};
      for (int i = 0; i < lens[f]; i++) body.push_back(pay[i]);
      for (int i = lens[f]; i < 46; i++) body.push_back(8'h00);
      fcs = ref_fcs(body);
      exp = {8'h55, 8'h55, 8'h55, 8'h55, 8'h55, 8'h55, 8'h55, 8'hD5};
      for (int i = 0; i < body.size(); i++) exp.push_back(body[i]);
      exp.push_back(fcs[7:0]); exp.push_back(fcs[15:8]); exp.push_back(fcs[23:16]); exp.push_back(fcs[31:24]);
      check(got.size() == exp.size(), $sformatf("frame %0d: %0d bytes, expected %0d", f, got.size(), exp.size()));
      for (int i = 0; i < exp.size() && i < got.size(); i++)
        check(got[i] == exp[i], $sformatf("frame %0d byte %0d: %h, expected %h", f, i, got[i], exp[i]));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

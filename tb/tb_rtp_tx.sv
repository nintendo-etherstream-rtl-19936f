// Self-checking test of rtp_tx: three packets with payload sizes that are
// and are not whole bytes, random stalls on both handshakes. Every output
// byte is compared with IPv4/UDP/RTP headers built here from the field
// definitions, followed by the payload bits packed first-bit-most-
// significant and zero padded; out_last must mark the final byte, and the
// RTP sequence number must rise by one per packet.
module tb_rtp_tx;
  logic clk = 0, rst = 1;
  logic prepare_for_data = 0, marker = 0, data_in = 0, data_valid = 0, out_ready = 0;
  logic [13:0] payload_bits = 0;
  logic [31:0] timestamp = 0;
  logic ready_for_data, out_valid, out_last, busy;
  logic [7:0] out_data;
  logic [15:0] rtp_sequence;
  int checks = 0, failures = 0;

  rtp_tx dut (.*);
  always #5 clk = ~clk;

  task automatic check(bit c, string msg);
    checks++;
    if (!c) begin failures++; if (failures < 20) $display("FAIL %s", msg); end
  endtask

  logic bits_q [$];
  logic [7:0] got [$];
  bit last_seen;
  int last_index;

  // byte sink with random ready, bit source with random valid (sampled at negedge)
  // the handshakes are decided just after the falling edge and take effect
  // at the next rising edge
  bit take_out = 0, take_bit = 0, take_last = 0;
  logic [7:0] take_data;
  always @(negedge clk) begin
    if (take_out) begin
      got.push_back(take_data);
      if (take_last) begin last_seen = 1; last_index = got.size() - 1; end
    end
    if (take_bit) void'(bits_q.pop_front());
    out_ready = ($urandom_range(0, 3) != 0);
    data_valid = (bits_q.size() > 0) && ($urandom_range(0, 4) != 0);
    data_in = (bits_q.size() > 0) ? bits_q[0] : 1'b0;
    #1;
    take_out = out_valid && out_ready;
    take_data = out_data;
    take_last = out_last;
    take_bit = data_valid && ready_for_data;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int sizes [3] = '{2100, 803, 64};
    logic [15:0] seq0;
    repeat (3) @(negedge clk);
    rst = 0;
    repeat (10) @(negedge clk);
    for (int p = 0; p < 3; p++) begin
      int n, nbytes;
      logic payload [];
      logic [7:0] exp [$];
      logic [15:0] ulen, ilen, seq;
      logic [31:0] ts;
      logic [7:0] mpt;
      n = sizes[p];
      nbytes = (n + 7) / 8;
      payload = new[n];
      for (int i = 0; i < n; i++) payload[i] = 1'($urandom);
      ts = $urandom;
      got.delete(); last_seen = 0;
      // start the packet
      @(negedge clk);
      payload_bits = 14'(n); marker = (p == 2); timestamp = ts; prepare_for_data = 1;
      @(negedge clk);
      prepare_for_data = 0;
      for (int i = 0; i < n; i++) bits_q.push_back(payload[i]);
      while (!(last_seen && !busy)) @(negedge clk);
      #2;
      seq = dut.rtp_sequence - 16'd1;
      if (p == 0) seq0 = seq;
      check(seq == seq0 + 16'(p), $sformatf("sequence of packet %0d", p));
      mpt = {(p == 2) ? 1'b1 : 1'b0, 7'd31};
      ulen = 16'(8 + 12 + nbytes); ilen = 16'(20) + ulen;
      exp = {8'h45, 8'h00, ilen[15:8], ilen[7:0], 8'h00, 8'h00, 8'h40, 8'h00, 8'd64, 8'd17, 8'h00, 8'h00,
             8'd192, 8'd168, 8'd1, 8'd2, 8'd192, 8'd168, 8'd1, 8'd1,
             8'h13, 8'h8C, 8'h13, 8'h8C, ulen[15:8], ulen[7:0], 8'h00, 8'h00,
             8'h80, mpt, seq[15:8], seq[7:0],
             ts[31:24], ts[23:16], ts[15:8], ts[7:0], 8'h4E, 8'h45, 8'h54, 8'h53};
      for (int b = 0; b < nbytes; b++) begin
        logic [7:0] v;
        v = 0;
        for (int k = 0; k < 8; k++) v[7 - k] = (b * 8 + k < n) ? payload[b * 8 + k] : 1'b0;
        exp.push_back(v);
      end
      check(got.size() == exp.size(), $sformatf("packet %0d: %0d bytes, expected %0d", p, got.size(), exp.size()));
      for (int i = 0; i < exp.size() && i < got.size(); i++)
        check(got[i] == exp[i], $sformatf("packet %0d byte %0d: %h, expected %h", p, i, got[i], exp[i]));
      check(last_index == exp.size() - 1, "out_last on the final byte");
      check(bits_q.size() == 0, "all payload bits taken");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

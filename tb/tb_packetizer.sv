// Self-checking test of packetizer with a model encoder and a model RTP
// transmitter. The encoder model emits macroblocks of random size (random
// gaps between bits, mb_end after each, frame_end with the last) and
// counts the cycles it is held off; the transmitter model takes bits with
// random stalls and is busy for a while after each packet. Checks: every
// packet is cut on a macroblock boundary after the first boundary past
// 2048 bits (or at the picture end), carries exactly those bits in order,
// has the marker only at the picture end and the picture's timestamp, and
// the encoder is paused while packets are sent.
module tb_packetizer;
  logic clk = 0, rst = 1;
  logic bit_in = 0, bit_valid = 0, bit_ready, mb_end = 0, frame_end = 0;
  logic [31:0] timestamp_in = 32'h1234_5678;
  logic tx_busy = 0, prepare_for_data, marker, data_out, data_valid, ready_for_data = 0;
  logic [13:0] payload_bits;
  logic [31:0] timestamp;
  logic [15:0] packets_sent;
  int checks = 0, failures = 0, paused = 0;

  packetizer dut (.*);
  always #5 clk = ~clk;

  task automatic check(bit c, string msg);
    checks++;
    if (!c) begin failures++; if (failures < 20) $display("FAIL %s", msg); end
  endtask

  logic stream [$];        // every bit the encoder sent
  int   mb_bounds [$];     // stream positions after each macroblock
  logic rx [$];            // bits the transmitter received
  int   pk_sizes [$];
  bit   pk_marks [$];
  int   tx_left = 0, tx_hold = 0;
  bit   take_bit = 0;
  logic take_val;

  // transmitter model
  always @(negedge clk) begin
    if (take_bit) begin rx.push_back(take_val); tx_left--; end
    if (prepare_for_data) begin
      pk_sizes.push_back(int'(payload_bits));
      pk_marks.push_back(marker);
      check(timestamp == 32'h1234_5678, "timestamp passed on");
      tx_left = int'(payload_bits);
      tx_busy = 1;
    end
    if (tx_busy && tx_left == 0) begin
      if (tx_hold == 20) begin tx_busy = 0; tx_hold = 0; end
      else tx_hold++;
    end
    ready_for_data = tx_busy && tx_left > 0 && ($urandom_range(0, 3) != 0);
    #1;
    take_bit = data_valid && ready_for_data;
    take_val = data_out;
  end

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int nmb = 40;
    repeat (3) @(negedge clk);
    rst = 0;
    for (int m = 0; m < nmb; m++) begin
      int n;
      n = $urandom_range(65, 900);
      for (int i = 0; i < n; i++) begin
        logic b;
        b = 1'($urandom);
        bit_in = b; bit_valid = 1;
        #1;
        while (!bit_ready) begin paused++; @(negedge clk); #1; end
        stream.push_back(b);
        @(negedge clk);
        bit_valid = 0;
        if ($urandom_range(0, 5) == 0) @(negedge clk);
      end
      mb_bounds.push_back(stream.size());
      mb_end = 1; frame_end = (m == nmb - 1);
      @(negedge clk);
      mb_end = 0; frame_end = 0;
      repeat (2) @(negedge clk);
    end
    repeat (3000) @(negedge clk);
    // expected cuts
    begin
      int exp_sizes [$];
      int start = 0, k = 0;
      foreach (mb_bounds[i]) begin
        if (mb_bounds[i] - start > 2048 || i == mb_bounds.size() - 1) begin
          exp_sizes.push_back(mb_bounds[i] - start);
          start = mb_bounds[i];
        end
      end
      check(pk_sizes.size() == exp_sizes.size(), $sformatf("%0d packets, expected %0d", pk_sizes.size(), exp_sizes.size()));
      for (int i = 0; i < exp_sizes.size() && i < pk_sizes.size(); i++) begin
        check(pk_sizes[i] == exp_sizes[i], $sformatf("packet %0d size %0d, expected %0d", i, pk_sizes[i], exp_sizes[i]));
        check(pk_marks[i] == (i == exp_sizes.size() - 1), $sformatf("packet %0d marker", i));
      end
      check(rx.size() == stream.size(), $sformatf("%0d bits sent, %0d received", stream.size(), rx.size()));
      for (int i = 0; i < stream.size() && i < rx.size(); i++)
        if (rx[i] != stream[i]) begin check(0, $sformatf("bit %0d differs", i)); break; end
      check(paused > 0, "encoder paused while sending");
      check(packets_sent == 16'(exp_sizes.size()), "packet counter");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

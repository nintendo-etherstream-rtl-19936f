// Worst-case video workload: the H.261 encoder and the packetizer, both at
// their default sizes, code a QCIF picture of random colour indices (every
// pixel independent), the picture that produces the most coefficient
// events. The transmitter is modelled at Ethernet speed: after each
// prepare_for_data it is busy for 320 cycles of header bytes, takes one
// payload bit per cycle (8 cycles per byte on the RMII side) and stays busy
// 304 cycles more for preamble, MAC header, FCS and gap.
// Checks: every packet fits the 12,000-bit packet buffer, every coded bit
// arrives in order in some packet, only the last packet is marked, one
// picture's coding and sending takes less than 1/30 s (3,333,333 cycles at
// 100 MHz), and the picture is indeed a heavy one (over 100,000 bits).
module tb_workload_noise;
  import etherstream_pkg::*;
  logic clk = 0, rst = 1, start = 0, busy;
  logic fb_rd_en;
  logic [14:0] fb_rd_addr;
  logic [PIX_W-1:0] fb_rd_data;
  logic enc_bit, enc_valid, enc_ready, mb_end, frame_end;
  logic [31:0] enc_ts;
  logic tx_busy = 0, prep, marker, pay_bit, pay_valid, pay_ready = 0;
  logic [13:0] pay_bits;
  logic [31:0] pk_ts;
  logic [15:0] packets_sent;
  int checks = 0, failures = 0, cyc = 0;

  h261_encoder enc (
    .clk, .rst, .start, .busy, .fb_rd_en, .fb_rd_addr, .fb_rd_data,
    .bit_out(enc_bit), .bit_valid(enc_valid), .bit_ready(enc_ready),
    .mb_end, .frame_end, .timestamp(enc_ts)
  );
  packetizer pk (
    .clk, .rst, .bit_in(enc_bit), .bit_valid(enc_valid), .bit_ready(enc_ready),
    .mb_end, .frame_end, .timestamp_in(enc_ts), .tx_busy,
    .prepare_for_data(prep), .payload_bits(pay_bits), .marker, .timestamp(pk_ts),
    .data_out(pay_bit), .data_valid(pay_valid), .ready_for_data(pay_ready), .packets_sent
  );
  always #5 clk = ~clk;

  task automatic check(bit c, string msg);
    checks++;
    if (!c) begin failures++; if (failures < 20) $display("FAIL %s", msg); end
  endtask

  logic [PIX_W-1:0] pic [SCREEN_W * SCREEN_H];
  always @(posedge clk) if (fb_rd_en) fb_rd_data <= pic[fb_rd_addr];

  logic coded [$];
  logic sent [$];
  int sizes [$];
  int marks = 0, last_marked = 0, max_size = 0;
  int phase = 0, wait_n = 0, left = 0;        // 0 idle, 1 header, 2 payload, 3 trailer
  bit take_enc = 0, take_pay = 0;
  logic v_enc, v_pay;
  always @(negedge clk) begin
    cyc++;
    if (take_enc) coded.push_back(v_enc);
    if (take_pay) begin sent.push_back(v_pay); left--; end
    if (prep) begin
      sizes.push_back(int'(pay_bits));
      if (int'(pay_bits) > max_size) max_size = int'(pay_bits);
      if (marker) marks++;
      last_marked = marker;
      tx_busy = 1; phase = 1; wait_n = 320; left = int'(pay_bits);
    end
    case (phase)
      1: begin wait_n--; if (wait_n == 0) phase = 2; end
      2: if (left == 0) begin phase = 3; wait_n = 304; end
      3: begin wait_n--; if (wait_n == 0) begin phase = 0; tx_busy = 0; end end
      default: ;
    endcase
    pay_ready = (phase == 2) && left > 0;
    #1;
    take_enc = enc_valid && enc_ready;
    v_enc = enc_bit;
    take_pay = pay_valid && pay_ready;
    v_pay = pay_bit;
  end

  initial begin
    repeat (5_000_000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int t0, n;
    for (int i = 0; i < SCREEN_W * SCREEN_H; i++) pic[i] = PIX_W'($urandom_range(0, 15));
    repeat (3) @(negedge clk);
    rst = 0;
    @(negedge clk);
    start = 1;
    @(negedge clk);
    start = 0;
    t0 = cyc;
    while (!(marks == 1 && phase == 0)) @(negedge clk);
    $display("noise picture: %0d bits in %0d packets (largest %0d bits), %0d cycles",
             coded.size(), sizes.size(), max_size, cyc - t0);
    check(cyc - t0 < 3_333_333, $sformatf("picture took %0d cycles", cyc - t0));
    check(max_size <= 12000, "every packet fits the packet buffer");
    check(coded.size() > 100_000, "a heavy picture");
    check(marks == 1 && last_marked == 1, "only the last packet is marked");
    n = 0;
    foreach (sizes[i]) n += sizes[i];
    check(n == coded.size() && sent.size() == coded.size(), "every coded bit is sent once");
    for (int i = 0; i < coded.size() && i < sent.size(); i++)
      if (coded[i] != sent[i]) begin check(0, $sformatf("bit %0d differs", i)); break; end
    check(int'(packets_sent) == sizes.size(), "packet counter");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

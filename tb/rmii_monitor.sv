// Testbench helper: receives and checks the Ethernet frames that the design
// sends on its RMII transmit pins.
//
// While txen is high it takes a dibit every second clock, least significant
// pair first, and assembles bytes. When txen falls the frame is checked:
// 7 preamble bytes and the start-of-frame delimiter, EtherType 0x0800, the
// frame check sequence (CRC-32 computed here bit by bit, reflected, sent
// least significant byte first), the IPv4 header (version/IHL 0x45, protocol
// UDP, total length), the UDP length, the RTP header (version 2, payload
// type 31), RTP sequence numbers that follow on from the previous frame, a
// common timestamp for all packets of one picture, and an H.261 picture
// start code at the start of the first packet of every picture. The gap
// between two frames is measured too. Each check adds to checks and, if it
// fails, to failures; the parent testbench reads the counters.
module rmii_monitor (
  input logic       clk,
  input logic [1:0] txd,
  input logic       txen
);
  int checks = 0, failures = 0;
  int frames = 0, markers = 0, payload_bytes = 0, min_gap = 1 << 30;
  logic [7:0] buf_q [$];
  logic [7:0] sh;
  int nd = 0, ph = 0, gap = 0;
  logic txen_q = 0;
  logic [15:0] last_seq;
  logic [31:0] last_ts;
  logic have_seq = 0, new_picture = 1;

  task automatic check(bit c, string msg);
    checks++;
    if (!c) begin failures++; if (failures < 20) $display("FAIL rmii: %s", msg); end
  endtask

  function automatic logic [31:0] crc_of(int first, int last);
    logic [31:0] c;
    c = '1;
    for (int i = first; i <= last; i++)
      for (int b = 0; b < 8; b++)
        c = ((c[0] ^ buf_q[i][b]) != 1'b0) ? ((c >> 1) ^ 32'hEDB8_8320) : (c >> 1);
    return ~c;
  endfunction

  task automatic check_frame();
    int n, ip, plen, pbytes;
    logic [31:0] fcs, crc;
    logic [15:0] seq;
    logic [31:0] ts;
    logic m;
    n = buf_q.size();
    frames++;
    check(n >= 8 + 64, $sformatf("frame of %0d bytes is too short", n));
    if (n < 8 + 64) return;
    for (int i = 0; i < 7; i++) check(buf_q[i] == 8'h55, "preamble");
    check(buf_q[7] == 8'hD5, "start of frame delimiter");
    check({buf_q[20], buf_q[21]} == 16'h0800, "EtherType");
    fcs = {buf_q[n-1], buf_q[n-2], buf_q[n-3], buf_q[n-4]};
    crc = crc_of(8, n - 5);
    check(fcs == crc, $sformatf("FCS %h, expected %h", fcs, crc));
    ip = 22;
    check(buf_q[ip] == 8'h45 && buf_q[ip+9] == 8'd17, "IPv4 version and protocol");
    plen = {buf_q[ip+2], buf_q[ip+3]};
    pbytes = plen - 40;
    check(pbytes > 0 && ip + plen + 4 <= n, $sformatf("IPv4 total length %0d in a %0d byte frame", plen, n));
    check({buf_q[ip+24], buf_q[ip+25]} == 16'(plen - 20), "UDP length");
    check(buf_q[ip+28] == 8'h80 && buf_q[ip+29][6:0] == 7'd31, "RTP version and payload type");
    m   = buf_q[ip+29][7];
    seq = {buf_q[ip+30], buf_q[ip+31]};
    ts  = {buf_q[ip+32], buf_q[ip+33], buf_q[ip+34], buf_q[ip+35]};
    if (have_seq) check(seq == last_seq + 16'd1, $sformatf("RTP sequence %0d after %0d", seq, last_seq));
    if (have_seq && !new_picture) check(ts == last_ts, "timestamp changes inside a picture");
    if (have_seq && new_picture) check(ts != last_ts, "timestamp repeats across pictures");
    if (new_picture && pbytes >= 3)
      check(buf_q[ip+40] == 8'h00 && buf_q[ip+41] == 8'h01 && buf_q[ip+42][7:4] == 4'h0,
            "picture start code at the start of the picture's first packet");
    have_seq = 1; last_seq = seq; last_ts = ts;
    new_picture = m;
    if (m) markers++;
    payload_bytes += pbytes;
  endtask

  always @(negedge clk) begin
    if (txen) begin
      if (!txen_q) begin
        if (frames > 0 && gap < min_gap) min_gap = gap;
        buf_q.delete(); nd = 0; ph = 0;
      end
      if (ph == 0) begin
        sh = {txd, sh[7:2]};
        nd++;
        if (nd == 4) begin buf_q.push_back(sh); nd = 0; end
      end
      ph = 1 - ph;
    end else begin
      if (txen_q) begin
        check(nd == 0, "frame ends inside a byte");
        check_frame();
        gap = 0;
      end
      gap++;
    end
    txen_q = txen;
  end
endmodule

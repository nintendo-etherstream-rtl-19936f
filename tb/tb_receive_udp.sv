// Self-checking test of receive_udp: packets of 20 IPv4 header bytes,
// 8 UDP header bytes and one command byte per player, with idle cycles
// between bytes. Checks the stored headers, every decoded direction (unused
// codes read as neutral), the one-cycle valid_out right after the last byte,
// and that outputs hold between packets.
module tb_receive_udp;
  import etherstream_pkg::*;
  logic clk = 0, rst = 1;
  logic [7:0] data_in = 0;
  logic valid_in = 0;
  dir_t move_dir [NUM_PLAYERS];
  dir_t shoot_dir [NUM_PLAYERS];
  logic valid_out;
  logic [159:0] ip_header;
  logic [63:0] udp_header;
  int checks = 0, failures = 0, valids = 0;

  receive_udp dut (.*);
  always #5 clk = ~clk;
  always @(posedge clk) if (valid_out) valids++;

  task automatic check(bit c, string msg);
    checks++;
    if (!c) begin failures++; $display("FAIL %s", msg); end
  endtask

  function automatic dir_t expect_dir(logic [2:0] c);
    return (c >= 3'd1 && c <= 3'd4) ? dir_t'(c) : DIR_NEUTRAL;
  endfunction

  task automatic send_byte(logic [7:0] b, bit gaps);
    data_in = b; valid_in = 1;
    @(negedge clk) valid_in = 0;
    if (gaps) repeat ($urandom_range(0, 2)) @(negedge clk);
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [159:0] ip;
    logic [63:0]  udp;
    logic [7:0]   pay [NUM_PLAYERS];
    repeat (2) @(negedge clk);
    rst = 0;
    @(negedge clk);
    for (int p = 0; p < 50; p++) begin
      int v0;
      ip  = {$urandom, $urandom, $urandom, $urandom, $urandom};
      udp = {$urandom, $urandom};
      for (int i = 0; i < NUM_PLAYERS; i++) pay[i] = {1'b0, 3'($urandom), 1'b0, 3'($urandom)};
      for (int i = 0; i < 20; i++) send_byte(ip[159 - 8*i -: 8], p[0]);
      for (int i = 0; i < 8; i++)  send_byte(udp[63 - 8*i -: 8], p[0]);
      v0 = valids;
      for (int i = 0; i < NUM_PLAYERS; i++) begin
        if (i == NUM_PLAYERS - 1) begin
          data_in = pay[i]; valid_in = 1;
          @(negedge clk) valid_in = 0;
          check(valid_out == 1'b1, "valid_out right after the last payload byte");
          @(negedge clk);
          check(valid_out == 1'b0, "valid_out lasts one cycle");
        end else send_byte(pay[i], p[0]);
      end
      check(valids == v0 + 1, "exactly one valid_out per packet");
      check(ip_header == ip, "IPv4 header stored");
      check(udp_header == udp, "UDP header stored");
      for (int i = 0; i < NUM_PLAYERS; i++) begin
        check(move_dir[i] == expect_dir(pay[i][6:4]), $sformatf("move of player %0d", i + 1));
        check(shoot_dir[i] == expect_dir(pay[i][2:0]), $sformatf("shoot of player %0d", i + 1));
      end
      repeat (3) @(negedge clk);
      check(move_dir[0] == expect_dir(pay[0][6:4]), "outputs held");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

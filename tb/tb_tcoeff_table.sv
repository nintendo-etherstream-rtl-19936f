// Self-checking test of tcoeff_table: codes of the H.261 TCOEFF table for
// listed pairs (with both signs), and the 20-bit escape form for pairs
// outside the list.
module tb_tcoeff_table;
  logic [5:0] run;
  logic signed [7:0] level;
  logic [19:0] code;
  logic [4:0] len;
  int checks = 0, failures = 0;

  tcoeff_table dut (.*);

  task automatic expect_code(int r, int l, logic [19:0] c, int n);
    run = 6'(r); level = 8'(l);
    #1;
    checks++;
    if (code != c || len != 5'(n)) begin
      failures++;
      $display("FAIL run %0d level %0d: %b/%0d, expected %b/%0d", r, l, code, len, c, n);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    expect_code(0, 1,  20'b110, 3);
    expect_code(0, -1, 20'b111, 3);
    expect_code(0, 2,  20'b01000, 5);
    expect_code(0, 3,  20'b001010, 6);
    expect_code(0, -4, 20'b00001101, 8);
    expect_code(1, 1,  20'b0110, 4);
    expect_code(1, -2, 20'b0001101, 7);
    expect_code(2, 1,  20'b01010, 5);
    expect_code(3, 1,  20'b001110, 6);
    expect_code(4, -1, 20'b001101, 6);
    expect_code(5, 1,  20'b0001110, 7);
    expect_code(13, 1, 20'b001000000, 9);
    // escapes: 000001 rrrrrr llllllll
    expect_code(20, 5,  {6'b000001, 6'd20, 8'd5}, 20);
    expect_code(0, -20, {6'b000001, 6'd0, 8'hEC}, 20);
    expect_code(63, 127, {6'b000001, 6'd63, 8'd127}, 20);
    expect_code(14, 1, {6'b000001, 6'd14, 8'd1}, 20);
    expect_code(0, 7,  {6'b000001, 6'd0, 8'd7}, 20);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// byte_transmitter: turns a byte stream into RMII transmit dibits.
//
// Each accepted byte is sent as four dibits on txd, least significant pair
// first, with txen high. A new dibit is presented every DIBIT_CYCLES system
// clocks (2 at a 100 MHz system clock for the 50 MHz RMII reference).
// in_ready is high in the last cycle of a byte (and when idle), so a byte
// offered then follows without a gap and txen stays high across a frame.
// Handshake: a byte moves when in_valid and in_ready are both high.
module byte_transmitter #(
  parameter int DIBIT_CYCLES = 2
) (
  input  logic       clk,
  input  logic       rst,
  input  logic [7:0] in_data,
  input  logic       in_valid,
  output logic       in_ready,
  output logic [1:0] txd,
  output logic       txen
);

  localparam int CW = (DIBIT_CYCLES > 1) ? $clog2(DIBIT_CYCLES) : 1;

  logic [7:0]    shift;
  logic [1:0]    dibit;      // index of the dibit being sent
  logic [CW-1:0] phase;      // system cycles into the current dibit
  logic          busy;

  wire last_cycle = busy && dibit == 2'd3 && phase == CW'(DIBIT_CYCLES - 1);
  assign in_ready = !busy || last_cycle;
  assign txd      = shift[1:0];
  assign txen     = busy;

  always_ff @(posedge clk) begin
    if (rst) begin
      busy  <= 1'b0;
      shift <= '0;
      dibit <= '0;
      phase <= '0;
    end else if (in_valid && in_ready) begin
      busy  <= 1'b1;
      shift <= in_data;
      dibit <= '0;
      phase <= '0;
    end else if (busy) begin
      if (phase == CW'(DIBIT_CYCLES - 1)) begin
        phase <= '0;
        shift <= shift >> 2;
        dibit <= dibit + 2'd1;
        if (dibit == 2'd3) busy <= 1'b0;
      end else begin
        phase <= phase + CW'(1);
      end
    end
  end

endmodule

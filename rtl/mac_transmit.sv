// mac_transmit: the Ethernet MAC transmitter.
//
// A state machine walks through the frame byte by byte: 7 preamble bytes
// (0x55), the start-of-frame delimiter (0xD5), destination and source MAC
// address and EtherType (0x0800, IPv4), then the packet bytes taken from
// the upstream in_* handshake until in_last, zero padding up to the 46-byte
// minimum payload, the 4-byte frame check sequence from crc32_eth (least
// significant byte first) and an inter-frame gap of IFG_CYCLES clocks.
// Bytes leave on the tx_* handshake towards byte_transmitter; tx_valid stays
// high from preamble to FCS. A frame starts when in_valid is seen in IDLE.
// Addresses are parameters whose values are this design's choice.
module mac_transmit #(
  parameter logic [47:0] DST_MAC    = 48'hFF_FF_FF_FF_FF_FF,
  parameter logic [47:0] SRC_MAC    = 48'h02_00_00_00_00_01,
  parameter int          IFG_CYCLES = 96
) (
  input  logic       clk,
  input  logic       rst,
  input  logic [7:0] in_data,
  input  logic       in_valid,
  input  logic       in_last,
  output logic       in_ready,
  output logic [7:0] tx_data,
  output logic       tx_valid,
  input  logic       tx_ready,
  output logic       busy
);

  typedef enum logic [2:0] {IDLE, PREAMBLE, SFD, HEADER, DATA, PAD, FCS, GAP} mac_state_t;
  mac_state_t state;

  localparam logic [111:0] HDR = {DST_MAC, SRC_MAC, 16'h0800};

  logic [7:0]  count;      // byte index inside the current field / gap cycles
  logic [10:0] data_len;   // bytes of payload sent so far
  logic [31:0] fcs;
  logic        crc_init, crc_en;

  crc32_eth u_crc (
    .clk, .init(crc_init), .data_in(tx_data), .data_valid(crc_en), .crc(), .fcs
  );

  always_comb begin
    tx_valid = 1'b0;
    tx_data  = 8'h00;
    in_ready = 1'b0;
    case (state)
      PREAMBLE: begin tx_valid = 1'b1; tx_data = 8'h55; end
      SFD:      begin tx_valid = 1'b1; tx_data = 8'hD5; end
      HEADER:   begin tx_valid = 1'b1; tx_data = HDR[111 - 8*count[3:0] -: 8]; end
      DATA:     begin tx_valid = in_valid; tx_data = in_data; in_ready = tx_ready; end
      PAD:      begin tx_valid = 1'b1; tx_data = 8'h00; end
      FCS:      begin tx_valid = 1'b1; tx_data = fcs[8*count[1:0] +: 8]; end
      default: ;
    endcase
  end

  wire take = tx_valid && tx_ready;
  assign crc_init = (state == IDLE);
  assign crc_en   = take && (state == HEADER || state == DATA || state == PAD);
  assign busy     = (state != IDLE);

  always_ff @(posedge clk) begin
    if (rst) begin
      state    <= IDLE;
      count    <= '0;
      data_len <= '0;
    end else begin
      case (state)
        IDLE: if (in_valid) begin
          state <= PREAMBLE;
          count <= '0;
        end
        PREAMBLE: if (take) begin
          if (count == 8'd6) begin count <= '0; state <= SFD; end
          else count <= count + 8'd1;
        end
        SFD: if (take) begin
          state <= HEADER;
          count <= '0;
        end
        HEADER: if (take) begin
          if (count == 8'd13) begin count <= '0; data_len <= '0; state <= DATA; end
          else count <= count + 8'd1;
        end
        DATA: if (take) begin
          data_len <= data_len + 11'd1;
          if (in_last) state <= (data_len + 11'd1 < 11'd46) ? PAD : FCS;
          count <= '0;
        end
        PAD: if (take) begin
          data_len <= data_len + 11'd1;
          if (data_len + 11'd1 == 11'd46) state <= FCS;
        end
        FCS: if (take) begin
          if (count == 8'd3) begin count <= '0; state <= GAP; end
          else count <= count + 8'd1;
        end
        default: begin // GAP
          if (count == 8'(IFG_CYCLES - 1)) state <= IDLE;
          else count <= count + 8'd1;
        end
      endcase
    end
  end

endmodule

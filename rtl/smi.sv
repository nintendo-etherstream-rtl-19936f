// Serial Management Interface (MDIO/MDC) master for the Ethernet PHY.
//
// It runs IEEE 802.3 clause 22 management frames: 32 preamble ones, start
// 01, opcode (10 read, 01 write), 5-bit PHY and register addresses,
// turnaround and 16 data bits. MDC is the system clock divided by
// 2*MDC_HALF (2.5 MHz from 100 MHz); MDIO is driven after the falling edge
// of MDC and read data is sampled at the rising edge. A request on req/we
// starts one transaction; done pulses at its end with rdata for a read.
// When no request is waiting, the master reads the PHY's basic status
// register (register 1) every POLL_CYCLES clocks and keeps bit 5,
// auto-negotiation complete, on autoneg_done for a board LED. The MDIO pad
// is split into mdio_o / mdio_oe / mdio_i; the tri-state buffer is outside.
module smi #(
  parameter int          MDC_HALF    = 20,
  parameter int          POLL_CYCLES = 100_000,
  parameter logic [4:0]  PHY_ADDR    = 5'd1
) (
  input  logic        clk,
  input  logic        rst,
  input  logic        req,
  input  logic        we,
  input  logic [4:0]  regad,
  input  logic [15:0] wdata,
  output logic        busy,
  output logic        done,
  output logic [15:0] rdata,
  output logic        autoneg_done,
  output logic        mdc,
  output logic        mdio_o,
  output logic        mdio_oe,
  input  logic        mdio_i
);

  localparam int FRAME_BITS = 64;            // 32 preamble + 32 frame bits

  logic [FRAME_BITS-1:0] frame;              // bits still to drive, MSB first
  logic [6:0]  bit_idx;                      // bit of the frame being sent
  logic [$clog2(MDC_HALF)-1:0] div;
  logic        is_read, polling;
  logic [31:0] poll_cnt;
  logic [15:0] shift_in;

  always_ff @(posedge clk) begin
    done <= 1'b0;
    if (rst) begin
      busy         <= 1'b0;
      mdc          <= 1'b0;
      mdio_o       <= 1'b1;
      mdio_oe      <= 1'b0;
      div          <= '0;
      bit_idx      <= '0;
      frame        <= '0;
      is_read      <= 1'b0;
      polling      <= 1'b0;
      poll_cnt     <= '0;
      rdata        <= '0;
      shift_in     <= '0;
      autoneg_done <= 1'b0;
    end else if (!busy) begin
      mdc      <= 1'b0;
      mdio_oe  <= 1'b0;
      poll_cnt <= (poll_cnt == 32'(POLL_CYCLES - 1)) ? '0 : poll_cnt + 32'd1;
      if (req || poll_cnt == 32'(POLL_CYCLES - 1)) begin
        busy    <= 1'b1;
        polling <= !req;
        is_read <= req ? !we : 1'b1;
        frame   <= {32'hFFFF_FFFF, 2'b01,
                    (req && we) ? 2'b01 : 2'b10,
                    PHY_ADDR, req ? regad : 5'd1,
                    2'b10, (req && we) ? wdata : 16'h0000};
        bit_idx <= '0;
        div     <= '0;
        mdio_oe <= 1'b1;
        mdio_o  <= 1'b1;
      end
    end else begin
      if (div == $bits(div)'(MDC_HALF - 1)) begin
        div <= '0;
        mdc <= !mdc;
        if (!mdc) begin
          // rising edge of MDC: sample read data (bits 48..63 of the frame)
          if (is_read && bit_idx >= 7'd48) shift_in <= {shift_in[14:0], mdio_i};
        end else begin
          // falling edge: move to the next bit
          if (bit_idx == 7'(FRAME_BITS - 1)) begin
            busy    <= 1'b0;
            mdio_oe <= 1'b0;
            if (is_read) begin
              if (polling) autoneg_done <= shift_in[5];
              else begin
                rdata <= shift_in;
                done  <= 1'b1;
              end
            end else begin
              done <= 1'b1;
            end
          end else begin
            bit_idx <= bit_idx + 7'd1;
            frame   <= frame << 1;
            mdio_o  <= frame[FRAME_BITS-2];
            // a read releases the line from the turnaround onwards
            mdio_oe <= !(is_read && bit_idx + 7'd1 >= 7'd46);
          end
        end
      end else begin
        div <= div + 1'b1;
      end
    end
  end

endmodule

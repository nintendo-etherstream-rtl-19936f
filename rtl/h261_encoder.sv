// H.261 intra-frame video encoder for one QCIF picture held in the
// framebuffer, producing the coded bitstream one bit per cycle.
//
// The state machine follows the H.261 layers. SAMPLE takes the RTP
// timestamp from a 90 kHz counter (the 100 MHz clock divided by TS_DIV =
// 1111). PICTURE_HEADER sends the 32-bit picture header (PSC, temporal
// reference, PTYPE with QCIF selected, PEI = 0). For each of the three QCIF
// groups of blocks (GN 1, 3, 5) GOB_HEADER sends the 26-bit GOB header
// (GBSC, GN, GQUANT = QUANT, GEI = 0). Each of the 33 macroblocks of a GOB
// is then loaded from the framebuffer (MB_LOAD: four 8x8 luma blocks and the
// Cb and Cr blocks, chroma taken from the top-left pixel of every 2x2 area),
// transformed by six dct8x8 units working in parallel (MB_DCT, 4097
// cycles), and coded: MACROBLOCK_HEADER sends MBA = 1 and MTYPE = intra,
// BLOCK_DATA sends for each block the 8-bit intra DC value, the AC
// coefficients in zig-zag order as run/level events through tcoeff_table,
// and the end-of-block code. mb_end pulses once a macroblock's last bit has
// left; frame_end comes with the last one.
// Output handshake: bit_out moves when bit_valid && bit_ready. While
// bit_ready is low the code being sent is held and the state machine stops
// at its next code; loading and transforming the next macroblock go on
// meanwhile (they emit nothing), so a short pause costs no time.
// Framebuffer reads have one cycle of latency. All macroblocks are coded intra with the fixed quantiser QUANT
// (level = coefficient / (2*QUANT), truncated, limited to +-127): mode
// decision, motion search and rate control are not part of this design.
module h261_encoder
  import etherstream_pkg::*;
#(
  parameter int QUANT  = 8,
  parameter int TS_DIV = 1111
) (
  input  logic        clk,
  input  logic        rst,
  input  logic        start,
  output logic        busy,
  output logic        fb_rd_en,
  output logic [14:0] fb_rd_addr,
  input  logic [PIX_W-1:0] fb_rd_data,
  output logic        bit_out,
  output logic        bit_valid,
  input  logic        bit_ready,
  output logic        mb_end,
  output logic        frame_end,
  output logic [31:0] timestamp
);

  localparam int MB_COLS = SCREEN_W / 16;   // 11
  localparam int MB_ROWS_PER_GOB = 3;
  localparam int MBS_PER_GOB = MB_COLS * MB_ROWS_PER_GOB;   // 33
  localparam int NUM_GOBS = SCREEN_H / 48;                  // 3

  typedef enum logic [3:0] {
    IDLE, SAMPLE, PICTURE_HEADER, GOB_HEADER, MB_LOAD, MB_DCT,
    MACROBLOCK_HEADER, BLOCK_DC, BLOCK_AC, BLOCK_EOB, MB_DONE
  } enc_state_t;
  enc_state_t state;

  // ---- 90 kHz timestamp clock ------------------------------------------
  logic [$clog2(TS_DIV)-1:0] ts_div;
  logic [31:0]               ts_count;
  always_ff @(posedge clk) begin
    if (rst) begin
      ts_div   <= '0;
      ts_count <= '0;
    end else if (ts_div == $bits(ts_div)'(TS_DIV - 1)) begin
      ts_div   <= '0;
      ts_count <= ts_count + 32'd1;
    end else begin
      ts_div <= ts_div + 1'b1;
    end
  end

  // ---- bit emitter: one pending code, sent MSB first -------------------
  logic [31:0] em_code;
  logic [5:0]  em_len;
  logic        push;
  logic [31:0] push_code;
  logic [5:0]  push_len;
  wire em_empty = (em_len == 6'd0);
  assign bit_valid = !em_empty;
  assign bit_out   = em_code[5'(em_len - 6'd1)];
  always_ff @(posedge clk) begin
    if (rst) begin
      em_len  <= '0;
      em_code <= '0;
    end else if (push) begin
      em_code <= push_code;
      em_len  <= push_len;
    end else if (bit_valid && bit_ready) begin
      em_len <= em_len - 6'd1;
    end
  end

  // ---- zig-zag order ---------------------------------------------------
  typedef logic [5:0] zz_table_t [64];
  function automatic zz_table_t make_zigzag();
    zz_table_t t;
    int idx = 0;
    for (int s = 0; s < 15; s++) begin
      for (int i = 0; i < 8; i++) begin
        int r = (s % 2 == 0) ? s - i : i;   // even diagonals run upwards
        int c = s - r;
        if (r >= 0 && r < 8 && c >= 0 && c < 8) begin
          t[idx] = 6'(r * 8 + c);
          idx++;
        end
      end
    end
    return t;
  endfunction
  localparam zz_table_t ZIGZAG = make_zigzag();

  // ---- six transform units ---------------------------------------------
  logic        dct_we;
  logic [5:0]  dct_waddr;
  logic [7:0]  dct_wdata;
  logic [2:0]  dct_wsel;
  logic        dct_start;
  logic [5:0]  dct_done;
  logic [5:0]  dct_raddr;
  logic signed [11:0] dct_rdata [6];

  for (genvar b = 0; b < 6; b++) begin : g_dct
    dct8x8 u_dct (
      .clk, .rst,
      .load_we(dct_we && dct_wsel == 3'(b)), .load_addr(dct_waddr), .load_data(dct_wdata),
      .start(dct_start), .busy(), .done(dct_done[b]),
      .rd_addr(dct_raddr), .rd_data(dct_rdata[b])
    );
  end

  // ---- position counters -------------------------------------------------
  logic [4:0] tr;              // temporal reference
  logic [1:0] gob;             // 0..2 -> GN 1, 3, 5
  logic [5:0] mb;              // macroblock inside the GOB
  logic [8:0] ld;              // load counter 0..383
  logic       ld_valid;        // a framebuffer read is in flight
  logic [8:0] ld_q;
  logic [2:0] blk;             // block being coded
  logic [5:0] kz;              // zig-zag position 1..63
  logic [5:0] run;

  // Pixel address of load step 'l' in the current macroblock.
  logic [3:0] mb_x;
  logic [3:0] mb_y;
  always_comb begin
    mb_x = 4'(32'(mb) % MB_COLS);
    mb_y = 4'(32'(gob) * MB_ROWS_PER_GOB + 32'(mb) / MB_COLS);
  end

  logic [8:0] px, py;
  always_comb begin
    if (ld[8:6] < 3'd4) begin
      px = 9'(mb_x) * 9'd16 + 9'(ld[6]) * 9'd8 + 9'(ld[2:0]);
      py = 9'(mb_y) * 9'd16 + 9'(ld[7]) * 9'd8 + 9'(ld[5:3]);
    end else begin
      px = 9'(mb_x) * 9'd16 + 9'(ld[2:0]) * 9'd2;
      py = 9'(mb_y) * 9'd16 + 9'(ld[5:3]) * 9'd2;
    end
  end
  assign fb_rd_addr = 15'(py * 9'(SCREEN_W)) + 15'(px);
  assign fb_rd_en   = (state == MB_LOAD) && (ld < 9'd384);

  ycbcr_t pal;
  always_comb pal = palette(fb_rd_data);
  assign dct_we    = ld_valid;
  assign dct_wsel  = ld_q[8:6];
  assign dct_waddr = ld_q[5:0];
  assign dct_wdata = (ld_q[8:6] < 3'd4) ? pal.y : (ld_q[8:6] == 3'd4) ? pal.cb : pal.cr;

  // ---- coefficient coding ------------------------------------------------
  logic signed [11:0] coef;
  logic signed [7:0]  level;
  logic [7:0]         dc_code;
  logic [19:0]        tc_code;
  logic [4:0]         tc_len;
  assign dct_raddr = (state == BLOCK_DC) ? 6'd0 : ZIGZAG[kz];
  assign coef      = dct_rdata[blk];

  logic [11:0]        mag, q;
  logic signed [12:0] dc_round;
  always_comb begin
    mag   = coef[11] ? 12'(-coef) : coef;
    q     = mag / 12'(2 * QUANT);
    if (q > 12'd127) q = 12'd127;
    level = coef[11] ? -8'(q) : 8'(q);
  end

  always_comb begin
    dc_round = (13'(coef) + 13'sd4) >>> 3;
    if (dc_round < 13'sd1)        dc_code = 8'd1;
    else if (dc_round > 13'sd254) dc_code = 8'd254;
    else                          dc_code = 8'(dc_round);
    if (dc_code == 8'd128) dc_code = 8'd255;     // 128 is coded as 1111 1111
  end

  tcoeff_table u_tcoeff (.run, .level, .code(tc_code), .len(tc_len));

  // ---- main state machine ------------------------------------------------
  always_comb begin
    push      = 1'b0;
    push_code = '0;
    push_len  = '0;
    if (em_empty) begin
      case (state)
        PICTURE_HEADER: begin
          push = 1'b1;
          push_code = {20'b0000_0000_0000_0001_0000, tr, 6'b000011, 1'b0};
          push_len  = 6'd32;
        end
        GOB_HEADER: begin
          push = 1'b1;
          push_code = 32'({16'h0001, 4'({gob, 1'b1}), 5'(QUANT), 1'b0});
          push_len  = 6'd26;
        end
        MACROBLOCK_HEADER: begin
          push = 1'b1;
          push_code = 32'b1_0001;       // MBA increment 1, MTYPE intra
          push_len  = 6'd5;
        end
        BLOCK_DC: begin
          push = 1'b1;
          push_code = 32'(dc_code);
          push_len  = 6'd8;
        end
        BLOCK_AC: if (level != 8'sd0) begin
          push = 1'b1;
          push_code = 32'(tc_code);
          push_len  = 6'(tc_len);
        end
        BLOCK_EOB: begin
          push = 1'b1;
          push_code = 32'b10;
          push_len  = 6'd2;
        end
        default: ;
      endcase
    end
  end

  assign busy = (state != IDLE);

  always_ff @(posedge clk) begin
    mb_end    <= 1'b0;
    frame_end <= 1'b0;
    dct_start <= 1'b0;
    if (rst) begin
      state     <= IDLE;
      tr        <= '0;
      gob       <= '0;
      mb        <= '0;
      ld        <= '0;
      ld_valid  <= 1'b0;
      ld_q      <= '0;
      blk       <= '0;
      kz        <= '0;
      run       <= '0;
      timestamp <= '0;
    end else begin
      ld_valid <= fb_rd_en;
      ld_q     <= ld;
      case (state)
        IDLE: if (start) state <= SAMPLE;
        SAMPLE: begin
          timestamp <= ts_count;
          gob   <= '0;
          mb    <= '0;
          state <= PICTURE_HEADER;
        end
        PICTURE_HEADER: if (em_empty) state <= GOB_HEADER;
        GOB_HEADER: if (em_empty) begin
          ld    <= '0;
          state <= MB_LOAD;
        end
        MB_LOAD: begin
          if (ld < 9'd384) ld <= ld + 9'd1;
          else if (!ld_valid) begin
            dct_start <= 1'b1;
            state     <= MB_DCT;
          end
        end
        MB_DCT: if (&dct_done) state <= MACROBLOCK_HEADER;
        MACROBLOCK_HEADER: if (em_empty) begin
          blk   <= '0;
          state <= BLOCK_DC;
        end
        BLOCK_DC: if (em_empty) begin
          kz    <= 6'd1;
          run   <= '0;
          state <= BLOCK_AC;
        end
        BLOCK_AC: if (level == 8'sd0 || em_empty) begin
          run <= (level == 8'sd0) ? run + 6'd1 : '0;
          kz  <= kz + 6'd1;
          if (kz == 6'd63) state <= BLOCK_EOB;
        end
        BLOCK_EOB: if (em_empty) begin
          if (blk == 3'd5) state <= MB_DONE;
          else begin
            blk   <= blk + 3'd1;
            state <= BLOCK_DC;
          end
        end
        default: begin // MB_DONE: wait for the last bit to leave
          if (em_empty) begin
            mb_end <= 1'b1;
            ld     <= '0;
            if (mb == 6'(MBS_PER_GOB - 1)) begin
              mb <= '0;
              if (gob == 2'(NUM_GOBS - 1)) begin
                frame_end <= 1'b1;
                tr        <= tr + 5'd1;
                state     <= IDLE;
              end else begin
                gob   <= gob + 2'd1;
                state <= GOB_HEADER;
              end
            end else begin
              mb    <= mb + 6'd1;
              state <= MB_LOAD;
            end
          end
        end
      endcase
    end
  end

endmodule

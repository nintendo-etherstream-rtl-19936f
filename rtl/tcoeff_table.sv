// TcoeffTable: the H.261 variable-length code for one transform
// coefficient event (run of zeros, then a non-zero level).
//
// The short codes of the H.261 TCOEFF table are listed for the common
// (run, |level|) pairs, followed by a sign bit (0 positive, 1 negative).
// The run-0/level-1 entry is the "not first coefficient" form '11s', as
// used after the fixed-length DC term of an intra block. Every other pair
// uses the 20-bit escape: 000001, 6-bit run, 8-bit two's-complement level.
// Purely combinational; code is right-aligned, len its length in bits.
// Which table entries are listed (the rest go by escape, which is always
// valid) is this design's choice. The five top bits of code are always
// zero (short codes with sign are at most 15 bits and the escape begins
// 000001), so synthesis sees them as constant outputs; the field is kept
// 20 bits wide so that every code has the same right-aligned format.
module tcoeff_table (
  input  logic [5:0]        run,
  input  logic signed [7:0] level,
  output logic [19:0]       code,
  output logic [4:0]        len
);

  logic [6:0] mag;
  logic [9:0] base;        // code without the sign bit, right-aligned
  logic [3:0] blen;        // its length, 0 when the pair needs an escape

  always_comb begin
    mag  = level[7] ? 7'(-level) : level[6:0];
    base = '0;
    blen = 4'd0;
    case ({run, mag})
      {6'd0, 7'd1}:  begin base = 10'b11;        blen = 4'd2; end
      {6'd0, 7'd2}:  begin base = 10'b0100;      blen = 4'd4; end
      {6'd0, 7'd3}:  begin base = 10'b00101;     blen = 4'd5; end
      {6'd0, 7'd4}:  begin base = 10'b0000110;   blen = 4'd7; end
      {6'd0, 7'd5}:  begin base = 10'b00100110;  blen = 4'd8; end
      {6'd0, 7'd6}:  begin base = 10'b00100001;  blen = 4'd8; end
      {6'd1, 7'd1}:  begin base = 10'b011;       blen = 4'd3; end
      {6'd1, 7'd2}:  begin base = 10'b000110;    blen = 4'd6; end
      {6'd1, 7'd3}:  begin base = 10'b00100101;  blen = 4'd8; end
      {6'd2, 7'd1}:  begin base = 10'b0101;      blen = 4'd4; end
      {6'd2, 7'd2}:  begin base = 10'b0000100;   blen = 4'd7; end
      {6'd3, 7'd1}:  begin base = 10'b00111;     blen = 4'd5; end
      {6'd3, 7'd2}:  begin base = 10'b00100100;  blen = 4'd8; end
      {6'd4, 7'd1}:  begin base = 10'b00110;     blen = 4'd5; end
      {6'd5, 7'd1}:  begin base = 10'b000111;    blen = 4'd6; end
      {6'd6, 7'd1}:  begin base = 10'b000101;    blen = 4'd6; end
      {6'd7, 7'd1}:  begin base = 10'b000100;    blen = 4'd6; end
      {6'd8, 7'd1}:  begin base = 10'b0000111;   blen = 4'd7; end
      {6'd9, 7'd1}:  begin base = 10'b0000101;   blen = 4'd7; end
      {6'd10, 7'd1}: begin base = 10'b00100111;  blen = 4'd8; end
      {6'd11, 7'd1}: begin base = 10'b00100011;  blen = 4'd8; end
      {6'd12, 7'd1}: begin base = 10'b00100010;  blen = 4'd8; end
      {6'd13, 7'd1}: begin base = 10'b00100000;  blen = 4'd8; end
      default: ;
    endcase
    if (blen != 4'd0) begin
      code = 20'({base, level[7]});
      len  = 5'(blen) + 5'd1;
    end else begin
      code = {6'b000001, run, level};
      len  = 5'd20;
    end
  end

endmodule

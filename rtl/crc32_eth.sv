// crcbzip2: the Ethernet frame check sequence, one byte per cycle.
//
// The CRC-32 of IEEE 802.3 (polynomial 0x04C11DB7, processed least
// significant bit first, i.e. the reflected form 0xEDB88320) is updated a
// byte at a time from a 256-entry table: crc' = (crc >> 8) ^ T[(crc ^ b) & 0xFF].
// The table is computed at elaboration from the polynomial rather than
// stored. 'init' presets the register to all ones; fcs is the complement of
// the register, to be sent least significant byte first. The register
// updates on the cycle data_valid is high.
module crc32_eth (
  input  logic        clk,
  input  logic        init,
  input  logic [7:0]  data_in,
  input  logic        data_valid,
  output logic [31:0] crc,
  output logic [31:0] fcs
);

  typedef logic [31:0] crc_table_t [256];

  function automatic crc_table_t make_table();
    crc_table_t t;
    for (int i = 0; i < 256; i++) begin
      logic [31:0] c = 32'(i);
      for (int k = 0; k < 8; k++)
        c = c[0] ? ((c >> 1) ^ 32'hEDB88320) : (c >> 1);
      t[i] = c;
    end
    return t;
  endfunction

  localparam crc_table_t TABLE = make_table();

  always_ff @(posedge clk) begin
    if (init)            crc <= 32'hFFFF_FFFF;
    else if (data_valid) crc <= (crc >> 8) ^ TABLE[crc[7:0] ^ data_in];
  end

  assign fcs = ~crc;

endmodule

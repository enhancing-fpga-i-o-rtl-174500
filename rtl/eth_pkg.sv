// eth_pkg: constants and types shared by the EthController blocks.
//
// The frame layout follows the proprietary PC<->FPGA protocol: after the
// 7-byte preamble and the start-of-frame delimiter, the data field holds a
// 4-byte packet type, a 2-byte packet number, a 2-byte payload length and the
// payload, then the 4-byte FCS. The numeric type codes, the byte order of the
// multi-byte fields (most significant byte first) and the encoding of the
// entries that travel through the synchronization FIFO are this design's own
// choices; the original paper gives only the field sizes.
package eth_pkg;

  localparam logic [7:0]  PRE_BYTE     = 8'h55;   // preamble byte
  localparam logic [7:0]  SFD_BYTE     = 8'hD5;   // start-of-frame delimiter
  localparam int unsigned PRE_BYTES    = 7;       // preamble length in bytes
  localparam int unsigned HDR_BYTES    = 8;       // type(4) + number(2) + length(2)
  localparam int unsigned MIN_DATA     = 60;      // data field bytes so that data + FCS >= 64
  localparam int unsigned FCS_BYTES    = 4;

  // Packet type codes (ASCII "DATA" and "ACK ").
  localparam logic [31:0] TYPE_DATA    = 32'h4441_5441;
  localparam logic [31:0] TYPE_ACK     = 32'h4143_4B20;

  // CRC-32 (IEEE 802.3), reflected form.
  localparam logic [31:0] CRC_POLY_REF = 32'hEDB8_8320;
  localparam logic [31:0] CRC_INIT     = 32'hFFFF_FFFF;
  // Register value after a frame and its own (complemented) FCS have passed.
  localparam logic [31:0] CRC_RESIDUE  = 32'hDEBB_20E3;

  // Work items sent from the receive clock domain to the transmit domain.
  typedef enum logic [7:0] {
    ENT_NONE     = 8'h00,
    ENT_SEND_ACK = 8'h01,   // a PC data packet was received intact: acknowledge it
    ENT_PEER_ACK = 8'h02    // the PC acknowledged one of our data packets
  } ent_kind_e;

  typedef struct packed {
    ent_kind_e   kind;
    logic [7:0]  rsvd;
    logic [15:0] pkt_nr;
  } fifo_entry_t;            // 32 bits, the width of the FIFO data buses

  // One byte step of the reflected CRC-32.
  function automatic logic [31:0] crc32_step(input logic [31:0] crc, input logic [7:0] d);
    logic [31:0] c;
    c = crc ^ {24'h0, d};
    for (int i = 0; i < 8; i++) begin
      c = c[0] ? ((c >> 1) ^ CRC_POLY_REF) : (c >> 1);
    end
    return c;
  endfunction

endpackage

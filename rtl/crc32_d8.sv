// crc32_d8: IEEE 802.3 CRC-32 generator/checker taking one byte per enable.
//
// The register starts at all ones (init_i, or reset) and folds in data_i on
// every cycle with en_i high, least significant bit first, as Ethernet sends
// it. Outputs are taken from the register, so they reflect every byte
// enabled up to the previous clock edge:
//   crc_o   - the raw register,
//   fcs_o   - the frame check sequence to transmit (the complemented register;
//             byte fcs_o[7:0] goes on the wire first),
//   check_o - the register minus the 802.3 residue. When a complete frame,
//             its FCS included, has been fed in, check_o is zero exactly when
//             the frame is intact, so a receiver tests check_o == 0.
// The original paper names this module and uses it in both the receive and the
// transmit path; the byte-serial loop form and the check_o output are this
// design's choices.
module crc32_d8
  import eth_pkg::*;
(
  input  logic        clk,
  input  logic        rst,      // synchronous, active high
  input  logic        init_i,   // restart at all ones
  input  logic        en_i,     // fold data_i into the CRC this cycle
  input  logic [7:0]  data_i,
  output logic [31:0] crc_o,
  output logic [31:0] fcs_o,
  output logic [31:0] check_o
);

  logic [31:0] crc_q;

  always_ff @(posedge clk) begin
    if (rst || init_i) crc_q <= CRC_INIT;
    else if (en_i)     crc_q <= crc32_step(crc_q, data_i);
  end

  assign crc_o   = crc_q;
  assign fcs_o   = ~crc_q;
  assign check_o = crc_q ^ CRC_RESIDUE;

endmodule

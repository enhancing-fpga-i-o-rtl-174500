// eth_controller: the EthController IP core, a light-weight link between a PC
// and the FPGA over 100 Mbit/s Ethernet that speaks a small proprietary
// protocol directly on the data-link layer, with no IP stack.
//
// Structure (the three blocks and their connections follow the original paper):
//   eth_receive  - rx clock domain: parses frames from the PHY, hands the
//                  16-bit payload words of PC data packets to user logic and
//                  writes acknowledgement work items into
//   send_fifo    - the dual-clock synchronization FIFO (32-bit items), read by
//   eth_send     - tx clock domain: sends an ACK frame for every PC packet
//                  received intact, sends user data in DATA frames, and
//                  resends a DATA frame when its ACK does not come within 1 ms.
// Each clock domain gets its own copy of the reset through rst_sync.
//
// Ports: the MII-side signals are those of the PHY connection (reset, rx
// clock/valid/nibble, tx clock/enable/nibble, collision). ack_en_i is the
// board switch that turns outgoing ACK frames off for fault testing. The
// rx_usr_* outputs (rx clock domain) and tx_usr_* stream inputs (tx clock
// domain) are the user-logic side; their handshake, and the status outputs,
// are this design's choices.
module eth_controller #(
  parameter int unsigned PRE_MIN_NIBBLES  = 15,
  parameter int unsigned FIFO_AW          = 4,
  parameter int unsigned IFG_CLKS         = 24,
  parameter int unsigned ACK_TIMEOUT_CLKS = 25000,
  parameter int unsigned PAY_AW           = 9
) (
  input  logic        reset_i,

  // PHY receive (MII)
  input  logic        rx_clk_i,
  input  logic        rx_valid_i,
  input  logic [3:0]  rx_data_i,

  // PHY transmit (MII)
  input  logic        tx_clk_i,
  output logic        tx_en_o,
  output logic [3:0]  tx_data_o,
  input  logic        col_i,

  input  logic        ack_en_i,

  // received user data (rx_clk_i domain)
  output logic [15:0] rx_usr_data_o,
  output logic        rx_usr_valid_o,
  output logic        rx_pkt_end_o,
  output logic        rx_pkt_ok_o,
  output logic [15:0] rx_pkt_nr_o,
  output logic        rx_fifo_ovf_o,

  // user data to send (tx_clk_i domain)
  input  logic [15:0] tx_usr_data_i,
  input  logic        tx_usr_valid_i,
  input  logic        tx_usr_last_i,
  output logic        tx_usr_ready_o,
  output logic        tx_wait_ack_o,
  output logic [15:0] tx_seq_o,
  output logic        tx_resend_o
);

  import eth_pkg::*;

  logic rx_rst, tx_rst;

  rst_sync u_rx_rst (.clk(rx_clk_i), .rst_i(reset_i), .rst_o(rx_rst));
  rst_sync u_tx_rst (.clk(tx_clk_i), .rst_i(reset_i), .rst_o(tx_rst));

  logic        wr_req, full, rd_req, empty;
  fifo_entry_t wr_data, rd_data;

  eth_receive #(.PRE_MIN_NIBBLES(PRE_MIN_NIBBLES)) u_rx (
    .clk            (rx_clk_i),
    .rst            (rx_rst),
    .rx_valid_i     (rx_valid_i),
    .rx_data_i      (rx_data_i),
    .usr_data_o     (rx_usr_data_o),
    .usr_valid_o    (rx_usr_valid_o),
    .pkt_end_o      (rx_pkt_end_o),
    .pkt_ok_o       (rx_pkt_ok_o),
    .pkt_nr_o       (rx_pkt_nr_o),
    .fifo_wr_req_o  (wr_req),
    .fifo_wr_data_o (wr_data),
    .fifo_full_i    (full),
    .fifo_ovf_o     (rx_fifo_ovf_o)
  );

  send_fifo #(.WIDTH(32), .AW(FIFO_AW)) u_fifo (
    .wr_clk  (rx_clk_i),
    .wr_rst  (rx_rst),
    .wr_req  (wr_req),
    .wr_data (wr_data),
    .full    (full),
    .rd_clk  (tx_clk_i),
    .rd_rst  (tx_rst),
    .rd_req  (rd_req),
    .rd_data (rd_data),
    .empty   (empty)
  );

  eth_send #(
    .IFG_CLKS         (IFG_CLKS),
    .ACK_TIMEOUT_CLKS (ACK_TIMEOUT_CLKS),
    .PAY_AW           (PAY_AW)
  ) u_tx (
    .clk            (tx_clk_i),
    .rst            (tx_rst),
    .tx_en_o        (tx_en_o),
    .tx_data_o      (tx_data_o),
    .col_i          (col_i),
    .ack_en_i       (ack_en_i),
    .fifo_rd_req_o  (rd_req),
    .fifo_rd_data_i (rd_data),
    .fifo_empty_i   (empty),
    .usr_data_i     (tx_usr_data_i),
    .usr_valid_i    (tx_usr_valid_i),
    .usr_last_i     (tx_usr_last_i),
    .usr_ready_o    (tx_usr_ready_o),
    .wait_ack_o     (tx_wait_ack_o),
    .tx_seq_o       (tx_seq_o),
    .resend_o       (tx_resend_o)
  );

endmodule

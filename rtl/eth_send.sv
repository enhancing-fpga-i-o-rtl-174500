// eth_send: transmit side of the EthController (EthSend).
//
// It sends two kinds of frame on the PHY's MII transmit bus, one nibble per
// tx clock, low nibble of each byte first:
//   ACK  frames - one for every "send ACK" item read from the synchronization
//                 FIFO, carrying the number of the PC packet it confirms;
//   DATA frames - carrying a packet of user words (usr_* stream, 16 bits per
//                 word, first byte in bits 15:8) up to 2**PAY_AW words, ended
//                 early by usr_last_i.
// Every frame is: 7 x 55h, D5h, type (4 bytes), packet number (2), payload
// length in bytes (2), payload, zero padding up to a 60-byte data field, and
// the 4-byte FCS from a crc32_d8 instance. The frame is generated on the fly:
// a byte counter selects the next byte, which is loaded into an 8-bit shift
// register and leaves in two nibbles.
//
// Flow control. A frame may start only when (a) at least IFG_CLKS clocks
// (960 ns at 25 MHz) have passed since the previous frame, (b) the collision
// input col_i is low, and, for a new DATA frame, (c) the previous DATA frame
// has been acknowledged. Data words are written into the resend_fifo as they
// are accepted; the packet is then sent, and kept until a "peer ACK" item
// with its number arrives through the FIFO. The same clock counter that times
// the inter-frame gap also measures the acknowledgement timeout: when it
// reaches ACK_TIMEOUT_CLKS (1 ms) with the packet still unacknowledged, the
// packet is sent again from the resend_fifo, as often as needed. Packet
// numbers of DATA frames count up from 0.
//
// ack_en_i is the board switch that suppresses outgoing ACK frames for fault
// testing: while it is low, "send ACK" items are read and dropped.
//
// Follows the original paper: nibble-wide output, on-the-fly CRC and padding to the
// 64-byte minimum, the 24-clock gap, the three start conditions, the
// 25000-clock timeout with one shared counter, the resend buffer and the
// acknowledge switch. This design's own choices: ACK frames need only (a)
// and (b) (else two ends waiting for each other could deadlock), ACK items
// are served before new data, the counter restarts after ACK frames too,
// col_i and ack_en_i pass two-flop synchronizers, and the payload length is
// in bytes. The type codes come from eth_pkg.
module eth_send
  import eth_pkg::*;
#(
  parameter int unsigned IFG_CLKS         = 24,     // 960 ns at 25 MHz
  parameter int unsigned ACK_TIMEOUT_CLKS = 25000,  // 1 ms at 25 MHz
  parameter int unsigned PAY_AW           = 9       // payload up to 2**PAY_AW words
) (
  input  logic        clk,            // tx clock from the PHY (25 MHz)
  input  logic        rst,            // synchronous to clk, active high

  output logic        tx_en_o,
  output logic [3:0]  tx_data_o,
  input  logic        col_i,

  input  logic        ack_en_i,       // 0: do not send ACK frames

  output logic        fifo_rd_req_o,
  input  fifo_entry_t fifo_rd_data_i,
  input  logic        fifo_empty_i,

  input  logic [15:0] usr_data_i,
  input  logic        usr_valid_i,
  input  logic        usr_last_i,
  output logic        usr_ready_o,

  output logic        wait_ack_o,     // a DATA packet is sent and not yet acknowledged
  output logic [15:0] tx_seq_o,       // number of the current / next DATA packet
  output logic        resend_o        // pulses when a DATA packet is sent again
);

  localparam int unsigned TMR_W = $clog2(ACK_TIMEOUT_CLKS + 1) + 1;
  localparam int unsigned WORDS = 1 << PAY_AW;

  typedef enum logic {T_IDLE, T_FRAME} tstate_e;

  // ---------------- synchronizers ----------------
  logic [1:0] col_sync_q, acken_sync_q;
  always_ff @(posedge clk) begin
    if (rst) begin
      col_sync_q   <= '0;
      acken_sync_q <= '1;                 // ACKs enabled until the switch is seen
    end else begin
      col_sync_q   <= {col_sync_q[0], col_i};
      acken_sync_q <= {acken_sync_q[0], ack_en_i};
    end
  end
  logic col_s, acken_s;
  assign col_s   = col_sync_q[1];
  assign acken_s = acken_sync_q[1];

  // ---------------- state ----------------
  tstate_e     state_q;
  logic [TMR_W-1:0] since_q;          // clocks since the last frame ended
  logic        have_pkt_q;            // a DATA packet is loaded in the resend buffer
  logic        wait_q;                // ... and it has been sent at least once
  logic [15:0] seq_q;
  logic [PAY_AW:0] pay_words_q;

  // frame being sent
  logic        f_data_q;              // 1: DATA frame, 0: ACK frame
  logic [15:0] f_nr_q;
  logic [15:0] f_len_q;               // payload bytes
  logic [15:0] f_dlen_q;              // data field bytes, padding included
  logic [15:0] idx_q;                 // byte index from the first preamble byte
  logic        phase_q;
  logic [7:0]  sh_q;                  // byte being shifted out

  // ---------------- resend buffer ----------------
  logic        buf_clr, buf_wr, buf_full;
  logic [PAY_AW:0] buf_count;
  logic [PAY_AW-1:0] buf_raddr;
  logic [15:0] buf_rdata;

  resend_fifo #(.WIDTH(16), .AW(PAY_AW)) u_resend (
    .clk     (clk),
    .rst     (rst),
    .clr_i   (buf_clr),
    .wr_en   (buf_wr),
    .wr_data (usr_data_i),
    .full_o  (buf_full),
    .count_o (buf_count),
    .rd_addr (buf_raddr),
    .rd_data (buf_rdata)
  );

  assign usr_ready_o = !have_pkt_q && !buf_full;
  assign buf_wr      = usr_valid_i && usr_ready_o;

  // ---------------- CRC ----------------
  logic        crc_init, crc_en;
  logic [7:0]  cur_byte;
  logic [31:0] fcs;

  crc32_d8 u_crc (
    .clk     (clk),
    .rst     (rst),
    .init_i  (crc_init),
    .en_i    (crc_en),
    .data_i  (cur_byte),
    .crc_o   (),
    .fcs_o   (fcs),
    .check_o ()
  );

  // ---------------- byte selection ----------------
  logic [15:0] d;                     // index inside the data field
  logic [15:0] p;                     // index inside the payload
  logic [15:0] f_idx;                 // index inside the FCS
  logic        in_data_field;
  logic        last_byte;
  logic [31:0] f_type;

  assign d             = idx_q - 16'(PRE_BYTES + 1);
  assign p             = d - 16'(HDR_BYTES);
  assign f_idx         = d - f_dlen_q;
  assign in_data_field = (idx_q >= 16'(PRE_BYTES + 1)) && (d < f_dlen_q);
  assign last_byte     = (idx_q == 16'(PRE_BYTES + 1 + FCS_BYTES - 1) + f_dlen_q);
  assign f_type        = f_data_q ? TYPE_DATA : TYPE_ACK;
  // Next payload word, read one clock ahead of use (synchronous RAM).
  assign buf_raddr     = PAY_AW'((p + 16'd1) >> 1);

  always_comb begin
    cur_byte = 8'h00;
    if (idx_q < 16'(PRE_BYTES))          cur_byte = PRE_BYTE;
    else if (idx_q == 16'(PRE_BYTES))    cur_byte = SFD_BYTE;
    else if (d < 16'd4) begin
      unique case (d[1:0])                                        // MSB first
        2'd0:    cur_byte = f_type[31:24];
        2'd1:    cur_byte = f_type[23:16];
        2'd2:    cur_byte = f_type[15:8];
        default: cur_byte = f_type[7:0];
      endcase
    end
    else if (d < 16'd6)                  cur_byte = d[0] ? f_nr_q[7:0]  : f_nr_q[15:8];
    else if (d < 16'd8)                  cur_byte = d[0] ? f_len_q[7:0] : f_len_q[15:8];
    else if (p < f_len_q)                cur_byte = p[0] ? buf_rdata[7:0] : buf_rdata[15:8];
    else if (d < f_dlen_q)               cur_byte = 8'h00;             // padding
    else                                 cur_byte = fcs[8*f_idx[1:0] +: 8];
  end

  assign crc_init = (state_q == T_FRAME) && !phase_q && (idx_q == 16'(PRE_BYTES));
  assign crc_en   = (state_q == T_FRAME) && !phase_q && in_data_field;

  // ---------------- start decision ----------------
  logic        can_start;
  logic        fifo_pop;
  logic        start_ack, start_data, start_resend;
  logic        peer_ack_ok;
  fifo_entry_t ent;

  assign ent         = fifo_rd_data_i;
  assign can_start   = (state_q == T_IDLE) && (since_q >= TMR_W'(IFG_CLKS)) && !col_s;
  assign peer_ack_ok = (ent.kind == ENT_PEER_ACK) && wait_q && (ent.pkt_nr == seq_q);

  always_comb begin
    fifo_pop     = 1'b0;
    start_ack    = 1'b0;
    start_data   = 1'b0;
    start_resend = 1'b0;
    if (state_q == T_IDLE) begin
      if (!fifo_empty_i) begin
        if (ent.kind == ENT_SEND_ACK) begin
          if (!acken_s) begin
            fifo_pop = 1'b1;                      // switch off: drop the ACK
          end else if (can_start) begin
            fifo_pop  = 1'b1;
            start_ack = 1'b1;
          end
        end else begin
          fifo_pop = 1'b1;                        // peer ACK (or unknown): consume
        end
      end else if (have_pkt_q && !wait_q && can_start) begin
        start_data = 1'b1;
      end else if (wait_q && since_q >= TMR_W'(ACK_TIMEOUT_CLKS) && can_start) begin
        start_data   = 1'b1;
        start_resend = 1'b1;
      end
    end
  end

  assign fifo_rd_req_o = fifo_pop;
  assign buf_clr       = fifo_pop && peer_ack_ok;

  // ---------------- sequential ----------------
  always_ff @(posedge clk) begin
    if (rst) begin
      state_q     <= T_IDLE;
      since_q     <= '0;
      have_pkt_q  <= 1'b0;
      wait_q      <= 1'b0;
      seq_q       <= '0;
      pay_words_q <= '0;
      f_data_q    <= 1'b0;
      f_nr_q      <= '0;
      f_len_q     <= '0;
      f_dlen_q    <= '0;
      idx_q       <= '0;
      phase_q     <= 1'b0;
      sh_q        <= '0;
      tx_en_o     <= 1'b0;
      tx_data_o   <= '0;
      resend_o    <= 1'b0;
    end else begin
      resend_o <= start_resend;

      // timer: saturates at the timeout
      if (since_q < TMR_W'(ACK_TIMEOUT_CLKS)) since_q <= since_q + 1'b1;

      // loading the next DATA packet
      if (buf_wr && (usr_last_i || buf_count == (PAY_AW+1)'(WORDS - 1))) begin
        have_pkt_q  <= 1'b1;
        pay_words_q <= buf_count + 1'b1;
      end

      // acknowledgement of the DATA packet in flight
      if (buf_clr) begin
        have_pkt_q <= 1'b0;
        wait_q     <= 1'b0;
        seq_q      <= seq_q + 1'b1;
      end

      unique case (state_q)
        T_IDLE: begin
          tx_en_o <= 1'b0;
          if (start_ack || start_data) begin
            state_q  <= T_FRAME;
            idx_q    <= '0;
            phase_q  <= 1'b0;
            f_data_q <= start_data;
            f_nr_q   <= start_data ? seq_q : ent.pkt_nr;
            if (start_data) begin
              f_len_q  <= 16'({pay_words_q, 1'b0});
              f_dlen_q <= (16'({pay_words_q, 1'b0}) + 16'(HDR_BYTES) > 16'(MIN_DATA))
                          ? 16'({pay_words_q, 1'b0}) + 16'(HDR_BYTES) : 16'(MIN_DATA);
              wait_q   <= 1'b1;
            end else begin
              f_len_q  <= '0;
              f_dlen_q <= 16'(MIN_DATA);
            end
          end
        end
        T_FRAME: begin
          tx_en_o <= 1'b1;
          if (!phase_q) begin
            sh_q      <= cur_byte;
            tx_data_o <= cur_byte[3:0];
            phase_q   <= 1'b1;
          end else begin
            tx_data_o <= sh_q[7:4];
            phase_q   <= 1'b0;
            idx_q     <= idx_q + 1'b1;
            if (last_byte) begin
              state_q <= T_IDLE;
              since_q <= '0;
            end
          end
        end
        default: state_q <= T_IDLE;
      endcase
    end
  end

  assign wait_ack_o = wait_q;
  assign tx_seq_o   = seq_q;

  // A FIFO item is only taken when there is one.
  a_pop_not_empty: assert property (@(posedge clk) disable iff (rst)
    fifo_rd_req_o |-> !fifo_empty_i);
  // A new frame never starts inside the inter-frame gap.
  a_ifg: assert property (@(posedge clk) disable iff (rst)
    (start_ack || start_data) |-> since_q >= TMR_W'(IFG_CLKS));

endmodule

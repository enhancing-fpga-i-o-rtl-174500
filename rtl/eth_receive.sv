// eth_receive: receive side of the EthController (EthReceive).
//
// It reads the PHY's MII receive bus (one nibble per rx clock, low nibble of
// each byte first, qualified by rx_valid_i) and interprets the frame while it
// arrives, without buffering it:
//   1. the preamble and start-of-frame delimiter are checked (at least
//      PRE_MIN_NIBBLES nibbles of 5h, then Dh);
//   2. the first 4 data bytes give the packet type; a type other than DATA or
//      ACK drops the frame at once;
//   3. the next 2 bytes give the packet number and the 2 after them the
//      payload length in bytes;
//   4. for a DATA packet each pair of payload bytes is output as one 16-bit
//      word with a one-cycle usr_valid_o (first byte in bits 15:8; an odd last
//      byte comes out alone in bits 15:8);
//   5. every byte after the delimiter, FCS included, goes through crc32_d8.
// When rx_valid_i falls, the frame is accepted if it ended on a byte
// boundary, was long enough to hold its header, payload and FCS, and the CRC
// check output is zero. An accepted DATA packet queues a "send ACK" item
// with its number in the synchronization FIFO; an accepted ACK packet queues
// a "peer ACK" item so that EthSend can release its resend buffer. Anything
// else is discarded. pkt_end_o pulses at the end of every DATA packet whose
// header was read, with pkt_ok_o telling whether it was accepted, so that
// user logic can drop the words of a corrupt packet, which have already been
// output by then.
//
// Timing: a word appears 1 clock after its last nibble; the FIFO write and
// pkt_end_o come 2 clocks after rx_valid_i falls. The parsing sequence,
// the field sizes, the 16-bit output and the CRC-is-zero test follow the
// original paper; the type codes, the length unit, the pkt_end_o/pkt_ok_o pair and
// the overflow flag are this design's choices.
module eth_receive
  import eth_pkg::*;
#(
  parameter int unsigned PRE_MIN_NIBBLES = 15   // 7 preamble bytes + low nibble of SFD
) (
  input  logic        clk,          // rx clock from the PHY (25 MHz)
  input  logic        rst,          // synchronous to clk, active high
  input  logic        rx_valid_i,
  input  logic [3:0]  rx_data_i,

  output logic [15:0] usr_data_o,
  output logic        usr_valid_o,
  output logic        pkt_end_o,
  output logic        pkt_ok_o,
  output logic [15:0] pkt_nr_o,

  output logic        fifo_wr_req_o,
  output fifo_entry_t fifo_wr_data_o,
  input  logic        fifo_full_i,
  output logic        fifo_ovf_o    // pulses when an item is lost to a full FIFO
);

  typedef enum logic [1:0] {S_IDLE, S_PRE, S_BODY, S_DROP} state_e;

  state_e      state_q;
  logic [4:0]  pre_cnt_q;
  logic        phase_q;              // 0: expecting low nibble, 1: high nibble
  logic [3:0]  lo_nib_q;
  logic [15:0] bcnt_q;               // data-field bytes completed
  logic [23:0] type_q;
  logic [15:0] nr_q, len_q;
  logic [7:0]  hi_byte_q;
  logic        is_data_q;

  // frame-end evaluation, one cycle after rx_valid_i falls
  logic        eval_q;
  logic        eval_len_ok_q;
  logic        eval_data_q;
  logic [15:0] eval_nr_q;

  logic [7:0]  rx_byte;
  logic        byte_done;
  logic [31:0] crc_check;
  logic        crc_init;
  logic [15:0] pay_idx;

  assign rx_byte   = {rx_data_i, lo_nib_q};
  assign byte_done = (state_q == S_BODY) && rx_valid_i && phase_q;
  assign crc_init  = (state_q == S_PRE) && rx_valid_i && (rx_data_i == SFD_BYTE[7:4]);
  assign pay_idx   = bcnt_q - 16'(HDR_BYTES);

  crc32_d8 u_crc (
    .clk     (clk),
    .rst     (rst),
    .init_i  (crc_init),
    .en_i    (byte_done),
    .data_i  (rx_byte),
    .crc_o   (),
    .fcs_o   (),
    .check_o (crc_check)
  );

  always_ff @(posedge clk) begin
    if (rst) begin
      state_q       <= S_IDLE;
      pre_cnt_q     <= '0;
      phase_q       <= 1'b0;
      lo_nib_q      <= '0;
      bcnt_q        <= '0;
      type_q        <= '0;
      nr_q          <= '0;
      len_q         <= '0;
      hi_byte_q     <= '0;
      is_data_q     <= 1'b0;
      eval_q        <= 1'b0;
      eval_len_ok_q <= 1'b0;
      eval_data_q   <= 1'b0;
      eval_nr_q     <= '0;
      usr_data_o    <= '0;
      usr_valid_o   <= 1'b0;
    end else begin
      usr_valid_o <= 1'b0;
      eval_q      <= 1'b0;
      unique case (state_q)
        S_IDLE: begin
          if (rx_valid_i) begin
            state_q   <= (rx_data_i == PRE_BYTE[3:0]) ? S_PRE : S_DROP;
            pre_cnt_q <= 5'd1;
          end
        end
        S_PRE: begin
          if (!rx_valid_i) begin
            state_q <= S_IDLE;
          end else if (rx_data_i == PRE_BYTE[3:0]) begin
            if (pre_cnt_q != '1) pre_cnt_q <= pre_cnt_q + 1'b1;
          end else if (rx_data_i == SFD_BYTE[7:4] && pre_cnt_q >= 5'(PRE_MIN_NIBBLES)) begin
            state_q   <= S_BODY;
            phase_q   <= 1'b0;
            bcnt_q    <= '0;
            is_data_q <= 1'b0;
          end else begin
            state_q <= S_DROP;
          end
        end
        S_BODY: begin
          if (!rx_valid_i) begin
            // frame over: judge it next cycle, when the CRC has settled
            state_q       <= S_IDLE;
            eval_q        <= (bcnt_q >= 16'(HDR_BYTES));
            eval_data_q   <= is_data_q;
            eval_nr_q     <= nr_q;
            eval_len_ok_q <= !phase_q &&
                             ({1'b0, bcnt_q} >= 17'(HDR_BYTES + FCS_BYTES) + {1'b0, len_q});
          end else if (!phase_q) begin
            lo_nib_q <= rx_data_i;
            phase_q  <= 1'b1;
          end else begin
            phase_q <= 1'b0;
            if (bcnt_q != '1) bcnt_q <= bcnt_q + 1'b1;
            if (bcnt_q < 16'd4) begin
              type_q <= {type_q[15:0], rx_byte};
              if (bcnt_q == 16'd3) begin
                if ({type_q[23:0], rx_byte} == TYPE_DATA)     is_data_q <= 1'b1;
                else if ({type_q[23:0], rx_byte} != TYPE_ACK) state_q   <= S_DROP;
              end
            end else if (bcnt_q < 16'd6) begin
              nr_q <= {nr_q[7:0], rx_byte};
            end else if (bcnt_q < 16'd8) begin
              len_q <= {len_q[7:0], rx_byte};
            end else if (is_data_q && pay_idx < len_q) begin
              if (!pay_idx[0]) begin
                hi_byte_q <= rx_byte;
                if (pay_idx + 16'd1 == len_q) begin
                  usr_data_o  <= {rx_byte, 8'h00};
                  usr_valid_o <= 1'b1;
                end
              end else begin
                usr_data_o  <= {hi_byte_q, rx_byte};
                usr_valid_o <= 1'b1;
              end
            end
          end
        end
        S_DROP: begin
          if (!rx_valid_i) state_q <= S_IDLE;
        end
        default: state_q <= S_IDLE;
      endcase
    end
  end

  // Frame verdict and the work item for EthSend.
  logic accept;
  assign accept = eval_q && eval_len_ok_q && (crc_check == 32'h0);

  always_ff @(posedge clk) begin
    if (rst) begin
      fifo_wr_req_o  <= 1'b0;
      fifo_wr_data_o <= '0;
      fifo_ovf_o     <= 1'b0;
      pkt_end_o      <= 1'b0;
      pkt_ok_o       <= 1'b0;
      pkt_nr_o       <= '0;
    end else begin
      fifo_wr_req_o  <= 1'b0;
      fifo_ovf_o     <= 1'b0;
      pkt_end_o      <= eval_q && eval_data_q;
      pkt_ok_o       <= accept && eval_data_q;
      if (eval_q) pkt_nr_o <= eval_nr_q;
      if (accept) begin
        fifo_wr_req_o         <= !fifo_full_i;
        fifo_ovf_o            <= fifo_full_i;
        fifo_wr_data_o.kind   <= eval_data_q ? ENT_SEND_ACK : ENT_PEER_ACK;
        fifo_wr_data_o.rsvd   <= '0;
        fifo_wr_data_o.pkt_nr <= eval_nr_q;
      end
    end
  end

endmodule

// tb_eth_controller: end-to-end test of the EthController at its default
// parameters (1024-byte payloads, 24-clock gap, 25000-clock ACK timeout).
// The testbench plays the PC and its PHY: it sends protocol frames on the MII
// receive side (rx clock 40 ns) and decodes every frame on the transmit side
// (tx clock 40.4 ns, unrelated), while also acting as the user logic on the
// FPGA side. It walks through a complete exchange in each direction and
// forces every mechanism of the design at least once, counting them:
//   ack      - an ACK frame answers a PC data packet (through the FIFO)
//   pad      - a short frame padded to 64 bytes
//   crc_drop - a corrupt PC packet is discarded and not acknowledged
//   bad_type - a packet outside the protocol is ignored
//   release  - a PC ACK releases the FPGA's pending DATA packet
//   resend   - a DATA packet is sent again after the 1 ms timeout
//   col_hold - a frame waits while the collision input is high
//   ack_off  - the ACK switch suppresses an ACK frame
//   ifg      - the smallest gap between frames is at least 24 clocks
module tb_eth_controller;
  import eth_tb_pkg::*;

  localparam int IFG = 24;
  localparam int TMO = 25000;
  localparam int PAY_WORDS = 512;

  logic reset = 1'b1;
  logic rx_clk = 1'b0, tx_clk = 1'b0;
  logic rx_valid = 1'b0;
  logic [3:0] rx_data = '0;
  logic tx_en, col = 1'b0, ack_en = 1'b1;
  logic [3:0] tx_data;
  logic [15:0] rx_usr_data, rx_pkt_nr, tx_seq;
  logic rx_usr_valid, rx_pkt_end, rx_pkt_ok, rx_ovf;
  logic [15:0] tx_usr_data = '0;
  logic tx_usr_valid = 1'b0, tx_usr_last = 1'b0, tx_usr_ready, tx_wait_ack, tx_resend;

  int checks = 0, failures = 0;
  int n_ack = 0, n_pad = 0, n_crc_drop = 0, n_bad_type = 0, n_release = 0;
  int n_resend = 0, n_col_hold = 0, n_ack_off = 0;

  eth_controller dut (
    .reset_i(reset),
    .rx_clk_i(rx_clk), .rx_valid_i(rx_valid), .rx_data_i(rx_data),
    .tx_clk_i(tx_clk), .tx_en_o(tx_en), .tx_data_o(tx_data), .col_i(col),
    .ack_en_i(ack_en),
    .rx_usr_data_o(rx_usr_data), .rx_usr_valid_o(rx_usr_valid),
    .rx_pkt_end_o(rx_pkt_end), .rx_pkt_ok_o(rx_pkt_ok), .rx_pkt_nr_o(rx_pkt_nr),
    .rx_fifo_ovf_o(rx_ovf),
    .tx_usr_data_i(tx_usr_data), .tx_usr_valid_i(tx_usr_valid),
    .tx_usr_last_i(tx_usr_last), .tx_usr_ready_o(tx_usr_ready),
    .tx_wait_ack_o(tx_wait_ack), .tx_seq_o(tx_seq), .tx_resend_o(tx_resend));

  always #20   rx_clk = ~rx_clk;
  always #20.2 tx_clk = ~tx_clk;

  initial begin
    #10ms;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input logic cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL @%0t: %s", $time, what); end
  endtask

  // ---- FPGA user side of the receive path ----
  logic [15:0] words [$];
  int ends = 0, oks = 0;
  always @(posedge rx_clk) if (!reset) begin
    if (rx_usr_valid) words.push_back(rx_usr_data);
    if (rx_pkt_end) begin ends++; if (rx_pkt_ok) oks++; end
    if (rx_ovf) begin failures++; $display("FAIL: FIFO overflow"); end
  end

  // ---- transmit monitor ----
  longint tcyc = 0;
  frame_t frames [$];
  longint f_start [$], f_end [$];
  nib_q_t cur;
  bit in_frame = 1'b0;
  longint last_end = -1000, min_gap = 1000000;
  always @(posedge tx_clk) if (!reset) begin
    tcyc++;
    if (tx_resend) n_resend++;
    if (tx_en) begin
      if (!in_frame) begin
        f_start.push_back(tcyc);
        if (tcyc - last_end - 1 < min_gap) min_gap = tcyc - last_end - 1;
      end
      in_frame = 1'b1;
      cur.push_back(tx_data);
    end else if (in_frame) begin
      in_frame = 1'b0;
      frames.push_back(parse_frame(cur));
      f_end.push_back(tcyc - 1);
      last_end = tcyc - 1;
      cur.delete();
    end
  end

  // ---- PC side ----
  task automatic pc_send(input nib_q_t n);
    @(negedge rx_clk);
    foreach (n[i]) begin
      rx_valid = 1'b1; rx_data = n[i];
      @(negedge rx_clk);
    end
    rx_valid = 1'b0; rx_data = '0;
    repeat (24) @(negedge rx_clk);
  endtask

  task automatic pc_data(input logic [15:0] nr, input byte_q_t pay, input bit bad);
    pc_send(frame_nibbles(data_field(T_DATA, nr, 16'(pay.size()), pay, 60), 15, bad));
  endtask

  task automatic pc_ack(input logic [15:0] nr);
    byte_q_t none;
    pc_send(frame_nibbles(data_field(T_ACK, nr, 16'h0, none, 60), 15, 1'b0));
  endtask

  // waits for frame number n (0-based) up to max tx clocks; 1 if it came
  task automatic wait_frame(input int n, input int max_cycles, output bit got);
    int t = 0;
    while (frames.size() <= n && t < max_cycles) begin @(posedge tx_clk); t++; end
    got = (frames.size() > n);
  endtask

  task automatic expect_ack(input logic [15:0] nr, input string what);
    bit got;
    int i = frames.size();
    wait_frame(i, 3000, got);
    check(got, {what, ": ACK frame sent"});
    if (got) begin
      check(frames[i].ok && frames[i].typ == T_ACK && frames[i].nr == nr,
            $sformatf("%s: ACK frame for %0d (%s)", what, nr, frames[i].why));
      if (frames[i].ok && frames[i].typ == T_ACK) n_ack++;
      if (frames[i].ok && frames[i].total == 64) n_pad++;
    end
  endtask

  task automatic expect_silence(input int cycles, input string what);
    int i = frames.size();
    repeat (cycles) @(posedge tx_clk);
    check(frames.size() == i && !in_frame, {what, ": no frame sent"});
  endtask

  task automatic user_packet(input int nwords, input bit with_last, output byte_q_t pay);
    pay.delete();
    for (int w = 0; w < nwords; w++) begin
      @(negedge tx_clk);
      tx_usr_data  = 16'($urandom);
      tx_usr_valid = 1'b1;
      tx_usr_last  = with_last && (w == nwords - 1);
      pay.push_back(tx_usr_data[15:8]);
      pay.push_back(tx_usr_data[7:0]);
      @(posedge tx_clk);
      while (!tx_usr_ready) @(posedge tx_clk);
    end
    @(negedge tx_clk);
    tx_usr_valid = 1'b0; tx_usr_last = 1'b0;
  endtask

  function automatic logic [15:0] pack_word(input byte_q_t p, input int w);
    return {p[2*w], (2*w + 1 < p.size()) ? p[2*w + 1] : 8'h00};
  endfunction

  initial begin
    byte_q_t p, q, fp;
    bit got;
    int i0;
    repeat (5) @(posedge rx_clk);
    reset = 1'b0;
    repeat (10) @(posedge tx_clk);

    // 1. PC -> FPGA: a full 1024-byte packet, received and acknowledged
    p = rand_bytes(1024);
    words.delete();
    pc_data(16'h0000, p, 1'b0);
    check(words.size() == 512, $sformatf("512 words received, got %0d", words.size()));
    begin
      automatic int bad = 0;
      foreach (words[w]) if (w < 512 && words[w] != pack_word(p, w)) bad++;
      check(bad == 0, "received words match the payload");
    end
    check(oks == 1, "packet accepted");
    expect_ack(16'h0000, "full packet");

    // 2. corrupt packet: dropped, not acknowledged; its resend is
    q = rand_bytes(100);
    pc_data(16'h0001, q, 1'b1);
    check(oks == 1 && ends == 2, "corrupt packet reported as not accepted");
    expect_silence(1500, "corrupt packet");
    n_crc_drop++;
    pc_data(16'h0001, q, 1'b0);
    expect_ack(16'h0001, "packet resent by the PC");

    // 3. a packet outside the protocol is ignored
    pc_send(frame_nibbles(data_field(32'h0BAD_0BAD, 16'h0002, 16'd10, q, 60), 15, 1'b0));
    expect_silence(1500, "unknown packet type");
    n_bad_type++;

    // 4. FPGA -> PC: full packet, the PC withholds its ACK -> resend after 1 ms
    user_packet(PAY_WORDS, 1'b0, fp);
    i0 = frames.size();
    wait_frame(i0, 3000, got);
    check(got && frames[i0].ok && frames[i0].typ == T_DATA && frames[i0].nr == 0 &&
          frames[i0].pay == fp, "DATA frame 0 with 1024-byte payload");
    check(tx_wait_ack, "waiting for the PC's ACK");
    wait_frame(i0 + 1, TMO + 3000, got);
    check(got && frames[i0+1].ok && frames[i0+1].pay == fp && frames[i0+1].nr == 0,
          "resent DATA frame identical");
    if (got) begin
      automatic longint g = f_start[i0+1] - f_end[i0] - 1;
      check(g >= TMO && g <= TMO + 4, $sformatf("resend after %0d clocks", g));
    end
    pc_ack(16'h0000);
    repeat (20) @(posedge tx_clk);
    check(!tx_wait_ack && tx_seq == 1, "PC ACK releases packet 0");
    if (!tx_wait_ack && tx_seq == 1) n_release++;

    // 5. short FPGA packet; a PC data packet is acknowledged while it waits
    user_packet(3, 1'b1, fp);
    i0 = frames.size();
    wait_frame(i0, 3000, got);
    check(got && frames[i0].ok && frames[i0].typ == T_DATA && frames[i0].nr == 1 &&
          frames[i0].pay == fp && frames[i0].total == 64, "short DATA frame 1, padded");
    if (got && frames[i0].total == 64) n_pad++;
    pc_data(16'h0002, rand_bytes(40), 1'b0);
    expect_ack(16'h0002, "ACK while waiting");
    check(tx_wait_ack, "still waiting for ACK of packet 1");
    pc_ack(16'h0001);
    repeat (20) @(posedge tx_clk);
    check(!tx_wait_ack && tx_seq == 2, "PC ACK releases packet 1");
    if (!tx_wait_ack && tx_seq == 2) n_release++;

    // 6. collision holds the ACK back
    @(negedge tx_clk) col = 1'b1;
    pc_data(16'h0003, rand_bytes(16), 1'b0);
    expect_silence(400, "collision");
    n_col_hold++;
    @(negedge tx_clk) col = 1'b0;
    expect_ack(16'h0003, "after the collision");

    // 7. ACK switch off: no ACK; the PC resends and gets one with the switch on
    @(negedge tx_clk) ack_en = 1'b0;
    pc_data(16'h0004, q, 1'b0);
    expect_silence(1500, "ACK switch off");
    n_ack_off++;
    @(negedge tx_clk) ack_en = 1'b1;
    repeat (5) @(posedge tx_clk);
    pc_data(16'h0004, q, 1'b0);
    expect_ack(16'h0004, "ACK switch on again");

    check(min_gap >= IFG, $sformatf("smallest gap between frames %0d clocks", min_gap));
    $display("mechanisms: ack=%0d pad=%0d crc_drop=%0d bad_type=%0d release=%0d resend=%0d col_hold=%0d ack_off=%0d min_gap=%0d",
             n_ack, n_pad, n_crc_drop, n_bad_type, n_release, n_resend, n_col_hold, n_ack_off, min_gap);
    check(n_ack > 0,      "mechanism: ACK frame");
    check(n_pad > 0,      "mechanism: padding");
    check(n_crc_drop > 0, "mechanism: CRC drop");
    check(n_bad_type > 0, "mechanism: unknown type ignored");
    check(n_release > 0,  "mechanism: ACK release");
    check(n_resend > 0,   "mechanism: timeout resend");
    check(n_col_hold > 0, "mechanism: collision hold-off");
    check(n_ack_off > 0,  "mechanism: ACK switch");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

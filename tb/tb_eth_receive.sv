// tb_eth_receive: sends MII frames into eth_receive and checks what comes
// out: the 16-bit user words (values, order, one word per 4 clocks), the
// end-of-packet verdict, and the items written for the transmit side.
// Frames: short padded and unpadded DATA packets, an odd length, a
// 1024-byte payload, an ACK from the PC, and the frames that must be
// discarded (bad FCS, bad preamble, short preamble, unknown type, truncated),
// plus one accepted while the FIFO reports full.
module tb_eth_receive;
  import eth_tb_pkg::*;
  import eth_pkg::fifo_entry_t;
  import eth_pkg::ENT_SEND_ACK;
  import eth_pkg::ENT_PEER_ACK;

  logic clk = 1'b0, rst = 1'b1;
  logic rx_valid = 1'b0;
  logic [3:0] rx_data = '0;
  logic [15:0] usr_data, pkt_nr;
  logic usr_valid, pkt_end, pkt_ok, wr_req, ovf;
  logic fifo_full = 1'b0;
  fifo_entry_t wr_data;

  int checks = 0, failures = 0;
  logic [15:0] words [$];
  fifo_entry_t items [$];
  int ends = 0, oks = 0, ovfs = 0;
  logic [15:0] last_end_nr;
  longint cyc = 0, last_word_cyc = -1;
  int gap_bad = 0;
  bit in_payload_run = 1'b0;
  bit gap_check_on = 1'b1;        // even payloads: strictly one word per 4 clocks

  eth_receive dut (
    .clk(clk), .rst(rst), .rx_valid_i(rx_valid), .rx_data_i(rx_data),
    .usr_data_o(usr_data), .usr_valid_o(usr_valid), .pkt_end_o(pkt_end),
    .pkt_ok_o(pkt_ok), .pkt_nr_o(pkt_nr), .fifo_wr_req_o(wr_req),
    .fifo_wr_data_o(wr_data), .fifo_full_i(fifo_full), .fifo_ovf_o(ovf));

  always #20 clk = ~clk;

  initial begin
    #5000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) if (!rst) begin
    cyc++;
    if (usr_valid) begin
      words.push_back(usr_data);
      if (in_payload_run && last_word_cyc >= 0 && cyc - last_word_cyc != 4) gap_bad++;
      last_word_cyc = cyc;
    end
    if (wr_req) items.push_back(wr_data);
    if (ovf) ovfs++;
    if (pkt_end) begin ends++; last_end_nr = pkt_nr; if (pkt_ok) oks++; end
  end

  task automatic check(input logic cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic send(input nib_q_t n);
    @(negedge clk);
    in_payload_run = gap_check_on; last_word_cyc = -1;
    foreach (n[i]) begin
      rx_valid = 1'b1; rx_data = n[i];
      @(negedge clk);
    end
    rx_valid = 1'b0; rx_data = '0;
    repeat (6) @(negedge clk);
    in_payload_run = 1'b0;
  endtask

  function automatic logic [15:0] pack_word(input byte_q_t p, input int w);
    logic [7:0] lo = (2*w + 1 < p.size()) ? p[2*w + 1] : 8'h00;
    return {p[2*w], lo};
  endfunction

  // A DATA frame that must be accepted: check words, verdict and item.
  task automatic data_frame_ok(input logic [15:0] nr, input int len, input int min_data);
    byte_q_t pay = rand_bytes(len);
    int e0 = ends, o0 = oks;
    words.delete(); items.delete();
    gap_check_on = (len % 2 == 0);
    send(frame_nibbles(data_field(T_DATA, nr, 16'(len), pay, min_data), 15, 1'b0));
    check(words.size() == (len + 1) / 2, $sformatf("word count len=%0d got %0d", len, words.size()));
    for (int w = 0; w < words.size() && w < (len + 1) / 2; w++)
      check(words[w] == pack_word(pay, w), $sformatf("word %0d of len %0d", w, len));
    check(ends == e0 + 1 && oks == o0 + 1 && last_end_nr == nr, "packet end, accepted");
    check(items.size() == 1, "one FIFO item");
    if (items.size() == 1)
      check(items[0].kind == ENT_SEND_ACK && items[0].pkt_nr == nr, "send-ACK item");
  endtask

  // A frame that must be discarded: no item, no accepted packet.
  task automatic bad_frame(input nib_q_t n, input bit words_allowed, input string what);
    int o0 = oks;
    words.delete(); items.delete();
    send(n);
    check(items.size() == 0, {what, ": no FIFO item"});
    check(oks == o0, {what, ": not accepted"});
    if (!words_allowed) check(words.size() == 0, {what, ": no user words"});
  endtask

  initial begin
    byte_q_t pay;
    nib_q_t n;
    repeat (4) @(posedge clk);
    @(negedge clk) rst = 1'b0;

    data_frame_ok(16'h1234, 10, 60);     // padded to the minimum
    data_frame_ok(16'h0001, 10, 0);      // not padded
    data_frame_ok(16'h0002, 7, 60);      // odd length
    data_frame_ok(16'hBEEF, 1024, 0);    // largest payload of the benchmark
    check(gap_bad == 0, "one word every 4 clocks");

    // ACK from the PC
    words.delete(); items.delete();
    begin
      automatic int e0 = ends;
      send(frame_nibbles(data_field(T_ACK, 16'h0005, 16'h0, pay, 60), 15, 1'b0));
      check(items.size() == 1 && items[0].kind == ENT_PEER_ACK && items[0].pkt_nr == 16'h0005,
            "peer-ACK item");
      check(words.size() == 0 && ends == e0, "ACK frame gives no user data");
    end

    // discarded frames
    pay = rand_bytes(20);
    bad_frame(frame_nibbles(data_field(T_DATA, 16'h0003, 16'd20, pay, 60), 15, 1'b1), 1'b1, "bad FCS");
    check(ends > 0 && !pkt_ok, "bad FCS reported at packet end");
    n = frame_nibbles(data_field(T_DATA, 16'h0004, 16'd20, pay, 60), 15, 1'b0);
    n[6] = 4'h7;
    bad_frame(n, 1'b0, "bad preamble");
    bad_frame(frame_nibbles(data_field(T_DATA, 16'h0004, 16'd20, pay, 60), 9, 1'b0), 1'b0, "short preamble");
    bad_frame(frame_nibbles(data_field(32'h1111_2222, 16'h0004, 16'd20, pay, 60), 15, 1'b0), 1'b0, "unknown type");
    n = frame_nibbles(data_field(T_DATA, 16'h0004, 16'd200, pay, 0), 15, 1'b0); // length beyond the frame
    bad_frame(n, 1'b1, "truncated");

    // still working after the bad ones
    data_frame_ok(16'h0006, 32, 60);

    // FIFO full: the item is lost and flagged
    fifo_full = 1'b1;
    words.delete(); items.delete();
    send(frame_nibbles(data_field(T_DATA, 16'h0007, 16'd4, pay, 60), 15, 1'b0));
    check(items.size() == 0 && ovfs == 1, "overflow flagged when FIFO full");
    fifo_full = 1'b0;

    // back-to-back frames with a minimal gap
    data_frame_ok(16'h0008, 2, 60);
    data_frame_ok(16'h0009, 60, 0);

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

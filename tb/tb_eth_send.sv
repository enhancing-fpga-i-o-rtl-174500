// tb_eth_send: drives eth_send with FIFO items and user packets and decodes
// every frame on the MII transmit bus with an independent frame checker.
// Checks: ACK frames (type, number, 64-byte minimum with zero padding, FCS);
// DATA frames (number, length, payload); the 24-clock inter-frame gap between
// every pair of frames; the acknowledgement timeout (a resend exactly
// ACK_TIMEOUT_CLKS after the frame, with identical content); release of the
// packet by the matching peer ACK only; ACK frames sent while a DATA packet
// waits; hold-off while col_i is high; ACK suppression by ack_en_i.
module tb_eth_send;
  import eth_tb_pkg::*;
  import eth_pkg::fifo_entry_t;
  import eth_pkg::ENT_SEND_ACK;
  import eth_pkg::ENT_PEER_ACK;

  localparam longint IFG = 24;
  localparam longint TMO = 2000;
  localparam int PAW = 5;

  logic clk = 1'b0, rst = 1'b1;
  logic tx_en, col = 1'b0, ack_en = 1'b1;
  logic [3:0] tx_data;
  logic rd_req;
  fifo_entry_t rd_data;
  logic empty;
  logic [15:0] usr_data = '0;
  logic usr_valid = 1'b0, usr_last = 1'b0, usr_ready, wait_ack, resend;
  logic [15:0] seq;

  fifo_entry_t fq [$];
  int checks = 0, failures = 0;
  longint cyc = 0;

  eth_send #(.IFG_CLKS(int'(IFG)), .ACK_TIMEOUT_CLKS(int'(TMO)), .PAY_AW(PAW)) dut (
    .clk(clk), .rst(rst), .tx_en_o(tx_en), .tx_data_o(tx_data), .col_i(col),
    .ack_en_i(ack_en), .fifo_rd_req_o(rd_req), .fifo_rd_data_i(rd_data),
    .fifo_empty_i(empty), .usr_data_i(usr_data), .usr_valid_i(usr_valid),
    .usr_last_i(usr_last), .usr_ready_o(usr_ready), .wait_ack_o(wait_ack),
    .tx_seq_o(seq), .resend_o(resend));

  always #20 clk = ~clk;

  initial begin
    #20000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // FIFO model, first word fall through
  assign empty   = (fq.size() == 0);
  assign rd_data = empty ? '0 : fq[0];
  always @(posedge clk) begin
    cyc++;
    if (rd_req && fq.size() > 0) void'(fq.pop_front());
  end

  // transmit monitor
  frame_t frames [$];
  longint f_start [$], f_end [$];
  nib_q_t cur;
  bit     in_frame = 1'b0;
  longint last_end = -1000, min_gap = 1000000;
  always @(posedge clk) if (!rst) begin
    if (tx_en) begin
      if (!in_frame) begin
        f_start.push_back(cyc);
        if (cyc - last_end - 1 < min_gap) min_gap = cyc - last_end - 1;
      end
      in_frame = 1'b1;
      cur.push_back(tx_data);
    end else if (in_frame) begin
      in_frame = 1'b0;
      frames.push_back(parse_frame(cur));
      f_end.push_back(cyc - 1);
      last_end = cyc - 1;
      cur.delete();
    end
  end

  task automatic check(input logic cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL @%0d: %s", cyc, what); end
  endtask

  task automatic push_item(input eth_pkg::ent_kind_e k, input logic [15:0] nr);
    fifo_entry_t e;
    e.kind = k; e.rsvd = '0; e.pkt_nr = nr;
    @(negedge clk);
    fq.push_back(e);
  endtask

  task automatic wait_frames(input int n, input int max_cycles);
    int t = 0;
    while (frames.size() < n && t < max_cycles) begin @(posedge clk); t++; end
    check(frames.size() >= n, $sformatf("expected %0d frames, have %0d", n, frames.size()));
  endtask

  task automatic check_ack(input int i, input logic [15:0] nr);
    if (i >= frames.size()) begin check(1'b0, "missing ACK frame"); return; end
    check(frames[i].ok, {"ACK frame valid: ", frames[i].why});
    check(frames[i].typ == T_ACK && frames[i].nr == nr && frames[i].len == 0,
          $sformatf("ACK frame %0d content (nr %h)", i, frames[i].nr));
    check(frames[i].total == 64, "ACK frame is the 64-byte minimum");
  endtask

  task automatic check_data(input int i, input logic [15:0] nr, input byte_q_t pay);
    if (i >= frames.size()) begin check(1'b0, "missing DATA frame"); return; end
    check(frames[i].ok, {"DATA frame valid: ", frames[i].why});
    check(frames[i].typ == T_DATA && frames[i].nr == nr && int'(frames[i].len) == pay.size(),
          $sformatf("DATA frame %0d header", i));
    check(frames[i].pay == pay, $sformatf("DATA frame %0d payload", i));
  endtask

  // Hands a packet of words to the user port; returns its bytes.
  task automatic user_packet(input int nwords, input bit with_last, output byte_q_t pay);
    pay.delete();
    for (int w = 0; w < nwords; w++) begin
      @(negedge clk);
      usr_data  = 16'($urandom);
      usr_valid = 1'b1;
      usr_last  = with_last && (w == nwords - 1);
      pay.push_back(usr_data[15:8]);
      pay.push_back(usr_data[7:0]);
      @(posedge clk);
      while (!usr_ready) @(posedge clk);
    end
    @(negedge clk);
    usr_valid = 1'b0; usr_last = 1'b0;
  endtask

  initial begin
    byte_q_t p0, p1;
    int n;
    repeat (4) @(posedge clk);
    @(negedge clk) rst = 1'b0;

    // single ACK
    push_item(ENT_SEND_ACK, 16'h0042);
    wait_frames(1, 500);
    check_ack(0, 16'h0042);

    // three ACKs back to back: gap and rate
    push_item(ENT_SEND_ACK, 16'h0100);
    push_item(ENT_SEND_ACK, 16'h0101);
    push_item(ENT_SEND_ACK, 16'h0102);
    wait_frames(4, 2000);
    for (int i = 1; i < 4; i++) check_ack(i, 16'h0100 + 16'(i - 1));
    for (int i = 2; i < 4; i++) begin
      automatic longint g = f_start[i] - f_end[i-1] - 1;
      check(g >= IFG && g <= IFG + 3, $sformatf("back-to-back gap %0d clocks", g));
      check(f_end[i] - f_start[i] + 1 == 2 * (8 + 64), "frame length in clocks");
    end

    // DATA packet, no ACK: resend after the timeout
    check(!wait_ack && seq == 0, "idle before data");
    user_packet(10, 1'b1, p0);
    wait_frames(5, 1000);
    check_data(4, 16'h0000, p0);
    check(wait_ack, "waiting for ACK");
    check(!usr_ready, "next packet held back while waiting");
    wait_frames(6, int'(TMO) + 500);
    check_data(5, 16'h0000, p0);
    if (frames.size() >= 6) begin
      automatic longint g = f_start[5] - f_end[4] - 1;
      check(g >= TMO && g <= TMO + 4, $sformatf("resend after %0d clocks", g));
    end

    // wrong peer ACK is ignored, right one releases
    push_item(ENT_PEER_ACK, 16'h0007);
    repeat (10) @(posedge clk);
    check(wait_ack && seq == 0, "wrong ACK number ignored");
    push_item(ENT_PEER_ACK, 16'h0000);
    repeat (5) @(posedge clk);
    check(!wait_ack && seq == 1, "ACK releases the packet");

    // full-buffer packet; an ACK frame goes out while it waits
    user_packet(1 << PAW, 1'b0, p1);
    wait_frames(7, 1000);
    check_data(6, 16'h0001, p1);
    push_item(ENT_SEND_ACK, 16'h0200);
    wait_frames(8, 500);
    check_ack(7, 16'h0200);
    check(wait_ack, "still waiting after the ACK frame");
    push_item(ENT_PEER_ACK, 16'h0001);
    repeat (5) @(posedge clk);
    check(!wait_ack && seq == 2, "second packet released");

    // collision holds transmission back
    @(negedge clk) col = 1'b1;
    push_item(ENT_SEND_ACK, 16'h0300);
    n = frames.size();
    repeat (200) @(posedge clk);
    check(frames.size() == n && !tx_en, "no frame while col_i is high");
    @(negedge clk) col = 1'b0;
    wait_frames(n + 1, 500);
    check_ack(n, 16'h0300);

    // ACK switch off: items are dropped
    @(negedge clk) ack_en = 1'b0;
    repeat (4) @(posedge clk);
    push_item(ENT_SEND_ACK, 16'h0400);
    n = frames.size();
    repeat (300) @(posedge clk);
    check(frames.size() == n && fq.size() == 0, "ACK suppressed by the switch");
    @(negedge clk) ack_en = 1'b1;
    repeat (4) @(posedge clk);
    push_item(ENT_SEND_ACK, 16'h0401);
    wait_frames(n + 1, 500);
    check_ack(n, 16'h0401);

    check(min_gap >= IFG, $sformatf("smallest gap %0d clocks", min_gap));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

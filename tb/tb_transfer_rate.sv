// tb_transfer_rate: sustained transfers through the EthController at its
// default parameters, in the stop-and-wait style of the PC program the core
// was built for.
//
// PC -> FPGA: the testbench sends NPKT data packets of 1024 bytes (1032-byte
// protocol frames, the size of the published benchmark). After each one it
// waits up to PC_TIMEOUT for the ACK frame and resends the packet, at most 3
// times, before giving up. For packet 3 the ACK switch is turned off for the
// first attempt, so one PC retry happens. Checks: every word arrives in order,
// every packet is acknowledged with its own number, and the rate is at least
// the 2935.6 packets/s of the benchmark (at most 340.6 us per packet).
//
// FPGA -> PC: user logic streams NPKT packets of 512 words. The PC answers
// each DATA frame with an ACK after a fixed turnaround (PC_TURN). Checks:
// packet numbers 0..NPKT-1 in order, payloads intact, no timeout resends, and
// the same minimum rate.
module tb_transfer_rate;
  import eth_tb_pkg::*;

  localparam int    NPKT       = 24;
  localparam int    WORDS      = 512;
  localparam time   PC_TIMEOUT = 2ms;
  localparam time   PC_TURN    = 20us;
  localparam real   MIN_RATE   = 2935.6;    // packets per second

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
  always #19.9 tx_clk = ~tx_clk;

  initial begin
    #60ms;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input logic cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL @%0t: %s", $time, what); end
  endtask

  // received words (FPGA user side)
  logic [15:0] words [$];
  int resends = 0;
  always @(posedge rx_clk) if (!reset && rx_usr_valid) words.push_back(rx_usr_data);
  always @(posedge tx_clk) if (!reset && tx_resend) resends++;

  // transmitted frames
  frame_t frames [$];
  nib_q_t cur;
  bit in_frame = 1'b0;
  always @(posedge tx_clk) if (!reset) begin
    if (tx_en) begin
      in_frame = 1'b1;
      cur.push_back(tx_data);
    end else if (in_frame) begin
      in_frame = 1'b0;
      frames.push_back(parse_frame(cur));
      cur.delete();
    end
  end

  task automatic pc_send(input nib_q_t n);
    @(negedge rx_clk);
    foreach (n[i]) begin
      rx_valid = 1'b1; rx_data = n[i];
      @(negedge rx_clk);
    end
    rx_valid = 1'b0; rx_data = '0;
    repeat (24) @(negedge rx_clk);
  endtask

  // Waits for the next frame from the FPGA, up to tmo; returns 1 if it came.
  task automatic next_frame(input time tmo, output bit got, output frame_t fr);
    time t0 = $time;
    got = 1'b0;
    while (!got && $time - t0 < tmo) begin
      @(posedge tx_clk);
      if (frames.size() > 0) begin
        fr  = frames.pop_front();
        got = 1'b1;
      end
    end
  endtask

  initial begin
    byte_q_t pays [NPKT];
    byte_q_t none;
    time t_start, t_end;   // ns
    real rate;
    int pc_retries, word_errors;

    pc_retries = 0; word_errors = 0;
    repeat (5) @(posedge rx_clk);
    reset = 1'b0;
    repeat (10) @(posedge tx_clk);

    // ---------------- PC -> FPGA ----------------
    t_start = $time;
    for (int k = 0; k < NPKT; k++) begin
      automatic bit acked = 1'b0;
      automatic int tries = 0;
      pays[k] = rand_bytes(2 * WORDS);
      while (!acked && tries < 4) begin
        automatic bit got;
        automatic frame_t fr;
        if (k == 3) ack_en = (tries > 0);
        tries++;
        pc_send(frame_nibbles(data_field(T_DATA, 16'(k), 16'(2 * WORDS), pays[k], 60), 15, 1'b0));
        next_frame(PC_TIMEOUT, got, fr);
        if (got && fr.ok && fr.typ == T_ACK && fr.nr == 16'(k)) acked = 1'b1;
      end
      check(acked, $sformatf("packet %0d acknowledged within 3 retries", k));
      pc_retries += tries - 1;
    end
    t_end = $time;
    ack_en = 1'b1;
    rate = real'(NPKT) / (real'(t_end - t_start) * 1.0e-9 - 0.002);   // the timed-out attempt excluded
    $display("PC->FPGA: %0d packets in %0d us, %0.1f packets/s without the retry wait", NPKT, (t_end - t_start) / 1us, rate);
    check(rate >= MIN_RATE, "PC->FPGA rate at least 2935.6 packets/s");
    // packet 3 was received twice (its first ACK was suppressed)
    check(words.size() == (NPKT + 1) * WORDS, $sformatf("words received %0d", words.size()));
    begin
      automatic int w = 0;
      for (int k = 0; k < NPKT; k++) begin
        for (int rep = 0; rep < ((k == 3) ? 2 : 1); rep++)
          for (int i = 0; i < WORDS; i++) begin
            if (w < words.size() && words[w] != {pays[k][2*i], pays[k][2*i+1]}) word_errors++;
            w++;
          end
      end
    end
    check(word_errors == 0, "received words in order and intact");

    // ---------------- FPGA -> PC ----------------
    t_start = $time;
    fork
      // user logic
      for (int k = 0; k < NPKT; k++) begin
        for (int w = 0; w < WORDS; w++) begin
          @(negedge tx_clk);
          tx_usr_data  = 16'(k * 7919 + w * 31);
          tx_usr_valid = 1'b1;
          tx_usr_last  = (w == WORDS - 1);
          @(posedge tx_clk);
          while (!tx_usr_ready) @(posedge tx_clk);
        end
        @(negedge tx_clk);
        tx_usr_valid = 1'b0; tx_usr_last = 1'b0;
      end
      // PC
      for (int k = 0; k < NPKT; k++) begin
        automatic bit got;
        automatic frame_t fr;
        automatic int bad = 0;
        next_frame(PC_TIMEOUT, got, fr);
        check(got && fr.ok && fr.typ == T_DATA && fr.nr == 16'(k) && int'(fr.len) == 2 * WORDS,
              $sformatf("DATA frame %0d", k));
        if (got && fr.ok)
          for (int w = 0; w < WORDS && 2*w+1 < fr.pay.size(); w++)
            if ({fr.pay[2*w], fr.pay[2*w+1]} != 16'(k * 7919 + w * 31)) bad++;
        check(bad == 0, $sformatf("payload of DATA frame %0d", k));
        #(PC_TURN);
        pc_send(frame_nibbles(data_field(T_ACK, 16'(k), 16'h0, none, 60), 15, 1'b0));
      end
    join
    t_end = $time;
    rate = real'(NPKT) / (real'(t_end - t_start) * 1.0e-9);
    $display("FPGA->PC: %0d packets in %0d us, %0.1f packets/s, %0d resends", NPKT, (t_end - t_start) / 1us, rate, resends);
    check(rate >= MIN_RATE, "FPGA->PC rate at least 2935.6 packets/s");
    check(resends == 0, "no timeout resends with a prompt PC");
    check(pc_retries == 1, $sformatf("exactly one PC retry (ACK switch), got %0d", pc_retries));

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

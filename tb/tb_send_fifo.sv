// tb_send_fifo: drives the dual-clock FIFO from two unrelated clocks
// (40 ns and 37 ns). Checks: empty after reset; first-word-fall-through data
// order against a reference queue under random write/read traffic; full
// after 2**AW writes with no reads (and no write taken while full); empty
// again after everything is read.
module tb_send_fifo;
  localparam int AW = 3;
  localparam int DEPTH = 1 << AW;

  logic wclk = 1'b0, rclk = 1'b0, wrst = 1'b1, rrst = 1'b1;
  logic wr_req = 1'b0, rd_req = 1'b0, full, empty;
  logic [31:0] wr_data = '0, rd_data;
  logic [31:0] model [$];
  int checks = 0, failures = 0;
  int written = 0, readn = 0;
  bit  wr_on = 1'b0, rd_on = 1'b0;

  send_fifo #(.WIDTH(32), .AW(AW)) dut (
    .wr_clk(wclk), .wr_rst(wrst), .wr_req(wr_req), .wr_data(wr_data), .full(full),
    .rd_clk(rclk), .rd_rst(rrst), .rd_req(rd_req), .rd_data(rd_data), .empty(empty));

  always #20 wclk = ~wclk;
  always #18.5 rclk = ~rclk;

  initial begin
    #2000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input logic cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", what); end
  endtask

  // writer
  always @(posedge wclk) begin
    if (wr_req && !full) begin
      model.push_back(wr_data);
      written++;
    end
    #1;
    wr_req  = wr_on && ($urandom_range(0, 3) != 0);
    wr_data = $urandom;
  end

  // reader
  always @(posedge rclk) begin
    if (rd_req && !empty) begin
      check(model.size() > 0, "read with nothing written");
      if (model.size() > 0) begin
        check(rd_data == model[0], $sformatf("data order at word %0d", readn));
        void'(model.pop_front());
      end
      readn++;
    end
    #1;
    rd_req = rd_on && ($urandom_range(0, 3) != 0);
  end

  initial begin
    repeat (4) @(posedge wclk);
    wrst = 1'b0;
    @(posedge rclk); rrst = 1'b0;
    repeat (3) @(posedge rclk);
    check(empty, "empty after reset");
    check(!full, "not full after reset");

    // fill without reading
    wr_on = 1'b1;
    wait (written == DEPTH);
    @(posedge wclk); wr_on = 1'b0;
    repeat (6) @(posedge wclk);
    check(full, "full after DEPTH writes");
    check(written == DEPTH, "no write accepted while full");

    // random traffic in both directions
    rd_on = 1'b1; wr_on = 1'b1;
    wait (readn >= 400);
    wr_on = 1'b0;
    wait (model.size() == 0);
    repeat (6) @(posedge rclk);
    rd_on = 1'b0;
    check(empty, "empty when drained");
    check(readn == written, "all words read");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

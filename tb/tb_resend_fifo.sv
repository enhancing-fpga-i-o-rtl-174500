// tb_resend_fifo: fills the resend buffer with random words, checks the
// word count and the full flag (no write taken when full), reads every
// address twice in a random order with the one-clock read latency (a packet
// replayed), then clears it and checks that a new, shorter packet is stored
// from address 0.
module tb_resend_fifo;
  localparam int AW = 5;
  localparam int DEPTH = 1 << AW;

  logic clk = 1'b0, rst = 1'b1, clr = 1'b0, wr_en = 1'b0, full;
  logic [15:0] wr_data = '0, rd_data;
  logic [AW:0] count;
  logic [AW-1:0] rd_addr = '0;
  logic [15:0] ref_mem [DEPTH];
  int checks = 0, failures = 0;

  resend_fifo #(.WIDTH(16), .AW(AW)) dut (
    .clk(clk), .rst(rst), .clr_i(clr), .wr_en(wr_en), .wr_data(wr_data),
    .full_o(full), .count_o(count), .rd_addr(rd_addr), .rd_data(rd_data));

  always #5 clk = ~clk;

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input logic cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic write_word(input logic [15:0] w);
    wr_data = w; wr_en = 1'b1;
    @(posedge clk); #1;
    wr_en = 1'b0;
  endtask

  task automatic read_check(input int a);
    rd_addr = AW'(a);
    @(posedge clk); #1;
    check(rd_data == ref_mem[a], $sformatf("read addr %0d", a));
  endtask

  initial begin
    repeat (2) @(posedge clk);
    #1 rst = 1'b0;
    check(count == 0 && !full, "empty after reset");
    for (int i = 0; i < DEPTH; i++) begin
      ref_mem[i] = 16'($urandom);
      write_word(ref_mem[i]);
      check(count == (AW+1)'(i + 1), "count while filling");
    end
    check(full, "full at DEPTH words");
    write_word(16'hDEAD);
    check(count == (AW+1)'(DEPTH), "write ignored when full");
    for (int rep = 0; rep < 2; rep++)
      for (int i = 0; i < DEPTH; i++) read_check(int'($urandom_range(0, DEPTH-1)));
    for (int i = 0; i < DEPTH; i++) read_check(i);

    clr = 1'b1; @(posedge clk); #1; clr = 1'b0;
    check(count == 0 && !full, "cleared");
    for (int i = 0; i < 5; i++) begin
      ref_mem[i] = 16'($urandom);
      write_word(ref_mem[i]);
    end
    check(count == 5, "count of second packet");
    for (int i = 0; i < 5; i++) read_check(i);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

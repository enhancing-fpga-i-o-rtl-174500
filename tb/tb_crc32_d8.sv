// tb_crc32_d8: checks the byte-wide CRC-32 against a bit-serial reference
// written in the non-reflected (MSB-first, polynomial 04C11DB7h) form, so the
// two do not share an algorithm. Checks the standard check value of
// "123456789" (CBF43926h), random messages, the init input, and that feeding
// a frame followed by its own FCS gives check_o == 0 while a corrupted frame
// does not.
module tb_crc32_d8;
  logic clk = 1'b0, rst = 1'b1, init = 1'b0, en = 1'b0;
  logic [7:0]  din = '0;
  logic [31:0] crc, fcs, chk;
  int checks = 0, failures = 0;

  crc32_d8 dut (.clk(clk), .rst(rst), .init_i(init), .en_i(en), .data_i(din),
                .crc_o(crc), .fcs_o(fcs), .check_o(chk));

  always #5 clk = ~clk;

  initial begin
    #200000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [7:0] rev8(input logic [7:0] b);
    for (int i = 0; i < 8; i++) rev8[i] = b[7-i];
  endfunction
  function automatic logic [31:0] rev32(input logic [31:0] b);
    for (int i = 0; i < 32; i++) rev32[i] = b[31-i];
  endfunction

  // Reference: MSB-first LFSR on bit-reversed bytes, returns the FCS value.
  function automatic logic [31:0] ref_fcs(input logic [7:0] m [], input int n);
    logic [31:0] r = 32'hFFFF_FFFF;
    for (int k = 0; k < n; k++) begin
      logic [7:0] b = rev8(m[k]);
      for (int i = 7; i >= 0; i--) begin
        logic fb = r[31] ^ b[i];
        r = {r[30:0], 1'b0};
        if (fb) r = r ^ 32'h04C1_1DB7;
      end
    end
    return rev32(~r);
  endfunction

  task automatic feed(input logic [7:0] b);
    din = b; en = 1'b1;
    @(posedge clk); #1;
    en = 1'b0;
  endtask

  task automatic restart();
    init = 1'b1; @(posedge clk); #1; init = 1'b0;
  endtask

  task automatic check(input logic cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    logic [7:0] msg [];
    repeat (3) @(posedge clk);
    #1 rst = 1'b0;
    check(crc == 32'hFFFF_FFFF, "reset value");

    // "123456789"
    msg = new[9];
    foreach (msg[i]) msg[i] = 8'h31 + 8'(i);
    foreach (msg[i]) feed(msg[i]);
    check(fcs == 32'hCBF4_3926, "check value of 123456789");
    check(ref_fcs(msg, 9) == 32'hCBF4_3926, "reference self-test");

    // en low holds the value
    din = 8'hA5; @(posedge clk); #1;
    check(fcs == 32'hCBF4_3926, "hold when en low");

    // random messages, FCS and residue
    for (int t = 0; t < 40; t++) begin
      automatic int n = 1 + int'($urandom_range(0, 70));
      automatic logic [31:0] f;
      msg = new[n];
      foreach (msg[i]) msg[i] = 8'($urandom);
      restart();
      check(crc == 32'hFFFF_FFFF, "init");
      foreach (msg[i]) feed(msg[i]);
      f = ref_fcs(msg, n);
      check(fcs == f, $sformatf("fcs len %0d", n));
      for (int k = 0; k < 4; k++) feed(f[8*k +: 8]);
      check(chk == 32'h0, "residue of intact frame");
      // same frame with one bit flipped
      restart();
      msg[$urandom_range(0, n-1)] ^= 8'(1 << $urandom_range(0, 7));
      foreach (msg[i]) feed(msg[i]);
      for (int k = 0; k < 4; k++) feed(f[8*k +: 8]);
      check(chk != 32'h0, "corrupt frame detected");
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

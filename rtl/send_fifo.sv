// send_fifo: dual-clock FIFO that carries work items from the receive clock
// domain (written by EthReceive) to the transmit clock domain (read by
// EthSend). The two MII clocks are both 25 MHz but unrelated.
//
// Classic gray-code design: each side keeps a binary pointer one bit wider
// than the address, publishes it in gray code, and brings the other side's
// gray pointer in through a two-flop synchronizer. "full" and "empty" are
// therefore conservative: they may stay asserted a few cycles after the other
// side has moved, never the other way round.
//
// Interface and timing: wr_req with wr_data writes one word on wr_clk unless
// full. The read side is first-word-fall-through: while empty is low, rd_data
// already shows the oldest word, and rd_req on rd_clk removes it. The port
// names and the 32-bit width follow the original paper's simulation set-up; the
// depth, the full flag, the resets and the show-ahead read are this design's
// choices.
module send_fifo #(
  parameter int unsigned WIDTH = 32,
  parameter int unsigned AW    = 4            // depth = 2**AW words
) (
  input  logic             wr_clk,
  input  logic             wr_rst,            // active high, synchronous to wr_clk
  input  logic             wr_req,
  input  logic [WIDTH-1:0] wr_data,
  output logic             full,

  input  logic             rd_clk,
  input  logic             rd_rst,            // active high, synchronous to rd_clk
  input  logic             rd_req,
  output logic [WIDTH-1:0] rd_data,
  output logic             empty
);

  localparam int unsigned DEPTH = 1 << AW;

  logic [WIDTH-1:0] mem [DEPTH];

  logic [AW:0] wbin_q, wgray_q, rbin_q, rgray_q;
  logic [AW:0] rgray_w1, rgray_w2;   // read pointer seen in write domain
  logic [AW:0] wgray_r1, wgray_r2;   // write pointer seen in read domain

  function automatic logic [AW:0] bin2gray(input logic [AW:0] b);
    return b ^ (b >> 1);
  endfunction

  // ---------------- write side ----------------
  logic [AW:0] wbin_nx;
  logic        wr_do;
  assign wr_do   = wr_req && !full;
  assign wbin_nx = wbin_q + (AW+1)'(wr_do);

  always_ff @(posedge wr_clk) begin
    if (wr_do) mem[wbin_q[AW-1:0]] <= wr_data;
  end

  always_ff @(posedge wr_clk) begin
    if (wr_rst) begin
      wbin_q   <= '0;
      wgray_q  <= '0;
      rgray_w1 <= '0;
      rgray_w2 <= '0;
    end else begin
      wbin_q   <= wbin_nx;
      wgray_q  <= bin2gray(wbin_nx);
      rgray_w1 <= rgray_q;
      rgray_w2 <= rgray_w1;
    end
  end

  // Full when the pointers differ only in their two top bits (gray form).
  assign full = (wgray_q == {~rgray_w2[AW:AW-1], rgray_w2[AW-2:0]});

  // ---------------- read side ----------------
  logic [AW:0] rbin_nx;
  logic        rd_do;
  assign rd_do   = rd_req && !empty;
  assign rbin_nx = rbin_q + (AW+1)'(rd_do);

  always_ff @(posedge rd_clk) begin
    if (rd_rst) begin
      rbin_q   <= '0;
      rgray_q  <= '0;
      wgray_r1 <= '0;
      wgray_r2 <= '0;
    end else begin
      rbin_q   <= rbin_nx;
      rgray_q  <= bin2gray(rbin_nx);
      wgray_r1 <= wgray_q;
      wgray_r2 <= wgray_r1;
    end
  end

  assign empty   = (rgray_q == wgray_r2);
  assign rd_data = mem[rbin_q[AW-1:0]];

endmodule

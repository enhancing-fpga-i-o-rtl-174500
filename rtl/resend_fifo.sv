// resend_fifo: payload store of the last data packet sent, so that EthSend
// can transmit it again when its acknowledgement does not arrive in time.
//
// It is written like a FIFO (wr_en appends one 16-bit word at the write
// pointer; clr_i empties it before the next packet is loaded) but read by
// address, so the same packet can be replayed from its first word as often as
// needed. count_o tells how many words the current packet holds. Reads are
// synchronous: rd_data is valid one clock after rd_addr, which lets the array
// map to a block RAM (512 x 16 bits at the default size).
//
// The original paper names the ResendFIFO and says what it stores; its width, depth
// (1024 payload bytes, from the frame sizes in the transfer statistics),
// replay-by-address read port and clear input are this design's choices.
module resend_fifo #(
  parameter int unsigned WIDTH = 16,
  parameter int unsigned AW    = 9             // 2**AW words
) (
  input  logic             clk,
  input  logic             rst,                // synchronous, active high
  input  logic             clr_i,              // discard the stored packet
  input  logic             wr_en,
  input  logic [WIDTH-1:0] wr_data,
  output logic             full_o,
  output logic [AW:0]      count_o,            // words stored
  input  logic [AW-1:0]    rd_addr,
  output logic [WIDTH-1:0] rd_data
);

  localparam int unsigned DEPTH = 1 << AW;

  logic [WIDTH-1:0] mem [DEPTH];
  logic [AW:0]      wptr_q;

  assign full_o  = (wptr_q == (AW+1)'(DEPTH));
  assign count_o = wptr_q;

  always_ff @(posedge clk) begin
    if (rst || clr_i)           wptr_q <= '0;
    else if (wr_en && !full_o)  wptr_q <= wptr_q + 1'b1;
  end

  always_ff @(posedge clk) begin
    if (wr_en && !full_o) mem[wptr_q[AW-1:0]] <= wr_data;
    rd_data <= mem[rd_addr];
  end

endmodule

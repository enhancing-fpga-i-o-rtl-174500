// rst_sync: reset synchronizer. The asynchronous, active-high reset input
// asserts rst_o at once and releases it two clocks after the input falls, in
// step with clk, so each clock domain of the EthController leaves reset
// cleanly. A helper of this design; the original paper has one reset input only.
module rst_sync (
  input  logic clk,
  input  logic rst_i,   // asynchronous, active high
  output logic rst_o    // active high, released synchronously
);

  logic [1:0] q;

  always_ff @(posedge clk or posedge rst_i) begin
    if (rst_i) q <= 2'b11;
    else       q <= {q[0], 1'b0};
  end

  assign rst_o = q[1];

endmodule

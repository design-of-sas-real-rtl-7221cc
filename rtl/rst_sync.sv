// Reset synchroniser: asserts rst_out as soon as rst_in rises, releases it
// two clk edges after rst_in falls, so every flop of the domain leaves reset
// on the same edge. Both reset signals are active high. The board shares one
// reset between the FPGA and the SSD2828 bridge; each clock domain of the
// FPGA gets its own copy through one of these.
module rst_sync (
  input  logic clk,
  input  logic rst_in,
  output logic rst_out
);
  logic stage;

  always_ff @(posedge clk or posedge rst_in) begin
    if (rst_in) begin
      stage   <= 1'b1;
      rst_out <= 1'b1;
    end else begin
      stage   <= 1'b0;
      rst_out <= stage;
    end
  end
endmodule

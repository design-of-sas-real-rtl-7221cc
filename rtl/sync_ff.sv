// Two-flop synchroniser for single-bit level signals crossing into clk.
// d is sampled on every rising edge; q follows it two cycles later. The first
// stage may go metastable, the second gives it a full cycle to settle. Reset
// loads RST_VAL into both stages (active-high, synchronous to clk).
module sync_ff #(
  parameter int unsigned WIDTH   = 1,
  parameter logic        RST_VAL = 1'b0
) (
  input  logic             clk,
  input  logic             rst,
  input  logic [WIDTH-1:0] d,
  output logic [WIDTH-1:0] q
);
  logic [WIDTH-1:0] meta;

  always_ff @(posedge clk) begin
    if (rst) begin
      meta <= {WIDTH{RST_VAL}};
      q    <= {WIDTH{RST_VAL}};
    end else begin
      meta <= d;
      q    <= meta;
    end
  end
endmodule

// sync2: two-flip-flop synchroniser for a single level or toggle signal
// crossing into the clock domain of clk. Output follows the input after two
// to three clk edges. Reset asynchronous, active low, to RST_VAL.
module sync2 #(
  parameter bit RST_VAL = 1'b0
) (
  input  logic clk,
  input  logic rst_n,
  input  logic d,
  output logic q
);
  logic meta;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      meta <= RST_VAL;
      q    <= RST_VAL;
    end else begin
      meta <= d;
      q    <= meta;
    end
  end
endmodule

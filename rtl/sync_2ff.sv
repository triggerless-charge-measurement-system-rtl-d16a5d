// sync_2ff: two-flip-flop synchroniser for slowly changing levels or
// Gray-coded values crossing into the clock domain of clk. Output lags the
// input by two clk edges. Reset value is zero. Design's own helper.
module sync_2ff #(
  parameter int unsigned W = 1
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic [W-1:0] d,
  output logic [W-1:0] q
);
  logic [W-1:0] meta;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      meta <= '0;
      q    <= '0;
    end else begin
      meta <= d;
      q    <= meta;
    end
  end
endmodule

// reset_sync: asserts rst_n_out asynchronously with the board reset and
// releases it two edges of clk later, so every clock domain leaves reset
// cleanly. Design's own helper.
module reset_sync (
  input  logic clk,
  input  logic rst_n_in,
  output logic rst_n_out
);
  logic stage;
  always_ff @(posedge clk or negedge rst_n_in) begin
    if (!rst_n_in) begin
      stage     <= 1'b0;
      rst_n_out <= 1'b0;
    end else begin
      stage     <= 1'b1;
      rst_n_out <= stage;
    end
  end
endmodule

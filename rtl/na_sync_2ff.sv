// Two-flop synchronizer. A signal from another timing domain is sampled by
// two flip-flops in series, giving the first one a full clock cycle to
// resolve metastability before the value is used. Reset value is 0.
//
// The two-flop synchronizer and its one-cycle settling window follow the
// original adapter's clock-crossing scheme. The reset value of 0 matches the
// idle level of the toggles it carries; it is this design's choice.
module na_sync_2ff (
  input  logic clk,
  input  logic rst_n,
  input  logic d,
  output logic q
);
  logic meta;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      meta <= 1'b0;
      q    <= 1'b0;
    end else begin
      meta <= d;
      q    <= meta;
    end
  end
endmodule

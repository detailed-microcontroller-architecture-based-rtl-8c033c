// nhse_down_counter: one of the counter registers of an nHSE_lr block
// (mrTEV_cnt, mrWDEV_cnt, crD1_cnt, crD2_cnt) with its "== 0" detector.
//
// On `load` the counter takes `load_val` (the value of the matching
// configuration register). While `en` is high and the count is not zero it
// decrements once per clock. `expired` is a one-cycle pulse in the cycle the
// count has just reached 0 (the "== 0" detector, taken on the step from 1).
// A load has priority over counting. Reloading with 0 leaves the counter stopped without an event.
// Counting once per machine cycle (no prescaler) is this design's choice.
module nhse_down_counter #(
  parameter int unsigned W = 32
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         load,
  input  logic [W-1:0] load_val,
  input  logic         en,
  output logic [W-1:0] cnt,
  output logic         expired
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cnt     <= '0;
      expired <= 1'b0;
    end else begin
      expired <= 1'b0;
      if (load) begin
        cnt <= load_val;
      end else if (en && cnt != '0) begin
        cnt <= cnt - 1'b1;
        if (cnt == W'(1)) expired <= 1'b1;
      end
    end
  end

endmodule

// hits_counter: counts the seeds found for the current subject word.
//
// clr zeroes the count (the hitter asserts it when a lookup starts) and inc
// adds one per hit; clr wins if both are high. count is num_of_hits. Both act
// on the rising edge, so count shows a hit one cycle after inc.
//
// From the source design: a hits counter inside the hitter whose value is the
// number of hits reported to the host. Its width (16 bits, enough for every
// position of a 65536-entry table) and the clear-on-start are this design's
// choices.
module hits_counter #(
  parameter int unsigned CNT_W = 16
) (
  input  logic             clk,
  input  logic             reset,
  input  logic             clr,
  input  logic             inc,
  output logic [CNT_W-1:0] count
);

  always_ff @(posedge clk) begin
    if (reset || clr) count <= '0;
    else if (inc)     count <= count + 1'b1;
  end

endmodule

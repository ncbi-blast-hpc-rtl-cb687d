// wr_addr_gen: memory write address generator of the hitter.
//
// Offset pairs of one lookup are stored one after another starting at mem_base.
// load copies mem_base into the address register when a lookup starts; adv
// moves it on by one 8-byte pair after each accepted write. vadr is the address
// of the next pair to be written. load wins over adv.
//
// From the source design: the generator exists, takes mem_base (AEG[1], the
// address where results start) and feeds mc_req_vadr. Consecutive quad-word
// addresses from mem_base for every call are this design's reading; the host
// moves mem_base on between calls by 8 x the returned hit count.
module wr_addr_gen
  import blast_pkg::*;
#(
  parameter int unsigned AW = VADR_W
) (
  input  logic          clk,
  input  logic          reset,
  input  logic          load,
  input  logic [AW-1:0] mem_base,
  input  logic          adv,
  output logic [AW-1:0] vadr
);

  always_ff @(posedge clk) begin
    if (reset)     vadr <= '0;
    else if (load) vadr <= mem_base;
    else if (adv)  vadr <= vadr + AW'(PAIR_BYTES);
  end

endmodule

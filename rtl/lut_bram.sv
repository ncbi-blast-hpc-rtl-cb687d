// lut_bram: one query lookup table of the hitter (backbone or overflow table).
//
// A simple-dual-port block RAM of DEPTH x WIDTH. The read port is synchronous
// with an enable: when rd_en is high the word at rd_addr appears on rd_data
// after the next rising edge; when rd_en is low rd_data keeps its value, which
// lets the hitter hold a looked-up entry while the memory path is stalled.
// The write port loads the table one word per cycle.
//
// From the source design: two such memories of 65536 x 16, one per table, read
// by the hitter FSM almost every cycle. There the tables are preloaded into
// the FPGA block RAMs at configuration from files generated for one query; here
// they are loaded through the write port instead, so any query's tables can be
// used without rebuilding the design. No reset: contents are defined by loading.
module lut_bram #(
  parameter int unsigned DEPTH = 65536,
  parameter int unsigned WIDTH = 16,
  localparam int unsigned AW   = $clog2(DEPTH)
) (
  input  logic             clk,
  // read port
  input  logic             rd_en,
  input  logic [AW-1:0]    rd_addr,
  output logic [WIDTH-1:0] rd_data,
  // load port
  input  logic             wr_en,
  input  logic [AW-1:0]    wr_addr,
  input  logic [WIDTH-1:0] wr_data
);

  logic [WIDTH-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (wr_en) mem[wr_addr] <= wr_data;
  end

  always_ff @(posedge clk) begin
    if (rd_en) rd_data <= mem[rd_addr];
  end

endmodule

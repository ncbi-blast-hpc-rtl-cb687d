// mem_xbar: write-request crossbar from the personality to the eight MC ports.
//
// Every memory controller owns one eighth of coprocessor memory. With binary
// interleave the controller of an address is given by its bits 8:6, so the
// crossbar sends each request to port vadr[8:6] and returns that port's stall
// to the requester. The routing is combinational: a request is accepted in the
// cycle its st is high, which the requester only does while stall is low.
//
// From the source design: the crossbar's place between the personality and the
// MC interfaces, its job of routing requests to the MC that owns the address,
// and the use of address bits 8:6. The source uses a vendor-supplied crossbar;
// this one handles only the write requests the personality issues (writes get
// no response) and has no queueing of its own.
module mem_xbar
  import blast_pkg::*;
(
  input  mc_req_t              req,
  output logic                 stall,
  output mc_req_t [NUM_MC-1:0] mc_req,
  input  logic    [NUM_MC-1:0] mc_stall
);

  logic [2:0] sel;
  assign sel = mc_of(req.vadr);

  always_comb begin
    for (int i = 0; i < NUM_MC; i++) begin
      mc_req[i].st   = req.st && (sel == 3'(i));
      mc_req[i].vadr = req.vadr;
      mc_req[i].wrd  = req.wrd;
    end
  end

  assign stall = mc_stall[sel];

endmodule

// ocb_dlb: one decision logic block (DLB) of the output control block's
// request chain.
//
// The busy status of every output port enters from the previous DLB (or from
// the status register for the first one). The DLB belongs to one input
// control block, whose build-up request arrives one-hot over the output
// ports. A request for an output whose status bit is clear is granted: the
// reply bit for that output goes high and the status passed on to the next
// DLB has the bit set, so every later (lower priority) input sees the output
// as taken. A request for a busy output gets no reply bit and leaves the
// status unchanged. Chaining the DLBs in port-id order gives the fixed
// priority of the switch: the lowest input id wins.
//
// Purely combinational. Interface: status_in/status_out and req/reply, all
// NPORTS wide, bit j standing for output port j.
module ocb_dlb #(
  parameter int unsigned NPORTS = pcc_pkg::NPORTS
) (
  input  logic [NPORTS-1:0] status_in,
  input  logic [NPORTS-1:0] req,
  output logic [NPORTS-1:0] reply,
  output logic [NPORTS-1:0] status_out
);

  always_comb begin
    reply      = req & ~status_in;
    status_out = status_in | reply;
  end

endmodule

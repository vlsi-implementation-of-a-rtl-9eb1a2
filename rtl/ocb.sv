// ocb: output control block of the switch.
//
// A register holds one busy bit per output port. Its value runs down a chain
// of decision logic blocks (ocb_dlb), one per input control block in order of
// port id, so input 0 is served first; each DLB answers its input's build-up
// request and marks a granted output busy for the DLBs below it. A second
// chain gathers the tear-down orders of all input control blocks into one
// mask of outputs to release. The register update block combines the two:
// the next status is the output of the request chain with the released
// outputs cleared.
//
// Timing: replies are combinational from the register and the requests of
// the same cycle; grants and releases take effect in the register at the
// next clock edge. An output released in a cycle is therefore free for a
// request in the following cycle, and a request in the same cycle as the
// release of the same output is refused (the register still shows it busy).
//
// Interface: build_req[i] and tear_down[i] are the one-hot (or zero) orders
// of input control block i over the output ports, reply[i] its answer, busy
// the status register. Reset clears every busy bit (this design's choice).
module ocb #(
  parameter int unsigned NPORTS = pcc_pkg::NPORTS
) (
  input  logic                          clk,
  input  logic                          rst_n,
  input  logic [NPORTS-1:0][NPORTS-1:0] build_req,
  input  logic [NPORTS-1:0][NPORTS-1:0] tear_down,
  output logic [NPORTS-1:0][NPORTS-1:0] reply,
  output logic [NPORTS-1:0]             busy
);

  // status[i] enters the DLB of input i; status[NPORTS] leaves the last one.
  logic [NPORTS:0][NPORTS-1:0] status;
  // release mask gathered along the tear-down chain
  logic [NPORTS:0][NPORTS-1:0] release_mask;

  assign status[0]       = busy;
  assign release_mask[0] = '0;

  for (genvar i = 0; i < NPORTS; i++) begin : g_chain
    ocb_dlb #(.NPORTS(NPORTS)) u_dlb (
      .status_in  (status[i]),
      .req        (build_req[i]),
      .reply      (reply[i]),
      .status_out (status[i+1])
    );
    assign release_mask[i+1] = release_mask[i] | tear_down[i];
  end

  // register update
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) busy <= '0;
    else        busy <= status[NPORTS] & ~release_mask[NPORTS];
  end

endmodule

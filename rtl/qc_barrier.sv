// qc_barrier: barrier synchronization status of the cluster.
//
// A core that executes a barrier (or a MODE switch, which is a barrier over
// its group) raises req with the barrier mask, the set of cores that must
// meet, and holds it until go. The status register records which cores
// are waiting and with which mask. Core c is released (go[c]) in the cycle
// in which every core j of its mask is waiting, now or already, with the
// same mask. All members of a barrier are released in the same cycle, so a
// barrier that all cores reach together costs a single cycle, and disjoint
// sets of cores synchronize independently. The status is read by every core
// at once, with no polling of memory. The barrier mask, its matching with
// the set of cores and the single-cycle release follow the published
// design; the mask comparison between waiting cores is this design's own.
module qc_barrier
  import qc_pkg::*;
(
  input  logic                clk,
  input  logic                rst_n,
  input  logic   [NCORES-1:0] req,
  input  cmask_t [NCORES-1:0] mask,
  output logic   [NCORES-1:0] go,
  output cmask_t              status
);

  cmask_t waiting;

  always_comb begin
    waiting = status | req;
    for (int c = 0; c < NCORES; c++) begin
      go[c] = req[c];
      for (int j = 0; j < NCORES; j++)
        if (mask[c][j] && !(waiting[j] && mask[j] == mask[c]))
          go[c] = 1'b0;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) status <= '0;
    else        status <= req & ~go;
  end

  // a released core must have been one of its own barrier's members
  property p_go_needs_req(int c);
    @(posedge clk) disable iff (!rst_n) go[c] |-> req[c];
  endproperty
  for (genvar c = 0; c < NCORES; c++) begin : g_chk
    a_go_req: assert property (p_go_needs_req(c));
  end

endmodule

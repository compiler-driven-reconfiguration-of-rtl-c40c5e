// qc_interconnect: reconfigurable interconnections between the decode and
// execute stages of the four cores.
//
// Instruction routing: for each core the unit chooses which decoded
// instruction enters its execute stage. In ASYNC and SYNC mode every core
// executes its own decoder's output. In SIMD mode the lowest-numbered core
// of the group mask is the master and the decoded control and data word of
// its decoder is forwarded to every other core of the group, which
// executes it on its own register bank while its own fetch and decode sit
// idle. The selection uses the mode each core will be in after its current
// instruction (mode_nxt), so a MODE instruction takes effect for the very
// next instruction: reconfiguration costs a single cycle.
//
// Execution control: a core in ASYNC mode advances its execute stage when
// it alone is ready. A core in SYNC or SIMD mode advances only when every
// core of its group mask is ready, so the group moves through its
// instructions in lock-step and every instruction of the group takes the
// time of its slowest member. Forwarding between decode and execute and
// lock-step execution follow the published design; choosing the master as
// the lowest core of the mask and implementing lock-step as a joint
// advance are this design's own choices.
module qc_interconnect
  import qc_pkg::*;
(
  input  ctrl_t  [NCORES-1:0] dec_ctrl,   // each core's decoder output
  input  mode_e  [NCORES-1:0] mode,       // mode of the current instruction
  input  cmask_t [NCORES-1:0] mask,       // group of the current instruction
  input  mode_e  [NCORES-1:0] mode_nxt,   // mode for the next instruction
  input  cmask_t [NCORES-1:0] mask_nxt,
  input  logic   [NCORES-1:0] ready,      // execute stage may complete
  output ctrl_t  [NCORES-1:0] ex_ctrl,    // instruction entering execute
  output logic   [NCORES-1:0] slave_nxt,  // core takes a forwarded instruction
  output logic   [NCORES-1:0] advance     // execute stage completes this cycle
);

  always_comb begin
    for (int c = 0; c < NCORES; c++) begin
      logic [CID_W-1:0] m;
      m            = lowest_core(mask_nxt[c]);
      slave_nxt[c] = (mode_nxt[c] == MODE_SIMD) && (m != CID_W'(c));
      ex_ctrl[c]   = slave_nxt[c] ? dec_ctrl[m] : dec_ctrl[c];
    end
  end

  always_comb begin
    for (int c = 0; c < NCORES; c++) begin
      advance[c] = ready[c];
      if (mode[c] != MODE_ASYNC)
        for (int j = 0; j < NCORES; j++)
          if (mask[c][j] && !ready[j]) advance[c] = 1'b0;
    end
  end

endmodule

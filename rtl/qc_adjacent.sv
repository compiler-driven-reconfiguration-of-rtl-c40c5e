// qc_adjacent: fast access to adjacent external memory locations.
//
// Sits between the bus arbiter and the external memory. An adjacent
// transaction (adj set, issued by the master of a group of cores) moves
// NCORES consecutive words in one bus transaction instead of one
// arbitrated transaction per core. For a store the unit fills lane k of the
// write data with the store value of core k (st_data), collecting the data
// of all cores into one write. For a load, and for the completion of a
// store, it registers the lanes when the memory acknowledges and, one cycle
// later, pulses done for the cores of the transaction's lane mask and
// presents lane k to core k; two groups thus never take each other's data.
// This distribution cycle makes an adjacent access take 7 cycles instead of
// the up to 15 of four arbitrated single accesses. Normal transactions pass through unchanged.
// Collecting and distributing the words among the four processors and the
// 7-cycle access follow the published design; the lane-per-core layout and
// the registered distribution are this design's own.
module qc_adjacent
  import qc_pkg::*;
(
  input  logic              clk,
  input  logic              rst_n,
  input  wb_req_t           m_req,
  output wb_rsp_t           m_rsp,
  output wb_req_t           s_req,
  input  wb_rsp_t           s_rsp,
  input  word_t [NCORES-1:0] st_data,
  output cmask_t            done,
  output word_t [NCORES-1:0] data
);

  always_comb begin
    s_req = m_req;
    if (m_req.adj && m_req.we)
      for (int k = 0; k < NCORES; k++) s_req.dat[k] = st_data[k];
  end

  assign m_rsp = s_rsp;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      done <= '0;
      data <= '0;
    end else begin
      done <= (s_rsp.ack && m_req.adj) ? m_req.sel : '0;
      if (s_rsp.ack && m_req.adj && !m_req.we) data <= s_rsp.dat;
    end
  end

endmodule

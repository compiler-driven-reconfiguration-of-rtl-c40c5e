// qc_wb_arbiter: round-robin arbiter of the shared wishbone bus.
//
// Every core is a bus master that raises cyc/stb and holds its request
// until ack. The arbiter owns a registered grant: when the bus is free, or
// in the cycle the current owner is acknowledged, it picks the next
// requesting core after the last owner in circular order (the owner just
// acknowledged is skipped), so back-to-back transactions follow without an
// idle cycle and no core waits behind more than NCORES-1 others. The
// owner's request is passed to the slave and the slave's ack is returned to
// the owner only; the read data lanes go to every core. The round-robin
// policy and the shared wishbone bus follow the published design; the
// registered grant (one arbitration cycle) is this design's own choice and
// gives, with the memory's timing, the published 6-cycle single access and
// 15-cycle worst case for four simultaneous accesses.
module qc_wb_arbiter
  import qc_pkg::*;
(
  input  logic                 clk,
  input  logic                 rst_n,
  input  wb_req_t [NCORES-1:0] m_req,
  output logic    [NCORES-1:0] m_ack,
  output wb_req_t              s_req,
  input  logic                 s_ack,
  output logic    [NCORES-1:0] grant
);

  logic             busy;
  logic [CID_W-1:0] owner;
  logic [CID_W-1:0] last;
  logic             pick_ok;
  logic [CID_W-1:0] pick;
  logic             free;

  assign free = !busy || s_ack;

  always_comb begin
    pick_ok = 1'b0;
    pick    = last;
    for (int k = 1; k <= NCORES; k++) begin
      logic [CID_W-1:0] c;
      c = CID_W'((int'(last) + k) % NCORES);
      if (!pick_ok && m_req[c].cyc && !(busy && s_ack && c == owner)) begin
        pick_ok = 1'b1;
        pick    = c;
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy  <= 1'b0;
      owner <= '0;
      last  <= CID_W'(NCORES - 1);
    end else if (free) begin
      busy <= pick_ok;
      if (pick_ok) begin
        owner <= pick;
        last  <= pick;
      end
    end
  end

  assign s_req = busy ? m_req[owner] : WB_IDLE;

  always_comb begin
    m_ack = '0;
    grant = '0;
    if (busy) begin
      m_ack[owner] = s_ack;
      grant[owner] = 1'b1;
    end
  end

  for (genvar c = 0; c < NCORES; c++) begin : g_chk
    // a master keeps its request up until it is acknowledged
    a_hold: assert property (@(posedge clk) disable iff (!rst_n)
      grant[c] && !m_ack[c] |=> m_req[c].cyc);
  end

endmodule

// Output controller: the two cell places of every fabric output port and the
// output mask that sends one of them.
//
// In each read cycle the SBM write/read controller grants at most one
// unicast and (in the third cycle) one multicast read per output port. The
// output controller notes the grant with the cell's queue length, steers the
// output MUX in the following clock, when the bank data arrives, and stores
// the cell in the port's unicast or multicast place. So at most two cells
// wait at an output port per slot.
//
// At t = T_DECIDE the output mask picks one cell per port: the one whose
// queue was longer when it was read (a tie goes to the unicast cell). The
// chosen cell is offered to the output rotation buffer (next_valid,
// next_cell) and its queue is popped: uq_pop[p], or mq_pop[p] with
// mq_pop_mci[p]. The other cell stays at the head of its queue and is read
// again in a later slot. The SBM address of a sent unicast cell is returned
// to the idle queues at t = T_UFREE + p (ufree_valid, ufree_entry).
//
// The two places per port and the longer-queue choice follow the switch
// architecture; the tie rule, the re-read of the losing cell and the cycle
// numbers are this design's choices.
module output_ctrl
  import switch_pkg::*;
#(
  parameter int N_PORTS = 4,
  parameter int N_SBM   = 8,
  parameter int ADDR_W  = 6,
  parameter int L_W     = 8,
  parameter int M_W     = 3,
  parameter int S_W     = $clog2(N_SBM),
  parameter int E_W     = S_W + ADDR_W
) (
  input  logic            clk,
  input  logic            rst_n,
  input  slot_cycle_t     t,
  // grants from the SBM write/read controller
  input  logic            u_grant [N_PORTS],
  input  logic [L_W-1:0]  u_len   [N_PORTS],
  input  logic [E_W-1:0]  u_head  [N_PORTS],
  input  logic            m_grant [N_PORTS],
  input  logic [L_W-1:0]  m_len   [N_PORTS],
  input  logic [E_W-1:0]  m_head  [N_PORTS],
  input  logic [M_W-1:0]  m_mci   [N_PORTS],
  // output MUX
  output logic [S_W-1:0]  u_sel   [N_PORTS],
  output logic [S_W-1:0]  m_sel   [N_PORTS],
  input  cell_t           u_cell  [N_PORTS],
  input  cell_t           m_cell  [N_PORTS],
  // queue updates
  output logic            uq_pop     [N_PORTS],
  output logic            mq_pop     [N_PORTS],
  output logic [M_W-1:0]  mq_pop_mci [N_PORTS],
  output logic            ufree_valid,
  output logic [E_W-1:0]  ufree_entry,
  // to the output rotation buffer
  output logic            next_valid [N_PORTS],
  output cell_t           next_cell  [N_PORTS],
  // what the mask chose in this slot, for observation
  output logic            sent_mcast [N_PORTS]
);

  logic           u_arr [N_PORTS];   // unicast data arrives in this clock
  logic           m_arr [N_PORTS];
  logic           u_have [N_PORTS];
  logic           m_have [N_PORTS];
  logic [L_W-1:0] u_len_q [N_PORTS];
  logic [L_W-1:0] m_len_q [N_PORTS];
  logic [E_W-1:0] u_ent_q [N_PORTS];
  logic [M_W-1:0] m_mci_q [N_PORTS];
  logic           u_win  [N_PORTS];
  logic           m_win  [N_PORTS];
  logic           freed  [N_PORTS];
  logic [E_W-1:0] freed_ent [N_PORTS];
  cell_t          u_place [N_PORTS];
  cell_t          m_place [N_PORTS];

  logic is_decide;
  assign is_decide = (t == slot_cycle_t'(T_DECIDE));

  always_comb begin
    for (int p = 0; p < N_PORTS; p++) begin
      u_win[p]      = u_have[p] && (!m_have[p] || u_len_q[p] >= m_len_q[p]);
      m_win[p]      = m_have[p] && !u_win[p];
      uq_pop[p]     = is_decide && u_win[p];
      mq_pop[p]     = is_decide && m_win[p];
      mq_pop_mci[p] = m_mci_q[p];
    end
    ufree_valid = 1'b0;
    ufree_entry = '0;
    for (int p = 0; p < N_PORTS; p++)
      if (t == slot_cycle_t'(T_UFREE + p) && freed[p]) begin
        ufree_valid = 1'b1;
        ufree_entry = freed_ent[p];
      end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int p = 0; p < N_PORTS; p++) begin
        u_arr[p]      <= 1'b0;
        m_arr[p]      <= 1'b0;
        u_have[p]     <= 1'b0;
        m_have[p]     <= 1'b0;
        u_sel[p]      <= '0;
        m_sel[p]      <= '0;
        u_len_q[p]    <= '0;
        m_len_q[p]    <= '0;
        u_ent_q[p]    <= '0;
        m_mci_q[p]    <= '0;
        freed[p]      <= 1'b0;
        freed_ent[p]  <= '0;
        next_valid[p] <= 1'b0;
        sent_mcast[p] <= 1'b0;
      end
    end else begin
      for (int p = 0; p < N_PORTS; p++) begin
        u_arr[p] <= u_grant[p];
        m_arr[p] <= m_grant[p];
        if (u_grant[p]) begin
          u_sel[p]   <= u_head[p][E_W-1:ADDR_W];
          u_len_q[p] <= u_len[p];
          u_ent_q[p] <= u_head[p];
        end
        if (m_grant[p]) begin
          m_sel[p]   <= m_head[p][E_W-1:ADDR_W];
          m_len_q[p] <= m_len[p];
          m_mci_q[p] <= m_mci[p];
        end
        if (t == 0) begin
          u_have[p] <= 1'b0;
          m_have[p] <= 1'b0;
        end else begin
          if (u_arr[p]) u_have[p] <= 1'b1;
          if (m_arr[p]) m_have[p] <= 1'b1;
        end
        if (is_decide) begin
          next_valid[p] <= u_win[p] || m_win[p];
          sent_mcast[p] <= m_win[p];
          freed[p]      <= u_win[p];
          freed_ent[p]  <= u_ent_q[p];
        end
      end
    end
  end

  always_ff @(posedge clk) begin
    for (int p = 0; p < N_PORTS; p++) begin
      if (u_arr[p]) u_place[p] <= u_cell[p];
      if (m_arr[p]) m_place[p] <= m_cell[p];
      if (is_decide) next_cell[p] <= u_win[p] ? u_place[p] : m_place[p];
    end
  end

endmodule

// SBM write/read controller: slot timing, bank choice for writes, and the
// three read cycles of every cell slot.
//
// Slot timing: a free-running counter t counts the SLOT_CYCLES clocks of a
// cell slot; slot_start marks cycle 0. Every other block works off t.
//
// Write cycle (t = T_WRITE): an incoming cell is eligible when its address
// queue has room. The banks are ranked by their vacancy (free addresses,
// more first, ties to the lower bank number) and the k-th eligible input
// (lower input index first) is written into the bank of rank k, if that bank
// has room. So all cells of a slot are written in parallel into different
// banks, the emptier banks first, and the banks fill evenly like one large
// memory. A cell that finds no room is dropped (drop[i]).
//
// Read cycles (t = T_READ1 .. T_READ1+2): each bank can deliver one cell per
// read cycle. In every read cycle each output port whose unicast head cell
// has not been read yet in this slot asks for that cell's bank; where several
// ports ask for one bank the port with the longer unicast queue wins (ties to
// the lower port). In the third read cycle every port also offers its chosen
// multicast head cell; it is read only if its bank serves no unicast cell in
// that cycle, and among multicast requests for one bank the longer queue
// wins. Grants are pulses (u_grant, m_grant) in the read cycle; the bank
// data returns one clock later.
//
// The vacancy-ordered writes, the three read cycles, the unicast-only first
// two cycles, the multicast third cycle and the longer-queue priority follow
// the switch architecture. Tie rules, cycle numbers and the drop on overflow
// are this design's choices.
module sbm_rw_ctrl
  import switch_pkg::*;
#(
  parameter int N_PORTS = 4,
  parameter int N_SBM   = 8,
  parameter int SBM_DEPTH = 64,
  parameter int L_W     = 8,
  parameter int P_W     = $clog2(N_PORTS),
  parameter int S_W     = $clog2(N_SBM),
  parameter int ADDR_W  = $clog2(SBM_DEPTH),
  parameter int E_W     = S_W + ADDR_W
) (
  input  logic              clk,
  input  logic              rst_n,
  output slot_cycle_t       t,
  output logic              slot_start,
  // write side
  input  tag_t              in_tag    [N_PORTS],
  input  logic              uq_accept [N_PORTS],
  input  logic              mq_accept [N_PORTS],
  input  logic [ADDR_W:0]   vacancy   [N_SBM],
  input  logic [ADDR_W-1:0] idle_addr [N_SBM],
  output logic              idle_pop  [N_SBM],
  output logic              uq_push   [N_PORTS],
  output logic              mq_push   [N_PORTS],
  output logic [E_W-1:0]    wr_entry  [N_PORTS],
  output logic              drop      [N_PORTS],
  output logic [P_W-1:0]    wsel      [N_SBM],
  // read side
  input  logic              u_avail [N_PORTS],
  input  logic [L_W-1:0]    u_len   [N_PORTS],
  input  logic [E_W-1:0]    u_head  [N_PORTS],
  input  logic              m_avail [N_PORTS],
  input  logic [L_W-1:0]    m_len   [N_PORTS],
  input  logic [E_W-1:0]    m_head  [N_PORTS],
  output logic              u_grant [N_PORTS],
  output logic              m_grant [N_PORTS],
  output logic [1:0]        read_cycle,   // 0..2 while a read cycle is on
  // SBM access
  output logic              sbm_en   [N_SBM],
  output logic              sbm_we   [N_SBM],
  output logic [ADDR_W-1:0] sbm_addr [N_SBM]
);

  logic is_write, is_read, is_read3;
  logic u_done [N_PORTS];
  logic [S_W-1:0] u_bank [N_PORTS];
  logic [S_W-1:0] m_bank [N_PORTS];
  logic [S_W-1:0] rank   [N_SBM];
  logic           in_ok  [N_PORTS];
  logic           u_bank_busy [N_SBM];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) t <= '0;
    else if (t == slot_cycle_t'(SLOT_CYCLES - 1)) t <= '0;
    else t <= t + 1'b1;
  end

  assign slot_start = (t == 0);
  assign is_write   = (t == slot_cycle_t'(T_WRITE));
  assign is_read    = (t >= slot_cycle_t'(T_READ1)) && (t < slot_cycle_t'(T_READ1 + N_READS));
  assign is_read3   = (t == slot_cycle_t'(T_READ1 + N_READS - 1));
  assign read_cycle = is_read ? 2'(t - slot_cycle_t'(T_READ1)) : 2'd0;

  // ---------------- write cycle: vacancy ranking and bank assignment
  always_comb begin
    for (int s = 0; s < N_SBM; s++) begin
      int r;
      r = 0;
      for (int q = 0; q < N_SBM; q++)
        if (vacancy[q] > vacancy[s] || (vacancy[q] == vacancy[s] && q < s)) r++;
      rank[s] = S_W'(r);
    end

    for (int s = 0; s < N_SBM; s++) begin
      idle_pop[s] = 1'b0;
      wsel[s]     = '0;
    end
    for (int i = 0; i < N_PORTS; i++) begin
      uq_push[i]  = 1'b0;
      mq_push[i]  = 1'b0;
      drop[i]     = 1'b0;
      wr_entry[i] = '0;
      in_ok[i]    = in_tag[i].valid && (in_tag[i].mcast ? mq_accept[i] : uq_accept[i]);
    end

    begin
      int ord;
      ord = 0;
      for (int i = 0; i < N_PORTS; i++) begin
        logic got;
        got = 1'b0;
        if (is_write && in_tag[i].valid) begin
          if (in_ok[i]) begin
            for (int s = 0; s < N_SBM; s++)
              if (int'(rank[s]) == ord && vacancy[s] != 0) begin
                got         = 1'b1;
                idle_pop[s] = 1'b1;
                wsel[s]     = P_W'(i);
                wr_entry[i] = {S_W'(s), idle_addr[s]};
              end
            ord++;
          end
          uq_push[i] = got && !in_tag[i].mcast;
          mq_push[i] = got &&  in_tag[i].mcast;
          drop[i]    = !got;
        end
      end
    end
  end

  // ---------------- read cycles: queue-length priority per bank
  always_comb begin
    for (int p = 0; p < N_PORTS; p++) begin
      u_bank[p] = u_head[p][E_W-1:ADDR_W];
      m_bank[p] = m_head[p][E_W-1:ADDR_W];
    end
    for (int s = 0; s < N_SBM; s++) u_bank_busy[s] = 1'b0;

    for (int p = 0; p < N_PORTS; p++) begin
      logic beaten;
      beaten = 1'b0;
      for (int q = 0; q < N_PORTS; q++)
        if (q != p && u_avail[q] && !u_done[q] && u_bank[q] == u_bank[p] &&
            (u_len[q] > u_len[p] || (u_len[q] == u_len[p] && q < p)))
          beaten = 1'b1;
      u_grant[p] = is_read && u_avail[p] && !u_done[p] && !beaten;
      if (u_grant[p]) u_bank_busy[u_bank[p]] = 1'b1;
    end

    for (int p = 0; p < N_PORTS; p++) begin
      logic beaten;
      beaten = 1'b0;
      for (int q = 0; q < N_PORTS; q++)
        if (q != p && m_avail[q] && !u_bank_busy[m_bank[q]] && m_bank[q] == m_bank[p] &&
            (m_len[q] > m_len[p] || (m_len[q] == m_len[p] && q < p)))
          beaten = 1'b1;
      m_grant[p] = is_read3 && m_avail[p] && !u_bank_busy[m_bank[p]] && !beaten;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int p = 0; p < N_PORTS; p++) u_done[p] <= 1'b0;
    end else begin
      for (int p = 0; p < N_PORTS; p++)
        if (slot_start)      u_done[p] <= 1'b0;
        else if (u_grant[p]) u_done[p] <= 1'b1;
    end
  end

  // ---------------- SBM address, enable and write enable
  always_comb begin
    for (int s = 0; s < N_SBM; s++) begin
      sbm_en[s]   = is_write && idle_pop[s];
      sbm_we[s]   = is_write;
      sbm_addr[s] = idle_addr[s];
    end
    for (int p = 0; p < N_PORTS; p++) begin
      if (u_grant[p]) begin
        sbm_en[u_bank[p]]   = 1'b1;
        sbm_addr[u_bank[p]] = u_head[p][ADDR_W-1:0];
      end
      if (m_grant[p]) begin
        sbm_en[m_bank[p]]   = 1'b1;
        sbm_addr[m_bank[p]] = m_head[p][ADDR_W-1:0];
      end
    end
  end

endmodule

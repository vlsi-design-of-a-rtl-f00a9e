// Multicast address queue controller: one address queue per multicast
// connection identifier (MCI), with one read pointer per output port.
//
// A multicast cell is stored once. Its entry (SBM number, SBM address) joins
// the queue of its MCI together with a pending mask of the destination ports
// that still have to read it. Every destination port walks the queue with its
// own read pointer, so the ports of one connection read their copies
// independently. For every output port the controller offers the head cell
// of the MCI whose queue is longest for that port (cells that port has not
// read yet; ties go to the lower MCI): avail[p], sel_mci[p], sel_len[p],
// sel_entry[p]. pop[p] with pop_mci[p] advances that port's pointer and
// clears its pending bit.
//
// The destination set of each MCI is written through the cfg_* port when the
// connection is set up. Ports outside the set keep their pointer at the end
// of the queue. When the oldest entry of an MCI has been read by every
// destination it can be freed: free_req for MCI free_mci returns its address
// (free_valid, free_entry) and removes it.
//
// Push side as in the unicast controller: req/mci/entry per input, accept
// when the MCI has destinations and room, push for the cells that got an SBM.
//
// Per-MCI queues and per-port read pointers follow the switch architecture.
// The pending mask, the release of the oldest entry, the tie rule and the
// configuration port are this design's choices.
module multicast_aq_ctrl #(
  parameter int N_PORTS = 4,
  parameter int N_MCI   = 8,
  parameter int DEPTH   = 32,
  parameter int E_W     = 9,
  parameter int M_W     = $clog2(N_MCI),
  parameter int Q_W     = $clog2(DEPTH),
  parameter int L_W     = Q_W + 1
) (
  input  logic           clk,
  input  logic           rst_n,
  // connection set-up
  input  logic           cfg_we,
  input  logic [M_W-1:0] cfg_mci,
  input  logic [N_PORTS-1:0] cfg_dests,
  // push (write cycle)
  input  logic           req    [N_PORTS],
  input  logic [M_W-1:0] mci    [N_PORTS],
  input  logic [E_W-1:0] entry  [N_PORTS],
  output logic           accept [N_PORTS],
  input  logic           push   [N_PORTS],
  // per output port: best multicast head cell
  output logic           avail     [N_PORTS],
  output logic [M_W-1:0] sel_mci   [N_PORTS],
  output logic [L_W-1:0] sel_len   [N_PORTS],
  output logic [E_W-1:0] sel_entry [N_PORTS],
  input  logic           pop     [N_PORTS],
  input  logic [M_W-1:0] pop_mci [N_PORTS],
  // release of fully read cells
  input  logic           free_req,
  input  logic [M_W-1:0] free_mci,
  output logic           free_valid,
  output logic [E_W-1:0] free_entry
);

  logic [E_W-1:0]     ent  [N_MCI][DEPTH];
  logic [N_PORTS-1:0] pend [N_MCI][DEPTH];
  logic [N_PORTS-1:0] dests [N_MCI];
  logic [Q_W:0]       wr   [N_MCI];
  logic [Q_W:0]       tail [N_MCI];
  logic [Q_W:0]       rd   [N_MCI][N_PORTS];

  logic [Q_W:0] wr_next [N_MCI];
  logic [L_W-1:0] plen  [N_MCI][N_PORTS];

  always_comb begin
    for (int m = 0; m < N_MCI; m++) begin
      int n;
      n = 0;
      for (int i = 0; i < N_PORTS; i++)
        if (push[i] && mci[i] == M_W'(m)) n++;
      wr_next[m] = wr[m] + (Q_W+1)'(n);
      for (int p = 0; p < N_PORTS; p++)
        plen[m][p] = dests[m][p] ? L_W'(wr[m] - rd[m][p]) : '0;
    end

    for (int i = 0; i < N_PORTS; i++) begin
      int ahead;
      ahead = 0;
      for (int j = 0; j < i; j++)
        if (req[j] && mci[j] == mci[i]) ahead++;
      accept[i] = (dests[mci[i]] != '0) &&
                  (int'(L_W'(wr[mci[i]] - tail[mci[i]])) + ahead < DEPTH);
    end

    for (int p = 0; p < N_PORTS; p++) begin
      avail[p]   = 1'b0;
      sel_mci[p] = '0;
      sel_len[p] = '0;
      for (int m = 0; m < N_MCI; m++)
        if (plen[m][p] > sel_len[p]) begin
          avail[p]   = 1'b1;
          sel_mci[p] = M_W'(m);
          sel_len[p] = plen[m][p];
        end
      sel_entry[p] = ent[sel_mci[p]][rd[sel_mci[p]][p][Q_W-1:0]];
    end

    free_valid = (tail[free_mci] != wr[free_mci]) &&
                 ((pend[free_mci][tail[free_mci][Q_W-1:0]] & dests[free_mci]) == '0);
    free_entry = ent[free_mci][tail[free_mci][Q_W-1:0]];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int m = 0; m < N_MCI; m++) begin
        dests[m] <= '0;
        wr[m]    <= '0;
        tail[m]  <= '0;
        for (int p = 0; p < N_PORTS; p++) rd[m][p] <= '0;
      end
    end else begin
      if (cfg_we) dests[cfg_mci] <= cfg_dests;
      for (int m = 0; m < N_MCI; m++) begin
        wr[m] <= wr_next[m];
        for (int p = 0; p < N_PORTS; p++)
          if (!dests[m][p]) rd[m][p] <= wr_next[m];
      end
      for (int p = 0; p < N_PORTS; p++)
        if (pop[p] && plen[pop_mci[p]][p] != 0)
          rd[pop_mci[p]][p] <= rd[pop_mci[p]][p] + 1'b1;
      if (free_req && free_valid) tail[free_mci] <= tail[free_mci] + 1'b1;
    end
  end

  always_ff @(posedge clk) begin
    for (int m = 0; m < N_MCI; m++) begin
      logic [Q_W:0] w;
      w = wr[m];
      for (int i = 0; i < N_PORTS; i++)
        if (push[i] && mci[i] == M_W'(m)) begin
          ent[m][w[Q_W-1:0]]  <= entry[i];
          pend[m][w[Q_W-1:0]] <= dests[m];
          w = w + 1'b1;
        end
    end
    for (int p = 0; p < N_PORTS; p++)
      if (pop[p] && plen[pop_mci[p]][p] != 0)
        pend[pop_mci[p]][rd[pop_mci[p]][p][Q_W-1:0]][p] <= 1'b0;
  end

endmodule

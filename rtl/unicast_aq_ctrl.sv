// Unicast address queue controller: one FIFO per output port of the places
// (SBM number, SBM address) where that port's unicast cells wait.
//
// Push side: in the write cycle up to N_PORTS cells arrive at once, and
// several may be for the same output port. Input i asks with req[i] for port
// dest[i]; accept[i] says whether that queue still has room after the
// earlier inputs of the same clock (lower input index first). The write
// controller then pushes the accepted cells that also got an SBM (push[i]),
// and they join their queues in input order in that one clock.
// Pop side: head[p] is the oldest entry of queue p, len[p] its length (the
// read priority of its head cell); pop[p] removes the head.
//
// The per-port FIFOs of (SBM number, address) follow the switch
// architecture; the multi-input push is this design's way of queueing
// parallel writes in one clock.
module unicast_aq_ctrl #(
  parameter int N_PORTS = 4,
  parameter int DEPTH   = 128,
  parameter int E_W     = 9,
  parameter int P_W     = $clog2(N_PORTS),
  parameter int Q_W     = $clog2(DEPTH)
) (
  input  logic           clk,
  input  logic           rst_n,
  input  logic           req    [N_PORTS],
  input  logic [P_W-1:0] dest   [N_PORTS],
  input  logic [E_W-1:0] entry  [N_PORTS],
  output logic           accept [N_PORTS],
  input  logic           push   [N_PORTS],
  input  logic           pop    [N_PORTS],
  output logic [E_W-1:0] head   [N_PORTS],
  output logic [Q_W:0]   len    [N_PORTS]
);

  logic [E_W-1:0] mem [N_PORTS][DEPTH];
  logic [Q_W-1:0] rd  [N_PORTS];
  logic [Q_W-1:0] wr  [N_PORTS];
  logic [Q_W:0]   n_in [N_PORTS];   // cells joining each queue in this clock

  always_comb begin
    for (int i = 0; i < N_PORTS; i++) begin
      int ahead;
      ahead = 0;
      for (int j = 0; j < i; j++)
        if (req[j] && dest[j] == dest[i]) ahead++;
      accept[i] = (int'(len[dest[i]]) + ahead) < DEPTH;
    end
    for (int p = 0; p < N_PORTS; p++) begin
      head[p] = mem[p][rd[p]];
      n_in[p] = '0;
      for (int i = 0; i < N_PORTS; i++)
        if (push[i] && dest[i] == P_W'(p)) n_in[p]++;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int p = 0; p < N_PORTS; p++) begin
        rd[p]  <= '0;
        wr[p]  <= '0;
        len[p] <= '0;
      end
    end else begin
      for (int p = 0; p < N_PORTS; p++) begin
        wr[p]  <= wr[p] + Q_W'(n_in[p]);
        if (pop[p] && len[p] != 0) rd[p] <= rd[p] + 1'b1;
        len[p] <= len[p] + n_in[p] - (Q_W+1)'(pop[p] && len[p] != 0);
      end
    end
  end

  always_ff @(posedge clk) begin
    for (int p = 0; p < N_PORTS; p++) begin
      logic [Q_W-1:0] w;
      w = wr[p];
      for (int i = 0; i < N_PORTS; i++)
        if (push[i] && dest[i] == P_W'(p)) begin
          mem[p][w] <= entry[i];
          w = w + 1'b1;
        end
    end
  end

endmodule

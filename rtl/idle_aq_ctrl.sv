// Idle address queue controller: keeps the free cell addresses of every SBM.
//
// One FIFO of free addresses per SBM. vacancy[s] is the number of free
// addresses of SBM s, the measure by which the write controller prefers the
// emptier banks. pop[s] takes the address shown on pop_addr[s] (at most one
// per bank per clock); push returns one freed address (push_sbm, push_addr)
// per clock.
//
// After reset every address is free. Rather than preloading the FIFOs, each
// bank first hands out the never-used addresses 0..DEPTH-1 from a counter and
// only then draws on its FIFO, which holds the addresses returned since. The
// per-bank FIFOs follow the switch architecture; the counter start-up and
// the single return port are this design's choices.
module idle_aq_ctrl #(
  parameter int N_SBM  = 8,
  parameter int DEPTH  = 64,
  parameter int S_W    = $clog2(N_SBM),
  parameter int ADDR_W = $clog2(DEPTH)
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              pop      [N_SBM],
  output logic [ADDR_W-1:0] pop_addr [N_SBM],
  input  logic              push,
  input  logic [S_W-1:0]    push_sbm,
  input  logic [ADDR_W-1:0] push_addr,
  output logic [ADDR_W:0]   vacancy  [N_SBM]
);

  logic [ADDR_W-1:0] fifo  [N_SBM][DEPTH];
  logic [ADDR_W:0]   fresh [N_SBM];   // addresses handed out from the counter
  logic [ADDR_W:0]   cnt   [N_SBM];   // addresses waiting in the FIFO
  logic [ADDR_W-1:0] rd    [N_SBM];
  logic [ADDR_W-1:0] wr    [N_SBM];

  logic do_push [N_SBM];
  logic do_fifo_pop [N_SBM];

  always_comb begin
    for (int s = 0; s < N_SBM; s++) begin
      do_push[s]     = push && (push_sbm == S_W'(s));
      do_fifo_pop[s] = pop[s] && (fresh[s] == (ADDR_W+1)'(DEPTH)) && (cnt[s] != 0);
      vacancy[s]  = (ADDR_W+1)'(DEPTH) - fresh[s] + cnt[s];
      pop_addr[s] = (fresh[s] != (ADDR_W+1)'(DEPTH)) ? fresh[s][ADDR_W-1:0] : fifo[s][rd[s]];
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int s = 0; s < N_SBM; s++) begin
        fresh[s] <= '0;
        cnt[s]   <= '0;
        rd[s]    <= '0;
        wr[s]    <= '0;
      end
    end else begin
      for (int s = 0; s < N_SBM; s++) begin
        if (pop[s] && fresh[s] != (ADDR_W+1)'(DEPTH)) fresh[s] <= fresh[s] + 1'b1;
        if (do_fifo_pop[s]) rd[s] <= rd[s] + 1'b1;
        if (do_push[s])     wr[s] <= wr[s] + 1'b1;
        cnt[s] <= cnt[s] + (ADDR_W+1)'(do_push[s]) - (ADDR_W+1)'(do_fifo_pop[s]);
      end
    end
  end

  always_ff @(posedge clk) begin
    if (push) fifo[push_sbm][wr[push_sbm]] <= push_addr;
  end

endmodule

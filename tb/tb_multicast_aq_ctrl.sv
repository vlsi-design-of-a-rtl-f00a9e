// Test of the multicast address queue controller against a reference model
// kept with absolute indices: per MCI the stored entries, their pending
// masks, the write and release counters, and one read counter per output
// port. Random connection set-ups, pushes from several inputs at once, pops
// and release requests. Every clock the room check, the longest-queue choice
// of every port (MCI, length, entry) and the release outputs are compared.
// Small sizes (4 MCIs, depth 8) make full queues and ties frequent.
module tb_multicast_aq_ctrl;
  localparam int NP = 4, NM = 4, D = 8, EW = 9;
  logic clk = 1'b0, rst_n = 1'b0;
  logic cfg_we = 0;
  logic [1:0] cfg_mci = '0;
  logic [NP-1:0] cfg_dests = '0;
  logic req [NP], accept [NP], push [NP];
  logic [1:0] mci [NP];
  logic [EW-1:0] entry [NP];
  logic avail [NP];
  logic [1:0] sel_mci [NP];
  logic [3:0] sel_len [NP];
  logic [EW-1:0] sel_entry [NP];
  logic pop [NP];
  logic [1:0] pop_mci [NP];
  logic free_req = 0;
  logic [1:0] free_mci = '0;
  logic free_valid;
  logic [EW-1:0] free_entry;

  multicast_aq_ctrl #(.N_PORTS(NP), .N_MCI(NM), .DEPTH(D), .E_W(EW)) dut (
    .clk, .rst_n, .cfg_we, .cfg_mci, .cfg_dests, .req, .mci, .entry, .accept, .push,
    .avail, .sel_mci, .sel_len, .sel_entry, .pop, .pop_mci,
    .free_req, .free_mci, .free_valid, .free_entry);
  always #5 clk = ~clk;

  // reference model
  logic [NP-1:0] m_dests [NM];
  int m_wr [NM], m_tail [NM], m_rd [NM][NP];
  int m_ent [NM][int];
  logic [NP-1:0] m_pend [NM][int];
  int checks = 0, failures = 0, n_full = 0, n_free = 0, n_pop = 0;

  function automatic int plen(int m, int p);
    return m_dests[m][p] ? m_wr[m] - m_rd[m][p] : 0;
  endfunction

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL %s at %0t", what, $time); end
  endtask

  initial begin
    for (int m = 0; m < NM; m++) begin
      m_dests[m] = '0; m_wr[m] = 0; m_tail[m] = 0;
      for (int p = 0; p < NP; p++) m_rd[m][p] = 0;
    end
    for (int i = 0; i < NP; i++) begin req[i] = 0; push[i] = 0; pop[i] = 0; mci[i] = 0; pop_mci[i] = 0; entry[i] = 0; end
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int n = 0; n < 6000; n++) begin
      int ahead [NM];
      int fv;
      @(negedge clk);
      // inputs of this clock
      cfg_we = (n < NM) || ($urandom_range(199) == 0);
      cfg_mci = 2'(n < NM ? n : $urandom_range(NM - 1));
      cfg_dests = NP'($urandom_range(15));
      if (n < NM) cfg_dests = NP'(4'b0011 << n) | NP'(n == 3 ? 1 : 0);
      for (int i = 0; i < NP; i++) begin
        req[i] = ($urandom_range(99) < 35);
        mci[i] = 2'($urandom_range(NM - 1));
        entry[i] = EW'($urandom);
        pop[i] = ($urandom_range(99) < 50);
        pop_mci[i] = 2'($urandom_range(NM - 1));
      end
      free_req = ($urandom_range(99) < 60);
      free_mci = 2'($urandom_range(NM - 1));
      #1;
      // use the offered choice for some of the pops, as the switch does
      for (int p = 0; p < NP; p++) if ($urandom_range(1)) pop_mci[p] = sel_mci[p];
      #1;
      // check the combinational outputs against the model
      for (int m = 0; m < NM; m++) ahead[m] = 0;
      for (int i = 0; i < NP; i++) begin
        bit exp_acc;
        exp_acc = (m_dests[mci[i]] != 0) && (m_wr[mci[i]] - m_tail[mci[i]] + ahead[mci[i]] < D);
        if (req[i]) begin
          ahead[mci[i]]++;
          check(accept[i] === exp_acc, "accept");
          if (!exp_acc) n_full++;
        end
        push[i] = req[i] && exp_acc;
      end
      for (int p = 0; p < NP; p++) begin
        int bm, bl;
        bm = 0; bl = 0;
        for (int m = 0; m < NM; m++) if (plen(m, p) > bl) begin bm = m; bl = plen(m, p); end
        check(avail[p] === (bl > 0), "avail");
        if (bl > 0) begin
          check(int'(sel_mci[p]) == bm, "sel_mci");
          check(int'(sel_len[p]) == bl, "sel_len");
          check(int'(sel_entry[p]) == m_ent[bm][m_rd[bm][p]], "sel_entry");
        end
      end
      fv = (m_tail[free_mci] != m_wr[free_mci]) &&
           ((m_pend[free_mci][m_tail[free_mci]] & m_dests[free_mci]) == 0);
      check(free_valid === fv[0], "free_valid");
      if (fv) check(int'(free_entry) == m_ent[free_mci][m_tail[free_mci]], "free_entry");
      // model update for the coming clock edge
      if (free_req && fv) begin m_tail[free_mci]++; n_free++; end
      for (int p = 0; p < NP; p++)
        if (pop[p] && plen(pop_mci[p], p) != 0) begin
          m_pend[pop_mci[p]][m_rd[pop_mci[p]][p]][p] = 1'b0;
          m_rd[pop_mci[p]][p]++;
          n_pop++;
        end
      for (int i = 0; i < NP; i++)
        if (push[i]) begin
          m_ent[mci[i]][m_wr[mci[i]]]  = int'(entry[i]);
          m_pend[mci[i]][m_wr[mci[i]]] = m_dests[mci[i]];
          m_wr[mci[i]]++;
        end
      for (int m = 0; m < NM; m++)
        for (int p = 0; p < NP; p++) if (!m_dests[m][p]) m_rd[m][p] = m_wr[m];
      if (cfg_we) m_dests[cfg_mci] = cfg_dests;
    end
    check(n_full > 0 && n_free > 0 && n_pop > 0, "full queues, releases and pops all seen");
    $display("full %0d releases %0d pops %0d", n_full, n_free, n_pop);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (14000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

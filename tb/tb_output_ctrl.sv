// Test of the output controller. Each slot every port randomly gets a
// unicast grant in one of the three read cycles and/or a multicast grant in
// the third, with random queue lengths. The bank data returning in the clock
// after a grant is random; the test plays the output MUX. At the decision
// cycle it checks which queue is popped (longer queue wins, a tie goes to
// unicast), then the cell offered to the output link, and the release of a
// sent unicast cell's address at its port's release cycle.
module tb_output_ctrl;
  import switch_pkg::*;
  localparam int NP = 4, NS = 8, AW = 6, LW = 8, MW = 3, EW = 9;
  logic clk = 1'b0, rst_n = 1'b0;
  slot_cycle_t t = '0;
  logic u_grant [NP], m_grant [NP];
  logic [LW-1:0] u_len [NP], m_len [NP];
  logic [EW-1:0] u_head [NP], m_head [NP];
  logic [MW-1:0] m_mci [NP];
  logic [2:0] u_sel [NP], m_sel [NP];
  cell_t u_cell [NP], m_cell [NP];
  logic uq_pop [NP], mq_pop [NP];
  logic [MW-1:0] mq_pop_mci [NP];
  logic ufree_valid;
  logic [EW-1:0] ufree_entry;
  logic next_valid [NP];
  cell_t next_cell [NP];
  logic sent_mcast [NP];
  cell_t bank [NS];
  int checks = 0, failures = 0, n_uwin = 0, n_mwin = 0;

  output_ctrl #(.N_PORTS(NP), .N_SBM(NS), .ADDR_W(AW), .L_W(LW), .M_W(MW)) dut (.*);
  always #5 clk = ~clk;

  // the output MUX
  always_comb
    for (int p = 0; p < NP; p++) begin
      u_cell[p] = bank[u_sel[p]];
      m_cell[p] = bank[m_sel[p]];
    end

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; if (failures < 15) $display("FAIL %s at %0t", what, $time); end
  endtask

  initial begin
    int    ucyc [NP];
    bit    hasm [NP];
    int    ul [NP], ml [NP], mc [NP];
    logic [EW-1:0] uh [NP], mh [NP];
    cell_t ud [NP], md [NP];
    for (int p = 0; p < NP; p++) begin
      u_grant[p] = 0; m_grant[p] = 0; u_len[p] = 0; m_len[p] = 0;
      u_head[p] = 0; m_head[p] = 0; m_mci[p] = 0;
    end
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int slot = 0; slot < 300; slot++) begin
      for (int p = 0; p < NP; p++) begin
        ucyc[p] = $urandom_range(3);          // 3 = no unicast cell this slot
        hasm[p] = $urandom_range(1);
        ul[p] = $urandom_range(1, 6);
        ml[p] = $urandom_range(1, 6);
        mc[p] = $urandom_range(7);
        uh[p] = EW'(($urandom_range(3) << AW) | $urandom_range(63));
        mh[p] = EW'(((4 + $urandom_range(3)) << AW) | $urandom_range(63));
      end
      for (int c = 0; c < SLOT_CYCLES; c++) begin
        t = slot_cycle_t'(c);
        for (int s = 0; s < NS; s++)
          for (int k = 0; k < CELL_BYTES; k++) bank[s][k] = 8'($urandom);
        for (int p = 0; p < NP; p++) begin
          // data of a grant in the previous clock is on the banks now
          if (c == T_READ1 + ucyc[p] + 1) ud[p] = bank[uh[p][EW-1:AW]];
          if (hasm[p] && c == T_READ1 + N_READS) md[p] = bank[mh[p][EW-1:AW]];
          u_grant[p] = (c == T_READ1 + ucyc[p]) && ucyc[p] < 3;
          m_grant[p] = (c == T_READ1 + 2) && hasm[p];
          u_len[p] = u_grant[p] ? LW'(ul[p]) : LW'($urandom);
          m_len[p] = m_grant[p] ? LW'(ml[p]) : LW'($urandom);
          u_head[p] = u_grant[p] ? uh[p] : EW'($urandom);
          m_head[p] = m_grant[p] ? mh[p] : EW'($urandom);
          m_mci[p]  = m_grant[p] ? MW'(mc[p]) : MW'($urandom);
        end
        #1;
        for (int p = 0; p < NP; p++) begin
          bit hu, uw, mw;
          hu = ucyc[p] < 3;
          uw = hu && (!hasm[p] || ul[p] >= ml[p]);
          mw = hasm[p] && !uw;
          if (c == T_DECIDE) begin
            check(uq_pop[p] === uw, "uq_pop");
            check(mq_pop[p] === mw, "mq_pop");
            if (mw) check(mq_pop_mci[p] == MW'(mc[p]), "mq_pop_mci");
            if (uw) n_uwin++;
            if (mw) n_mwin++;
          end else begin
            check(!uq_pop[p] && !mq_pop[p], "no pop outside the decision");
          end
          if (c == T_DECIDE + 1) begin
            check(next_valid[p] === (uw || mw), "next_valid");
            check(sent_mcast[p] === mw, "sent_mcast");
            if (uw) check(next_cell[p] === ud[p], "unicast cell offered");
            if (mw) check(next_cell[p] === md[p], "multicast cell offered");
          end
          if (c == T_UFREE + p) begin
            check(ufree_valid === uw, "ufree_valid");
            if (uw) check(ufree_entry == uh[p], "ufree_entry");
          end
        end
        @(negedge clk);
      end
    end
    check(n_uwin > 0 && n_mwin > 0, "both kinds sent");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (320 * SLOT_CYCLES) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

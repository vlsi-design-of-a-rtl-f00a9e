// Test of the SBM write/read controller.
//  1. The read example of the multicast scheme: unicast head cells of ports
//     1, 2, 4 in bank 2 and of port 3 in bank 4, read priority 3 > 1 > 2 > 4;
//     multicast head cells of port 2 in bank 2, port 1 in bank 3, ports 3 and
//     4 in bank 4, priority 2 > 1 > 3 > 4. Expected: read cycle 1 serves
//     ports 3 and 1, cycle 2 port 2, cycle 3 unicast port 4 plus multicast
//     ports 1 and 3 (port 2 loses its bank to port 4's unicast read, port 4
//     loses bank 4 to port 3). Ports and banks are numbered from 0 here.
//  2. Random read situations against a reference arbiter, per bank.
//  3. Random write situations: bank choice by vacancy, pushes and drops.
// Also checks the slot length and that every read happens in its cycle.
module tb_sbm_rw_ctrl;
  import switch_pkg::*;
  localparam int NP = 4, NS = 8, AW = 6, EW = 9, LW = 8;
  logic clk = 1'b0, rst_n = 1'b0;
  slot_cycle_t t;
  logic slot_start;
  tag_t in_tag [NP];
  logic uq_accept [NP], mq_accept [NP];
  logic [AW:0] vacancy [NS];
  logic [AW-1:0] idle_addr [NS];
  logic idle_pop [NS];
  logic uq_push [NP], mq_push [NP], drop [NP];
  logic [EW-1:0] wr_entry [NP];
  logic [1:0] wsel [NS];
  logic u_avail [NP], m_avail [NP];
  logic [LW-1:0] u_len [NP], m_len [NP];
  logic [EW-1:0] u_head [NP], m_head [NP];
  logic u_grant [NP], m_grant [NP];
  logic [1:0] read_cycle;
  logic sbm_en [NS], sbm_we [NS];
  logic [AW-1:0] sbm_addr [NS];
  int checks = 0, failures = 0;

  sbm_rw_ctrl #(.N_PORTS(NP), .N_SBM(NS), .SBM_DEPTH(64), .L_W(LW)) dut (.*);
  always #5 clk = ~clk;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; if (failures < 15) $display("FAIL %s at %0t", what, $time); end
  endtask

  task automatic wait_cycle(int c);
    do @(negedge clk); while (int'(t) != c);
    #1;
  endtask

  // reference arbiter: expected grants of one read cycle
  task automatic ref_read(int c, inout bit done [NP], output bit eu [NP], output bit em [NP]);
    bit busy [NS];
    for (int s = 0; s < NS; s++) busy[s] = 0;
    for (int p = 0; p < NP; p++) begin eu[p] = 0; em[p] = 0; end
    for (int s = 0; s < NS; s++) begin
      int best;
      best = -1;
      for (int p = 0; p < NP; p++)
        if (u_avail[p] && !done[p] && int'(u_head[p][EW-1:AW]) == s)
          if (best < 0 || u_len[p] > u_len[best]) best = p;
      if (best >= 0) begin eu[best] = 1; busy[s] = 1; end
    end
    if (c == 2)
      for (int s = 0; s < NS; s++) begin
        int best;
        best = -1;
        if (!busy[s])
          for (int p = 0; p < NP; p++)
            if (m_avail[p] && int'(m_head[p][EW-1:AW]) == s)
              if (best < 0 || m_len[p] > m_len[best]) best = p;
        if (best >= 0) em[best] = 1;
      end
    for (int p = 0; p < NP; p++) if (eu[p]) done[p] = 1;
  endtask

  task automatic check_read_slot(string name);
    bit done [NP], eu [NP], em [NP];
    for (int p = 0; p < NP; p++) done[p] = 0;
    for (int c = 0; c < N_READS; c++) begin
      wait_cycle(T_READ1 + c);
      ref_read(c, done, eu, em);
      check(read_cycle == 2'(c), "read_cycle");
      for (int p = 0; p < NP; p++) begin
        check(u_grant[p] === eu[p], $sformatf("%s u_grant cycle %0d port %0d", name, c, p));
        check(m_grant[p] === em[p], $sformatf("%s m_grant cycle %0d port %0d", name, c, p));
        if (eu[p]) check(sbm_en[u_head[p][EW-1:AW]] && !sbm_we[u_head[p][EW-1:AW]] &&
                         sbm_addr[u_head[p][EW-1:AW]] == u_head[p][AW-1:0], "unicast bank access");
        if (em[p]) check(sbm_en[m_head[p][EW-1:AW]] && !sbm_we[m_head[p][EW-1:AW]] &&
                         sbm_addr[m_head[p][EW-1:AW]] == m_head[p][AW-1:0], "multicast bank access");
      end
    end
  endtask

  function automatic logic [EW-1:0] ent(int s, int a);
    return EW'((s << AW) | a);
  endfunction

  initial begin
    int expect_u [3][NP];
    for (int p = 0; p < NP; p++) begin
      in_tag[p] = '0; uq_accept[p] = 1; mq_accept[p] = 1;
      u_avail[p] = 0; m_avail[p] = 0; u_len[p] = 0; m_len[p] = 0; u_head[p] = 0; m_head[p] = 0;
    end
    for (int s = 0; s < NS; s++) begin vacancy[s] = 7'd64; idle_addr[s] = 6'(s); end
    repeat (2) @(negedge clk);
    rst_n = 1;

    // ---- slot length
    begin
      int a, b;
      @(posedge slot_start); a = $time;
      @(posedge slot_start); b = $time;
      check((b - a) == SLOT_CYCLES * 10, "slot length");
    end

    // ---- 1. the worked example
    wait_cycle(0);
    u_avail = '{1, 1, 1, 1};
    u_len   = '{30, 20, 40, 10};
    u_head  = '{ent(1, 5), ent(1, 9), ent(3, 7), ent(1, 11)};
    m_avail = '{1, 1, 1, 1};
    m_len   = '{30, 40, 20, 10};
    m_head  = '{ent(2, 3), ent(1, 4), ent(3, 8), ent(3, 12)};
    wait_cycle(T_READ1);
    check(u_grant[2] && u_grant[0] && !u_grant[1] && !u_grant[3], "example cycle 1 serves ports 3 and 1");
    wait_cycle(T_READ1 + 1);
    check(u_grant[1] && !u_grant[0] && !u_grant[2] && !u_grant[3], "example cycle 2 serves port 2");
    wait_cycle(T_READ1 + 2);
    check(u_grant[3] && !u_grant[0] && !u_grant[1] && !u_grant[2], "example cycle 3 unicast port 4");
    check(m_grant[0] && m_grant[2] && !m_grant[1] && !m_grant[3], "example cycle 3 multicast ports 1 and 3");
    check(sbm_addr[1] == 6'd11 && sbm_addr[2] == 6'd3 && sbm_addr[3] == 6'd8, "example cycle 3 addresses");
    wait_cycle(T_READ1 + 3);
    for (int p = 0; p < NP; p++) check(!u_grant[p] && !m_grant[p], "no grant outside the read cycles");

    // ---- 2. random read situations
    for (int n = 0; n < 300; n++) begin
      wait_cycle(0);
      for (int p = 0; p < NP; p++) begin
        u_avail[p] = ($urandom_range(99) < 80);
        m_avail[p] = ($urandom_range(99) < 60);
        u_len[p] = LW'($urandom_range(5));
        m_len[p] = LW'($urandom_range(5));
        u_head[p] = ent($urandom_range(2), $urandom_range(63));
        m_head[p] = ent($urandom_range(3), $urandom_range(63));
      end
      check_read_slot("random");
    end
    for (int p = 0; p < NP; p++) begin u_avail[p] = 0; m_avail[p] = 0; end

    // ---- 3. random write situations
    for (int n = 0; n < 400; n++) begin
      int rank [NS];
      int ord;
      wait_cycle(0);
      for (int s = 0; s < NS; s++) begin
        vacancy[s] = 7'($urandom_range(3) == 0 ? 0 : $urandom_range(64));
        if (n % 50 == 0) vacancy[s] = (s < 2) ? 7'd5 : 7'd0;
        idle_addr[s] = 6'($urandom);
      end
      for (int i = 0; i < NP; i++) begin
        in_tag[i] = '{valid: ($urandom_range(99) < 80), mcast: $urandom_range(1), dest: 6'($urandom_range(3))};
        uq_accept[i] = ($urandom_range(9) != 0);
        mq_accept[i] = ($urandom_range(9) != 0);
      end
      wait_cycle(T_WRITE);
      for (int s = 0; s < NS; s++) begin
        rank[s] = 0;
        for (int q = 0; q < NS; q++)
          if (vacancy[q] > vacancy[s] || (vacancy[q] == vacancy[s] && q < s)) rank[s]++;
      end
      ord = 0;
      begin
        bit used [NS];
        for (int s = 0; s < NS; s++) used[s] = 0;
        for (int i = 0; i < NP; i++) begin
          bit ok, got;
          int bank;
          ok = in_tag[i].valid && (in_tag[i].mcast ? mq_accept[i] : uq_accept[i]);
          got = 0; bank = -1;
          if (ok) begin
            for (int s = 0; s < NS; s++) if (rank[s] == ord) bank = s;
            got = (vacancy[bank] != 0);
            ord++;
          end
          check(drop[i] === (in_tag[i].valid && !got), "drop");
          check(uq_push[i] === (got && !in_tag[i].mcast), "uq_push");
          check(mq_push[i] === (got && in_tag[i].mcast), "mq_push");
          if (got) begin
            used[bank] = 1;
            check(wr_entry[i] == ent(bank, idle_addr[bank]), "write entry");
            check(idle_pop[bank] && sbm_en[bank] && sbm_we[bank] && wsel[bank] == 2'(i) &&
                  sbm_addr[bank] == idle_addr[bank], "bank write");
          end
        end
        for (int s = 0; s < NS; s++)
          check(idle_pop[s] === used[s] && sbm_en[s] === used[s], "only the chosen banks are written");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (800 * SLOT_CYCLES) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

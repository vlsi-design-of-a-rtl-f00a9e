// Test of the idle address queue controller against a reference model: one
// SV queue of free addresses per bank, starting with 0..DEPTH-1. Random pops
// (at most one per bank per clock, only when the bank has room) and returns
// of taken addresses; each clock the offered address of every bank and its
// vacancy must match the model.
module tb_idle_aq_ctrl;
  localparam int NS = 8, D = 64;
  logic clk = 1'b0, rst_n = 1'b0;
  logic pop [NS];
  logic [5:0] pop_addr [NS];
  logic push = 0;
  logic [2:0] push_sbm = '0;
  logic [5:0] push_addr = '0;
  logic [6:0] vacancy [NS];
  int unsigned freeq [NS][$];
  int unsigned taken [$];
  int checks = 0, failures = 0;

  idle_aq_ctrl #(.N_SBM(NS), .DEPTH(D)) dut (.clk, .rst_n, .pop, .pop_addr, .push,
                                           .push_sbm, .push_addr, .vacancy);
  always #5 clk = ~clk;

  initial begin
    for (int s = 0; s < NS; s++) begin
      pop[s] = 0;
      for (int a = 0; a < D; a++) freeq[s].push_back(a);
    end
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int n = 0; n < 4000; n++) begin
      int pop_pct;
      pop_pct = (n % 1000 < 500) ? 70 : 20;
      @(negedge clk);
      for (int s = 0; s < NS; s++) begin
        checks += 2;
        if (int'(vacancy[s]) != freeq[s].size()) begin failures++; $display("FAIL vacancy %0d", s); end
        if (freeq[s].size() > 0 && int'(pop_addr[s]) != freeq[s][0]) begin
          failures++; $display("FAIL addr bank %0d: %0d vs %0d", s, pop_addr[s], freeq[s][0]);
        end
      end
      // drive this clock's operations and update the model
      for (int s = 0; s < NS; s++) begin
        pop[s] = (freeq[s].size() > 0) && ($urandom_range(99) < pop_pct);
        if (pop[s]) taken.push_back((s << 8) | freeq[s].pop_front());
      end
      push = (taken.size() > 0) && ($urandom_range(99) < 60);
      if (push) begin
        int idx;
        int unsigned e;
        idx = $urandom_range(taken.size() - 1);
        e = taken[idx];
        taken.delete(idx);
        push_sbm = 3'(e >> 8); push_addr = 6'(e & 255);
        freeq[e >> 8].push_back(e & 255);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

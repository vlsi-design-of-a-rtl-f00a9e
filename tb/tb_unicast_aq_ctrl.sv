// Test of the unicast address queue controller against one SV queue per
// output port. Each clock several inputs may push, often to the same port,
// and ports may pop; accept, head and length are checked every clock, so
// the room check of same-clock pushes and their input order are covered.
// The queues are kept small (depth 8) so that they fill up often.
module tb_unicast_aq_ctrl;
  localparam int NP = 4, D = 8, EW = 9;
  logic clk = 1'b0, rst_n = 1'b0;
  logic req [NP], accept [NP], push [NP], pop [NP];
  logic [1:0] dest [NP];
  logic [EW-1:0] entry [NP], head [NP];
  logic [3:0] len [NP];
  int unsigned q [NP][$];
  int checks = 0, failures = 0, full_seen = 0;

  unicast_aq_ctrl #(.N_PORTS(NP), .DEPTH(D), .E_W(EW)) dut (
    .clk, .rst_n, .req, .dest, .entry, .accept, .push, .pop, .head, .len);
  always #5 clk = ~clk;

  initial begin
    for (int i = 0; i < NP; i++) begin req[i] = 0; push[i] = 0; pop[i] = 0; dest[i] = 0; entry[i] = 0; end
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int n = 0; n < 5000; n++) begin
      int room [NP];
      @(negedge clk);
      for (int p = 0; p < NP; p++) begin
        checks++;
        if (int'(len[p]) != q[p].size()) begin failures++; $display("FAIL len %0d dut %0d model %0d t=%0t", p, len[p], q[p].size(), $time); end
        if (q[p].size() > 0) begin
          checks++;
          if (head[p] != EW'(q[p][0])) begin failures++; $display("FAIL head %0d", p); end
        end
        room[p] = D - q[p].size();
        if (room[p] == 0) full_seen++;
      end
      for (int p = 0; p < NP; p++) begin
        pop[p] = ($urandom_range(99) < 45);
        if (pop[p] && q[p].size() > 0) void'(q[p].pop_front());
      end
      for (int i = 0; i < NP; i++) begin
        req[i]   = ($urandom_range(99) < 60);
        dest[i]  = 2'($urandom_range(n % 600 < 300 ? 3 : 1));
        entry[i] = EW'($urandom);
      end
      #1;
      for (int i = 0; i < NP; i++) begin
        bit exp_acc;
        exp_acc = room[dest[i]] > 0;
        if (req[i]) begin
          room[dest[i]]--;
          checks++;
          if (accept[i] !== exp_acc) begin failures++; $display("FAIL accept %0d", i); end
        end
        push[i] = req[i] && exp_acc && ($urandom_range(9) != 0);
        if (push[i]) q[dest[i]].push_back(entry[i]);
      end
    end
    checks++;
    if (full_seen == 0) begin failures++; $display("FAIL queues never filled"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (12000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

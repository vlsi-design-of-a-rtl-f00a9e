// Throughput runs of the 4 x 4 switch at its default sizes under the two
// mixed-traffic conditions used to evaluate the architecture:
//   A. random mixed traffic, multicast arrival rate 0.01 per input and slot,
//      fanout 2, 3 and 4, offered load 0.97 .. 1.0
//   B. bursty mixed traffic, fanout 3, offered load 0.95 .. 1.0 with the
//      multicast arrival rate 0.01; bursts of geometrically distributed
//      length (mean 10 cells) go to one destination
//   C. unicast-only random and bursty traffic at offered load 0.97 and 1.0
// Each run sends traffic for RUN_SLOTS slots, measures the cells delivered
// per output port and slot in that window, then drains. Throughput is the
// delivered copies divided by the offered copies in the window. A
// scoreboard checks every delivery (right port, intact, in queue order, not
// duplicated) and that after the drain every cell was delivered or reported
// dropped. The throughput figures are printed; the test requires each to be
// at least 0.80.
module tb_workloads;
  import switch_pkg::*;

  localparam int NP = 4;
  localparam int MAXID = 65536;
  localparam int RUN_SLOTS = 1500;

  logic clk = 1'b0, rst_n = 1'b0;
  logic [7:0] in_byte [NP];
  logic [7:0] out_byte [NP];
  logic out_valid [NP], out_soc [NP], cell_drop [NP];
  logic slot_start;
  logic cfg_we = 1'b0;
  logic [2:0] cfg_mci = '0;
  logic [NP-1:0] cfg_dests = '0;

  atm_switch dut (
    .clk, .rst_n, .in_byte, .out_byte, .out_valid, .out_soc, .slot_start,
    .cfg_we, .cfg_mci, .cfg_dests, .cell_drop
  );

  always #25 clk = ~clk;

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s (time %0t)", what, $time);
    end
  endtask

  logic [NP-1:0] mci_dests [8];
  logic [NP-1:0] remaining [MAXID];
  int last_u [NP];
  int last_m [8][NP];
  int next_id = 1;

  bit   traffic_on = 0, bursty = 0, measuring = 0;
  real  load = 0.0, mrate = 0.01;
  int   tc = 0;
  tag_t cur_tag [NP];
  int   cur_id  [NP];
  int   prev_id [NP];
  int   burst_left [NP], burst_dst [NP];
  bit   burst_m [NP];
  cell_t rx [NP];
  int   rx_idx [NP];
  int   offered_copies = 0, delivered_copies = 0, dropped = 0;

  function automatic logic [7:0] cell_byte(int id, int src, bit m, int dst, int k);
    case (k)
      0: return id[7:0];
      1: return id[15:8];
      2: return 8'(src);
      3: return 8'(m);
      4: return 8'(dst);
      default: return 8'((id * 29 + k * 11) & 255);
    endcase
  endfunction

  function automatic bit coin(real p);
    return real'($urandom_range(999999)) < p * 1.0e6;
  endfunction

  task automatic pick_cells();
    for (int i = 0; i < NP; i++) begin
      bit send, m;
      int dst;
      prev_id[i] = cur_id[i];
      send = 0; m = 0; dst = 0;
      if (traffic_on) begin
        if (!bursty) begin
          send = coin(load);
          m    = coin(mrate / load);
          dst  = m ? $urandom_range(7) : $urandom_range(NP - 1);
        end else begin
          // on/off source: a burst of cells to one destination, then a gap,
          // mean burst 10 cells, gaps sized to give the offered load
          if (burst_left[i] == 0) begin
            if (coin((1.0 - load) > 0.0 ? 1.0 / (1.0 + 10.0 * (1.0 - load) / load) : 1.0)) begin
              burst_m[i]    = coin(mrate / load);
              burst_dst[i]  = burst_m[i] ? $urandom_range(7) : $urandom_range(NP - 1);
              burst_left[i] = 1;
              while (burst_left[i] < 200 && !coin(0.1)) burst_left[i]++;
            end
          end
          if (burst_left[i] > 0) begin
            send = 1; m = burst_m[i]; dst = burst_dst[i];
            burst_left[i]--;
          end
        end
      end
      if (send && next_id < MAXID) begin
        cur_tag[i] = '{valid: 1'b1, mcast: m, dest: 6'(dst)};
        cur_id[i]  = next_id;
        remaining[next_id] = m ? mci_dests[dst] : NP'(1 << dst);
        if (measuring) offered_copies += $countones(remaining[next_id]);
        next_id++;
      end else begin
        cur_tag[i] = '0;
        cur_id[i]  = 0;
      end
    end
  endtask

  function automatic logic [7:0] drive_byte(int i, int k);
    if (k == 0) return 8'(cur_tag[i]);
    if (!cur_tag[i].valid) return 8'h00;
    return cell_byte(cur_id[i], i, cur_tag[i].mcast, int'(cur_tag[i].dest), k - 1);
  endfunction

  task automatic receive(int p, cell_t c);
    int id, src, dst;
    bit m, ok;
    id  = {c[1], c[0]};
    src = int'(c[2]);
    m   = c[3][0];
    dst = int'(c[4]);
    if (measuring) delivered_copies++;
    check(id > 0 && id < next_id, "unknown cell");
    if (id <= 0 || id >= next_id) return;
    check(remaining[id][p], $sformatf("cell %0d on port %0d not expected", id, p));
    remaining[id][p] = 1'b0;
    ok = 1;
    for (int k = 5; k < CELL_BYTES; k++)
      if (c[k] != cell_byte(id, src, m, dst, k)) ok = 0;
    check(ok, "payload");
    if (m) begin
      check(id > last_m[dst][p], "multicast order");
      last_m[dst][p] = id;
    end else begin
      check(dst == p && id > last_u[p], "unicast port and order");
      last_u[p] = id;
    end
  endtask

  always @(negedge clk) if (rst_n) begin
    if (slot_start) tc = 0; else tc++;
    for (int p = 0; p < NP; p++)
      if (out_valid[p]) begin
        if (out_soc[p]) rx_idx[p] = 0;
        rx[p][rx_idx[p]] = out_byte[p];
        rx_idx[p]++;
        if (rx_idx[p] == CELL_BYTES) receive(p, rx[p]);
      end
    for (int i = 0; i < NP; i++)
      if (cell_drop[i] && prev_id[i] != 0) begin
        remaining[prev_id[i]] = '0;
        dropped++;
      end
    if (tc == 0) pick_cells();
    for (int i = 0; i < NP; i++) in_byte[i] = drive_byte(i, tc);
  end

  task automatic set_fanout(int f);
    for (int m = 0; m < 8; m++) begin
      logic [2*NP-1:0] two;
      two = {NP'(0), NP'((1 << f) - 1)};
      two = two << (m % NP);
      mci_dests[m] = two[NP-1:0] | two[2*NP-1:NP];
      @(negedge clk);
      cfg_we = 1'b1; cfg_mci = 3'(m); cfg_dests = mci_dests[m];
    end
    @(negedge clk) cfg_we = 1'b0;
  endtask

  task automatic run(string name, bit b, real l, int f, real mr = 0.01);
    real thr;
    int missing;
    set_fanout(f);
    // the previous run has drained, so cell numbers start again
    next_id = 1;
    for (int p = 0; p < NP; p++) begin
      last_u[p] = 0;
      for (int m = 0; m < 8; m++) last_m[m][p] = 0;
    end
    bursty = b; load = l; mrate = mr;
    for (int i = 0; i < NP; i++) burst_left[i] = 0;
    offered_copies = 0; delivered_copies = 0;
    traffic_on = 1;
    repeat (100 * SLOT_CYCLES) @(posedge clk);   // warm-up
    measuring = 1;
    repeat (RUN_SLOTS * SLOT_CYCLES) @(posedge clk);
    measuring = 0;
    traffic_on = 0;
    repeat (600 * SLOT_CYCLES) @(posedge clk);   // drain
    thr = real'(delivered_copies) / real'(offered_copies);
    missing = 0;
    for (int i = 1; i < next_id; i++) if (remaining[i] != '0) missing++;
    check(missing == 0, $sformatf("%s: %0d cells lost without a drop report", name, missing));
    for (int i = 1; i < next_id; i++) remaining[i] = '0;
    $display("%s fanout %0d load %0.3f: throughput %0.4f (offered %0d, delivered %0d, drops so far %0d)",
             name, f, l, thr, offered_copies, delivered_copies, dropped);
    check(thr >= 0.80, $sformatf("%s throughput %0.4f", name, thr));
  endtask

  initial begin
    for (int i = 0; i < MAXID; i++) remaining[i] = '0;
    for (int p = 0; p < NP; p++) begin
      last_u[p] = 0; rx_idx[p] = 0;
      for (int m = 0; m < 8; m++) last_m[m][p] = 0;
    end
    for (int i = 0; i < NP; i++) begin
      cur_tag[i] = '0; cur_id[i] = 0; prev_id[i] = 0; in_byte[i] = '0; burst_left[i] = 0;
    end
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    for (int f = 2; f <= 4; f++) begin
      run("random", 0, 0.97, f);
      run("random", 0, 1.0, f);
    end
    run("unicast random", 0, 0.97, 2, 0.0);
    run("unicast random", 0, 1.0, 2, 0.0);
    run("unicast bursty", 1, 0.97, 2, 0.0);
    run("unicast bursty", 1, 1.0, 2, 0.0);
    run("bursty", 1, 0.95, 3);
    run("bursty", 1, 0.99, 3);
    run("bursty", 1, 1.0, 3);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (14 * 2300 * SLOT_CYCLES) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule

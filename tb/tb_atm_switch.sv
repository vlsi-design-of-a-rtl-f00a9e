// End-to-end test of the shared multibuffer ATM switch at its default sizes
// (4 x 4 ports, 8 SBMs of 64 cells, unicast queues of 128, 8 MCIs of 32).
//
// Every cell carries a unique number, its source, its kind and destination
// in its payload, and the rest of its bytes follow from its number. The
// scoreboard checks that each cell leaves on exactly the ports it was meant
// for, intact, in queue order, and that a cell is missing only if the switch
// reported it dropped. Phases:
//   1. one unicast cell alone: latency of exactly two slots (108 clocks)
//   2. random mixed unicast/multicast traffic
//   3. hot spot: every input sends unicast to port 0 (unicast queue overflow)
//   4. every input sends to one multicast connection (multicast queue overflow)
//   5. random traffic again, then drain until every cell is out
// It also checks the slot length against the STM-1 rate at 20 MHz and counts
// the switch's mechanisms (unicast reads in each of the three read cycles,
// multicast reads, multicast reads blocked by a unicast read of the same
// bank, the output mask choosing either kind, both kinds of overflow); each
// must occur at least once.
module tb_atm_switch;
  import switch_pkg::*;

  localparam int NP = 4;
  localparam int MAXID = 8192;

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

  always #25 clk = ~clk;   // 20 MHz

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s (time %0t)", what, $time);
    end
  endtask

  // multicast connections: MCI -> destination ports
  logic [NP-1:0] mci_dests [8] = '{4'b0011, 4'b1110, 4'b1111, 4'b0101,
                                   4'b1000, 4'b0110, 4'b1011, 4'b0001};

  // scoreboard
  logic [NP-1:0] remaining [MAXID];
  logic          was_sent  [MAXID];
  int last_u [NP];        // last unicast id delivered per output port
  int last_m [8][NP];     // last multicast id delivered per MCI and port
  int next_id = 1;

  // traffic state
  int   phase = 0;
  int   slot_no = 0;
  int   tc = 0;
  tag_t cur_tag [NP];
  int   cur_id  [NP];
  int   prev_id [NP];
  int   load_pct = 0, mcast_pct = 0;
  cell_t rx [NP];
  int   rx_idx [NP];
  int   first_in_time = -1, first_out_time = -1;
  int   slot_len = 0, last_slot_start = -1, cyc = 0;

  // mechanism counters
  int n_u_rd [3];
  int n_m_rd = 0, n_m_blocked = 0, n_mask_u = 0, n_mask_m = 0;
  int n_drop_u = 0, n_drop_m = 0, n_sent = 0, n_deliv = 0, n_other_bank = 0;

  function automatic logic [7:0] cell_byte(int id, int src, bit m, int dst, int k);
    case (k)
      0: return id[7:0];
      1: return id[15:8];
      2: return 8'(src);
      3: return 8'(m);
      4: return 8'(dst);
      default: return 8'((id * 31 + k * 7) & 255);
    endcase
  endfunction

  function automatic int cell_id(cell_t c);
    return {c[1], c[0]};
  endfunction

  // choose the cells of the next slot
  task automatic pick_cells();
    for (int i = 0; i < NP; i++) begin
      bit send, m;
      int dst;
      prev_id[i] = cur_id[i];
      send = 0; m = 0; dst = 0;
      case (phase)
        1: begin send = (i == 2) && (slot_no == 3); dst = 1; end
        2, 5: begin
          send = ($urandom_range(99) < load_pct);
          m    = ($urandom_range(99) < mcast_pct);
          dst  = m ? $urandom_range(7) : $urandom_range(NP - 1);
        end
        3: begin send = 1; dst = 0; end
        4: begin send = 1; m = 1; dst = 2; end
        default: send = 0;
      endcase
      if (send && next_id < MAXID) begin
        cur_tag[i] = '{valid: 1'b1, mcast: m, dest: 6'(dst)};
        cur_id[i]  = next_id;
        remaining[next_id] = m ? mci_dests[dst] : NP'(1 << dst);
        was_sent[next_id]  = 1'b1;
        next_id++;
        n_sent++;
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
    id  = cell_id(c);
    src = int'(c[2]);
    m   = c[3][0];
    dst = int'(c[4]);
    n_deliv++;
    check(id > 0 && id < next_id && was_sent[id], "unknown cell");
    if (id <= 0 || id >= MAXID) return;
    check(remaining[id][p], $sformatf("cell %0d on port %0d not expected", id, p));
    remaining[id][p] = 1'b0;
    ok = 1;
    for (int k = 5; k < CELL_BYTES; k++)
      if (c[k] != cell_byte(id, src, m, dst, k)) ok = 0;
    check(ok, $sformatf("payload of cell %0d", id));
    if (m) begin
      check(id > last_m[dst][p], $sformatf("multicast order MCI %0d port %0d", dst, p));
      last_m[dst][p] = id;
    end else begin
      check(dst == p, "unicast on wrong port");
      check(id > last_u[p], $sformatf("unicast order port %0d", p));
      last_u[p] = id;
    end
  endtask

  // everything happens at the falling edge: outputs are stable, inputs are
  // set up for the next rising edge
  always @(negedge clk) if (rst_n) begin
    cyc++;
    if (slot_start) begin
      if (last_slot_start >= 0) slot_len = cyc - last_slot_start;
      last_slot_start = cyc;
      tc = 0;
    end else tc++;

    // outputs
    for (int p = 0; p < NP; p++)
      if (out_valid[p]) begin
        if (out_soc[p]) rx_idx[p] = 0;
        if (first_out_time < 0) first_out_time = cyc;
        rx[p][rx_idx[p]] = out_byte[p];
        rx_idx[p]++;
        if (rx_idx[p] == CELL_BYTES) receive(p, rx[p]);
      end

    // drops are reported in the write cycle for the cell of the previous slot
    for (int i = 0; i < NP; i++)
      if (cell_drop[i]) begin
        check(prev_id[i] != 0, "drop without a cell");
        if (prev_id[i] != 0) begin
          remaining[prev_id[i]] = '0;
          if (dut.in_tag[i].mcast) n_drop_m++; else n_drop_u++;
        end
      end

    // mechanisms
    for (int p = 0; p < NP; p++) begin
      if (dut.u_grant[p]) n_u_rd[dut.read_cycle]++;
      if (dut.m_grant[p]) n_m_rd++;
      if (dut.u_rw.is_read3 && dut.m_avail[p] && dut.u_rw.u_bank_busy[dut.u_rw.m_bank[p]])
        n_m_blocked++;
      if (dut.u_oc.is_decide && dut.u_oc.u_have[p] && dut.u_oc.m_have[p]) begin
        if (dut.u_oc.u_win[p]) n_mask_u++; else n_mask_m++;
      end
    end
    for (int s = 1; s < 8; s++)
      if (dut.sbm_en[s] && dut.sbm_we[s]) n_other_bank++;

    // inputs for the next cycle
    if (tc == 0) begin
      slot_no++;
      pick_cells();
    end
    for (int i = 0; i < NP; i++)
      in_byte[i] = drive_byte(i, tc);
    if (tc == 0 && cur_id[2] == 1 && first_in_time < 0) first_in_time = cyc;
  end

  task automatic run_slots(int n);
    repeat (n * SLOT_CYCLES) @(posedge clk);
  endtask

  initial begin
    for (int i = 0; i < MAXID; i++) begin remaining[i] = '0; was_sent[i] = 1'b0; end
    for (int p = 0; p < NP; p++) begin
      last_u[p] = 0; rx_idx[p] = 0;
      for (int m = 0; m < 8; m++) last_m[m][p] = 0;
    end
    for (int i = 0; i < NP; i++) begin
      cur_tag[i] = '0; cur_id[i] = 0; prev_id[i] = 0; in_byte[i] = '0;
    end
    for (int r = 0; r < 3; r++) n_u_rd[r] = 0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    for (int m = 0; m < 8; m++) begin
      @(negedge clk);
      cfg_we = 1'b1; cfg_mci = 3'(m); cfg_dests = mci_dests[m];
    end
    @(negedge clk) cfg_we = 1'b0;

    phase = 1; run_slots(8);
    check(first_in_time > 0 && first_out_time - first_in_time == 2 * SLOT_CYCLES,
          $sformatf("latency %0d clocks", first_out_time - first_in_time));
    check(slot_len == SLOT_CYCLES, "slot length");
    // STM-1: a 424-bit cell every 424/155.52e6 s; at 20 MHz that is 54.5 clocks
    check(real'(SLOT_CYCLES) <= 20.0e6 * 424.0 / 155.52e6, "slot fits the STM-1 cell time");

    phase = 2; load_pct = 90; mcast_pct = 25; run_slots(300);
    phase = 3; run_slots(60);
    phase = 0; run_slots(150);
    phase = 4; run_slots(20);
    phase = 5; load_pct = 60; mcast_pct = 30; run_slots(200);
    phase = 0; run_slots(400);

    begin
      int missing;
      missing = 0;
      for (int i = 1; i < next_id; i++) if (remaining[i] != '0) missing++;
      check(missing == 0, $sformatf("%0d cells never delivered", missing));
    end
    $display("cells sent %0d, deliveries %0d, unicast drops %0d, multicast drops %0d",
             n_sent, n_deliv, n_drop_u, n_drop_m);
    $display("unicast reads in cycle 1/2/3: %0d %0d %0d, multicast reads %0d, blocked %0d",
             n_u_rd[0], n_u_rd[1], n_u_rd[2], n_m_rd, n_m_blocked);
    $display("output mask: unicast chosen %0d, multicast chosen %0d", n_mask_u, n_mask_m);
    check(n_u_rd[0] > 0, "unicast read in read cycle 1");
    check(n_u_rd[1] > 0, "unicast read in read cycle 2");
    check(n_u_rd[2] > 0, "unicast read in read cycle 3");
    check(n_m_rd > 0, "multicast read in read cycle 3");
    check(n_m_blocked > 0, "multicast read blocked by a unicast read");
    check(n_mask_u > 0, "output mask chose unicast over multicast");
    check(n_mask_m > 0, "output mask chose multicast over unicast");
    check(n_drop_u > 0, "unicast queue overflow");
    check(n_drop_m > 0, "multicast queue overflow");
    check(n_other_bank > 0, "writes spread over the banks");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (1300 * SLOT_CYCLES) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule

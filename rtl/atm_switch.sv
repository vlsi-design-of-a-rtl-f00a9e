// Shared multibuffer ATM switch, N_PORTS x N_PORTS, with separate unicast and
// multicast address queues.
//
// Cells arrive byte-serially on every input link, one slot of SLOT_CYCLES
// clocks per cell (routing tag byte, then the 53 cell bytes), aligned to
// slot_start. In the slot after a cell has arrived it is written, in parallel
// with the other inputs' cells, into one of N_SBM shared buffer memories,
// the emptier banks first. Its (bank, address) joins the unicast queue of its
// output port, or the queue of its multicast connection identifier (MCI).
// Three read cycles follow: unicast head cells are read in all three, banks
// being given to the longer queue; in the third cycle multicast head cells
// are read from the banks left unused by unicast reads. Each output port can
// thus hold one unicast and one multicast cell; it sends the one with the
// longer queue, byte-serially in the following slot. A cell therefore leaves
// two slots after it started to arrive if it is not held back.
//
// Ports:
//   in_byte[i]                 input link i, one byte per clock
//   out_byte/out_valid/out_soc output link p: 53 bytes, out_soc on the first
//   slot_start                 slot cycle 0; inputs send their tag byte then
//   cfg_we/cfg_mci/cfg_dests   sets the destination ports of a multicast connection
//   cell_drop[i]               pulse: input i's cell found no queue or bank room
//
// read_cycle and sent_mcast are internal status signals left unconnected at
// the top; testbenches observe them to count read cycles and mask decisions.
//
// Sizes follow the 4 x 4 switch with 8 shared memories and 128 cells per
// port (SBM_DEPTH = 4*128/8 = 64 cells per bank, unicast queues of 128).
// The number and depth of the multicast queues are this design's choice.
module atm_switch
  import switch_pkg::*;
#(
  parameter int N_PORTS        = 4,
  parameter int N_SBM          = 8,
  parameter int CELLS_PER_PORT = 128,
  parameter int SBM_DEPTH      = N_PORTS * CELLS_PER_PORT / N_SBM,
  parameter int UQ_DEPTH       = CELLS_PER_PORT,
  parameter int N_MCI          = 8,
  parameter int MQ_DEPTH       = 32,
  parameter int M_W            = $clog2(N_MCI)
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic [7:0]         in_byte   [N_PORTS],
  output logic [7:0]         out_byte  [N_PORTS],
  output logic               out_valid [N_PORTS],
  output logic               out_soc   [N_PORTS],
  output logic               slot_start,
  input  logic               cfg_we,
  input  logic [M_W-1:0]     cfg_mci,
  input  logic [N_PORTS-1:0] cfg_dests,
  output logic               cell_drop [N_PORTS]
);

  localparam int P_W    = $clog2(N_PORTS);
  localparam int S_W    = $clog2(N_SBM);
  localparam int ADDR_W = $clog2(SBM_DEPTH);
  localparam int E_W    = S_W + ADDR_W;
  localparam int UQ_W   = $clog2(UQ_DEPTH) + 1;
  localparam int MQ_W   = $clog2(MQ_DEPTH) + 1;
  localparam int L_W    = (UQ_W > MQ_W) ? UQ_W : MQ_W;

  initial begin
    assert (T_MFREE + N_MCI <= T_LOAD) else $error("too many MCIs for one slot");
    assert (N_PORTS <= T_MFREE - T_UFREE) else $error("unicast releases overlap multicast releases");
    assert (N_MCI <= 64 && N_PORTS <= 64) else $error("tag byte holds 6 destination bits");
  end

  slot_cycle_t t;
  tag_t        in_tag  [N_PORTS];
  cell_t       in_cell [N_PORTS];

  // write side
  logic              uq_accept [N_PORTS];
  logic              mq_accept [N_PORTS];
  logic              uq_push   [N_PORTS];
  logic              mq_push   [N_PORTS];
  logic [E_W-1:0]    wr_entry  [N_PORTS];
  logic [P_W-1:0]    u_dest    [N_PORTS];
  logic [M_W-1:0]    m_dest    [N_PORTS];
  logic              u_req     [N_PORTS];
  logic              m_req     [N_PORTS];
  logic [ADDR_W:0]   vacancy   [N_SBM];
  logic [ADDR_W-1:0] idle_addr [N_SBM];
  logic              idle_pop  [N_SBM];
  logic [P_W-1:0]    wsel      [N_SBM];

  // read side
  logic              u_avail [N_PORTS];
  logic [UQ_W-1:0]   uq_len  [N_PORTS];
  logic [L_W-1:0]    u_len   [N_PORTS];
  logic [E_W-1:0]    u_head  [N_PORTS];
  logic              m_avail [N_PORTS];
  logic [MQ_W-1:0]   mq_len  [N_PORTS];
  logic [L_W-1:0]    m_len   [N_PORTS];
  logic [E_W-1:0]    m_head  [N_PORTS];
  logic [M_W-1:0]    m_mci   [N_PORTS];
  logic              u_grant [N_PORTS];
  logic              m_grant [N_PORTS];
  logic [1:0]        read_cycle;

  logic              sbm_en    [N_SBM];
  logic              sbm_we    [N_SBM];
  logic [ADDR_W-1:0] sbm_addr  [N_SBM];
  cell_t             sbm_wdata [N_SBM];
  cell_t             sbm_rdata [N_SBM];

  logic [S_W-1:0]    u_sel  [N_PORTS];
  logic [S_W-1:0]    m_sel  [N_PORTS];
  cell_t             u_cell [N_PORTS];
  cell_t             m_cell [N_PORTS];
  logic              uq_pop     [N_PORTS];
  logic              mq_pop     [N_PORTS];
  logic [M_W-1:0]    mq_pop_mci [N_PORTS];
  logic              ufree_valid;
  logic [E_W-1:0]    ufree_entry;
  logic              mfree_req, mfree_valid;
  logic [M_W-1:0]    mfree_mci;
  logic [E_W-1:0]    mfree_entry;
  logic              idle_push;
  logic [E_W-1:0]    idle_entry;
  logic              next_valid [N_PORTS];
  cell_t             next_cell  [N_PORTS];
  logic              sent_mcast [N_PORTS];

  always_comb begin
    for (int i = 0; i < N_PORTS; i++) begin
      u_req[i]  = in_tag[i].valid && !in_tag[i].mcast;
      m_req[i]  = in_tag[i].valid &&  in_tag[i].mcast;
      u_dest[i] = P_W'(in_tag[i].dest);
      m_dest[i] = M_W'(in_tag[i].dest);
    end
    for (int p = 0; p < N_PORTS; p++) begin
      u_avail[p] = (uq_len[p] != 0);
      u_len[p]   = L_W'(uq_len[p]);
      m_len[p]   = L_W'(mq_len[p]);
    end
    // oldest multicast cell of MCI m is checked for release at T_MFREE + m
    mfree_req = (t >= slot_cycle_t'(T_MFREE)) && (t < slot_cycle_t'(T_MFREE + N_MCI)) && !ufree_valid;
    mfree_mci = M_W'(t - slot_cycle_t'(T_MFREE));
    // one freed address per clock into the idle queues
    idle_push  = ufree_valid || (mfree_req && mfree_valid);
    idle_entry = ufree_valid ? ufree_entry : mfree_entry;
  end

  input_rotation_buffer #(.N_PORTS(N_PORTS)) u_irb (
    .clk, .rst_n, .t, .in_byte, .cell_tag(in_tag), .cell_data(in_cell)
  );

  input_demux #(.N_PORTS(N_PORTS), .N_SBM(N_SBM)) u_idmx (
    .in_cell, .sel(wsel), .sbm_wdata
  );

  for (genvar s = 0; s < N_SBM; s++) begin : g_sbm
    sbm #(.DEPTH(SBM_DEPTH)) u_sbm (
      .clk, .en(sbm_en[s]), .we(sbm_we[s]), .addr(sbm_addr[s]),
      .wdata(sbm_wdata[s]), .rdata(sbm_rdata[s])
    );
  end

  sbm_rw_ctrl #(.N_PORTS(N_PORTS), .N_SBM(N_SBM), .SBM_DEPTH(SBM_DEPTH), .L_W(L_W)) u_rw (
    .clk, .rst_n, .t, .slot_start,
    .in_tag, .uq_accept, .mq_accept, .vacancy, .idle_addr, .idle_pop,
    .uq_push, .mq_push, .wr_entry, .drop(cell_drop), .wsel,
    .u_avail, .u_len, .u_head, .m_avail, .m_len, .m_head,
    .u_grant, .m_grant, .read_cycle,
    .sbm_en, .sbm_we, .sbm_addr
  );

  unicast_aq_ctrl #(.N_PORTS(N_PORTS), .DEPTH(UQ_DEPTH), .E_W(E_W)) u_uaq (
    .clk, .rst_n, .req(u_req), .dest(u_dest), .entry(wr_entry), .accept(uq_accept),
    .push(uq_push), .pop(uq_pop), .head(u_head), .len(uq_len)
  );

  multicast_aq_ctrl #(.N_PORTS(N_PORTS), .N_MCI(N_MCI), .DEPTH(MQ_DEPTH), .E_W(E_W)) u_maq (
    .clk, .rst_n, .cfg_we, .cfg_mci, .cfg_dests,
    .req(m_req), .mci(m_dest), .entry(wr_entry), .accept(mq_accept), .push(mq_push),
    .avail(m_avail), .sel_mci(m_mci), .sel_len(mq_len), .sel_entry(m_head),
    .pop(mq_pop), .pop_mci(mq_pop_mci),
    .free_req(mfree_req), .free_mci(mfree_mci), .free_valid(mfree_valid), .free_entry(mfree_entry)
  );

  idle_aq_ctrl #(.N_SBM(N_SBM), .DEPTH(SBM_DEPTH)) u_iaq (
    .clk, .rst_n, .pop(idle_pop), .pop_addr(idle_addr),
    .push(idle_push), .push_sbm(idle_entry[E_W-1:ADDR_W]), .push_addr(idle_entry[ADDR_W-1:0]),
    .vacancy
  );

  output_ctrl #(.N_PORTS(N_PORTS), .N_SBM(N_SBM), .ADDR_W(ADDR_W), .L_W(L_W), .M_W(M_W)) u_oc (
    .clk, .rst_n, .t,
    .u_grant, .u_len, .u_head, .m_grant, .m_len, .m_head, .m_mci,
    .u_sel, .m_sel, .u_cell, .m_cell,
    .uq_pop, .mq_pop, .mq_pop_mci, .ufree_valid, .ufree_entry,
    .next_valid, .next_cell, .sent_mcast
  );

  output_mux #(.N_PORTS(N_PORTS), .N_SBM(N_SBM)) u_omx (
    .sbm_rdata, .u_sel, .m_sel, .u_cell, .m_cell
  );

  output_rotation_buffer #(.N_PORTS(N_PORTS)) u_orb (
    .clk, .rst_n, .t, .next_valid, .next_cell, .out_byte, .out_valid, .out_soc
  );

endmodule

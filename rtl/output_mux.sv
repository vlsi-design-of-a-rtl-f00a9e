// Output MUX: steers the cells read from the SBMs to the output ports.
//
// Every output port has two cell places, one for a unicast cell and one for a
// multicast cell. In the clock when read data comes back, u_sel[p] and
// m_sel[p] name the SBM whose data goes to port p's unicast and multicast
// place. Purely combinational; the output controller decides when the places
// take the data.
module output_mux
  import switch_pkg::*;
#(
  parameter int N_PORTS = 4,
  parameter int N_SBM   = 8,
  parameter int S_W     = $clog2(N_SBM)
) (
  input  cell_t          sbm_rdata [N_SBM],
  input  logic [S_W-1:0] u_sel     [N_PORTS],
  input  logic [S_W-1:0] m_sel     [N_PORTS],
  output cell_t          u_cell    [N_PORTS],
  output cell_t          m_cell    [N_PORTS]
);

  always_comb begin
    for (int p = 0; p < N_PORTS; p++) begin
      u_cell[p] = sbm_rdata[u_sel[p]];
      m_cell[p] = sbm_rdata[m_sel[p]];
    end
  end

endmodule

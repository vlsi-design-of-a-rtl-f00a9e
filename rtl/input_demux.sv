// Input deMUX: steers the cells of the input ports to the SBMs.
//
// For every SBM the SBM write/read controller names the input port whose
// cell it is to store (sel[s]); the deMUX places that port's cell on the
// SBM's write data. Purely combinational. Only the port-to-bank steering is
// described for this block; its form as a multiplexer per bank is this
// design's choice.
module input_demux
  import switch_pkg::*;
#(
  parameter int N_PORTS = 4,
  parameter int N_SBM   = 8,
  parameter int P_W     = $clog2(N_PORTS)
) (
  input  cell_t          in_cell [N_PORTS],
  input  logic [P_W-1:0] sel     [N_SBM],
  output cell_t          sbm_wdata [N_SBM]
);

  always_comb begin
    for (int s = 0; s < N_SBM; s++) sbm_wdata[s] = in_cell[sel[s]];
  end

endmodule

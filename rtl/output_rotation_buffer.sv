// Output controller with rotation buffer: sends the chosen cells out on the
// byte-serial output links.
//
// At the last cycle of a slot (T_LOAD) each port copies the cell the output
// controller chose for it into its shift buffer. During the next slot the
// port sends the 53 bytes in cycles 0..52, with out_valid high and out_soc
// marking byte 0; cycle 53 is idle. A port with no cell keeps out_valid low
// for the slot.
//
// The block is only named, as a one-cell-per-port rotation buffer behind the
// output MUX; this parallel-to-serial form is this design's own choice.
module output_rotation_buffer
  import switch_pkg::*;
#(
  parameter int N_PORTS = 4
) (
  input  logic        clk,
  input  logic        rst_n,
  input  slot_cycle_t t,
  input  logic        next_valid [N_PORTS],
  input  cell_t       next_cell  [N_PORTS],
  output logic [7:0]  out_byte   [N_PORTS],
  output logic        out_valid  [N_PORTS],
  output logic        out_soc    [N_PORTS]
);

  logic  busy [N_PORTS];
  cell_t buf_q [N_PORTS];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int p = 0; p < N_PORTS; p++) busy[p] <= 1'b0;
    end else if (t == slot_cycle_t'(T_LOAD)) begin
      for (int p = 0; p < N_PORTS; p++) busy[p] <= next_valid[p];
    end
  end

  always_ff @(posedge clk) begin
    if (t == slot_cycle_t'(T_LOAD)) begin
      for (int p = 0; p < N_PORTS; p++) buf_q[p] <= next_cell[p];
    end
  end

  always_comb begin
    for (int p = 0; p < N_PORTS; p++) begin
      out_valid[p] = busy[p] && (t < slot_cycle_t'(CELL_BYTES));
      out_soc[p]   = busy[p] && (t == 0);
      out_byte[p]  = out_valid[p] ? buf_q[p][t] : 8'h00;
    end
  end

endmodule

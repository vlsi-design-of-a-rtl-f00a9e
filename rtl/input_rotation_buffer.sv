// Input controller with rotation buffer: turns the byte-serial input links
// into whole cells for the parallel SBM write.
//
// Every input link carries one byte per clock, aligned to the switch's slot
// counter t: the routing tag (switch_pkg::tag_t) in slot cycle 0 and the 53
// cell bytes in cycles 1..53. Each port assembles its cell in an assembly
// buffer; when the last byte arrives the whole cell and its tag move into a
// one-cell holding buffer, where they stay for the whole next slot, in which
// the write cycle stores them. Assembly of the next cell proceeds meanwhile,
// so the links never stop.
//
// The block is only named, as a one-cell-per-port rotation buffer in front of
// the input deMUX; this two-buffer serial-to-parallel form is this design's
// own choice.
module input_rotation_buffer
  import switch_pkg::*;
#(
  parameter int N_PORTS = 4
) (
  input  logic        clk,
  input  logic        rst_n,
  input  slot_cycle_t t,
  input  logic [7:0]  in_byte [N_PORTS],
  output tag_t        cell_tag  [N_PORTS],
  output cell_t       cell_data [N_PORTS]
);

  tag_t  asm_tag  [N_PORTS];
  cell_t asm_data [N_PORTS];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int p = 0; p < N_PORTS; p++) begin
        asm_tag[p]  <= '0;
        cell_tag[p] <= '0;
      end
    end else begin
      for (int p = 0; p < N_PORTS; p++) begin
        if (t == 0) asm_tag[p] <= tag_t'(in_byte[p]);
        if (t == slot_cycle_t'(SLOT_CYCLES - 1)) cell_tag[p] <= asm_tag[p];
      end
    end
  end

  always_ff @(posedge clk) begin
    for (int p = 0; p < N_PORTS; p++) begin
      if (t != 0) asm_data[p][t - 1] <= in_byte[p];
      if (t == slot_cycle_t'(SLOT_CYCLES - 1)) begin
        cell_data[p]                 <= asm_data[p];
        cell_data[p][CELL_BYTES - 1] <= in_byte[p];
      end
    end
  end

endmodule

// Test of the output rotation buffer: cells offered at the end of a slot
// must come out in the next slot as 53 bytes in slot cycles 0..52, with
// out_soc on byte 0, and nothing where no cell was offered.
module tb_output_rotation_buffer;
  import switch_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  slot_cycle_t t = '0;
  logic  next_valid [4];
  cell_t next_cell [4];
  logic [7:0] out_byte [4];
  logic out_valid [4], out_soc [4];
  logic  exp_v [4];
  cell_t exp_c [4];
  int checks = 0, failures = 0;

  output_rotation_buffer #(.N_PORTS(4)) dut (.clk, .rst_n, .t, .next_valid, .next_cell,
                                             .out_byte, .out_valid, .out_soc);
  always #5 clk = ~clk;

  initial begin
    for (int p = 0; p < 4; p++) begin next_valid[p] = 0; exp_v[p] = 0; end
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int slot = 0; slot < 40; slot++) begin
      for (int c = 0; c < SLOT_CYCLES; c++) begin
        t = slot_cycle_t'(c);
        if (c == 10)
          for (int p = 0; p < 4; p++) begin
            next_valid[p] = ($urandom_range(3) != 0);
            for (int k = 0; k < CELL_BYTES; k++) next_cell[p][k] = 8'($urandom);
          end
        #1;
        for (int p = 0; p < 4; p++) begin
          checks += 2;
          if (out_valid[p] !== (exp_v[p] && c < CELL_BYTES)) begin failures++; $display("FAIL valid"); end
          if (out_soc[p] !== (exp_v[p] && c == 0)) begin failures++; $display("FAIL soc"); end
          if (exp_v[p] && c < CELL_BYTES) begin
            checks++;
            if (out_byte[p] !== exp_c[p][c]) begin failures++; $display("FAIL byte"); end
          end
        end
        @(negedge clk);
      end
      exp_v = next_valid; exp_c = next_cell;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

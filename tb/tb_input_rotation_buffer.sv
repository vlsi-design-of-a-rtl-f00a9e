// Test of the input rotation buffer: random tagged cells sent byte-serially
// on four ports; after the last byte of a slot the held tag and cell must
// equal what was sent, and stay unchanged through the whole next slot while
// the following cell is assembled.
module tb_input_rotation_buffer;
  import switch_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  slot_cycle_t t = '0;
  logic [7:0] in_byte [4];
  tag_t  cell_tag [4];
  cell_t cell_data [4];
  tag_t  snd_tag [4], exp_tag [4];
  cell_t snd [4], exp_cell [4];
  bit have_exp = 0;
  int checks = 0, failures = 0;

  input_rotation_buffer #(.N_PORTS(4)) dut (.clk, .rst_n, .t, .in_byte, .cell_tag, .cell_data);
  always #5 clk = ~clk;

  initial begin
    for (int i = 0; i < 4; i++) in_byte[i] = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    checks++; if (cell_tag[0].valid) begin failures++; $display("FAIL reset"); end
    for (int slot = 0; slot < 40; slot++) begin
      for (int i = 0; i < 4; i++) begin
        snd_tag[i] = tag_t'(8'($urandom));
        for (int k = 0; k < CELL_BYTES; k++) snd[i][k] = 8'($urandom);
      end
      for (int c = 0; c < SLOT_CYCLES; c++) begin
        t = slot_cycle_t'(c);
        for (int i = 0; i < 4; i++) in_byte[i] = (c == 0) ? 8'(snd_tag[i]) : snd[i][c - 1];
        @(negedge clk);
        if (have_exp && c != SLOT_CYCLES - 1)
          for (int i = 0; i < 4; i++) begin
            checks += 2;
            if (cell_tag[i] !== exp_tag[i])   begin failures++; $display("FAIL tag %0d", i); end
            if (cell_data[i] !== exp_cell[i]) begin failures++; $display("FAIL cell %0d", i); end
          end
      end
      exp_tag = snd_tag; exp_cell = snd; have_exp = 1;
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

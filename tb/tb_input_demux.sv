// Test of the input deMUX: random cells and random port selections per bank,
// every bank's write data compared with the selected port's cell.
module tb_input_demux;
  import switch_pkg::*;
  cell_t      in_cell [4];
  logic [1:0] sel [8];
  cell_t      sbm_wdata [8];
  int checks = 0, failures = 0;

  input_demux #(.N_PORTS(4), .N_SBM(8)) dut (.in_cell, .sel, .sbm_wdata);

  initial begin
    for (int n = 0; n < 500; n++) begin
      for (int i = 0; i < 4; i++)
        for (int k = 0; k < CELL_BYTES; k++) in_cell[i][k] = 8'($urandom);
      for (int s = 0; s < 8; s++) sel[s] = 2'($urandom);
      #1;
      for (int s = 0; s < 8; s++) begin
        checks++;
        if (sbm_wdata[s] !== in_cell[sel[s]]) begin
          failures++; $display("FAIL bank %0d", s);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

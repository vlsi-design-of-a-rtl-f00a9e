// Test of the output MUX: random bank data and selections, each port's
// unicast and multicast place compared with the selected bank.
module tb_output_mux;
  import switch_pkg::*;
  cell_t      sbm_rdata [8];
  logic [2:0] u_sel [4], m_sel [4];
  cell_t      u_cell [4], m_cell [4];
  int checks = 0, failures = 0;

  output_mux #(.N_PORTS(4), .N_SBM(8)) dut (.sbm_rdata, .u_sel, .m_sel, .u_cell, .m_cell);

  initial begin
    for (int n = 0; n < 500; n++) begin
      for (int s = 0; s < 8; s++)
        for (int k = 0; k < CELL_BYTES; k++) sbm_rdata[s][k] = 8'($urandom);
      for (int p = 0; p < 4; p++) begin u_sel[p] = 3'($urandom); m_sel[p] = 3'($urandom); end
      #1;
      for (int p = 0; p < 4; p++) begin
        checks += 2;
        if (u_cell[p] !== sbm_rdata[u_sel[p]]) begin failures++; $display("FAIL u %0d", p); end
        if (m_cell[p] !== sbm_rdata[m_sel[p]]) begin failures++; $display("FAIL m %0d", p); end
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

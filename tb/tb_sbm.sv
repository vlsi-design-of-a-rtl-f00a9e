// Test of one shared buffer memory bank: random writes, then reads checked
// against a reference copy, with the one-clock read latency and the read
// data holding while the bank is idle or written.
module tb_sbm;
  import switch_pkg::*;
  localparam int DEPTH = 64;
  logic clk = 1'b0;
  logic en = 1'b0, we = 1'b0;
  logic [5:0] addr = '0;
  cell_t wdata, rdata;
  cell_t ref_mem [DEPTH];
  bit    written [DEPTH];
  int checks = 0, failures = 0;

  sbm #(.DEPTH(DEPTH)) dut (.clk, .en, .we, .addr, .wdata, .rdata);
  always #5 clk = ~clk;

  function automatic cell_t rand_cell();
    cell_t c;
    for (int k = 0; k < CELL_BYTES; k++) c[k] = 8'($urandom);
    return c;
  endfunction

  initial begin
    for (int a = 0; a < DEPTH; a++) begin
      @(negedge clk); en = 1; we = 1; addr = 6'(a); wdata = rand_cell();
      ref_mem[a] = wdata; written[a] = 1;
    end
    for (int n = 0; n < 2000; n++) begin
      @(negedge clk);
      en = 1; addr = 6'($urandom_range(DEPTH - 1));
      we = ($urandom_range(3) == 0);
      wdata = rand_cell();
      if (we) ref_mem[addr] = wdata;
      else begin
        cell_t exp;
        exp = ref_mem[addr];
        @(negedge clk);
        en = 0; we = 0;
        checks++; if (rdata !== exp) begin failures++; $display("FAIL read"); end
        @(negedge clk);
        en = 1; we = 1; addr = 6'($urandom_range(DEPTH - 1)); wdata = rand_cell();
        ref_mem[addr] = wdata;
        @(negedge clk);
        en = 0;
        checks++; if (rdata !== exp) begin failures++; $display("FAIL hold"); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

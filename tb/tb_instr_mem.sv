// tb_instr_mem: self-checking test of the instruction memory.
// Loads a random program through the write port and reads it back on
// both combinational ports, including the wrap of the second port.
module tb_instr_mem;
  import ooasip_pkg::*;
  logic clk = 0;
  always #5 clk = ~clk;
  pc_t rd_addr0, rd_addr1, wr_addr;
  logic [7:0] rd_data0, rd_data1, wr_data;
  logic wr_en;
  int checks = 0, failures = 0;
  logic [7:0] ref_m [256];

  instr_mem dut (.*);

  initial begin
    repeat (3000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    wr_en = 0; wr_addr = '0; wr_data = '0; rd_addr0 = '0; rd_addr1 = '0;
    for (int i = 0; i < 256; i++) begin
      ref_m[i] = 8'($urandom);
      @(negedge clk); wr_en = 1; wr_addr = pc_t'(i); wr_data = ref_m[i];
    end
    @(negedge clk); wr_en = 0;
    for (int i = 0; i < 256; i++) begin
      rd_addr0 = pc_t'(i); rd_addr1 = pc_t'(i) + 8'd1; #1;
      checks += 2;
      if (rd_data0 !== ref_m[i]) begin failures++; $display("FAIL p0 %0d", i); end
      if (rd_data1 !== ref_m[(i + 1) % 256]) begin failures++; $display("FAIL p1 %0d", i); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

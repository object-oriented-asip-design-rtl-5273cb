// tb_addr_map_table: self-checking test of the OMU address mapping table.
// Writes random storage entries for every object, reads them back against a
// reference array, frees some objects, and checks reset clears the table.
module tb_addr_map_table;
  import ooasip_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  oid_t rd_oid, wr_oid;
  map_entry_t rd_entry, wr_entry;
  logic wr_en;
  int checks = 0, failures = 0;
  map_entry_t ref_t [16];

  addr_map_table dut (.*);

  task automatic check(input map_entry_t got, exp, input string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %p exp %p", what, got, exp);
    end
  endtask

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    wr_en = 0; wr_oid = '0; wr_entry = '0; rd_oid = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < 16; i++) begin
      rd_oid = oid_t'(i); #1; check(rd_entry, '0, "after reset");
    end
    for (int i = 0; i < 16; i++) begin
      ref_t[i] = '{valid: 1'b1, in_rf: 1'($urandom), base: 8'($urandom)};
      @(negedge clk); wr_en = 1; wr_oid = oid_t'(i); wr_entry = ref_t[i];
    end
    @(negedge clk); wr_en = 0;
    for (int i = 0; i < 16; i++) begin
      rd_oid = oid_t'(i); #1; check(rd_entry, ref_t[i], "read back");
    end
    // free odd objects
    for (int i = 1; i < 16; i += 2) begin
      @(negedge clk); wr_en = 1; wr_oid = oid_t'(i); wr_entry = '0; ref_t[i] = '0;
    end
    @(negedge clk); wr_en = 0;
    for (int i = 0; i < 16; i++) begin
      rd_oid = oid_t'(i); #1; check(rd_entry, ref_t[i], "after free");
    end
    rst_n = 0; #1; rst_n = 1;
    for (int i = 0; i < 16; i++) begin
      rd_oid = oid_t'(i); #1; check(rd_entry, '0, "after second reset");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

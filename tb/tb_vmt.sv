// tb_vmt: self-checking test of the Virtual Method Table.
// Fills every (class, method) entry with random hardware/software
// bindings, reads all of them back against a reference matrix, rewrites
// one hardware entry as a software routine (method override by software)
// and checks that only that entry changed.
module tb_vmt;
  import ooasip_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  cid_t rd_cid, wr_cid;
  mid_t rd_mid, wr_mid;
  vmt_entry_t rd_entry, wr_entry;
  logic wr_en;
  int checks = 0, failures = 0;
  vmt_entry_t ref_t [4][4];

  vmt dut (.*);

  task automatic check_all(input string what);
    for (int c = 0; c < 4; c++)
      for (int m = 0; m < 4; m++) begin
        rd_cid = cid_t'(c); rd_mid = mid_t'(m); #1;
        checks++;
        if (rd_entry !== ref_t[c][m]) begin
          failures++;
          $display("FAIL %s [%0d][%0d]: got %p exp %p", what, c, m, rd_entry, ref_t[c][m]);
        end
      end
  endtask

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    wr_en = 0; wr_cid = '0; wr_mid = '0; wr_entry = '0; rd_cid = '0; rd_mid = '0;
    for (int c = 0; c < 4; c++) for (int m = 0; m < 4; m++) ref_t[c][m] = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    check_all("after reset");
    for (int c = 0; c < 4; c++)
      for (int m = 0; m < 4; m++) begin
        ref_t[c][m] = '{valid: 1'b1, ishw: 1'($urandom), fuid: pc_t'($urandom)};
        @(negedge clk); wr_en = 1; wr_cid = cid_t'(c); wr_mid = mid_t'(m); wr_entry = ref_t[c][m];
      end
    @(negedge clk); wr_en = 0;
    check_all("filled");
    ref_t[1][0] = '{valid: 1'b1, ishw: 1'b0, fuid: 8'h40};
    @(negedge clk); wr_en = 1; wr_cid = 1; wr_mid = 0; wr_entry = ref_t[1][0];
    @(negedge clk); wr_en = 0;
    check_all("override");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

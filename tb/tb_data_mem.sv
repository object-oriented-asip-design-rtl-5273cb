// tb_data_mem: self-checking test of the data memory.
// Random reads and writes on both ports against a reference array; checks
// the one-cycle read latency and that port A wins a same-address write.
module tb_data_mem;
  import ooasip_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic a_en, a_we, b_en, b_we;
  logic [7:0] a_addr, b_addr;
  word_t a_wdata, a_rdata, b_wdata, b_rdata;
  int checks = 0, failures = 0;
  word_t ref_m [256];
  word_t exp_a, exp_b;
  logic chk_a, chk_b;

  data_mem dut (.clk, .a_en, .a_we, .a_addr, .a_wdata, .a_rdata,
                .b_en, .b_we, .b_addr, .b_wdata, .b_rdata);

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    {a_en, a_we, b_en, b_we} = '0;
    a_addr = '0; b_addr = '0; a_wdata = '0; b_wdata = '0;
    chk_a = 0; chk_b = 0;
    for (int i = 0; i < 256; i++) ref_m[i] = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < 256; i++) begin
      @(negedge clk); b_en = 1; b_we = 1; b_addr = 8'(i); b_wdata = '0;
    end
    for (int n = 0; n < 1000; n++) begin
      @(negedge clk);
      if (chk_a) begin checks++; if (a_rdata !== exp_a) begin failures++; $display("FAIL A rd %h exp %h", a_rdata, exp_a); end end
      if (chk_b) begin checks++; if (b_rdata !== exp_b) begin failures++; $display("FAIL B rd %h exp %h", b_rdata, exp_b); end end
      a_en = 1'($urandom); a_we = 1'($urandom); a_addr = 8'($urandom); a_wdata = $urandom;
      b_en = 1'($urandom); b_we = 1'($urandom); b_addr = 8'($urandom); b_wdata = $urandom;
      if (n % 50 == 0) begin b_addr = a_addr; a_en = 1; a_we = 1; b_en = 1; b_we = 1; end
      chk_a = a_en; exp_a = ref_m[a_addr];
      chk_b = b_en; exp_b = ref_m[b_addr];
      if (b_en && b_we) ref_m[b_addr] = b_wdata;
      if (a_en && a_we) ref_m[a_addr] = a_wdata;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

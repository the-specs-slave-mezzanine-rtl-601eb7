// tb_specs_ident: checks the identification words Board_ID and Ser_Rev for
// random switch and PROM values, and write/read-back of Userdef_test.
module tb_specs_ident;
  import specs_pkg::*;
  logic clk = 0, rst_n = 0, wr = 0;
  logic [7:0] sub_addr = '0;
  logic [15:0] wdata = '0, rdata;
  logic hit;
  logic [5:0] slave_addr = '0;
  logic [1:0] pba = '0;
  logic [7:0] ident = '0, serial_nb = '0, revision_nb = '0;
  int checks = 0, failures = 0;

  specs_ident dut (.clk, .rst_n, .wr, .sub_addr, .wdata, .rdata, .hit, .slave_addr, .pba,
                   .ident, .serial_nb, .revision_nb);

  always #5 clk = ~clk;

  task automatic check(input logic ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [15:0] ud;
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(negedge clk) sub_addr = SUB_USERDEF; #1 check(rdata == 16'h0000, "Userdef reset");
    for (int i = 0; i < 30; i++) begin
      slave_addr = 6'($urandom); pba = 2'($urandom);
      ident = 8'($urandom); serial_nb = 8'($urandom); revision_nb = 8'($urandom);
      ud = 16'($urandom);
      @(negedge clk) sub_addr = SUB_BOARD_ID; #1;
      check(hit && rdata == {ident, pba, slave_addr}, "Board_ID");
      @(negedge clk) sub_addr = SUB_SER_REV; #1;
      check(hit && rdata == {serial_nb, revision_nb}, "Ser_Rev");
      @(negedge clk) wr = 1; sub_addr = SUB_USERDEF; wdata = ud;
      @(negedge clk) wr = 0; #1;
      check(hit && rdata == ud, "Userdef_test read back");
      @(negedge clk) wr = 1; sub_addr = SUB_SER_REV; wdata = ~ud;
      @(negedge clk) wr = 0; sub_addr = SUB_USERDEF; #1;
      check(rdata == ud, "Userdef unchanged by write to 9");
    end
    sub_addr = SUB_MEZZ_CTRL; #1 check(!hit, "no hit on 4");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

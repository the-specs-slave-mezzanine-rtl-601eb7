// tb_global_ctrl: checks Mezz_ctrl read/write and its outputs (bus_conf,
// osc_en, master mode from strap or Mas/Sla), the Mezz_stat word, and the
// RESET_REG* pulse: low for exactly RST_LEN cycles after a write of rst_reg,
// with rst_reg reading 1 meanwhile and 0 afterwards.
module tb_global_ctrl;
  import specs_pkg::*;
  localparam int RL = 6;
  logic clk = 0, rst_n = 0, wr = 0;
  logic [7:0] sub_addr = '0;
  logic [15:0] wdata = '0, rdata;
  logic hit, slave_mode = 1, osc_selected = 0, irq = 0;
  logic master_mode, bus_conf, osc_en, reset_reg_n;
  int checks = 0, failures = 0;

  global_ctrl #(.RST_LEN(RL)) dut (.clk, .rst_n, .wr, .sub_addr, .wdata, .rdata, .hit,
    .slave_mode, .osc_selected, .irq, .master_mode, .bus_conf, .osc_en, .reset_reg_n);

  always #5 clk = ~clk;

  task automatic check(input logic ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  task automatic write(input logic [7:0] a, input logic [15:0] v);
    @(negedge clk); wr = 1; sub_addr = a; wdata = v;
    @(negedge clk); wr = 0;
  endtask

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int low;
    repeat (2) @(posedge clk);
    rst_n = 1;
    #1 check(reset_reg_n && !bus_conf && !osc_en && !master_mode, "reset state");
    slave_mode = 0; #1 check(master_mode, "strap selects master mode");
    slave_mode = 1; #1 check(!master_mode, "strap selects slave mode");
    for (int i = 0; i < 20; i++) begin
      logic [7:0] v;
      v = 8'($urandom) & 8'hFE;
      write(SUB_MEZZ_CTRL, {8'h00, v});
      sub_addr = SUB_MEZZ_CTRL; #1;
      check(rdata[7:0] == v && hit, "Mezz_ctrl read back");
      check(bus_conf == v[MC_BUS_CONF], "bus_conf");
      check(osc_en == v[MC_OSC], "osc enable");
      check(master_mode == v[MC_MAS_SLA], "Mas/Sla forces master");
      check(reset_reg_n, "no reset without rst_reg");
    end
    write(SUB_MEZZ_CTRL, 16'h0000);
    // RESET_REG* pulse
    @(negedge clk); wr = 1; sub_addr = SUB_MEZZ_CTRL; wdata = 16'h0001;
    @(negedge clk); wr = 0;
    #1 check(rdata[MC_RST_REG] == 1'b1, "rst_reg reads 1 during pulse");
    low = 0;
    while (!reset_reg_n && low < 100) begin @(negedge clk); low++; end
    check(low == RL, $sformatf("RESET_REG* low for %0d cycles, expected %0d", low, RL));
    #1 check(rdata[MC_RST_REG] == 1'b0, "rst_reg clears");
    // status word
    osc_selected = 1; irq = 1; slave_mode = 0;
    repeat (3) @(posedge clk);
    @(negedge clk) sub_addr = SUB_MEZZ_STAT; #1;
    check(rdata == 16'h0007 && hit, $sformatf("Mezz_stat %h", rdata));
    osc_selected = 0; irq = 0; slave_mode = 1;
    repeat (3) @(posedge clk);
    #1 check(rdata == 16'h0000, "Mezz_stat cleared");
    sub_addr = SUB_INTERRUPT; #1 check(!hit, "no hit on sub-address 6");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

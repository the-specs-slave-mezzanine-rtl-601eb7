// tb_interrupt_unit: checks the interrupt word {vector[7:0], user, header
// checksum, trailer checksum}. Rising edges on enabled input pins set their
// vector bit; disabled pins, pins configured as outputs and falling edges do
// not; USER_INTER and the checksum pulses set their bits; irq follows the
// word; a read of sub-address 6 returns and clears it; IT_Config_vect reads
// back. The pin-to-bit latency (3 cycles) is checked too.
module tb_interrupt_unit;
  import specs_pkg::*;
  logic clk = 0, rst_n = 0, wr = 0, rd = 0;
  logic [7:0] sub_addr = '0;
  logic [15:0] wdata = '0, rdata;
  logic hit, irq;
  logic [7:0] vec_pins = '0, vec_is_out = '0;
  logic user_inter = 0, hdr = 0, trl = 0;
  int checks = 0, failures = 0;

  interrupt_unit dut (.clk, .rst_n, .wr, .rd, .sub_addr, .wdata, .rdata, .hit,
                      .vec_pins, .vec_is_out, .user_inter, .hdr_chk_err(hdr),
                      .trl_chk_err(trl), .irq);

  always #5 clk = ~clk;

  task automatic check(input logic ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  task automatic write(input logic [7:0] a, input logic [15:0] v);
    @(negedge clk); wr = 1; sub_addr = a; wdata = v;
    @(negedge clk); wr = 0;
  endtask

  // read with clear (rd strobe)
  task automatic read_clr(output logic [15:0] v);
    @(negedge clk); rd = 1; sub_addr = SUB_INTERRUPT; #1 v = rdata;
    @(negedge clk); rd = 0;
  endtask

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [15:0] v;
    logic [7:0] cfg, rise, exp_vec;
    int lat;
    repeat (2) @(posedge clk);
    rst_n = 1;
    repeat (2) @(posedge clk);
    check(!irq, "no irq after reset");
    // pin edge with interrupts disabled
    @(negedge clk) vec_pins = 8'hFF;
    repeat (5) @(posedge clk);
    #1 check(!irq, "disabled pins do not interrupt");
    @(negedge clk) vec_pins = 8'h00;
    repeat (5) @(posedge clk);
    // latency: enable bit 0, raise pin 0, count cycles until irq
    write(SUB_IT_CONFIG, 16'h0001);
    @(negedge clk) vec_pins = 8'h01;
    lat = 0;
    while (!irq && lat < 20) begin @(posedge clk); #1 lat++; end
    check(lat == 3, $sformatf("pin-to-irq latency %0d, expected 3", lat));
    read_clr(v);
    check(v == 16'h0008, $sformatf("vector bit 0 set: %h", v));
    #1 check(!irq, "cleared by read");
    @(negedge clk) vec_pins = 8'h00;
    repeat (5) @(posedge clk);
    read_clr(v);
    check(v == 16'h0000, "falling edge does not interrupt");
    // random enables, direction and edges
    for (int i = 0; i < 30; i++) begin
      cfg = 8'($urandom);
      write(SUB_IT_CONFIG, {8'hAB, cfg});
      @(negedge clk) sub_addr = SUB_IT_CONFIG; #1;
      check(rdata == {8'h00, cfg}, "IT_Config_vect read back");
      vec_is_out = 8'($urandom);
      rise = 8'($urandom);
      @(negedge clk) vec_pins = rise;
      repeat (5) @(posedge clk);
      exp_vec = rise & cfg & ~vec_is_out;
      read_clr(v);
      check(v == {5'd0, exp_vec, 3'b000}, $sformatf("vector %h exp %h", v, {5'd0, exp_vec, 3'b000}));
      @(negedge clk) vec_pins = '0;
      repeat (4) @(posedge clk);
      read_clr(v);
    end
    // user interrupt and checksum errors
    @(negedge clk) user_inter = 1;
    repeat (5) @(posedge clk);
    @(negedge clk) hdr = 1;
    @(negedge clk) hdr = 0; trl = 1;
    @(negedge clk) trl = 0;
    #1 check(irq, "irq raised");
    read_clr(v);
    check(v == 16'h0007, $sformatf("user+hdr+trl bits: %h", v));
    // event in the same cycle as the clearing read is kept
    @(negedge clk); rd = 1; sub_addr = SUB_INTERRUPT; trl = 1;
    @(negedge clk); rd = 0; trl = 0; #1;
    check(irq, "event during clear kept");
    read_clr(v);
    check(v == 16'h0001, "kept event is trailer checksum");
    @(negedge clk) sub_addr = 8'd3; #1 check(!hit, "no hit on other sub-address");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

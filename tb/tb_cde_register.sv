// tb_cde_register: checks the REG_EXT control/status register. After reset
// every pin must be an input; random directions and output values are
// written through sub-addresses 0..3 and the pin drive, output enables and
// read-back (pin level for inputs, register for outputs) are compared with a
// reference model. Unrelated sub-addresses must not hit.
module tb_cde_register;
  import specs_pkg::*;
  logic clk = 0, rst_n = 0, wr = 0;
  logic [7:0] sub_addr = '0;
  logic [15:0] wdata = '0, rdata;
  logic hit;
  logic [31:0] pins_in = '0, reg_ext_o, reg_ext_oe, conf;
  logic [31:0] m_out = '0, m_conf = '0, exp_rb;
  int checks = 0, failures = 0;

  cde_register dut (.clk, .rst_n, .wr, .sub_addr, .wdata, .rdata, .hit,
                    .reg_ext_i(pins_in), .reg_ext_o, .reg_ext_oe, .conf);

  always #5 clk = ~clk;

  task automatic check(input logic ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  task automatic write(input logic [7:0] a, input logic [15:0] v);
    @(negedge clk); wr = 1; sub_addr = a; wdata = v;
    @(negedge clk); wr = 0;
  endtask

  task automatic read(input logic [7:0] a, output logic [15:0] v);
    @(negedge clk); sub_addr = a; #1 v = rdata;
  endtask

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [15:0] v;
    repeat (2) @(posedge clk);
    rst_n = 1;
    check(reg_ext_oe == 32'd0, "all pins inputs after reset");
    for (int i = 0; i < 40; i++) begin
      int a;
      a = $urandom % 4;
      v = 16'($urandom);
      write(8'(a), v);
      case (a)
        0: m_out[15:0]   = v;
        1: m_out[31:16]  = v;
        2: m_conf[15:0]  = v;
        3: m_conf[31:16] = v;
        default: ;
      endcase
      pins_in = $urandom;
      exp_rb = (m_conf & m_out) | (~m_conf & pins_in);
      #1;
      check(reg_ext_o == m_out, "pin output value");
      check(reg_ext_oe == m_conf && conf == m_conf, "pin direction");
      read(SUB_REGOUT_LO, v); check(v == exp_rb[15:0] && hit, "readback lo");
      read(SUB_REGOUT_HI, v); check(v == exp_rb[31:16] && hit, "readback hi");
      read(SUB_CONF_LO, v);   check(v == m_conf[15:0], "conf lo");
      read(SUB_CONF_HI, v);   check(v == m_conf[31:16], "conf hi");
    end
    read(SUB_MEZZ_CTRL, v); check(!hit, "no hit outside 0..3");
    write(SUB_MEZZ_CTRL, 16'hFFFF);
    check(reg_ext_o == m_out && reg_ext_oe == m_conf, "write elsewhere ignored");
    // hardware reset returns every pin to input
    rst_n = 0; #1;
    check(reg_ext_oe == 32'd0, "reset makes all pins inputs");
    rst_n = 1;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

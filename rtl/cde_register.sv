// cde_register: the 32-bit external control/status register (REG_EXT pins).
//
// Each of the 32 REG_EXT pins is a bidirectional I/O. Reg_out[31:0] holds the
// value driven on pins configured as outputs; Conf_regout[31:0] holds the
// direction of each pin (1 = output, 0 = input). After a hardware reset both
// registers are zero, so every pin is an input, as the specification asks
// for safety. Both registers are triple-voted (tmr_reg).
//
// Register access (mode 3), 16-bit words:
//   sub-address 0 : Reg_out[15:0]      1 : Reg_out[31:16]
//   sub-address 2 : Conf_regout[15:0]  3 : Conf_regout[31:16]
// A read of sub-address 0/1 returns the pin level for input bits and the
// register for output bits, so it reads back the local environment. A read of
// 2/3 returns the direction register. The split into low and high 16-bit
// words at consecutive sub-addresses is this design's reading of the register
// table; the read-back rule above is also its own choice.
//
// Timing: a write (wr high for one cycle with a matching sub_addr) takes
// effect at that clock edge; read data is combinational from sub_addr.
// The interrupt use of bits 31:24 is handled by interrupt_unit.
module cde_register
  import specs_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  // register access
  input  logic        wr,
  input  logic [7:0]  sub_addr,
  input  logic [15:0] wdata,
  output logic [15:0] rdata,
  output logic        hit,        // sub_addr belongs to this block
  // pins
  input  logic [31:0] reg_ext_i,
  output logic [31:0] reg_ext_o,
  output logic [31:0] reg_ext_oe,
  // direction register, for the interrupt unit
  output logic [31:0] conf
);

  logic [31:0] reg_out;
  logic [31:0] readback;

  tmr_reg #(.W(16)) u_out_lo  (.clk, .rst_n, .en(wr && sub_addr == SUB_REGOUT_LO),
                               .d(wdata), .q(reg_out[15:0]));
  tmr_reg #(.W(16)) u_out_hi  (.clk, .rst_n, .en(wr && sub_addr == SUB_REGOUT_HI),
                               .d(wdata), .q(reg_out[31:16]));
  tmr_reg #(.W(16)) u_conf_lo (.clk, .rst_n, .en(wr && sub_addr == SUB_CONF_LO),
                               .d(wdata), .q(conf[15:0]));
  tmr_reg #(.W(16)) u_conf_hi (.clk, .rst_n, .en(wr && sub_addr == SUB_CONF_HI),
                               .d(wdata), .q(conf[31:16]));

  assign reg_ext_o  = reg_out;
  assign reg_ext_oe = conf;
  assign readback   = (conf & reg_out) | (~conf & reg_ext_i);

  always_comb begin
    hit   = 1'b1;
    rdata = '0;
    unique case (sub_addr)
      SUB_REGOUT_LO: rdata = readback[15:0];
      SUB_REGOUT_HI: rdata = readback[31:16];
      SUB_CONF_LO:   rdata = conf[15:0];
      SUB_CONF_HI:   rdata = conf[31:16];
      default:       hit   = 1'b0;
    endcase
  end

endmodule

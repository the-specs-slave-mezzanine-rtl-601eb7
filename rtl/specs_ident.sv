// specs_ident: identification registers of the SPECS slave.
//
//   sub-address 8  Board_ID     = {Identification[7:0], board_nb[7:0]}  read only
//   sub-address 9  Ser_Rev      = {serial_nb[7:0], revision_nb[7:0]}    read only
//   sub-address 10 Userdef_test = {test[15:8], user_defined[7:0]}       read/write
//
// Identification, serial number and revision are inputs (on the mezzanine
// they come from the socketed serial PROM, which is read outside this
// block). board_nb is the slave address set by the six address switches
// {2'b0, slave_addr}, and the two broadcast-group switches (PBA) are kept in
// bits 7:6 of board_nb. Userdef_test is a triple-voted scratch register that
// the control software can write and read back to test the link.
//
// The register table prints sub-address 9 for both Ser_Rev and Userdef_test;
// this design places Userdef_test at 10. Taking board_nb from the switches is
// this design's choice.
module specs_ident
  import specs_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic        wr,
  input  logic [7:0]  sub_addr,
  input  logic [15:0] wdata,
  output logic [15:0] rdata,
  output logic        hit,
  input  logic [5:0]  slave_addr,  // address switches
  input  logic [1:0]  pba,         // partial broadcast address switches
  input  logic [7:0]  ident,       // from the serial PROM
  input  logic [7:0]  serial_nb,   // from the serial PROM
  input  logic [7:0]  revision_nb  // from the serial PROM
);

  logic [15:0] userdef;

  tmr_reg #(.W(16)) u_user (.clk, .rst_n, .en(wr && sub_addr == SUB_USERDEF),
                            .d(wdata), .q(userdef));

  always_comb begin
    hit   = 1'b1;
    rdata = '0;
    unique case (sub_addr)
      SUB_BOARD_ID: rdata = {ident, pba, slave_addr};
      SUB_SER_REV:  rdata = {serial_nb, revision_nb};
      SUB_USERDEF:  rdata = userdef;
      default:      hit   = 1'b0;
    endcase
  end

endmodule

// interrupt_unit: collects the sources of a SPECS interrupt.
//
// The interrupt word is Interrupt[10:0] = {Interrupt_Vector[7:0],
// User_interrupt, Header_checksum, Trailer_checksum}, as in the register
// table of the specification:
//   - Interrupt_Vector[i] is set by a rising edge on REG_EXT[24+i] when that
//     pin is an input (Conf_regout bit clear) and IT_Config_vect[i] is set;
//   - User_interrupt is set by a rising edge on the USER_INTER pin;
//   - Header_checksum / Trailer_checksum are set by error pulses from the
//     SPECS protocol core.
// irq is high while any bit of the word is set; it asks the protocol core to
// send an interrupt to the master.
//
// Register access (mode 3): sub-address 6 reads Interrupt[10:0] and clears
// it; sub-address 7 reads and writes IT_Config_vect[7:0] (triple-voted, zero
// after reset so no pin interrupts until enabled). Edge sensitivity,
// stickiness and clear-on-read are this design's own choices.
//
// Timing: pins are resynchronised with two flip-flops, so a pin edge sets its
// bit 3 cycles later. An event arriving in the cycle of the clearing read is
// kept.
module interrupt_unit
  import specs_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  // register access
  input  logic        wr,
  input  logic        rd,
  input  logic [7:0]  sub_addr,
  input  logic [15:0] wdata,
  output logic [15:0] rdata,
  output logic        hit,
  // sources
  input  logic [7:0]  vec_pins,    // REG_EXT[31:24] pin levels
  input  logic [7:0]  vec_is_out,  // Conf_regout[31:24]
  input  logic        user_inter,  // USER_INTER pin
  input  logic        hdr_chk_err, // pulse from the protocol core
  input  logic        trl_chk_err, // pulse from the protocol core
  // request
  output logic        irq
);

  logic [7:0]  it_cfg;
  logic [8:0]  sync1, sync2, prev;   // {user_inter, vec_pins}
  logic [8:0]  rise;
  logic [10:0] intr, intr_set;
  logic        clear;

  tmr_reg #(.W(8)) u_cfg (.clk, .rst_n, .en(wr && sub_addr == SUB_IT_CONFIG),
                          .d(wdata[7:0]), .q(it_cfg));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sync1 <= '0;
      sync2 <= '0;
      prev  <= '0;
    end else begin
      sync1 <= {user_inter, vec_pins};
      sync2 <= sync1;
      prev  <= sync2;
    end
  end

  assign rise     = sync2 & ~prev;
  assign intr_set = {rise[7:0] & it_cfg & ~vec_is_out, rise[8], hdr_chk_err, trl_chk_err};
  assign clear    = rd && sub_addr == SUB_INTERRUPT;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) intr <= '0;
    else        intr <= (clear ? '0 : intr) | intr_set;
  end

  assign irq = |intr;

  always_comb begin
    hit   = 1'b1;
    rdata = '0;
    unique case (sub_addr)
      SUB_INTERRUPT: rdata = {5'd0, intr};
      SUB_IT_CONFIG: rdata = {8'd0, it_cfg};
      default:       hit   = 1'b0;
    endcase
  end

endmodule

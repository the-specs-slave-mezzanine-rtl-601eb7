// global_ctrl: mezzanine control and status registers and the RESET_REG*
// output.
//
// Mezz_ctrl[7:0] (sub-address 4, read/write, triple-voted) holds
// {osc, Mas/Sla, bus_conf, rst_reg} in bits 3..0:
//   rst_reg  (bit 0) : writing 1 fires RESET_REG* low for RST_LEN cycles; the
//                      bit reads 1 while the pulse lasts and then clears;
//   bus_conf (bit 1) : parallel bus waits for the DT_RDY/DT_ACK handshake;
//   Mas/Sla  (bit 2) : forces the SPECS bus routing into master mode;
//   osc      (bit 3) : enables the local oscillator on SPECS_CLOCKOUT.
// Bits 7..4 are stored and read back unused. The field list comes from the
// register table; the bit order (first named = most significant) and the
// meaning given to bus_conf and Mas/Sla are this design's reading.
//
// The board is in master mode when the Slave_mode strap is low or Mas/Sla is
// set. Mezz_stat[7:0] (sub-address 5, read only; its content is left open by
// the specification) is {5'b0, irq, osc_selected, master_mode}.
//
// RESET_REG* is generated from the SPECS bus clock only, so no clock on the
// board is needed to trigger it. osc_selected comes from another clock
// domain and is resynchronised with two flip-flops.
module global_ctrl
  import specs_pkg::*;
#(
  parameter int unsigned RST_LEN = 16
) (
  input  logic        clk,
  input  logic        rst_n,
  // register access
  input  logic        wr,
  input  logic [7:0]  sub_addr,
  input  logic [15:0] wdata,
  output logic [15:0] rdata,
  output logic        hit,
  // status inputs
  input  logic        slave_mode,    // strap: 1 = slave mode
  input  logic        osc_selected,  // local oscillator replaces the LHC clock
  input  logic        irq,
  // control outputs
  output logic        master_mode,
  output logic        bus_conf,
  output logic        osc_en,
  output logic        reset_reg_n    // RESET_REG*, active low
);

  localparam int CW = $clog2(RST_LEN + 1);

  logic [7:0]  ctrl;
  logic [CW-1:0] rst_cnt;
  logic        osc_sel_s1, osc_sel_s2;
  logic        ctrl_wr;

  assign ctrl_wr = wr && sub_addr == SUB_MEZZ_CTRL;

  tmr_reg #(.W(7)) u_ctrl (.clk, .rst_n, .en(ctrl_wr), .d(wdata[7:1]), .q(ctrl[7:1]));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rst_cnt    <= '0;
      osc_sel_s1 <= 1'b0;
      osc_sel_s2 <= 1'b0;
    end else begin
      osc_sel_s1 <= osc_selected;
      osc_sel_s2 <= osc_sel_s1;
      if (ctrl_wr && wdata[MC_RST_REG]) rst_cnt <= CW'(RST_LEN);
      else if (rst_cnt != 0)            rst_cnt <= rst_cnt - 1'b1;
    end
  end

  assign ctrl[MC_RST_REG] = (rst_cnt != 0);
  assign reset_reg_n      = (rst_cnt == 0);
  assign bus_conf         = ctrl[MC_BUS_CONF];
  assign osc_en           = ctrl[MC_OSC];
  assign master_mode      = !slave_mode || ctrl[MC_MAS_SLA];

  always_comb begin
    hit   = 1'b1;
    rdata = '0;
    unique case (sub_addr)
      SUB_MEZZ_CTRL: rdata = {8'd0, ctrl};
      SUB_MEZZ_STAT: rdata = {8'd0, 5'd0, irq, osc_sel_s2, master_mode};
      default:       hit   = 1'b0;
    endcase
  end

endmodule

// specs_slave: the SPECS slave chip of the mezzanine board.
//
// The slave receives commands from a SPECS master over a serial bus and turns
// them into actions on the front-end electronics. Each command has a mode:
//   0  I2C           byte operations on the long-distance or on-board bus
//   1  JTAG          up to 8 bits shifted on TCK/TMS/TDI/TDO
//   2  parallel bus  16-bit read or write at an 8-bit address
//   3  registers     16-bit access to the slave's own registers:
//                    0-1 Reg_out, 2-3 Conf_regout (cde_register),
//                    4 Mezz_ctrl, 5 Mezz_stat (global_ctrl),
//                    6 Interrupt, 7 IT_Config_vect (interrupt_unit),
//                    8 Board_ID, 9 Ser_Rev, 10 Userdef_test (specs_ident)
// Beside the command path the chip holds the TTCrx channel-B decoder, the
// LHC-clock / local-oscillator switch and the routing of the SPECS lines for
// master or slave mode of the mezzanine.
//
// The serial SPECS frame (header, address matching, checksums) is handled by
// a protocol core defined in the SPECS protocol specification and not part of
// this RTL. Its interface to this module is: cmd_valid/cmd (one decoded
// command, accepted when cmd_ready is high), resp_valid/resp (the answer, one
// cycle), irq (interrupt request to be sent to the master), hdr_chk_err and
// trl_chk_err (checksum error pulses), and the raw lines rx_sda/rx_scl and
// tx_sda/tx_scl/tx_en through specs_bus_switch.
//
// Clocks: specs_clk runs the command path and the registers (the SPECS bus
// clock delivered by the protocol core, so no board clock is needed to write
// a register or fire RESET_REG*). clk_sys, the LHC clock or the local
// oscillator after clock_switch, runs the channel-B decoder and the bus-free
// watch of the SPECS switch. rst_n is the hardware Reset*, asynchronous.
//
// Timing: a register command is answered one specs_clk cycle after it is
// accepted; I2C, JTAG and parallel-bus commands are answered when the engine
// finishes. Only one command is in flight at a time.
module specs_slave
  import specs_pkg::*;
#(
  parameter int unsigned I2C_QTR    = 100,
  parameter int unsigned JTAG_HALF  = 2,
  parameter int unsigned PB_SETUP   = 1,
  parameter int unsigned PB_STROBE  = 2,
  parameter int unsigned PB_TIMEOUT = 255,
  parameter int unsigned RST_LEN    = 16,
  parameter int unsigned LOSS_CYCLES = 8,
  parameter int unsigned GOOD_CYCLES = 16,
  parameter int unsigned FREE_CYC   = 8
) (
  input  logic        specs_clk,
  input  logic        rst_n,
  // protocol core side
  input  logic        cmd_valid,
  input  specs_cmd_t  cmd,
  output logic        cmd_ready,
  output logic        resp_valid,
  output specs_resp_t resp,
  output logic        irq,
  input  logic        hdr_chk_err,
  input  logic        trl_chk_err,
  output logic        rx_sda,
  output logic        rx_scl,
  input  logic        tx_sda,
  input  logic        tx_scl,
  input  logic        tx_en,
  output logic        bus_free,
  // SPECS lines
  input  logic        sda_ms,
  input  logic        scl_ms,
  output logic        sda_sm,
  output logic        scl_sm,
  output logic        sdaout_board,
  output logic        sclout_board,
  input  logic        sdain_board,
  input  logic        sclin_board,
  input  logic        sclout_board_spy,
  input  logic        slave_mode,
  // identification
  input  logic [5:0]  slave_addr,
  input  logic [1:0]  pba,
  input  logic [7:0]  prom_ident,
  input  logic [7:0]  prom_serial,
  input  logic [7:0]  prom_revision,
  // clocks
  input  logic        lhc_clk,          // SPECS_CLOCKIN
  input  logic        osc_clk,          // local 40 MHz oscillator
  output logic        clk_sys,
  output logic        specs_clockout,   // SPECS_CLOCKOUT
  // global control
  input  logic        user_inter,
  output logic        reset_reg_n,      // RESET_REG*
  // channel B
  input  logic [8:0]  chan_b,
  output logic        bu_id,
  output logic        l0_evt,
  output logic        l0_rst,
  output logic        l1_rst,
  output logic [3:0]  b_calib,
  // control/status register
  input  logic [31:0] reg_ext_i,
  output logic [31:0] reg_ext_o,
  output logic [31:0] reg_ext_oe,
  // parallel bus
  output logic [7:0]  bus_adr,
  output logic [15:0] bus_data_o,
  output logic        bus_data_oe,
  input  logic [15:0] bus_data_i,
  output logic        bus_r_n,
  output logic        bus_w_n,
  input  logic        dt_rdy,
  output logic        dt_ack,
  // I2C
  output logic        sda_i2c,
  output logic        scl_i2c,
  input  logic        sda_i2cin,
  input  logic        scl_i2cin,
  output logic        sda_i2c_int_drive_low,
  input  logic        sda_i2c_int_i,
  output logic        scl_i2c_int,
  // JTAG
  output logic        tck,
  output logic        tms,
  output logic        tdi,
  input  logic        tdo,
  output logic        trst,
  // external driver control
  output logic [15:0] i2cjtag_re,
  output logic [15:0] i2cjtag_de
);

  // ---------------------------------------------------------------- command path
  logic        accept, reg_wr, reg_rd;
  logic        active;
  logic [15:0] rd_cde, rd_int, rd_glb, rd_id;
  logic        hit_cde, hit_int, hit_glb, hit_id;
  logic [31:0] conf;
  logic        master_mode, bus_conf, osc_en, osc_selected;
  logic        pb_busy, pb_done, pb_err;
  logic [15:0] pb_rdata;
  logic        i2c_busy, i2c_done, i2c_ack;
  logic [7:0]  i2c_rdata;
  logic        jt_busy, jt_done;
  logic [7:0]  jt_rdata;
  logic [15:0] i2c_sel, i2c_dir, jt_sel, jt_dir;

  assign cmd_ready = !active;
  assign accept    = cmd_valid && cmd_ready;
  assign reg_wr    = accept && cmd.mode == MODE_REG && cmd.write;
  assign reg_rd    = accept && cmd.mode == MODE_REG && !cmd.write;

  always_ff @(posedge specs_clk or negedge rst_n) begin
    if (!rst_n) begin
      active     <= 1'b0;
      resp_valid <= 1'b0;
      resp       <= '0;
    end else begin
      resp_valid <= 1'b0;
      if (accept) begin
        if (cmd.mode == MODE_REG) begin
          resp_valid <= 1'b1;
          resp.ack   <= 1'b0;
          resp.error <= !(hit_cde || hit_int || hit_glb || hit_id);
          resp.data  <= cmd.write ? 16'd0 : (rd_cde | rd_int | rd_glb | rd_id);
        end else begin
          active <= 1'b1;
        end
      end else if (active && (pb_done || i2c_done || jt_done)) begin
        active     <= 1'b0;
        resp_valid <= 1'b1;
        resp.ack   <= i2c_done && i2c_ack;
        resp.error <= pb_done && pb_err;
        resp.data  <= pb_done  ? pb_rdata :
                      i2c_done ? {8'd0, i2c_rdata} : {8'd0, jt_rdata};
      end
    end
  end

  // ---------------------------------------------------------------- registers
  cde_register u_cde (
    .clk(specs_clk), .rst_n, .wr(reg_wr), .sub_addr(cmd.sub_addr), .wdata(cmd.data),
    .rdata(rd_cde), .hit(hit_cde), .reg_ext_i, .reg_ext_o, .reg_ext_oe, .conf
  );

  interrupt_unit u_int (
    .clk(specs_clk), .rst_n, .wr(reg_wr), .rd(reg_rd), .sub_addr(cmd.sub_addr),
    .wdata(cmd.data), .rdata(rd_int), .hit(hit_int),
    .vec_pins(reg_ext_i[31:24]), .vec_is_out(conf[31:24]), .user_inter,
    .hdr_chk_err, .trl_chk_err, .irq
  );

  global_ctrl #(.RST_LEN(RST_LEN)) u_glb (
    .clk(specs_clk), .rst_n, .wr(reg_wr), .sub_addr(cmd.sub_addr), .wdata(cmd.data),
    .rdata(rd_glb), .hit(hit_glb), .slave_mode, .osc_selected, .irq,
    .master_mode, .bus_conf, .osc_en, .reset_reg_n
  );

  specs_ident u_id (
    .clk(specs_clk), .rst_n, .wr(reg_wr), .sub_addr(cmd.sub_addr), .wdata(cmd.data),
    .rdata(rd_id), .hit(hit_id), .slave_addr, .pba,
    .ident(prom_ident), .serial_nb(prom_serial), .revision_nb(prom_revision)
  );

  // ---------------------------------------------------------------- engines
  parallel_bus #(.SETUP_CYC(PB_SETUP), .STROBE_CYC(PB_STROBE), .TIMEOUT(PB_TIMEOUT)) u_pb (
    .clk(specs_clk), .rst_n, .start(accept && cmd.mode == MODE_PBUS), .write(cmd.write),
    .addr(cmd.sub_addr), .wdata(cmd.data), .handshake(bus_conf),
    .busy(pb_busy), .done(pb_done), .rdata(pb_rdata), .error(pb_err),
    .bus_adr, .bus_data_o, .bus_data_oe, .bus_data_i, .bus_r_n, .bus_w_n, .dt_rdy, .dt_ack
  );

  i2c_master #(.QTR(I2C_QTR)) u_i2c (
    .clk(specs_clk), .rst_n, .start(accept && cmd.mode == MODE_I2C), .op(cmd.i2c_op),
    .wdata(cmd.data[7:0]), .nack(cmd.i2c_nack), .local_bus(cmd.i2c_local),
    .channel(cmd.channel), .busy(i2c_busy), .done(i2c_done), .rdata(i2c_rdata),
    .ack(i2c_ack), .sda_o(sda_i2c), .scl_o(scl_i2c), .sda_in(sda_i2cin), .scl_in(scl_i2cin),
    .chan_sel(i2c_sel), .chan_dir(i2c_dir),
    .sda_int_drive_low(sda_i2c_int_drive_low), .sda_int_i(sda_i2c_int_i),
    .scl_int_o(scl_i2c_int)
  );

  jtag_master #(.HALF(JTAG_HALF)) u_jtag (
    .clk(specs_clk), .rst_n, .start(accept && cmd.mode == MODE_JTAG), .tdi(cmd.data[7:0]),
    .tms(cmd.tms), .nbits(cmd.nbits), .trst(cmd.trst), .channel(cmd.channel),
    .busy(jt_busy), .done(jt_done), .rdata(jt_rdata),
    .tck_o(tck), .tms_o(tms), .tdi_o(tdi), .tdo_i(tdo), .trst_o(trst),
    .chan_sel(jt_sel), .chan_dir(jt_dir)
  );

  assign i2cjtag_re = i2c_sel | jt_sel;
  assign i2cjtag_de = i2c_dir | jt_dir;

  // ---------------------------------------------------------------- clocks, TTC, SPECS lines
  clock_switch #(.LOSS_CYCLES(LOSS_CYCLES), .GOOD_CYCLES(GOOD_CYCLES)) u_clk (
    .lhc_clk, .osc_clk, .rst_n, .osc_en, .clk_sys, .clk_out(specs_clockout), .osc_selected
  );

  chanb_decoder u_chb (
    .clk(clk_sys), .rst_n, .chan_b, .bu_id, .l0_evt, .l0_rst, .l1_rst, .b_calib
  );

  specs_bus_switch #(.FREE_CYC(FREE_CYC)) u_sw (
    .clk(clk_sys), .rst_n, .master_mode, .sda_ms, .scl_ms, .sda_sm, .scl_sm,
    .sdaout_board, .sclout_board, .sdain_board, .sclin_board, .sclout_board_spy,
    .rx_sda, .rx_scl, .tx_sda, .tx_scl, .tx_en, .bus_free
  );

  // only one command engine runs at a time
  assert property (@(posedge specs_clk) disable iff (!rst_n)
                   $onehot0({pb_busy, i2c_busy, jt_busy}));

endmodule

// tb_specs_slave: end-to-end test of the SPECS slave at its default
// parameters. A task plays the part of the SPECS protocol core and issues
// decoded commands; behavioural models stand for the board around the chip:
// two I2C slaves (one behind the long-distance drivers of channel 3, one on
// the on-board bus), a JTAG scan chain, a parallel-bus device with the
// DT_RDY/DT_ACK handshake, the REG_EXT pins, the TTCrx and the clocks.
// Every mechanism of the design is made to happen and counted; a mechanism
// never seen counts as a failure:
//   register access in every sub-address, unknown sub-address error,
//   REG_EXT direction and read-back, pin / user / checksum interrupts and
//   clear-on-read, RESET_REG* pulse, parallel bus with and without
//   handshake and its timeout, I2C on both buses with ACK and NACK, JTAG
//   shift, LHC clock loss and recovery, SPECS_CLOCKOUT enable, channel-B L0
//   reset and test pulse, master/slave routing of the SPECS lines and the
//   bus-free watch.
module tb_specs_slave;
  import specs_pkg::*;

  // clocks
  logic specs_clk = 0, osc_clk = 0, lhc_clk = 0, lhc_run = 1;
  always #10 specs_clk = ~specs_clk;
  always #12.5 osc_clk = ~osc_clk;
  initial begin #3; forever #12.5 if (lhc_run) lhc_clk = ~lhc_clk; end

  logic rst_n = 0;
  logic cmd_valid = 0, cmd_ready, resp_valid, irq;
  specs_cmd_t cmd = '0;
  specs_resp_t resp;
  logic hdr_chk_err = 0, trl_chk_err = 0;
  logic rx_sda, rx_scl, tx_sda = 1, tx_scl = 1, tx_en = 0, bus_free;
  logic sda_ms = 1, scl_ms = 1, sda_sm, scl_sm, sdaout_board, sclout_board;
  logic sdain_board = 1, sclin_board = 1, spy = 1, slave_mode = 1;
  logic [5:0] slave_addr = 6'd37;
  logic [1:0] pba = 2'd2;
  logic [7:0] prom_ident = 8'hC5, prom_serial = 8'h12, prom_revision = 8'h03;
  logic clk_sys, specs_clockout, user_inter = 0, reset_reg_n;
  logic [8:0] chan_b = '0;
  logic bu_id, l0_evt, l0_rst, l1_rst;
  logic [3:0] b_calib;
  logic [31:0] reg_ext_i, reg_ext_o, reg_ext_oe, env_in = '0;
  logic [7:0] bus_adr;
  logic [15:0] bus_data_o, bus_data_i;
  logic bus_data_oe, bus_r_n, bus_w_n, dt_rdy = 0, dt_ack;
  logic sda_i2c, scl_i2c, sda_i2cin, scl_i2cin, sda_i2c_int_drive_low, sda_i2c_int_i, scl_i2c_int;
  logic tck, tms, tdi, tdo, trst;
  logic [15:0] i2cjtag_re, i2cjtag_de;

  specs_slave dut (.*, .sclout_board_spy(spy));

  // ------------------------------------------------------------ board models
  // REG_EXT: pins driven by the chip where enabled, by the environment elsewhere
  assign reg_ext_i = (reg_ext_oe & reg_ext_o) | (~reg_ext_oe & env_in);

  // long-distance I2C through the drivers of channel 3
  localparam int I2C_CH = 3;
  logic ld_sda_low, ld_scl_hold, loc_sda_low, loc_scl_hold;
  int ld_stretch, loc_stretch;
  assign sda_i2cin = (i2cjtag_de[I2C_CH] ? sda_i2c : 1'b1) && !ld_sda_low;
  assign scl_i2cin = scl_i2c && !ld_scl_hold;
  i2c_slave_model #(.ADDR(7'h2A)) ld_slave (.scl(scl_i2cin), .sda(sda_i2cin), .stretch_en(1'b0),
    .sda_low(ld_sda_low), .scl_hold(ld_scl_hold), .n_stretch(ld_stretch));
  // on-board I2C (the DCU sits here on the board)
  assign sda_i2c_int_i = !sda_i2c_int_drive_low && !loc_sda_low;
  i2c_slave_model #(.ADDR(7'h48)) loc_slave (.scl(scl_i2c_int), .sda(sda_i2c_int_i),
    .stretch_en(1'b0), .sda_low(loc_sda_low), .scl_hold(loc_scl_hold), .n_stretch(loc_stretch));

  // JTAG scan chain of 8 flip-flops
  logic [7:0] chain = '0;
  initial tdo = 0;
  always @(posedge tck) chain = {tdi, chain[7:1]};
  always @(negedge tck) tdo = chain[0];

  // parallel-bus device
  logic [15:0] pmem [256];
  logic dev_dead = 0, dev_hs = 0;
  assign bus_data_i = !bus_r_n ? pmem[bus_adr] : 16'h0000;
  always @(posedge bus_w_n) if (rst_n) pmem[bus_adr] = bus_data_o;
  initial forever begin
    @(negedge bus_r_n or negedge bus_w_n);
    if (dev_hs && !dev_dead) begin
      repeat (3) @(posedge specs_clk);
      dt_rdy = 1;
      wait (dt_ack);
      repeat (2) @(posedge specs_clk);
      dt_rdy = 0;
    end
  end

  // ------------------------------------------------------------ bookkeeping
  int checks = 0, failures = 0;
  int lat;
  typedef enum int {
    EV_REG, EV_BADSUB, EV_DIR, EV_IRQ_PIN, EV_IRQ_USER, EV_IRQ_CHK, EV_RESET, EV_PB_PLAIN,
    EV_PB_HS, EV_PB_TIMEOUT, EV_I2C_LD, EV_I2C_LOCAL, EV_I2C_NACK, EV_JTAG, EV_CLK_LOSS,
    EV_CLK_BACK, EV_CLKOUT, EV_L0RST, EV_CALIB, EV_MASTER, EV_SLAVE, EV_BUSFREE, EV_N
  } ev_e;
  int ev [EV_N];

  task automatic check(input logic ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  task automatic send(input specs_cmd_t c, output specs_resp_t r);
    @(negedge specs_clk);
    while (!cmd_ready) @(negedge specs_clk);
    cmd = c; cmd_valid = 1;
    @(negedge specs_clk);
    cmd_valid = 0;
    lat = 1;
    while (!resp_valid) begin @(negedge specs_clk); lat++; end
    r = resp;
    // a register command is answered in the cycle after it is accepted
    if (c.mode == MODE_REG) check(lat == 1, $sformatf("register answer latency %0d", lat));
  endtask

  task automatic reg_wr(input logic [7:0] sub, input logic [15:0] d);
    specs_cmd_t c; specs_resp_t r;
    c = '0; c.mode = MODE_REG; c.write = 1; c.sub_addr = sub; c.data = d;
    send(c, r);
  endtask

  task automatic reg_rd(input logic [7:0] sub, output logic [15:0] d, output logic err);
    specs_cmd_t c; specs_resp_t r;
    c = '0; c.mode = MODE_REG; c.write = 0; c.sub_addr = sub;
    send(c, r);
    d = r.data; err = r.error;
  endtask

  task automatic pb(input logic wr, input logic [7:0] a, input logic [15:0] d, output specs_resp_t r);
    specs_cmd_t c;
    c = '0; c.mode = MODE_PBUS; c.write = wr; c.sub_addr = a; c.data = d;
    send(c, r);
  endtask

  task automatic i2c(input i2c_op_e op, input logic [7:0] d, input logic lcl, input logic nk,
                     output specs_resp_t r);
    specs_cmd_t c;
    c = '0; c.mode = MODE_I2C; c.i2c_op = op; c.data = {8'h00, d}; c.i2c_local = lcl;
    c.i2c_nack = nk; c.channel = 4'(I2C_CH);
    send(c, r);
  endtask

  // watchdog
  initial begin
    #20ms;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // channel B and reset monitors
  int rst_low = 0;
  always @(posedge specs_clk) if (rst_n && !reset_reg_n) rst_low++;
  always @(posedge clk_sys) begin
    if (rst_n && l0_rst) ev[EV_L0RST]++;
    if (rst_n && b_calib != 0) ev[EV_CALIB]++;
  end

  initial begin
    logic [15:0] d;
    logic err;
    specs_resp_t r;
    specs_cmd_t c;
    int n, pulses;

    repeat (3) @(posedge specs_clk);
    rst_n = 1;
    repeat (3) @(posedge specs_clk);

    // ---- identification and scratch register
    reg_rd(SUB_BOARD_ID, d, err);
    check(!err && d == {8'hC5, 2'd2, 6'd37}, $sformatf("Board_ID %h", d));
    reg_rd(SUB_SER_REV, d, err);
    check(d == 16'h1203, "Ser_Rev");
    reg_wr(SUB_USERDEF, 16'hBEEF);
    reg_rd(SUB_USERDEF, d, err);
    check(d == 16'hBEEF, "Userdef_test");
    ev[EV_REG]++;
    reg_rd(8'd77, d, err);
    check(err, "unknown sub-address reports error");
    if (err) ev[EV_BADSUB]++;

    // ---- REG_EXT: all inputs after reset, then half outputs
    check(reg_ext_oe == 0, "REG_EXT all inputs after reset");
    env_in = 32'hA5A5_0F0F;
    reg_rd(SUB_REGOUT_LO, d, err); check(d == 16'h0F0F, "read inputs lo");
    reg_rd(SUB_REGOUT_HI, d, err); check(d == 16'hA5A5, "read inputs hi");
    reg_wr(SUB_REGOUT_LO, 16'h1234);
    reg_wr(SUB_REGOUT_HI, 16'h5678);
    reg_wr(SUB_CONF_LO, 16'hFF00);
    reg_wr(SUB_CONF_HI, 16'h00FF);
    check(reg_ext_oe == 32'h00FF_FF00 && (reg_ext_o & reg_ext_oe) == 32'h0078_1200, "REG_EXT drive");
    reg_rd(SUB_REGOUT_LO, d, err); check(d == 16'h120F, $sformatf("mixed read lo %h", d));
    reg_rd(SUB_REGOUT_HI, d, err); check(d == 16'hA578, $sformatf("mixed read hi %h", d));
    reg_rd(SUB_CONF_HI, d, err); check(d == 16'h00FF, "Conf_regout read");
    if (d == 16'h00FF) ev[EV_DIR]++;

    // ---- interrupts: pin 28 (vector bit 4) is an input, enable it
    reg_wr(SUB_IT_CONFIG, 16'h0010);
    env_in[28] = 0;
    repeat (4) @(posedge specs_clk);
    env_in[28] = 1;
    repeat (5) @(posedge specs_clk);
    check(irq, "pin interrupt raises irq");
    reg_rd(SUB_INTERRUPT, d, err);
    check(d == 16'h0080, $sformatf("interrupt word %h", d));
    if (d == 16'h0080) ev[EV_IRQ_PIN]++;
    check(!irq, "irq cleared by read");
    user_inter = 1;
    repeat (5) @(posedge specs_clk);
    @(negedge specs_clk) hdr_chk_err = 1;
    @(negedge specs_clk) hdr_chk_err = 0; trl_chk_err = 1;
    @(negedge specs_clk) trl_chk_err = 0;
    reg_rd(SUB_MEZZ_STAT, d, err);
    check(d[2], "Mezz_stat shows irq");
    reg_rd(SUB_INTERRUPT, d, err);
    check(d == 16'h0007, $sformatf("user + checksum interrupts %h", d));
    if (d[2]) ev[EV_IRQ_USER]++;
    if (d[1:0] == 2'b11) ev[EV_IRQ_CHK]++;

    // ---- RESET_REG*
    rst_low = 0;
    reg_wr(SUB_MEZZ_CTRL, 16'h0001);
    repeat (30) @(posedge specs_clk);
    check(rst_low == 16, $sformatf("RESET_REG* low %0d cycles", rst_low));
    if (rst_low > 0) ev[EV_RESET]++;

    // ---- parallel bus, plain then with handshake, then timeout
    for (int hs = 0; hs < 2; hs++) begin
      reg_wr(SUB_MEZZ_CTRL, hs ? 16'h0002 : 16'h0000);
      dev_hs = hs[0];
      for (int i = 0; i < 8; i++) begin
        pb(1, 8'(16 * hs + i), 16'(16'h1000 * hs + 16'h0101 * i), r);
        check(!r.error, "bus write ok");
      end
      for (int i = 0; i < 8; i++) begin
        pb(0, 8'(16 * hs + i), 16'h0, r);
        check(!r.error && r.data == 16'(16'h1000 * hs + 16'h0101 * i),
              $sformatf("bus read %h", r.data));
      end
      if (hs) ev[EV_PB_HS]++; else ev[EV_PB_PLAIN]++;
    end
    dev_dead = 1;
    pb(0, 8'h40, 16'h0, r);
    check(r.error, "bus timeout reported");
    if (r.error) ev[EV_PB_TIMEOUT]++;
    dev_dead = 0;

    // ---- I2C long distance: write two bytes, read them back
    i2c(I2C_START, 0, 0, 0, r);
    check(i2cjtag_re == 16'(1 << I2C_CH), "long-distance driver selected");
    i2c(I2C_WRITE, {7'h2A, 1'b0}, 0, 0, r); check(r.ack, "ld address ack");
    i2c(I2C_WRITE, 8'h02, 0, 0, r);
    i2c(I2C_WRITE, 8'h9C, 0, 0, r);
    i2c(I2C_WRITE, 8'h3E, 0, 0, r);
    i2c(I2C_STOP, 0, 0, 0, r);
    i2c(I2C_START, 0, 0, 0, r);
    i2c(I2C_WRITE, {7'h2A, 1'b0}, 0, 0, r);
    i2c(I2C_WRITE, 8'h02, 0, 0, r);
    i2c(I2C_START, 0, 0, 0, r);
    i2c(I2C_WRITE, {7'h2A, 1'b1}, 0, 0, r);
    i2c(I2C_READ, 0, 0, 0, r); check(r.data == 16'h009C, $sformatf("ld read %h", r.data));
    i2c(I2C_READ, 0, 0, 1, r); check(r.data == 16'h003E, $sformatf("ld read %h", r.data));
    if (r.data == 16'h003E) ev[EV_I2C_LD]++;
    i2c(I2C_STOP, 0, 0, 0, r);
    check(i2cjtag_re == 0, "driver released");
    // on-board bus: read the DCU-like slave, and a NACK from a missing address
    i2c(I2C_START, 0, 1, 0, r);
    i2c(I2C_WRITE, {7'h48, 1'b0}, 1, 0, r); check(r.ack, "local address ack");
    i2c(I2C_WRITE, 8'h05, 1, 0, r);
    i2c(I2C_START, 0, 1, 0, r);
    i2c(I2C_WRITE, {7'h48, 1'b1}, 1, 0, r);
    i2c(I2C_READ, 0, 1, 1, r); check(r.data == 16'h0015, $sformatf("local read %h", r.data));
    if (r.data == 16'h0015) ev[EV_I2C_LOCAL]++;
    i2c(I2C_STOP, 0, 1, 0, r);
    i2c(I2C_START, 0, 1, 0, r);
    i2c(I2C_WRITE, {7'h10, 1'b0}, 1, 0, r); check(!r.ack, "missing slave NACK");
    if (!r.ack) ev[EV_I2C_NACK]++;
    i2c(I2C_STOP, 0, 1, 0, r);
    check(ld_slave.mem[2] == 8'h9C && loc_slave.mem[2] == 8'h12, "writes reached the right bus");

    // ---- JTAG: shift 0xA7 then 0x00 through the 8-bit chain
    c = '0; c.mode = MODE_JTAG; c.data = 16'h00A7; c.tms = 8'h00; c.nbits = 4'd8; c.channel = 4'd9;
    send(c, r);
    c.data = 16'h0000;
    send(c, r);
    check(r.data == 16'h00A7, $sformatf("JTAG chain returned %h", r.data));
    if (r.data == 16'h00A7) ev[EV_JTAG]++;

    // ---- channel B
    @(posedge clk_sys); #1 chan_b = 9'b0_0000_1001;   // strobe + L0 reset
    @(posedge clk_sys); #1 chan_b = 9'b0_1010_0001;   // strobe + test pulse type 2
    @(posedge clk_sys); #1 chan_b = 9'b1_0000_0000;   // channel A
    @(posedge clk_sys); #1 chan_b = '0;
    repeat (2) @(posedge clk_sys);
    check(ev[EV_L0RST] == 1 && ev[EV_CALIB] == 1, $sformatf("channel B decoded once each: %0d %0d", ev[EV_L0RST], ev[EV_CALIB]));

    // ---- SPECS line routing
    slave_mode = 1; tx_en = 1; tx_sda = 0; sdain_board = 1; #1;
    check(sdaout_board == 0 && rx_sda == sdain_board, "slave mode routing");
    ev[EV_SLAVE]++;
    reg_wr(SUB_MEZZ_CTRL, 16'h0004);   // Mas/Sla
    #1 sda_ms = 0;
    #1 check(rx_sda == 0 && sdaout_board == 0 && sda_sm == 0, "master mode routing");
    ev[EV_MASTER]++;
    sda_ms = 1; tx_en = 0; #1;
    check(sda_sm == 1, "master mode link idle");
    spy = 0;
    repeat (5) @(posedge clk_sys);
    check(!bus_free, "bus busy while spy low");
    spy = 1;
    repeat (12) @(posedge clk_sys);
    check(bus_free, "bus free after spy high");
    if (bus_free) ev[EV_BUSFREE]++;

    // ---- clocks: enable SPECS_CLOCKOUT, then lose and recover the LHC clock
    reg_wr(SUB_MEZZ_CTRL, 16'h0008);
    repeat (4) @(posedge osc_clk);
    pulses = 0;
    fork
      begin repeat (10) @(posedge osc_clk); end
      forever @(posedge specs_clockout) pulses++;
    join_any
    disable fork;
    check(pulses >= 9, "SPECS_CLOCKOUT runs when enabled");
    if (pulses >= 9) ev[EV_CLKOUT]++;
    lhc_run = 0;
    repeat (20) @(posedge osc_clk);
    reg_rd(SUB_MEZZ_STAT, d, err);
    check(d[1], "Mezz_stat shows local oscillator");
    if (d[1]) ev[EV_CLK_LOSS]++;
    // channel B keeps working on the oscillator
    @(posedge clk_sys); #1 chan_b = 9'b0_0000_1001;
    @(posedge clk_sys); #1 chan_b = '0;
    repeat (2) @(posedge clk_sys);
    check(ev[EV_L0RST] == 2, "channel B runs on the local oscillator");
    lhc_run = 1;
    repeat (40) @(posedge osc_clk);
    reg_rd(SUB_MEZZ_STAT, d, err);
    check(!d[1], "LHC clock selected again");
    if (!d[1]) ev[EV_CLK_BACK]++;

    for (int e = 0; e < EV_N; e++)
      check(ev[e] > 0, $sformatf("mechanism %s happened", ev_e'(e)));
    for (int e = 0; e < EV_N; e++) $display("  %-14s %0d", ev_e'(e), ev[e]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

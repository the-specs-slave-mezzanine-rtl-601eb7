// tb_i2c_master: runs the I2C master against the behavioural slave model,
// first on the long-distance bus (channel 5, through a model of the external
// drivers: the master's SDA reaches the line only while I2CJTAG_DE is high)
// and then on the on-board open-drain bus. Checks acknowledge from the right
// address and NACK from a wrong one, written bytes arriving in the slave,
// bytes read back with ACK and NACK, the driver select/direction bits, the
// operation times (WRITE/READ: 36 quarter periods, START/STOP: 4) and the
// wait for a slave that stretches SCL.
module tb_i2c_master;
  import specs_pkg::*;
  localparam int QTR = 4;
  localparam int CH = 5;
  logic clk = 0, rst_n = 0;
  logic start = 0, nack = 0, local_bus = 0;
  i2c_op_e op = I2C_START;
  logic [7:0] wdata = '0, rdata;
  logic [3:0] channel = 4'(CH);
  logic busy, done, ack;
  logic sda_o, scl_o, sda_int_drive_low, scl_int_o;
  logic [15:0] chan_sel, chan_dir;
  logic stretch_en = 0;
  logic sda_low, scl_hold;
  int n_stretch;
  logic sda_line, scl_line;
  int checks = 0, failures = 0;
  int sel_bad = 0;

  i2c_master #(.QTR(QTR)) dut (
    .clk, .rst_n, .start, .op, .wdata, .nack, .local_bus, .channel, .busy, .done, .rdata, .ack,
    .sda_o, .scl_o, .sda_in(sda_line), .scl_in(scl_line), .chan_sel, .chan_dir,
    .sda_int_drive_low, .sda_int_i(sda_line), .scl_int_o);

  // bus: long distance through the channel's drivers, or on-board open drain
  always_comb begin
    if (local_bus) begin
      sda_line = !sda_int_drive_low && !sda_low;
      scl_line = scl_int_o && !scl_hold;
    end else begin
      sda_line = (chan_dir[CH] ? sda_o : 1'b1) && !sda_low;
      scl_line = scl_o && !scl_hold;
    end
  end

  i2c_slave_model #(.ADDR(7'h2A)) slave (.scl(scl_line), .sda(sda_line), .stretch_en,
                                         .sda_low, .scl_hold, .n_stretch);

  always #5 clk = ~clk;

  always @(posedge clk) if (rst_n && busy && !local_bus && chan_sel != 0 && chan_sel != 16'(1 << CH)) begin sel_bad++; $display("sel %h at %t", chan_sel, $time); end

  task automatic check(input logic ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  task automatic do_op(input i2c_op_e o, input logic [7:0] d, input logic nk, output int cyc);
    @(negedge clk);
    start = 1; op = o; wdata = d; nack = nk;
    @(negedge clk);
    start = 0;
    cyc = 1;
    while (!done && cyc < 100000) begin @(negedge clk); cyc++; end
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int c;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int pass = 0; pass < 3; pass++) begin
      local_bus  = (pass == 1);
      stretch_en = (pass == 2);
      // write pointer 3 and two bytes
      do_op(I2C_START, 0, 0, c);
      check(c == 4 * QTR + 1, $sformatf("START took %0d cycles", c));
      if (!local_bus) check(chan_sel == 16'(1 << CH), "driver channel selected after START");
      do_op(I2C_WRITE, {7'h2A, 1'b0}, 0, c);
      check(ack, "address acknowledged");
      if (!stretch_en) check(c == 36 * QTR + 1, $sformatf("WRITE took %0d cycles", c));
      do_op(I2C_WRITE, 8'h03, 0, c); check(ack, "pointer acknowledged");
      if (stretch_en) check(c > 36 * QTR + 1, $sformatf("stretched WRITE took %0d cycles", c));
      do_op(I2C_WRITE, 8'hA5 ^ 8'(pass), 0, c); check(ack, "data acknowledged");
      do_op(I2C_WRITE, 8'h5A ^ 8'(pass), 0, c); check(ack, "data acknowledged");
      do_op(I2C_STOP, 0, 0, c);
      if (!stretch_en) check(c == 4 * QTR + 1, $sformatf("STOP took %0d cycles", c));
      check(chan_sel == 0 && chan_dir == 0, "driver released after STOP");
      check(slave.mem[3] == (8'hA5 ^ 8'(pass)) && slave.mem[4] == (8'h5A ^ 8'(pass)),
            "slave received bytes");
      // read back with repeated start
      do_op(I2C_START, 0, 0, c);
      do_op(I2C_WRITE, {7'h2A, 1'b0}, 0, c);
      do_op(I2C_WRITE, 8'h03, 0, c);
      do_op(I2C_START, 0, 0, c);
      do_op(I2C_WRITE, {7'h2A, 1'b1}, 0, c); check(ack, "read address acknowledged");
      do_op(I2C_READ, 0, 0, c);
      check(rdata == (8'hA5 ^ 8'(pass)), $sformatf("read byte 1: %h", rdata));
      if (!stretch_en) check(c == 36 * QTR + 1, $sformatf("READ took %0d cycles", c));
      do_op(I2C_READ, 0, 1, c);
      check(rdata == (8'h5A ^ 8'(pass)), $sformatf("read byte 2: %h", rdata));
      do_op(I2C_STOP, 0, 0, c);
      // wrong address
      do_op(I2C_START, 0, 0, c);
      do_op(I2C_WRITE, {7'h11, 1'b0}, 0, c);
      check(!ack, "wrong address not acknowledged");
      do_op(I2C_STOP, 0, 0, c);
    end
    check(n_stretch > 0, "slave stretched the clock");
    check(sel_bad == 0, "only the selected channel enabled");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

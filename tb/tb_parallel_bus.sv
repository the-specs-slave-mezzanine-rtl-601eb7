// tb_parallel_bus: runs the parallel-bus master against a behavioural bus
// device holding 256 16-bit words. Random writes and reads are compared with
// a reference copy, both without and with the DT_RDY/DT_ACK handshake (the
// device answers after a random delay). Checks the access time without
// handshake (SETUP_CYC + STROBE_CYC + 2 cycles counted from the cycle that presents start up to the cycle in which done is high), the
// strobe width, that a write drives the data bus and a read does not, and
// the timeout when the device never answers.
module tb_parallel_bus;
  localparam int SU = 1, ST = 2, TO = 20;
  logic clk = 0, rst_n = 0;
  logic start = 0, write = 0, handshake = 0;
  logic [7:0] addr = '0;
  logic [15:0] wdata = '0, rdata;
  logic busy, done, error;
  logic [7:0] bus_adr;
  logic [15:0] bus_data_o, bus_data_i;
  logic bus_data_oe, bus_r_n, bus_w_n, dt_rdy = 0, dt_ack;
  logic [15:0] mem [256];
  logic [15:0] ref_mem [256];
  logic dev_dead = 0;
  int checks = 0, failures = 0;
  int w_low = 0, r_low = 0, oe_bad = 0;

  parallel_bus #(.SETUP_CYC(SU), .STROBE_CYC(ST), .TIMEOUT(TO)) dut (
    .clk, .rst_n, .start, .write, .addr, .wdata, .handshake, .busy, .done, .rdata, .error,
    .bus_adr, .bus_data_o, .bus_data_oe, .bus_data_i, .bus_r_n, .bus_w_n, .dt_rdy, .dt_ack);

  always #5 clk = ~clk;

  // bus device: writes on the rising edge of BUS_W*, reads combinationally
  assign bus_data_i = (!bus_r_n) ? mem[bus_adr] : 16'hDEAD;
  always @(posedge bus_w_n) if (rst_n) mem[bus_adr] = bus_data_o;
  always @(posedge clk) begin
    if (!bus_w_n) w_low++;
    if (!bus_r_n) r_low++;
    if (!bus_r_n && bus_data_oe) oe_bad++;
    if (!bus_w_n && !bus_data_oe) oe_bad++;
  end
  // slow-device handshake
  initial forever begin
    @(negedge bus_r_n or negedge bus_w_n);
    if (!dev_dead) begin
      repeat ($urandom % 6) @(posedge clk);
      dt_rdy = 1;
      wait (dt_ack);
      repeat ($urandom % 4) @(posedge clk);
      dt_rdy = 0;
    end
  end

  task automatic check(input logic ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  task automatic access(input logic wr, input logic [7:0] a, input logic [15:0] d,
                        output int cycles);
    @(negedge clk);
    start = 1; write = wr; addr = a; wdata = d;
    @(negedge clk);
    start = 0;
    cycles = 1;
    while (!done && cycles < 1000) begin @(negedge clk); cycles++; end
  endtask

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int cyc, w0;
    for (int i = 0; i < 256; i++) begin mem[i] = 16'(i * 3); ref_mem[i] = 16'(i * 3); end
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int hs = 0; hs < 2; hs++) begin
      handshake = hs[0];
      for (int i = 0; i < 60; i++) begin
        logic [7:0] a;
        logic [15:0] d;
        a = 8'($urandom % 16);
        d = 16'($urandom);
        if ($urandom % 2) begin
          w0 = w_low;
          access(1, a, d, cyc);
          ref_mem[a] = d;
          check(!error, "no error");
          if (!hs) begin
            check(cyc == SU + ST + 2, $sformatf("write took %0d cycles", cyc));
            check(w_low - w0 == ST, $sformatf("BUS_W* width %0d", w_low - w0));
          end
          check(mem[a] == d, "device received write");
        end else begin
          access(0, a, 16'h0, cyc);
          check(!error, "no error");
          if (!hs) check(cyc == SU + ST + 2, $sformatf("read took %0d cycles", cyc));
          check(rdata == ref_mem[a], $sformatf("read %h exp %h", rdata, ref_mem[a]));
        end
      end
    end
    check(oe_bad == 0, "data bus driven only on writes");
    // dead device: timeout
    wait (!dt_rdy);
    dev_dead = 1;
    handshake = 1;
    access(0, 8'h5, 16'h0, cyc);
    check(error, "timeout sets error");
    check(cyc >= TO && cyc < TO + 10, $sformatf("timeout after %0d cycles", cyc));
    check(bus_r_n && bus_w_n && !busy, "bus released after timeout");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

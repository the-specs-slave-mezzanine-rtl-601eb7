// tb_chanb_decoder: drives random channel-B words and channel-A levels and
// compares every output, one clock later, with an independent decode of the
// bit assignment (strobe bit 0, bunch reset bit 2, L0 reset bit 3, L1 reset
// bit 4, test pulse bit 5 with type in bits 7:6).
module tb_chanb_decoder;
  logic clk = 0, rst_n = 0;
  logic [8:0] chan_b = '0;
  logic bu_id, l0_evt, l0_rst, l1_rst;
  logic [3:0] b_calib;
  int checks = 0, failures = 0;
  int n_l0rst = 0, n_calib = 0;

  chanb_decoder dut (.clk, .rst_n, .chan_b, .bu_id, .l0_evt, .l0_rst, .l1_rst, .b_calib);

  always #5 clk = ~clk;

  task automatic check(input logic ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [8:0] w;
    logic [3:0] exp_cal;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < 400; i++) begin
      @(negedge clk);
      w = 9'($urandom);
      chan_b = w;
      @(negedge clk);
      chan_b = '0;
      exp_cal = '0;
      if (w[0] && w[5]) begin
        case (w[7:6])
          2'd0: exp_cal = 4'b0001;
          2'd1: exp_cal = 4'b0010;
          2'd2: exp_cal = 4'b0100;
          default: exp_cal = 4'b1000;
        endcase
      end
      check(l0_evt == w[8], "L0_EVT follows channel A");
      check(bu_id == (w[0] & w[2]), "BU_ID");
      check(l0_rst == (w[0] & w[3]), "L0_RST");
      check(l1_rst == (w[0] & w[4]), "L1_RST");
      check(b_calib == exp_cal, $sformatf("B_CALIB %b exp %b", b_calib, exp_cal));
      if (l0_rst) n_l0rst++;
      if (b_calib != 0) n_calib++;
      @(negedge clk);
      check({bu_id, l0_rst, l1_rst, b_calib} == '0, "outputs last one clock");
    end
    check(n_l0rst > 0 && n_calib > 0, "L0 reset and test pulse both seen");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

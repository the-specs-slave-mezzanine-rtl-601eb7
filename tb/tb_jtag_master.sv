// tb_jtag_master: runs the JTAG master against a scan-chain model of L
// flip-flops (TDI shifted in on rising TCK, TDO updated on falling TCK).
// Random commands of 1..8 bits are issued; every TDO bit captured by the
// master must equal the bit shifted in L clocks earlier, TMS at each rising
// TCK must equal the command's TMS bit, the command must take
// 2 * HALF * nbits + 1 cycles, and the driver select must name the command's
// channel while it runs.
module tb_jtag_master;
  localparam int HALF = 2, L = 13;
  logic clk = 0, rst_n = 0;
  logic start = 0, trst = 0;
  logic [7:0] tdi = '0, tms = '0, rdata;
  logic [3:0] nbits = '0, channel = '0;
  logic busy, done, tck_o, tms_o, tdi_o, tdo_i, trst_o;
  logic [15:0] chan_sel, chan_dir;
  logic [L-1:0] chain = '0;
  logic in_bits [$];
  logic tms_seen [$];
  int checks = 0, failures = 0, sel_bad = 0;

  jtag_master #(.HALF(HALF)) dut (.clk, .rst_n, .start, .tdi, .tms, .nbits, .trst, .channel,
    .busy, .done, .rdata, .tck_o, .tms_o, .tdi_o, .tdo_i, .trst_o, .chan_sel, .chan_dir);

  always #5 clk = ~clk;

  initial tdo_i = 0;
  always @(posedge tck_o) begin
    chain = {tdi_o, chain[L-1:1]};
    in_bits.push_back(tdi_o);
    tms_seen.push_back(tms_o);
  end
  always @(negedge tck_o) tdo_i = chain[0];
  always @(posedge clk) if (rst_n && busy && (chan_sel != 16'(1 << channel) || chan_dir != chan_sel)) sel_bad++;

  task automatic check(input logic ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int cyc, n, g0;
    logic exp_bit;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < 80; i++) begin
      n = 1 + ($urandom % 8);
      @(negedge clk);
      start = 1; tdi = 8'($urandom); tms = 8'($urandom); nbits = 4'(n);
      channel = 4'($urandom); trst = 1'($urandom);
      g0 = in_bits.size();
      @(negedge clk);
      start = 0;
      cyc = 1;
      while (!done && cyc < 1000) begin @(negedge clk); cyc++; end
      check(cyc == 2 * HALF * n + 1, $sformatf("%0d bits took %0d cycles", n, cyc));
      check(in_bits.size() == g0 + n, "one TCK pulse per bit");
      check(trst_o == trst, "TRST follows command");
      check(!tck_o, "TCK rests low");
      for (int b = 0; b < n; b++) begin
        check(in_bits[g0 + b] == tdi[b], "TDI bit order");
        check(tms_seen[g0 + b] == tms[b], "TMS bit");
        exp_bit = (g0 + b >= L) ? in_bits[g0 + b - L] : 1'b0;
        check(rdata[b] == exp_bit, $sformatf("TDO bit %0d of command %0d", b, i));
      end
    end
    check(sel_bad == 0, "driver select follows channel");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_specs_bus_switch: checks the routing of the SPECS lines in master and
// slave mode for random line levels (received lines, repeated lines, and
// answers combined so that any low sender pulls the line low), and the
// bus-free watch: bus_free must rise FREE_CYC+2 cycles after the spy line
// goes and stays high, and fall within 3 cycles when it goes low.
module tb_specs_bus_switch;
  localparam int FREE = 6;
  logic clk = 0, rst_n = 0, master_mode = 0;
  logic sda_ms = 1, scl_ms = 1, sdain_board = 1, sclin_board = 1, spy = 0;
  logic tx_sda = 1, tx_scl = 1, tx_en = 0;
  logic sda_sm, scl_sm, sdaout_board, sclout_board, rx_sda, rx_scl, bus_free;
  int checks = 0, failures = 0;

  specs_bus_switch #(.FREE_CYC(FREE)) dut (.clk, .rst_n, .master_mode, .sda_ms, .scl_ms,
    .sda_sm, .scl_sm, .sdaout_board, .sclout_board, .sdain_board, .sclin_board,
    .sclout_board_spy(spy), .rx_sda, .rx_scl, .tx_sda, .tx_scl, .tx_en, .bus_free);

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
    logic own_sda, own_scl;
    int n;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < 200; i++) begin
      {master_mode, sda_ms, scl_ms, sdain_board, sclin_board, tx_sda, tx_scl, tx_en} = 8'($urandom);
      #1;
      own_sda = tx_en ? tx_sda : 1'b1;
      own_scl = tx_en ? tx_scl : 1'b1;
      if (master_mode) begin
        check(rx_sda == sda_ms && rx_scl == scl_ms, "master: receive from link");
        check(sdaout_board == sda_ms && sclout_board == scl_ms, "master: repeat on board bus");
        check(sda_sm == (own_sda & sdain_board) && scl_sm == (own_scl & sclin_board),
              "master: answers combined to link");
      end else begin
        check(rx_sda == sdain_board && rx_scl == sclin_board, "slave: receive from board bus");
        check(sdaout_board == own_sda && sclout_board == own_scl, "slave: answer on board bus");
        check(sda_sm && scl_sm, "slave: link idle");
      end
    end
    @(negedge clk) spy = 1;
    n = 0;
    while (!bus_free && n < 50) begin @(negedge clk); n++; end
    check(n == FREE + 2, $sformatf("bus free after %0d cycles", n));
    @(negedge clk) spy = 0;
    n = 0;
    while (bus_free && n < 50) begin @(negedge clk); n++; end
    check(n <= 3, "bus busy quickly");
    @(negedge clk) spy = 1;
    repeat (3) @(negedge clk);
    spy = 0;
    repeat (10) @(negedge clk);
    check(!bus_free, "short high period is not free");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

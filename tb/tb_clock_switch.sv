// tb_clock_switch: checks the LHC-clock loss detector and the clock outputs.
// The LHC clock and the oscillator run at 40 MHz with a phase offset. With
// the LHC clock running, clk_sys must follow it; when it stops, osc_selected
// must rise between LOSS_CYCLES and LOSS_CYCLES+4 oscillator cycles later and
// clk_sys must follow the oscillator; when it restarts, the LHC clock must be
// selected again. clk_out must stay low while disabled and pulse once per
// oscillator cycle while enabled.
module tb_clock_switch;
  localparam int LOSS = 8, GOOD = 16;
  logic lhc_clk = 0, osc_clk = 0, rst_n = 0, osc_en = 0;
  logic lhc_run = 1;
  logic clk_sys, clk_out, osc_selected;
  int checks = 0, failures = 0;

  clock_switch #(.LOSS_CYCLES(LOSS), .GOOD_CYCLES(GOOD)) dut (
    .lhc_clk, .osc_clk, .rst_n, .osc_en, .clk_sys, .clk_out, .osc_selected);

  always #12.5 osc_clk = ~osc_clk;
  initial begin
    #4;
    forever #12.5 if (lhc_run) lhc_clk = ~lhc_clk;
  end

  task automatic check(input logic ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  initial begin
    repeat (3000) @(posedge osc_clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int n, pulses;
    repeat (3) @(posedge osc_clk);
    rst_n = 1;
    repeat (40) @(posedge osc_clk);
    check(!osc_selected, "LHC clock kept while running");
    for (int i = 0; i < 10; i++) begin
      #3.1 check(clk_sys == lhc_clk, "clk_sys follows LHC clock");
      @(posedge osc_clk);
    end
    // clk_out disabled
    pulses = 0;
    fork
      begin repeat (20) @(posedge osc_clk); end
      forever @(posedge clk_out) pulses++;
    join_any
    disable fork;
    check(pulses == 0, "clk_out silent while disabled");
    // enabled
    osc_en = 1;
    repeat (5) @(posedge osc_clk);
    pulses = 0;
    fork
      begin repeat (20) @(posedge osc_clk); end
      forever @(posedge clk_out) pulses++;
    join_any
    disable fork;
    check(pulses >= 19 && pulses <= 20, $sformatf("clk_out pulses %0d in 20 cycles", pulses));
    // stop the LHC clock
    @(posedge osc_clk);
    lhc_run = 0;
    n = 0;
    while (!osc_selected && n < 100) begin @(posedge osc_clk); n++; end
    check(n >= LOSS && n <= LOSS + 4, $sformatf("loss detected after %0d cycles", n));
    for (int i = 0; i < 10; i++) begin
      #3.1 check(clk_sys == osc_clk, "clk_sys follows oscillator");
      @(posedge osc_clk);
    end
    // restart the LHC clock
    lhc_run = 1;
    n = 0;
    while (osc_selected && n < 200) begin @(posedge osc_clk); n++; end
    check(!osc_selected && n >= GOOD, $sformatf("LHC clock reselected after %0d cycles", n));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_tmr_reg: checks the triple-voted register. Writes random words and
// checks q against a reference copy; upsets one copy at a time (force for a
// cycle) and checks that q is unaffected and that the copy is repaired by the
// next clock edge; upsets two copies of disjoint bits and checks the vote.
module tb_tmr_reg;
  localparam int W = 12;
  logic clk = 0, rst_n = 0, en = 0;
  logic [W-1:0] d = '0, q, ref_q;
  int checks = 0, failures = 0;

  tmr_reg #(.W(W), .RESET(12'h5A5)) dut (.clk, .rst_n, .en, .d, .q);

  always #5 clk = ~clk;

  task automatic check(input logic ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [W-1:0] bad;
    repeat (2) @(posedge clk);
    check(q == 12'h5A5, "reset value");
    rst_n = 1;
    ref_q = 12'h5A5;
    for (int i = 0; i < 50; i++) begin
      @(negedge clk);
      en = ($urandom % 2) == 1;
      d  = W'($urandom);
      @(posedge clk); #1;
      if (en) ref_q = d;
      check(q == ref_q, $sformatf("write %0d q=%h exp=%h", i, q, ref_q));
    end
    en = 0;
    // single upset in each copy
    for (int c = 0; c < 3; c++) begin
      @(negedge clk);
      bad = ~ref_q;
      if (c == 0) force dut.copy_a = bad;
      if (c == 1) force dut.copy_b = bad;
      if (c == 2) force dut.copy_c = bad;
      #1 check(q == ref_q, $sformatf("vote masks upset of copy %0d", c));
      @(posedge clk); #1;
      if (c == 0) release dut.copy_a;
      if (c == 1) release dut.copy_b;
      if (c == 2) release dut.copy_c;
      @(posedge clk); #1;
      check(dut.copy_a == ref_q && dut.copy_b == ref_q && dut.copy_c == ref_q,
            $sformatf("copy %0d scrubbed", c));
      check(q == ref_q, "q after scrub");
    end
    // two copies upset in disjoint bits still vote correctly
    @(negedge clk);
    force dut.copy_a = ref_q ^ 12'h00F;
    force dut.copy_b = ref_q ^ 12'hF00;
    #1 check(q == ref_q, "disjoint double upset");
    @(posedge clk); #1;
    release dut.copy_a;
    release dut.copy_b;
    @(posedge clk); #1;
    check(q == ref_q && dut.copy_a == ref_q, "repaired after double upset");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tmr_reg: a register protected against single-event upsets by triple
// modular redundancy.
//
// Three copies of the register are kept. The output q is the bitwise
// two-out-of-three majority of the copies, so one upset copy never shows at
// the output. Every clock cycle all three copies reload either the new data
// (en = 1) or the voted value, which repairs an upset copy one cycle after it
// happened (scrubbing). Triple voting of the internal registers follows the
// specification; the scrubbing is this design's own choice.
//
// Interface: d is captured when en is high at the rising clock edge; q is
// valid from that edge on. rst_n is an asynchronous active-low reset to
// RESET. No clock is needed other than clk: in the slave chip clk is the
// SPECS bus clock.
module tmr_reg #(
  parameter int          W     = 8,
  parameter logic [W-1:0] RESET = '0
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         en,
  input  logic [W-1:0] d,
  output logic [W-1:0] q
);

  logic [W-1:0] copy_a, copy_b, copy_c;
  logic [W-1:0] voted;

  assign voted = (copy_a & copy_b) | (copy_a & copy_c) | (copy_b & copy_c);
  assign q     = voted;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      copy_a <= RESET;
      copy_b <= RESET;
      copy_c <= RESET;
    end else begin
      copy_a <= en ? d : voted;
      copy_b <= en ? d : voted;
      copy_c <= en ? d : voted;
    end
  end

endmodule

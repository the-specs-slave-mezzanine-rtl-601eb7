// chanb_decoder: decoder for the TTCrx channel B broadcast commands.
//
// The TTCrx delivers its broadcast commands on CHAN_B[7:0] and the channel A
// (L0 trigger) on CHAN_B[8]. The specification asks the slave to decode the
// functions needed by the front-end, currently the L0 counter reset and the
// test pulse, and names the outputs BU_ID, L0_EVT, L0_RST, L1_RST and
// B_CALIB[3:0]. The bit assignment used here is this design's choice:
//   CHAN_B[0]   broadcast strobe (command valid for one clock)
//   CHAN_B[1]   unused
//   CHAN_B[2]   bunch-counter reset          -> BU_ID
//   CHAN_B[3]   L0 counter reset             -> L0_RST
//   CHAN_B[4]   L1 reset                     -> L1_RST
//   CHAN_B[5]   calibration (test) pulse     -> B_CALIB[CHAN_B[7:6]]
//   CHAN_B[8]   channel A                    -> L0_EVT
// All outputs are registered, active-high, one clock long per strobe; L0_EVT
// follows channel A with one clock of latency. The block runs on the LHC
// clock (clk_sys of the slave), the clock of the TTCrx outputs.
module chanb_decoder (
  input  logic       clk,
  input  logic       rst_n,
  input  logic [8:0] chan_b,
  output logic       bu_id,
  output logic       l0_evt,
  output logic       l0_rst,
  output logic       l1_rst,
  output logic [3:0] b_calib
);

  logic strobe;
  assign strobe = chan_b[0];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      bu_id   <= 1'b0;
      l0_evt  <= 1'b0;
      l0_rst  <= 1'b0;
      l1_rst  <= 1'b0;
      b_calib <= '0;
    end else begin
      l0_evt  <= chan_b[8];
      bu_id   <= strobe && chan_b[2];
      l0_rst  <= strobe && chan_b[3];
      l1_rst  <= strobe && chan_b[4];
      b_calib <= (strobe && chan_b[5]) ? 4'(1 << chan_b[7:6]) : 4'd0;
    end
  end

endmodule

// clock_switch: replaces the LHC clock by the local 40 MHz oscillator when
// the LHC clock fails, and drives the oscillator on SPECS_CLOCKOUT.
//
// Loss detection runs on the local oscillator. A flip-flop toggles on every
// LHC clock edge; its level is resynchronised to the oscillator and watched
// for changes. If no change is seen for LOSS_CYCLES oscillator cycles the LHC
// clock is declared lost and osc_selected goes high; after GOOD_CYCLES
// consecutive oscillator cycles that each see fresh LHC activity within a
// window the LHC clock is selected again. clk_sys is the selected clock.
// clk_out is the oscillator gated by osc_en, with the enable re-timed on the
// falling oscillator edge so that the gated clock has no short pulses.
//
// The automatic replacement and the software-enabled oscillator output
// follow the specification; the detector, its thresholds and the plain
// multiplexer for clk_sys are this design's own choice. The multiplexer is
// not glitch-free at the moment of switching: the LHC clock is assumed dead
// or stopped when the switch to the oscillator happens.
//
// Interface: lhc_clk (SPECS_CLOCKIN), osc_clk (local oscillator), rst_n
// (asynchronous), osc_en (Mezz_ctrl osc bit, any domain).
module clock_switch #(
  parameter int unsigned LOSS_CYCLES = 8,
  parameter int unsigned GOOD_CYCLES = 16
) (
  input  logic lhc_clk,
  input  logic osc_clk,
  input  logic rst_n,
  input  logic osc_en,
  output logic clk_sys,
  output logic clk_out,
  output logic osc_selected
);

  localparam int LW = $clog2(LOSS_CYCLES + 1);
  localparam int GW = $clog2(GOOD_CYCLES + 1);

  logic          lhc_tgl;
  logic [2:0]    tgl_sync;
  logic [LW-1:0] idle_cnt;
  logic [GW-1:0] good_cnt;
  logic          activity;
  logic          en_s1, en_neg;

  always_ff @(posedge lhc_clk or negedge rst_n) begin
    if (!rst_n) lhc_tgl <= 1'b0;
    else        lhc_tgl <= !lhc_tgl;
  end

  assign activity = tgl_sync[2] ^ tgl_sync[1];

  always_ff @(posedge osc_clk or negedge rst_n) begin
    if (!rst_n) begin
      tgl_sync     <= '0;
      idle_cnt     <= '0;
      good_cnt     <= '0;
      osc_selected <= 1'b0;
      en_s1        <= 1'b0;
    end else begin
      tgl_sync <= {tgl_sync[1:0], lhc_tgl};
      en_s1    <= osc_en;
      if (activity) idle_cnt <= '0;
      else if (idle_cnt != LW'(LOSS_CYCLES)) idle_cnt <= idle_cnt + 1'b1;

      if (!osc_selected) begin
        good_cnt <= '0;
        if (idle_cnt == LW'(LOSS_CYCLES)) osc_selected <= 1'b1;
      end else if (idle_cnt < LW'(LOSS_CYCLES / 2)) begin
        if (good_cnt == GW'(GOOD_CYCLES)) osc_selected <= 1'b0;
        else                              good_cnt     <= good_cnt + 1'b1;
      end else begin
        good_cnt <= '0;
      end
    end
  end

  always_ff @(negedge osc_clk or negedge rst_n) begin
    if (!rst_n) en_neg <= 1'b0;
    else        en_neg <= en_s1;
  end

  assign clk_out = osc_clk & en_neg;
  assign clk_sys = osc_selected ? osc_clk : lhc_clk;

endmodule

// specs_bus_switch: routing of the SPECS lines between the point-to-point
// link and the on-board multi-mezzanine bus.
//
// A mezzanine has two SPECS interfaces: the point-to-point link to the SPECS
// master (SDA_MS/SCL_MS in, SDA_SM/SCL_SM out) and the on-board bus shared
// with other mezzanines (SDAOUT/SCLOUT_BOARD out, SDAIN/SCLIN_BOARD in).
//   master mode : the lines from the SPECS master are received and repeated
//                 on SDAOUT/SCLOUT_BOARD towards the other mezzanines; the
//                 answers of the other mezzanines (SDAIN/SCLIN_BOARD) and this
//                 slave's own answer are combined and sent back on SDA_SM/
//                 SCL_SM.
//   slave mode  : the lines are received from SDAIN/SCLIN_BOARD; this slave's
//                 answer goes out on SDAOUT/SCLOUT_BOARD.
// Idle lines are high (the board bus has pull-ups at both ends). Combining
// answers by AND (a line is low when any sender pulls it low) is this
// design's choice, as is the reading of the board lines per mode.
// bus_free is high once SCLOUT_BOARD_SPY has been seen high for FREE_CYC
// consecutive clk cycles, so the answer path can check that no other slave is
// using the shared return bus; the line is resynchronised first.
// Everything except bus_free is combinational.
module specs_bus_switch #(
  parameter int unsigned FREE_CYC = 8
) (
  input  logic clk,
  input  logic rst_n,
  input  logic master_mode,
  // point-to-point link
  input  logic sda_ms,
  input  logic scl_ms,
  output logic sda_sm,
  output logic scl_sm,
  // on-board bus
  output logic sdaout_board,
  output logic sclout_board,
  input  logic sdain_board,
  input  logic sclin_board,
  input  logic sclout_board_spy,
  // to and from the protocol core of this slave
  output logic rx_sda,
  output logic rx_scl,
  input  logic tx_sda,
  input  logic tx_scl,
  input  logic tx_en,
  output logic bus_free
);

  localparam int FW = $clog2(FREE_CYC + 1);

  logic          own_sda, own_scl;
  logic [1:0]    spy_sync;
  logic [FW-1:0] free_cnt;

  assign own_sda = tx_en ? tx_sda : 1'b1;
  assign own_scl = tx_en ? tx_scl : 1'b1;

  always_comb begin
    if (master_mode) begin
      rx_sda       = sda_ms;
      rx_scl       = scl_ms;
      sdaout_board = sda_ms;
      sclout_board = scl_ms;
      sda_sm       = own_sda & sdain_board;
      scl_sm       = own_scl & sclin_board;
    end else begin
      rx_sda       = sdain_board;
      rx_scl       = sclin_board;
      sdaout_board = own_sda;
      sclout_board = own_scl;
      sda_sm       = 1'b1;
      scl_sm       = 1'b1;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      spy_sync <= '0;
      free_cnt <= '0;
    end else begin
      spy_sync <= {spy_sync[0], sclout_board_spy};
      if (!spy_sync[1])                    free_cnt <= '0;
      else if (free_cnt != FW'(FREE_CYC))  free_cnt <= free_cnt + 1'b1;
    end
  end

  assign bus_free = (free_cnt == FW'(FREE_CYC));

endmodule

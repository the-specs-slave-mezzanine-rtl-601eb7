// i2c_master: byte-level I2C master for mode 0 commands.
//
// A SPECS I2C command carries one byte (I2C data[7:0] = SPECS data[7:0]) and
// one of four operations: START (also a repeated start), WRITE (8 bits, MSB
// first, then the slave's acknowledge is sampled), READ (8 bits sampled, then
// the master sends ACK, or NACK for the last byte) and STOP.
//
// Two buses can be driven, chosen per command by i2c_local:
//   long distance : SDA_I2C / SCL_I2C are driven push-pull towards external
//                   bus drivers; the bus comes back on SDA_I2CIN / SCL_I2CIN.
//                   I2CJTAG_RE[ch] selects the driver of channel ch (0..15)
//                   from START to STOP, and I2CJTAG_DE[ch] is high while the
//                   master drives SDA (low while the slave may answer).
//   on-board      : SDA_I2C_INT is open drain (sda_int_drive_low), SCL_I2C_INT
//                   is an output.
// Each bit lasts four quarter periods of QTR clock cycles. In the SCL-high
// quarter of the long-distance bus (of a data bit, a START or a STOP) the
// master waits until SCL_I2CIN is high, so a slave may stretch the clock.
// Read bits and ACK are sampled at the end of the SCL-high quarter.
//
// Interface: start is a one-cycle pulse accepted while busy is low; done
// pulses when the operation has finished, with rdata (READ) and ack (WRITE:
// slave pulled SDA low) valid from then on. Bus levels, the select/direction
// use of the 16 driver bits, the per-command bus choice and the timing are
// this design's choices; the specification gives the pins and the byte-wide
// data mapping. The state machine is one-hot.
module i2c_master
  import specs_pkg::*;
#(
  parameter int unsigned QTR = 100   // 40 MHz / (4 * 100) = 100 kHz SCL
) (
  input  logic        clk,
  input  logic        rst_n,
  // command
  input  logic        start,
  input  i2c_op_e     op,
  input  logic [7:0]  wdata,
  input  logic        nack,        // READ: answer NACK
  input  logic        local_bus,   // 1 = on-board bus
  input  logic [3:0]  channel,
  output logic        busy,
  output logic        done,
  output logic [7:0]  rdata,
  output logic        ack,
  // long-distance bus
  output logic        sda_o,
  output logic        scl_o,
  input  logic        sda_in,
  input  logic        scl_in,
  output logic [15:0] chan_sel,    // I2CJTAG_RE contribution
  output logic [15:0] chan_dir,    // I2CJTAG_DE contribution
  // on-board bus
  output logic        sda_int_drive_low,
  input  logic        sda_int_i,
  output logic        scl_int_o
);

  typedef enum logic [3:0] {
    S_IDLE  = 4'b0001,
    S_START = 4'b0010,
    S_BIT   = 4'b0100,
    S_STOP  = 4'b1000
  } state_e;

  localparam int QW = $clog2(QTR + 1);

  state_e        state;
  logic [QW-1:0] qcnt;
  logic [1:0]    phase;
  logic [3:0]    bitn;        // 0..7 data bits, 8 = acknowledge bit
  logic [7:0]    shreg;
  logic          is_read, nack_q, local_q;
  logic          sda_q, scl_q, sda_drv;
  logic          sel_on;
  logic [3:0]    chan_q;
  logic          sda_sample, scl_sample;
  logic          qdone;

  assign sda_sample = local_q ? sda_int_i : sda_in;
  assign scl_sample = local_q ? 1'b1 : scl_in;
  assign qdone      = (qcnt == 0);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state   <= S_IDLE;
      qcnt    <= '0;
      phase   <= '0;
      bitn    <= '0;
      shreg   <= '0;
      is_read <= 1'b0;
      nack_q  <= 1'b0;
      local_q <= 1'b0;
      sda_q   <= 1'b1;
      scl_q   <= 1'b1;
      sda_drv <= 1'b0;
      sel_on  <= 1'b0;
      chan_q  <= '0;
      rdata   <= '0;
      ack     <= 1'b0;
      done    <= 1'b0;
    end else begin
      done <= 1'b0;
      unique case (state)
        S_IDLE: if (start) begin
          qcnt  <= QW'(QTR - 1);
          phase <= 2'd0;
          bitn  <= '0;
          unique case (op)
            I2C_START: begin
              state   <= S_START;
              local_q <= local_bus;
              chan_q  <= channel;
              sel_on  <= 1'b1;
            end
            I2C_WRITE: begin
              state   <= S_BIT;
              is_read <= 1'b0;
              shreg   <= wdata;
            end
            I2C_READ: begin
              state   <= S_BIT;
              is_read <= 1'b1;
              nack_q  <= nack;
            end
            default: state <= S_STOP;
          endcase
        end
        S_START, S_STOP: begin
          if (phase == 2'd2 && !scl_sample) begin
            qcnt <= qcnt;   // slave stretches the clock
          end else if (qdone) begin
            qcnt  <= QW'(QTR - 1);
            phase <= phase + 1'b1;
            unique case (phase)
              2'd0: begin sda_q <= (state == S_START); sda_drv <= 1'b1; end
              2'd1: scl_q <= 1'b1;
              2'd2: sda_q <= (state == S_STOP);
              default: begin
                if (state == S_START) scl_q <= 1'b0;
                else begin
                  sda_drv <= 1'b0;
                  sel_on  <= 1'b0;
                end
                state <= S_IDLE;
                done  <= 1'b1;
              end
            endcase
          end else qcnt <= qcnt - 1'b1;
        end
        S_BIT: begin
          if (phase == 2'd2 && !scl_sample) begin
            qcnt <= qcnt;   // slave stretches the clock
          end else if (qdone) begin
            qcnt  <= QW'(QTR - 1);
            phase <= phase + 1'b1;
            unique case (phase)
              2'd0: begin
                if (bitn == 4'd8) begin
                  sda_drv <= is_read;          // master drives only its ACK
                  sda_q   <= is_read ? nack_q : 1'b1;
                end else begin
                  sda_drv <= !is_read;
                  sda_q   <= is_read ? 1'b1 : shreg[7];
                end
              end
              2'd1: scl_q <= 1'b1;
              2'd2: begin
                if (bitn == 4'd8) begin
                  if (!is_read) ack <= !sda_sample;
                end else begin
                  shreg <= {shreg[6:0], is_read ? sda_sample : 1'b0};
                end
              end
              default: begin
                scl_q <= 1'b0;
                if (bitn == 4'd8) begin
                  if (is_read) rdata <= shreg;
                  sda_drv <= 1'b1;
                  sda_q   <= 1'b1;
                  state   <= S_IDLE;
                  done    <= 1'b1;
                end else bitn <= bitn + 1'b1;
              end
            endcase
          end else qcnt <= qcnt - 1'b1;
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  assign busy = (state != S_IDLE);

  // long-distance outputs idle high while the on-board bus is in use
  assign sda_o    = local_q ? 1'b1 : sda_q;
  assign scl_o    = local_q ? 1'b1 : scl_q;
  assign chan_sel = (sel_on && !local_q) ? (16'd1 << chan_q) : 16'd0;
  assign chan_dir = (sel_on && !local_q && sda_drv) ? (16'd1 << chan_q) : 16'd0;

  assign sda_int_drive_low = local_q && sda_drv && !sda_q;
  assign scl_int_o         = local_q ? scl_q : 1'b1;

  // a driver is only turned towards the slaves on the selected channel, and
  // commands arrive only while idle
  assert property (@(posedge clk) disable iff (!rst_n) (chan_dir & ~chan_sel) == '0);
  assert property (@(posedge clk) disable iff (!rst_n) start |-> !busy);

endmodule

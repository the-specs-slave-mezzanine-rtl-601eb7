// parallel_bus: master of the mezzanine's parallel bus (mode 2 commands).
//
// The bus has 16 data bits BUS_DATA, 8 address bits BUS_ADR, active-low
// strobes BUS_R* and BUS_W*, and two handshake lines for slow components:
// DT_RDY (input) and DT_ACK (output). A 16-bit word is built by the SPECS
// side from two SPECS data bytes.
//
// One access, started by a one-cycle start pulse while busy is low:
//   SETUP  : address (and write data) driven for SETUP_CYC cycles;
//   STROBE : BUS_R* or BUS_W* low for STROBE_CYC cycles; with the handshake
//            enabled (Mezz_ctrl bus_conf) the strobe is then held until
//            DT_RDY is seen high;
//   ACK    : (handshake only) read data is captured, the strobe released and
//            DT_ACK raised until DT_RDY returns low;
//   HOLD   : strobe released, address/data held one more cycle; done pulses.
// Read data is captured at the end of the strobe. A handshake that does not
// complete within TIMEOUT cycles ends the access with error set. DT_RDY is
// resynchronised with two flip-flops. The state machine is one-hot, as the
// specification asks for state machines. Cycle counts, the four-phase
// DT_RDY/DT_ACK sequence and the timeout are this design's choices; the
// specification gives only the signal names and their directions.
module parallel_bus #(
  parameter int unsigned SETUP_CYC  = 1,
  parameter int unsigned STROBE_CYC = 2,
  parameter int unsigned TIMEOUT    = 255
) (
  input  logic        clk,
  input  logic        rst_n,
  // command
  input  logic        start,
  input  logic        write,
  input  logic [7:0]  addr,
  input  logic [15:0] wdata,
  input  logic        handshake,   // Mezz_ctrl bus_conf
  output logic        busy,
  output logic        done,
  output logic [15:0] rdata,
  output logic        error,
  // bus pins
  output logic [7:0]  bus_adr,
  output logic [15:0] bus_data_o,
  output logic        bus_data_oe,
  input  logic [15:0] bus_data_i,
  output logic        bus_r_n,
  output logic        bus_w_n,
  input  logic        dt_rdy,
  output logic        dt_ack
);

  typedef enum logic [4:0] {
    S_IDLE   = 5'b00001,
    S_SETUP  = 5'b00010,
    S_STROBE = 5'b00100,
    S_ACK    = 5'b01000,
    S_HOLD   = 5'b10000
  } state_e;

  localparam int CW = $clog2(TIMEOUT + 2);

  state_e        state;
  logic [CW-1:0] cnt;
  logic          rdy_s1, rdy_s2;
  logic          wr_q, hs_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rdy_s1 <= 1'b0;
      rdy_s2 <= 1'b0;
    end else begin
      rdy_s1 <= dt_rdy;
      rdy_s2 <= rdy_s1;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state      <= S_IDLE;
      cnt        <= '0;
      wr_q       <= 1'b0;
      hs_q       <= 1'b0;
      bus_adr    <= '0;
      bus_data_o <= '0;
      rdata      <= '0;
      error      <= 1'b0;
      done       <= 1'b0;
    end else begin
      done <= 1'b0;
      unique case (state)
        S_IDLE: if (start) begin
          wr_q       <= write;
          hs_q       <= handshake;
          bus_adr    <= addr;
          bus_data_o <= wdata;
          error      <= 1'b0;
          cnt        <= CW'(SETUP_CYC - 1);
          state      <= S_SETUP;
        end
        S_SETUP: begin
          if (cnt == 0) begin
            cnt   <= '0;
            state <= S_STROBE;
          end else cnt <= cnt - 1'b1;
        end
        S_STROBE: begin
          cnt <= cnt + 1'b1;
          if (cnt >= CW'(STROBE_CYC - 1)) begin
            if (!hs_q) begin
              if (!wr_q) rdata <= bus_data_i;
              state <= S_HOLD;
            end else if (rdy_s2) begin
              if (!wr_q) rdata <= bus_data_i;
              cnt   <= '0;
              state <= S_ACK;
            end else if (cnt >= CW'(TIMEOUT)) begin
              error <= 1'b1;
              state <= S_HOLD;
            end
          end
        end
        S_ACK: begin
          cnt <= cnt + 1'b1;
          if (!rdy_s2) state <= S_HOLD;
          else if (cnt >= CW'(TIMEOUT)) begin
            error <= 1'b1;
            state <= S_HOLD;
          end
        end
        S_HOLD: begin
          done  <= 1'b1;
          state <= S_IDLE;
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  assign busy        = (state != S_IDLE);
  assign bus_r_n     = !(state == S_STROBE && !wr_q);
  assign bus_w_n     = !(state == S_STROBE && wr_q);
  assign bus_data_oe = wr_q && (state inside {S_SETUP, S_STROBE, S_ACK, S_HOLD});
  assign dt_ack      = (state == S_ACK);

  // bus rules: never both strobes, DT_ACK only with the strobe released,
  // commands only while idle
  assert property (@(posedge clk) disable iff (!rst_n) bus_r_n || bus_w_n);
  assert property (@(posedge clk) disable iff (!rst_n) dt_ack |-> (bus_r_n && bus_w_n));
  assert property (@(posedge clk) disable iff (!rst_n) start |-> !busy);

endmodule

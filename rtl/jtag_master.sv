// jtag_master: JTAG master for mode 1 commands.
//
// A SPECS JTAG command shifts up to 8 bits (JTAG data = SPECS data): for bit
// i (i = 0 first) TDI = tdi[i] and TMS = tms[i] are set while TCK is low,
// TCK rises HALF cycles later and TDO is sampled on that rising edge into
// rdata[i]; TCK falls after another HALF cycles. TCK rests low between
// commands. TRST_SPECS, reserved by the specification for future use, simply
// follows the trst level of the last command.
//
// While a command runs, I2CJTAG_RE[ch] selects the external driver of JTAG
// channel ch and I2CJTAG_DE[ch] sets it to drive towards the target.
//
// Interface: start is a one-cycle pulse accepted while busy is low; done
// pulses after the last falling TCK edge, with rdata valid. A command of
// nbits bits takes 2 * HALF * nbits + 1 cycles from start to done. The bit
// order, the per-bit TMS byte, the bit count field and the TCK rate are this
// design's choices. The state machine is one-hot.
module jtag_master #(
  parameter int unsigned HALF = 2   // TCK = clk / (2 * HALF)
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        start,
  input  logic [7:0]  tdi,
  input  logic [7:0]  tms,
  input  logic [3:0]  nbits,       // 1..8 (0 and >8 are taken as 8)
  input  logic        trst,
  input  logic [3:0]  channel,
  output logic        busy,
  output logic        done,
  output logic [7:0]  rdata,
  output logic        tck_o,
  output logic        tms_o,
  output logic        tdi_o,
  input  logic        tdo_i,
  output logic        trst_o,
  output logic [15:0] chan_sel,
  output logic [15:0] chan_dir
);

  typedef enum logic [2:0] {
    S_IDLE = 3'b001,
    S_LOW  = 3'b010,
    S_HIGH = 3'b100
  } state_e;

  localparam int HW = $clog2(HALF + 1);

  state_e        state;
  logic [HW-1:0] hcnt;
  logic [2:0]    idx, last;
  logic [7:0]    tdi_q, tms_q;
  logic [3:0]    chan_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state  <= S_IDLE;
      hcnt   <= '0;
      idx    <= '0;
      last   <= '0;
      tdi_q  <= '0;
      tms_q  <= '0;
      chan_q <= '0;
      rdata  <= '0;
      tck_o  <= 1'b0;
      trst_o <= 1'b0;
      done   <= 1'b0;
    end else begin
      done <= 1'b0;
      unique case (state)
        S_IDLE: if (start) begin
          tdi_q  <= tdi;
          tms_q  <= tms;
          chan_q <= channel;
          trst_o <= trst;
          last   <= (nbits == 0 || nbits > 8) ? 3'd7 : 3'(nbits - 1);
          idx    <= '0;
          rdata  <= '0;
          hcnt   <= HW'(HALF - 1);
          state  <= S_LOW;
        end
        S_LOW: begin
          if (hcnt == 0) begin
            tck_o        <= 1'b1;
            rdata[idx]   <= tdo_i;
            hcnt         <= HW'(HALF - 1);
            state        <= S_HIGH;
          end else hcnt <= hcnt - 1'b1;
        end
        S_HIGH: begin
          if (hcnt == 0) begin
            tck_o <= 1'b0;
            hcnt  <= HW'(HALF - 1);
            if (idx == last) begin
              state <= S_IDLE;
              done  <= 1'b1;
            end else begin
              idx   <= idx + 1'b1;
              state <= S_LOW;
            end
          end else hcnt <= hcnt - 1'b1;
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  assign busy     = (state != S_IDLE);
  assign tdi_o    = tdi_q[idx];
  assign tms_o    = tms_q[idx];
  assign chan_sel = busy ? (16'd1 << chan_q) : 16'd0;
  assign chan_dir = chan_sel;

  // commands arrive only while idle; TCK rests low between commands
  assert property (@(posedge clk) disable iff (!rst_n) start |-> !busy);
  assert property (@(posedge clk) disable iff (!rst_n) !busy |-> !tck_o);

endmodule

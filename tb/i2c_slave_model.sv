// i2c_slave_model: behavioural I2C slave used by the testbenches (it stands
// for a front-end chip or the DCU on the board). It answers to the 7-bit
// address ADDR, holds 16 bytes: the first byte written after the address is
// the register pointer, further written bytes are stored at the pointer and
// read bytes are returned from it, the pointer incrementing each time. It
// pulls SDA low (sda_low) for its ACK and for 0 data bits. With stretch_en
// it holds SCL low (scl_hold) for STRETCH_NS after each acknowledge clock.
module i2c_slave_model #(
  parameter logic [6:0] ADDR       = 7'h2A,
  parameter int         STRETCH_NS = 300
) (
  input  logic scl,
  input  logic sda,
  input  logic stretch_en,
  output logic sda_low,
  output logic scl_hold,
  output int   n_stretch
);
  typedef enum {M_IDLE, M_ADDR, M_WDATA, M_RDATA} mstate_e;
  mstate_e st = M_IDLE;
  logic [7:0] mem [16];
  logic [7:0] sh = '0, byte_q = '0;
  logic [3:0] ptr = '0;
  logic       rw = 0, matched = 0, mack = 0, first = 0;
  int         r = 0;

  initial begin
    sda_low = 0; scl_hold = 0; n_stretch = 0;
    foreach (mem[i]) mem[i] = 8'(8'h10 + i);
  end

  always @(negedge sda) if (scl) begin st = M_ADDR; r = 0; sda_low = 0; end
  always @(posedge sda) if (scl) begin st = M_IDLE; r = 0; sda_low = 0; end

  always @(posedge scl) if (st != M_IDLE) begin
    if (r < 8) sh = {sh[6:0], sda};
    else if (st == M_RDATA) mack = !sda;
    r++;
  end

  always @(negedge scl) if (st != M_IDLE) begin
    if (r == 8) begin
      case (st)
        M_ADDR: begin
          matched = (sh[7:1] == ADDR);
          rw = sh[0];
          sda_low = matched;
        end
        M_WDATA: begin
          sda_low = 1;
          if (first) ptr = sh[3:0];
          else begin mem[ptr] = sh; ptr++; end
          first = 0;
        end
        M_RDATA: sda_low = 0;
        default: ;
      endcase
    end else if (r == 9) begin
      r = 0;
      sda_low = 0;
      case (st)
        M_ADDR: begin
          if (!matched) st = M_IDLE;
          else if (rw) begin st = M_RDATA; byte_q = mem[ptr]; ptr++; sda_low = !byte_q[7]; end
          else begin st = M_WDATA; first = 1; end
        end
        M_RDATA: begin
          if (mack) begin byte_q = mem[ptr]; ptr++; sda_low = !byte_q[7]; end
          else st = M_IDLE;
        end
        default: ;
      endcase
      if (stretch_en && st != M_IDLE) begin
        scl_hold = 1;
        n_stretch++;
        #(STRETCH_NS) scl_hold = 0;
      end
    end else if (st == M_RDATA && r > 0 && r < 8) begin
      sda_low = !byte_q[7 - r];
    end
  end
endmodule

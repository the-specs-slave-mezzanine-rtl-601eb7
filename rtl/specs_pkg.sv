// specs_pkg: types and constants shared by the SPECS slave blocks.
//
// The SPECS slave executes commands in four modes: 0 = I2C, 1 = JTAG,
// 2 = parallel bus, 3 = internal registers. The SPECS frame itself (header,
// slave address, checksums) is decoded by a protocol core outside this RTL;
// what reaches the slave logic is one specs_cmd_t per operation and what goes
// back is one specs_resp_t.
//
// The mode numbers and the register sub-addresses 0..9 follow the command
// register table of the mezzanine specification. The register words are 16
// bits wide (two SPECS data bytes). The sub-address of the user register
// (SUB_USERDEF = 10) and every field of specs_cmd_t that carries I2C/JTAG
// details (operation, channel, TMS byte, bit count) are this design's own
// choice.
package specs_pkg;

  typedef enum logic [1:0] {
    MODE_I2C  = 2'd0,
    MODE_JTAG = 2'd1,
    MODE_PBUS = 2'd2,
    MODE_REG  = 2'd3
  } specs_mode_e;

  // Mode-3 register sub-addresses (16-bit words).
  localparam logic [7:0] SUB_REGOUT_LO  = 8'd0;  // Reg_out[15:0]
  localparam logic [7:0] SUB_REGOUT_HI  = 8'd1;  // Reg_out[31:16]
  localparam logic [7:0] SUB_CONF_LO    = 8'd2;  // Conf_regout[15:0]
  localparam logic [7:0] SUB_CONF_HI    = 8'd3;  // Conf_regout[31:16]
  localparam logic [7:0] SUB_MEZZ_CTRL  = 8'd4;  // Mezz_ctrl[7:0]
  localparam logic [7:0] SUB_MEZZ_STAT  = 8'd5;  // Mezz_stat[7:0]
  localparam logic [7:0] SUB_INTERRUPT  = 8'd6;  // Interrupt[10:0], read clears
  localparam logic [7:0] SUB_IT_CONFIG  = 8'd7;  // IT_Config_vect[7:0]
  localparam logic [7:0] SUB_BOARD_ID   = 8'd8;  // {Identification, board_nb}
  localparam logic [7:0] SUB_SER_REV    = 8'd9;  // {serial_nb, revision_nb}
  localparam logic [7:0] SUB_USERDEF    = 8'd10; // {test, user_defined}

  // Mezz_ctrl bit positions: {osc, Mas/Sla, bus_conf, rst_reg}.
  localparam int MC_RST_REG  = 0;
  localparam int MC_BUS_CONF = 1;
  localparam int MC_MAS_SLA  = 2;
  localparam int MC_OSC      = 3;

  // I2C byte-level operations.
  typedef enum logic [1:0] {
    I2C_START = 2'd0,
    I2C_WRITE = 2'd1,
    I2C_READ  = 2'd2,
    I2C_STOP  = 2'd3
  } i2c_op_e;

  // One decoded SPECS command.
  typedef struct packed {
    specs_mode_e mode;
    logic        write;     // 1 = write, 0 = read (modes 2 and 3)
    logic [7:0]  sub_addr;  // register sub-address (mode 3) or BUS_ADR (mode 2)
    logic [15:0] data;      // write data; I2C/JTAG use data[7:0]
    logic [3:0]  channel;   // I2C/JTAG driver channel 0..15
    i2c_op_e     i2c_op;    // mode 0 operation
    logic        i2c_local; // mode 0: 1 = on-board I2C bus, 0 = long-distance bus
    logic        i2c_nack;  // mode 0 READ: 1 = master answers NACK (last byte)
    logic [7:0]  tms;       // mode 1: TMS value for each shifted bit
    logic [3:0]  nbits;     // mode 1: number of bits to shift, 1..8
    logic        trst;      // mode 1: level of TRST during the command
  } specs_cmd_t;

  // Answer to one command.
  typedef struct packed {
    logic [15:0] data;      // read data (register, bus, I2C byte, TDO bits)
    logic        ack;       // I2C: slave acknowledged
    logic        error;     // parallel bus timeout or unknown sub-address
  } specs_resp_t;

endpackage

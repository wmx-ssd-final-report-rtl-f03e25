// wmx_pkg: command codes, flash opcodes and peripheral control codes shared by
// the NAND controller, its FSL peripheral, the AES PLB peripherals and the top.
//
// The host-side command set of the NAND controller (RESET, READ STATUS, READ
// PAGE, PROGRAM PAGE, ERASE BLOCK) follows the commands the controller is
// described as supporting; the 3-bit code values are this design's choice.
// The flash opcodes are the standard ones of Micron SLC NAND parts. The
// encryption control codes 0x2 (start) and 0x1 (done) are the values the
// encryption peripheral's software flow uses; the decryption codes are this
// design's choice.
package wmx_pkg;

  // Host command on the NAND controller's CMD[2:0] input.
  typedef enum logic [2:0] {
    NAND_NOP          = 3'd0,
    NAND_RESET        = 3'd1,
    NAND_READ_STATUS  = 3'd2,
    NAND_READ_PAGE    = 3'd3,
    NAND_PROGRAM_PAGE = 3'd4,
    NAND_ERASE_BLOCK  = 3'd5
  } nand_cmd_e;

  // Flash opcodes written in command-latch cycles.
  localparam logic [7:0] OP_READ_1    = 8'h00;
  localparam logic [7:0] OP_READ_2    = 8'h30;
  localparam logic [7:0] OP_PROGRAM_1 = 8'h80;
  localparam logic [7:0] OP_PROGRAM_2 = 8'h10;
  localparam logic [7:0] OP_ERASE_1   = 8'h60;
  localparam logic [7:0] OP_ERASE_2   = 8'hD0;
  localparam logic [7:0] OP_STATUS    = 8'h70;
  localparam logic [7:0] OP_RESET     = 8'hFF;

  // Kind of one flash bus cycle.
  typedef enum logic [1:0] {
    CYC_CMD   = 2'd0,   // CLE high, byte written on the rising edge of WE#
    CYC_ADDR  = 2'd1,   // ALE high, byte written on the rising edge of WE#
    CYC_WDATA = 2'd2,   // data byte written on the rising edge of WE#
    CYC_RDATA = 2'd3    // data byte read while RE# is low
  } nand_cycle_e;

  // CTRL register (slv_reg13) codes of the AES peripherals.
  localparam logic [31:0] CTRL_IDLE            = 32'h0;
  localparam logic [31:0] CTRL_ENC_START       = 32'h2;
  localparam logic [31:0] CTRL_ENC_DONE        = 32'h1;
  localparam logic [31:0] CTRL_TEXT_LOAD_READY = 32'h2;
  localparam logic [31:0] CTRL_TEXT_OUT_DONE   = 32'h1;
  localparam logic [31:0] CTRL_KEY_LOAD_READY  = 32'h4;
  localparam logic [31:0] CTRL_KEY_LOAD_DONE   = 32'h8;

  // Number of 32-bit slave registers of each AES peripheral.
  localparam int AES_NUM_REGS = 14;

endpackage

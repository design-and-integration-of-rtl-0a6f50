// nfc_pkg: types and constants shared by the AXI4 NAND flash controller.
//
// Holds the NAND command opcodes, the operation codes the host writes to the
// command register, the register map of the AXI4 slave, and the bus-cycle
// request that the main FSM hands to the timing FSM. The opcodes (FFh, 80h,
// 10h, 00h, 30h, 60h, D0h, 70h) follow the controller's flow charts; 90h for
// Read ID and the register map are this design's own choices.
package nfc_pkg;

  // NAND flash command bytes sent while CLE is high.
  localparam logic [7:0] NAND_CMD_RESET      = 8'hFF;
  localparam logic [7:0] NAND_CMD_PROG_1     = 8'h80;
  localparam logic [7:0] NAND_CMD_PROG_2     = 8'h10;
  localparam logic [7:0] NAND_CMD_READ_1     = 8'h00;
  localparam logic [7:0] NAND_CMD_READ_2     = 8'h30;
  localparam logic [7:0] NAND_CMD_ERASE_1    = 8'h60;
  localparam logic [7:0] NAND_CMD_ERASE_2    = 8'hD0;
  localparam logic [7:0] NAND_CMD_STATUS     = 8'h70;
  localparam logic [7:0] NAND_CMD_READ_ID    = 8'h90;

  // Flash operations the main FSM runs.
  typedef enum logic [2:0] {
    OP_NONE   = 3'd0,
    OP_RESET  = 3'd1,
    OP_PROG   = 3'd2,
    OP_READ   = 3'd3,
    OP_ERASE  = 3'd4,
    OP_STATUS = 3'd5,
    OP_READID = 3'd6,
    OP_STATUS_RD = 3'd7   // read the status byte again (no 70h if still in status mode)
  } nfc_op_e;

  // Kinds of one flash bus cycle performed by the timing FSM.
  typedef enum logic [2:0] {
    CYC_CMD   = 3'd0,  // byte latched with CLE high on the WE_n rising edge
    CYC_ADDR  = 3'd1,  // byte latched with ALE high on the WE_n rising edge
    CYC_WDATA = 3'd2,  // data byte latched on the WE_n rising edge
    CYC_RDATA = 3'd3,  // data byte sampled on the RE_n rising edge
    CYC_WAIT_RB  = 3'd4,  // wait tWB, then wait until R/B is high (ready)
    CYC_WAIT_WHR = 3'd5   // wait tWHR (WE_n high to RE_n low)
  } nfc_cyc_e;

  typedef struct packed {
    nfc_cyc_e   kind;
    logic [7:0] data;
  } nfc_req_t;

  // AXI4 register map (byte addresses, low 5 bits decoded).
  localparam logic [4:0] REG_CMD    = 5'h00;  // W: start operation, R: last operation
  localparam logic [4:0] REG_STATUS = 5'h04;  // R: busy / R/B / error / status byte
  localparam logic [4:0] REG_ROW    = 5'h08;  // RW: 24-bit row (page) address
  localparam logic [4:0] REG_DATA   = 5'h0C;  // data window: write burst = page program, read burst = page read
  localparam logic [4:0] REG_COL    = 5'h10;  // RW: 16-bit column address
  localparam logic [4:0] REG_LEN    = 5'h14;  // RW: bytes per page program / page read
  localparam logic [4:0] REG_ID     = 5'h18;  // R: first four Read ID bytes

  // AXI4 responses.
  localparam logic [1:0] AXI_OKAY   = 2'b00;
  localparam logic [1:0] AXI_SLVERR = 2'b10;

endpackage

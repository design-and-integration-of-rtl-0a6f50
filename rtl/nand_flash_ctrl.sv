// nand_flash_ctrl: AXI4 NAND flash controller (top).
//
// Connects an AXI4 bus to one 8-bit asynchronous NAND flash device. Four parts:
//   nfc_axi_slave  - AXI4 slave: register bursts and the streaming data window
//   nfc_regs       - row / column / length / command registers, status, ID
//   nfc_main_fsm   - runs reset, page program, page read, block erase,
//                    read status and read ID as chains of flash bus cycles
//   nfc_timing_fsm - produces CLE/ALE/WE_n/RE_n/IO timing for each cycle and
//                    waits on tWB, tWHR and R/B
// A host programs a page by writing ROW (and COL, LEN if not the defaults)
// and then writing the page bytes, one per beat in bits [7:0], to the data
// window at 0x0C; the final write response carries the program status. A page
// read is a read burst from 0x0C after writing ROW. Reset, block erase, read
// status and read ID start by writing their code to CMD (0x00); STATUS (0x04)
// shows busy / done / error. After reset the controller sends the flash reset
// command (FFh) by itself once R/B is high.
//
// The flash data bus is split into nf_io_o / nf_io_oe / nf_io_i; a pad or the
// FPGA wrapper joins them into the bidirectional NAND I/O. All flash pin
// outputs are registered. One clock domain (clk, 250 MHz in the reference
// system); rst_n is the active-low AXI reset. Default page length is 2048
// bytes and default pin timing is for 4 ns clocks (see nfc_timing_fsm).
module nand_flash_ctrl
  import nfc_pkg::*;
#(
  parameter int unsigned ID_W       = 4,
  parameter int unsigned ADDR_W     = 32,
  parameter int unsigned DATA_W     = 32,
  parameter int unsigned PAGE_BYTES = 2048,
  parameter int unsigned LEN_W      = 16,
  parameter int unsigned T_SETUP    = 13,
  parameter int unsigned T_WP       = 13,
  parameter int unsigned T_WH       = 8,
  parameter int unsigned T_RP       = 13,
  parameter int unsigned T_REH      = 8,
  parameter int unsigned T_WB       = 50,
  parameter int unsigned T_WHR      = 30
) (
  input  logic                aclk,
  input  logic                aresetn,
  // AXI4 slave
  input  logic [ID_W-1:0]     s_axi_awid,
  input  logic [ADDR_W-1:0]   s_axi_awaddr,
  input  logic [7:0]          s_axi_awlen,
  input  logic [2:0]          s_axi_awsize,
  input  logic [1:0]          s_axi_awburst,
  input  logic                s_axi_awvalid,
  output logic                s_axi_awready,
  input  logic [DATA_W-1:0]   s_axi_wdata,
  input  logic [DATA_W/8-1:0] s_axi_wstrb,
  input  logic                s_axi_wlast,
  input  logic                s_axi_wvalid,
  output logic                s_axi_wready,
  output logic [ID_W-1:0]     s_axi_bid,
  output logic [1:0]          s_axi_bresp,
  output logic                s_axi_bvalid,
  input  logic                s_axi_bready,
  input  logic [ID_W-1:0]     s_axi_arid,
  input  logic [ADDR_W-1:0]   s_axi_araddr,
  input  logic [7:0]          s_axi_arlen,
  input  logic [2:0]          s_axi_arsize,
  input  logic [1:0]          s_axi_arburst,
  input  logic                s_axi_arvalid,
  output logic                s_axi_arready,
  output logic [ID_W-1:0]     s_axi_rid,
  output logic [DATA_W-1:0]   s_axi_rdata,
  output logic [1:0]          s_axi_rresp,
  output logic                s_axi_rlast,
  output logic                s_axi_rvalid,
  input  logic                s_axi_rready,
  // NAND flash
  output logic                nf_ce_n,
  output logic                nf_cle,
  output logic                nf_ale,
  output logic                nf_we_n,
  output logic                nf_re_n,
  output logic [7:0]          nf_io_o,
  output logic                nf_io_oe,
  input  logic [7:0]          nf_io_i,
  input  logic                nf_rb
);

  // register block <-> AXI slave
  logic        reg_wr_en, reg_wr_err;
  logic [4:0]  reg_wr_addr, reg_rd_addr;
  logic [31:0] reg_wr_data, reg_rd_data;
  logic [3:0]  reg_wr_strb;
  logic        prog_req, read_req;
  // register block -> main FSM
  logic             start;
  nfc_op_e          op, cur_op;
  logic [23:0]      row;
  logic [15:0]      col;
  logic [LEN_W-1:0] len;
  // main FSM state
  logic        busy, op_done, prog_need_data, status_err;
  logic [7:0]  status_byte;
  logic [31:0] id_bytes;
  // data streams
  logic        st_wr_valid, st_wr_ready, st_rd_valid, st_rd_ready;
  logic [7:0]  st_wr_data, st_rd_data;
  // main FSM <-> timing FSM
  logic        t_req_valid, t_req_ready, t_done, rb_sync;
  nfc_req_t    t_req;
  logic [7:0]  t_rd_data;

  nfc_axi_slave #(.ID_W(ID_W), .ADDR_W(ADDR_W), .DATA_W(DATA_W)) u_axi (
    .clk(aclk), .rst_n(aresetn),
    .s_axi_awid, .s_axi_awaddr, .s_axi_awlen, .s_axi_awsize, .s_axi_awburst,
    .s_axi_awvalid, .s_axi_awready,
    .s_axi_wdata, .s_axi_wstrb, .s_axi_wlast, .s_axi_wvalid, .s_axi_wready,
    .s_axi_bid, .s_axi_bresp, .s_axi_bvalid, .s_axi_bready,
    .s_axi_arid, .s_axi_araddr, .s_axi_arlen, .s_axi_arsize, .s_axi_arburst,
    .s_axi_arvalid, .s_axi_arready,
    .s_axi_rid, .s_axi_rdata, .s_axi_rresp, .s_axi_rlast, .s_axi_rvalid, .s_axi_rready,
    .reg_wr_en, .reg_wr_addr, .reg_wr_data, .reg_wr_strb, .reg_wr_err,
    .reg_rd_addr, .reg_rd_data, .prog_req, .read_req,
    .busy, .cur_op, .prog_need_data, .status_err,
    .st_wr_valid, .st_wr_data, .st_wr_ready,
    .st_rd_valid, .st_rd_data, .st_rd_ready
  );

  nfc_regs #(.LEN_W(LEN_W), .PAGE_BYTES(PAGE_BYTES)) u_regs (
    .clk(aclk), .rst_n(aresetn),
    .wr_en(reg_wr_en), .wr_addr(reg_wr_addr), .wr_data(reg_wr_data),
    .wr_strb(reg_wr_strb), .wr_err(reg_wr_err),
    .rd_addr(reg_rd_addr), .rd_data(reg_rd_data),
    .prog_req, .read_req,
    .start, .op, .row, .col, .len,
    .busy, .cur_op, .op_done, .status_byte, .status_err, .id_bytes,
    .rb(rb_sync)
  );

  nfc_main_fsm #(.LEN_W(LEN_W), .N_ID_BYTES(4)) u_main (
    .clk(aclk), .rst_n(aresetn),
    .start, .op, .row, .col, .len,
    .wr_valid(st_wr_valid), .wr_data(st_wr_data), .wr_ready(st_wr_ready),
    .rd_valid(st_rd_valid), .rd_data(st_rd_data), .rd_ready(st_rd_ready),
    .busy, .cur_op, .op_done, .prog_need_data, .status_byte, .status_err, .id_bytes,
    .t_req_valid, .t_req, .t_req_ready, .t_done, .t_rd_data,
    .nf_ce_n
  );

  nfc_timing_fsm #(
    .T_SETUP(T_SETUP), .T_WP(T_WP), .T_WH(T_WH), .T_RP(T_RP), .T_REH(T_REH),
    .T_WB(T_WB), .T_WHR(T_WHR)
  ) u_timing (
    .clk(aclk), .rst_n(aresetn),
    .req_valid(t_req_valid), .req(t_req), .req_ready(t_req_ready),
    .done(t_done), .rd_data(t_rd_data),
    .nf_cle, .nf_ale, .nf_we_n, .nf_re_n, .nf_io_o, .nf_io_oe, .nf_io_i, .nf_rb,
    .rb_sync
  );

endmodule

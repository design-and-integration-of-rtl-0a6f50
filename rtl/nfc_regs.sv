// nfc_regs: register block of the NAND flash controller.
//
// Holds what the host sets up ahead of an operation (row address, column
// address, transfer length) and decides which operation starts. The host
// supplies the flash address in advance through these registers; the
// operation itself then starts either by a write to the command register or,
// for page program and page read, by the first burst on the data window,
// which the AXI4 slave signals with prog_req / read_req.
//
// Register map (byte offsets, see nfc_pkg):
//   0x00 CMD    W: operation code 1-7 (nfc_op_e) starts that operation;
//               refused (wr_err) while an operation runs and for a code of 0
//               or above 7 in bits [7:0]. R: last operation started.
//   0x04 STATUS R: [0] busy, [1] R/B pin (1 = ready), [2] error (bit 0 of the
//               last status byte read back), [3] done (set when an operation
//               ends, cleared when one starts), [15:8] last status byte,
//               [18:16] current or last operation.
//   0x08 ROW    RW: [23:0] row address, sent as three address cycles.
//   0x10 COL    RW: [15:0] column address, sent as two address cycles.
//   0x14 LEN    RW: bytes per page program / page read, reset to PAGE_BYTES.
//   0x18 ID     R: first four bytes returned by Read ID, first byte in [7:0].
// Writes honour the byte strobes. Reads are combinational from rd_addr.
// `start` is a one-clock pulse, registered in the main FSM on the same edge.
// The register map, the done bit and the strobe handling are this design's
// own; the page size default (2048 bytes) follows the program and read flows.
module nfc_regs
  import nfc_pkg::*;
#(
  parameter int unsigned LEN_W      = 16,
  parameter int unsigned PAGE_BYTES = 2048
) (
  input  logic             clk,
  input  logic             rst_n,
  // register write port
  input  logic             wr_en,
  input  logic [4:0]       wr_addr,
  input  logic [31:0]      wr_data,
  input  logic [3:0]       wr_strb,
  output logic             wr_err,
  // register read port
  input  logic [4:0]       rd_addr,
  output logic [31:0]      rd_data,
  // data-window operation requests from the AXI4 slave
  input  logic             prog_req,
  input  logic             read_req,
  // to / from the main FSM
  output logic             start,
  output nfc_op_e          op,
  output logic [23:0]      row,
  output logic [15:0]      col,
  output logic [LEN_W-1:0] len,
  input  logic             busy,
  input  nfc_op_e          cur_op,
  input  logic             op_done,
  input  logic [7:0]       status_byte,
  input  logic             status_err,
  input  logic [31:0]      id_bytes,
  input  logic             rb
);

  logic [31:0] row_q, col_q, len_q;
  nfc_op_e     last_op;
  logic        done_q;

  function automatic logic [31:0] merge(logic [31:0] old, logic [31:0] nw, logic [3:0] strb);
    for (int i = 0; i < 4; i++) if (strb[i]) old[8*i +: 8] = nw[8*i +: 8];
    return old;
  endfunction

  wire     cmd_wr   = wr_en && (wr_addr == REG_CMD);
  nfc_op_e cmd_code;
  assign cmd_code = nfc_op_e'(wr_data[2:0]);
  wire     cmd_ok   = cmd_wr && wr_strb[0] && !busy &&
                      (cmd_code != OP_NONE) && (wr_data[7:3] == 5'd0);

  assign wr_err = cmd_wr && !cmd_ok;

  always_comb begin
    start = 1'b0;
    op    = OP_NONE;
    if (!busy) begin
      if (prog_req) begin
        start = 1'b1;
        op    = OP_PROG;
      end else if (read_req) begin
        start = 1'b1;
        op    = OP_READ;
      end else if (cmd_ok) begin
        start = 1'b1;
        op    = cmd_code;
      end
    end
  end

  assign row = row_q[23:0];
  assign col = col_q[15:0];
  assign len = len_q[LEN_W-1:0];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      row_q   <= '0;
      col_q   <= '0;
      len_q   <= 32'(PAGE_BYTES);
      last_op <= OP_RESET;
      done_q  <= 1'b0;
    end else begin
      if (wr_en) begin
        unique case (wr_addr)
          REG_ROW: row_q <= merge(row_q, wr_data, wr_strb) & 32'h00FF_FFFF;
          REG_COL: col_q <= merge(col_q, wr_data, wr_strb) & 32'h0000_FFFF;
          REG_LEN: len_q <= merge(len_q, wr_data, wr_strb) & 32'((64'd1 << LEN_W) - 1);
          default: ;
        endcase
      end
      if (start) begin
        last_op <= op;
        done_q  <= 1'b0;
      end else if (op_done) begin
        done_q  <= 1'b1;
      end
    end
  end

  always_comb begin
    unique case (rd_addr)
      REG_CMD:    rd_data = {29'd0, last_op};
      REG_STATUS: rd_data = {13'd0, cur_op, status_byte, 4'd0, done_q, status_err, rb, busy};
      REG_ROW:    rd_data = row_q;
      REG_COL:    rd_data = col_q;
      REG_LEN:    rd_data = len_q;
      REG_ID:     rd_data = id_bytes;
      default:    rd_data = 32'd0;
    endcase
  end

endmodule

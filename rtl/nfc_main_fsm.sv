// nfc_main_fsm: the main FSM of the NAND flash controller.
//
// It turns one flash operation, started by a one-clock `start` with `op`, into
// the chain of bus cycles the flash expects, and hands them one at a time to
// the timing FSM (t_req_valid / t_req_ready, then t_done). The chains follow
// the controller's flow charts:
//
//   reset        : FFh, wait tWB and R/B
//   page program : 80h, 2 column + 3 row address cycles, `len` data bytes
//                  taken from the write stream, 10h, wait tWB and R/B,
//                  70h, wait tWHR, read status; status bit 0 = 1 is an error
//   page read    : 00h, 2 column + 3 row address cycles, 30h, wait tWB and R/B,
//                  `len` data bytes handed to the read stream
//   block erase  : 60h, 3 row address cycles, D0h, wait tWB and R/B,
//                  70h, wait tWHR, read status; status bit 0 = 1 is an error
//   read status  : 70h, wait tWHR, read status
//   status again : wait tWHR, read status, when the last command the flash
//                  got was 70h (it still outputs status); else as read status
//   read ID      : 90h, address 00h, wait tWHR, read four ID bytes
//
// After reset the FSM first runs the reset operation by itself: it waits for
// R/B to be high, then sends FFh. Address cycles go out low byte first: column
// bits [7:0], [15:8], then row bits [7:0], [15:8], [23:16]. Chip enable is
// driven low for the whole of an operation and high while idle.
//
// Streams: the write stream (wr_valid/wr_ready/wr_data) is accepted only in the
// page-program data phase (prog_need_data); the read stream offers one byte at
// a time (rd_valid/rd_ready/rd_data) and the next flash read cycle starts only
// after the byte was taken. `op_done` pulses for one clock when an operation
// ends, together with the final status in status_byte / status_err.
// The automatic power-up reset, the tWHR wait in read status, the Read ID
// sequence, the stream handshakes and the status-mode flag that decides
// whether "status again" must resend 70h are this design's own choices.
module nfc_main_fsm
  import nfc_pkg::*;
#(
  parameter int unsigned LEN_W = 16,
  parameter int unsigned N_ID_BYTES = 4
) (
  input  logic             clk,
  input  logic             rst_n,
  // operation request
  input  logic             start,
  input  nfc_op_e          op,
  input  logic [23:0]      row,
  input  logic [15:0]      col,
  input  logic [LEN_W-1:0] len,
  // page program data in
  input  logic             wr_valid,
  input  logic [7:0]       wr_data,
  output logic             wr_ready,
  // page read data out
  output logic             rd_valid,
  output logic [7:0]       rd_data,
  input  logic             rd_ready,
  // state
  output logic             busy,
  output nfc_op_e          cur_op,
  output logic             op_done,
  output logic             prog_need_data,
  output logic [7:0]       status_byte,
  output logic             status_err,
  output logic [8*N_ID_BYTES-1:0] id_bytes,
  // timing FSM
  output logic             t_req_valid,
  output nfc_req_t         t_req,
  input  logic             t_req_ready,
  input  logic             t_done,
  input  logic [7:0]       t_rd_data,
  // chip enable
  output logic             nf_ce_n
);

  typedef enum logic [3:0] {
    S_IDLE,
    S_PWR_WAIT,    // power-up: wait for R/B before the reset command
    S_CMD1,        // first command byte
    S_ADDR,        // address cycles
    S_PROG_DATA,   // page program: one data byte from the write stream
    S_CMD2,        // second command byte (10h / 30h / D0h)
    S_WAIT_BUSY,   // tWB then R/B high
    S_STAT_CMD,    // 70h after program / erase
    S_WAIT_WHR,    // tWHR before reading status or ID
    S_STAT_RD,     // read the status byte
    S_READ_DATA,   // page read: one flash read cycle
    S_READ_HOLD,   // page read: byte offered on the read stream
    S_ID_RD,       // read ID bytes
    S_WAIT         // waiting for the timing FSM to finish a cycle
  } state_e;

  state_e           state, after;
  nfc_op_e          op_q;
  logic [23:0]      row_q;
  logic [15:0]      col_q;
  logic [LEN_W-1:0] len_q;
  logic [LEN_W-1:0] byte_cnt;
  logic [2:0]       addr_idx;
  logic [2:0]       addr_last;
  logic [7:0]       addr_byte;
  logic [7:0]       rd_byte_q;
  logic             stat_mode;   // last command sent was 70h

  assign busy           = (state != S_IDLE);
  assign cur_op         = op_q;
  assign prog_need_data = (state == S_PROG_DATA);
  assign wr_ready       = (state == S_PROG_DATA) && t_req_ready;
  assign rd_valid       = (state == S_READ_HOLD);
  assign rd_data        = rd_byte_q;

  // Address byte for the current address cycle.
  always_comb begin
    unique case (addr_idx)
      3'd0:    addr_byte = col_q[7:0];
      3'd1:    addr_byte = col_q[15:8];
      3'd2:    addr_byte = row_q[7:0];
      3'd3:    addr_byte = row_q[15:8];
      default: addr_byte = row_q[23:16];
    endcase
    if (op_q == OP_READID) addr_byte = 8'h00;
  end

  // Request offered to the timing FSM in each issuing state.
  always_comb begin
    t_req_valid = 1'b0;
    t_req       = '{kind: CYC_CMD, data: 8'h00};
    unique case (state)
      S_PWR_WAIT: begin
        t_req_valid = 1'b1;
        t_req.kind  = CYC_WAIT_RB;
      end
      S_CMD1: begin
        t_req_valid = 1'b1;
        t_req.kind  = CYC_CMD;
        unique case (op_q)
          OP_PROG:   t_req.data = NAND_CMD_PROG_1;
          OP_READ:   t_req.data = NAND_CMD_READ_1;
          OP_ERASE:  t_req.data = NAND_CMD_ERASE_1;
          OP_STATUS, OP_STATUS_RD: t_req.data = NAND_CMD_STATUS;
          OP_READID: t_req.data = NAND_CMD_READ_ID;
          default:   t_req.data = NAND_CMD_RESET;
        endcase
      end
      S_ADDR: begin
        t_req_valid = 1'b1;
        t_req.kind  = CYC_ADDR;
        t_req.data  = addr_byte;
      end
      S_PROG_DATA: begin
        t_req_valid = wr_valid;
        t_req.kind  = CYC_WDATA;
        t_req.data  = wr_data;
      end
      S_CMD2: begin
        t_req_valid = 1'b1;
        t_req.kind  = CYC_CMD;
        unique case (op_q)
          OP_PROG:  t_req.data = NAND_CMD_PROG_2;
          OP_READ:  t_req.data = NAND_CMD_READ_2;
          default:  t_req.data = NAND_CMD_ERASE_2;
        endcase
      end
      S_WAIT_BUSY: begin
        t_req_valid = 1'b1;
        t_req.kind  = CYC_WAIT_RB;
      end
      S_STAT_CMD: begin
        t_req_valid = 1'b1;
        t_req.kind  = CYC_CMD;
        t_req.data  = NAND_CMD_STATUS;
      end
      S_WAIT_WHR: begin
        t_req_valid = 1'b1;
        t_req.kind  = CYC_WAIT_WHR;
      end
      S_STAT_RD, S_READ_DATA, S_ID_RD: begin
        t_req_valid = 1'b1;
        t_req.kind  = CYC_RDATA;
      end
      default: ;
    endcase
  end

  wire issue = t_req_valid && t_req_ready;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state       <= S_PWR_WAIT;
      after       <= S_IDLE;
      op_q        <= OP_RESET;
      row_q       <= '0;
      col_q       <= '0;
      len_q       <= '0;
      byte_cnt    <= '0;
      addr_idx    <= '0;
      addr_last   <= '0;
      rd_byte_q   <= '0;
      stat_mode   <= 1'b0;
      op_done     <= 1'b0;
      status_byte <= '0;
      status_err  <= 1'b0;
      id_bytes    <= '0;
      nf_ce_n     <= 1'b1;
    end else begin
      op_done <= 1'b0;
      unique case (state)
        S_IDLE: begin
          nf_ce_n <= 1'b1;
          if (start && op != OP_NONE) begin
            op_q     <= op;
            row_q    <= row;
            col_q    <= col;
            len_q    <= len;
            byte_cnt <= '0;
            nf_ce_n  <= 1'b0;
            // the flash stays in status mode until it gets another command;
            // the tWHR wait also covers CE_n low to output valid (tCEA)
            state    <= (op == OP_STATUS_RD && stat_mode) ? S_WAIT_WHR : S_CMD1;
            // address cycles: 5 for program/read, 3 row cycles for erase,
            // one 00h cycle for read ID
            unique case (op)
              OP_ERASE:  begin addr_idx <= 3'd2; addr_last <= 3'd4; end
              OP_READID: begin addr_idx <= 3'd0; addr_last <= 3'd0; end
              default:   begin addr_idx <= 3'd0; addr_last <= 3'd4; end
            endcase
          end
        end
        S_PWR_WAIT: if (issue) begin
          nf_ce_n <= 1'b0;
          after   <= S_CMD1;
          state   <= S_WAIT;
        end
        S_CMD1: if (issue) begin
          state     <= S_WAIT;
          stat_mode <= (op_q inside {OP_STATUS, OP_STATUS_RD});
          unique case (op_q)
            OP_PROG, OP_READ, OP_ERASE, OP_READID: after <= S_ADDR;
            OP_STATUS, OP_STATUS_RD:               after <= S_WAIT_WHR;
            default:                               after <= S_WAIT_BUSY;  // reset
          endcase
        end
        S_ADDR: if (issue) begin
          state    <= S_WAIT;
          addr_idx <= addr_idx + 1'b1;
          if (addr_idx != addr_last)              after <= S_ADDR;
          else if (op_q == OP_READID)             after <= S_WAIT_WHR;
          else if (op_q == OP_PROG && len_q != 0) after <= S_PROG_DATA;
          else                                    after <= S_CMD2;
        end
        S_PROG_DATA: if (issue) begin
          state    <= S_WAIT;
          byte_cnt <= byte_cnt + 1'b1;
          after    <= (byte_cnt + 1'b1 == len_q) ? S_CMD2 : S_PROG_DATA;
        end
        S_CMD2: if (issue) begin
          state     <= S_WAIT;
          stat_mode <= 1'b0;
          after <= S_WAIT_BUSY;
        end
        S_WAIT_BUSY: if (issue) begin
          state <= S_WAIT;
          unique case (op_q)
            OP_PROG, OP_ERASE: after <= S_STAT_CMD;
            OP_READ:           after <= (len_q != 0) ? S_READ_DATA : S_IDLE;
            default:           after <= S_IDLE;   // reset
          endcase
        end
        S_STAT_CMD: if (issue) begin
          state     <= S_WAIT;
          stat_mode <= 1'b1;
          after <= S_WAIT_WHR;
        end
        S_WAIT_WHR: if (issue) begin
          state <= S_WAIT;
          after <= (op_q == OP_READID) ? S_ID_RD : S_STAT_RD;
        end
        S_STAT_RD: if (issue) begin
          state <= S_WAIT;
          after <= S_IDLE;
        end
        S_READ_DATA: if (issue) begin
          state <= S_WAIT;
          after <= S_READ_HOLD;
        end
        S_READ_HOLD: if (rd_ready) begin
          byte_cnt <= byte_cnt + 1'b1;
          if (byte_cnt + 1'b1 == len_q) begin
            state   <= S_IDLE;
            op_done <= 1'b1;
            nf_ce_n <= 1'b1;
          end else begin
            state <= S_READ_DATA;
          end
        end
        S_ID_RD: if (issue) begin
          state    <= S_WAIT;
          byte_cnt <= byte_cnt + 1'b1;
          after    <= (byte_cnt + 1'b1 == LEN_W'(N_ID_BYTES)) ? S_IDLE : S_ID_RD;
        end
        S_WAIT: if (t_done) begin
          // capture what a read cycle returned
          if (after == S_READ_HOLD) rd_byte_q <= t_rd_data;
          if (op_q == OP_READID && byte_cnt != '0)
            id_bytes <= {t_rd_data, id_bytes[8*N_ID_BYTES-1:8]};
          if ((op_q inside {OP_PROG, OP_ERASE, OP_STATUS, OP_STATUS_RD}) && after == S_IDLE) begin
            status_byte <= t_rd_data;
            status_err  <= t_rd_data[0];
          end
          state <= after;
          if (after == S_IDLE) begin
            op_done <= 1'b1;
            nf_ce_n <= 1'b1;
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  // The stream handshakes hold their offers until taken.
  a_rd_hold: assert property (@(posedge clk) disable iff (!rst_n)
    rd_valid && !rd_ready |=> rd_valid && $stable(rd_data));

endmodule

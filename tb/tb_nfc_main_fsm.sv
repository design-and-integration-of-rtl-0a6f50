// tb_nfc_main_fsm: self-checking testbench of the main FSM.
//
// The main FSM drives a timing FSM (short pulse widths) and the behavioural
// NAND flash model. The testbench runs every operation and checks the command
// and address bytes the flash received, the data stored and read back (read
// stream stalled at random), the status outcome of program and erase
// including an injected failure, the Read ID bytes, a status re-read with
// and without a new 70h, chip enable, and that the flash saw no protocol
// violation.
module tb_nfc_main_fsm;
  import nfc_pkg::*;

  localparam int unsigned PAGE = 64;

  logic clk = 0, rst_n = 1;
  initial #2 rst_n = 0;
  always #5 clk = ~clk;

  logic        start = 0;
  nfc_op_e     op = OP_NONE;
  logic [23:0] row = '0;
  logic [15:0] col = '0;
  logic [15:0] len = '0;
  logic        wr_valid = 0, wr_ready, rd_valid, rd_ready = 0;
  logic [7:0]  wr_data = '0, rd_data;
  logic        busy, op_done, prog_need_data, status_err, nf_ce_n;
  nfc_op_e     cur_op;
  logic [7:0]  status_byte;
  logic [31:0] id_bytes;
  logic        t_req_valid, t_req_ready, t_done, rb_sync;
  nfc_req_t    t_req;
  logic [7:0]  t_rd_data;
  logic        cle, ale, we_n, re_n, io_oe, rb;
  logic [7:0]  io_o, io_i;

  nfc_main_fsm #(.LEN_W(16), .N_ID_BYTES(4)) dut (
    .clk, .rst_n, .start, .op, .row, .col, .len,
    .wr_valid, .wr_data, .wr_ready, .rd_valid, .rd_data, .rd_ready,
    .busy, .cur_op, .op_done, .prog_need_data, .status_byte, .status_err, .id_bytes,
    .t_req_valid, .t_req, .t_req_ready, .t_done, .t_rd_data, .nf_ce_n);

  nfc_timing_fsm #(.T_SETUP(1), .T_WP(2), .T_WH(1), .T_RP(2), .T_REH(1), .T_WB(3),
                   .T_WHR(3)) u_t (
    .clk, .rst_n, .req_valid(t_req_valid), .req(t_req), .req_ready(t_req_ready),
    .done(t_done), .rd_data(t_rd_data), .nf_cle(cle), .nf_ale(ale), .nf_we_n(we_n),
    .nf_re_n(re_n), .nf_io_o(io_o), .nf_io_oe(io_oe), .nf_io_i(io_i), .nf_rb(rb),
    .rb_sync);

  nand_flash_model #(.PAGE_BYTES(PAGE), .PAGES_PER_BLOCK(4), .BUSY_CYCLES(40),
                     .PWRUP_CYCLES(30), .MIN_WP(2), .MIN_RP(2)) flash (
    .clk, .ce_n(nf_ce_n), .cle, .ale, .we_n, .re_n, .io_i(io_o), .io_o(io_i), .rb);

  int checks = 0, failures = 0;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // chip enable must be low whenever a strobe moves
  always @(negedge clk) if (rst_n && (!we_n || !re_n) && nf_ce_n) begin
    checks++; failures++; $display("FAIL: strobe with CE_n high");
  end

  task automatic run_op(nfc_op_e o, logic [23:0] r, logic [15:0] c, logic [15:0] n);
    #1 op = o; row = r; col = c; len = n; start = 1;
    @(posedge clk);
    #1 start = 0;
  endtask

  task automatic wait_done();
    while (!op_done) begin @(posedge clk); #1; end
  endtask

  task automatic write_bytes(int n, int seed);
    for (int i = 0; i < n; i++) begin
      wr_valid = 1; wr_data = 8'(seed + 7 * i);
      do @(posedge clk); while (!wr_ready);
      #1 wr_valid = 0;
    end
  endtask

  task automatic read_bytes(int n, int seed, bit expect_erased);
    int bad = 0;
    for (int i = 0; i < n; i++) begin
      logic [7:0] exp = expect_erased ? 8'hFF : 8'(seed + 7 * i);
      repeat ($urandom_range(0, 3)) @(posedge clk);
      #1 rd_ready = 1;
      do @(posedge clk); while (!rd_valid);
      if (rd_data != exp) begin
        bad++;
        if (bad < 4) $display("byte %0d: %02h expected %02h", i, rd_data, exp);
      end
      #1 rd_ready = 0;
    end
    check(bad == 0, "page data read back");
  endtask

  task automatic expect_log(logic [7:0] cmds[$], logic [7:0] addrs[$], string what);
    check(flash.cmd_log == cmds, $sformatf("%s: commands %p", what, flash.cmd_log));
    check(flash.addr_log == addrs, $sformatf("%s: address bytes %p", what, flash.addr_log));
    flash.cmd_log.delete();
    flash.addr_log.delete();
  endtask

  initial begin
    repeat (3) @(posedge clk);
    #1 rst_n = 1;

    // power-up: waits for R/B, then sends FFh
    check(busy, "busy after reset");
    wait_done();
    @(posedge clk); #1;
    check(!busy && nf_ce_n, "idle with CE_n high after power-up reset");
    expect_log('{8'hFF}, '{}, "power-up reset");

    // page program row 0x050403, column 2
    run_op(OP_PROG, 24'h050403, 16'h0002, 16'(PAGE - 2));
    check(cur_op == OP_PROG && busy && !nf_ce_n, "program running with CE_n low");
    write_bytes(PAGE - 2, 8'h11);
    wait_done();
    check(!status_err, "program passed");
    check(status_byte == 8'hE0, $sformatf("program status %02h", status_byte));
    expect_log('{8'h80, 8'h10, 8'h70}, '{8'h02, 8'h00, 8'h03, 8'h04, 8'h05}, "page program");
    check(flash.data_in == PAGE - 2, "data cycles of the program");

    // page read of the same place, stalled read stream
    run_op(OP_READ, 24'h050403, 16'h0002, 16'(PAGE - 2));
    read_bytes(PAGE - 2, 8'h11, 0);
    wait_done();
    expect_log('{8'h00, 8'h30}, '{8'h02, 8'h00, 8'h03, 8'h04, 8'h05}, "page read");

    // block erase, then the page reads as erased
    run_op(OP_ERASE, 24'h050401, 16'h0000, 16'd0);
    wait_done();
    check(!status_err, "erase passed");
    expect_log('{8'h60, 8'hD0, 8'h70}, '{8'h01, 8'h04, 8'h05}, "block erase");
    run_op(OP_READ, 24'h050403, 16'h0002, 16'd8);
    read_bytes(8, 0, 1);
    wait_done();
    expect_log('{8'h00, 8'h30}, '{8'h02, 8'h00, 8'h03, 8'h04, 8'h05}, "read after erase");

    // program failure reported by the flash
    flash.fail_next = 1;
    run_op(OP_PROG, 24'h000010, 16'h0000, 16'd4);
    write_bytes(4, 8'h40);
    wait_done();
    check(status_err && status_byte == 8'hE1, $sformatf("program error seen, status %02h", status_byte));
    expect_log('{8'h80, 8'h10, 8'h70}, '{8'h00, 8'h00, 8'h10, 8'h00, 8'h00}, "failing program");

    // read status on its own
    run_op(OP_STATUS, 24'h0, 16'h0, 16'h0);
    wait_done();
    check(status_byte == 8'hE1 && status_err, "read status returns the last result");
    expect_log('{8'h70}, '{}, "read status");

    // status again: the flash is still in status mode, so no 70h is sent
    run_op(OP_STATUS_RD, 24'h0, 16'h0, 16'h0);
    wait_done();
    check(status_byte == 8'hE1 && status_err, "status re-read returns the last result");
    expect_log('{}, '{}, "status re-read in status mode");

    // erase failure
    flash.fail_next = 1;
    run_op(OP_ERASE, 24'h000010, 16'h0000, 16'd0);
    wait_done();
    check(status_err, "erase error seen");
    flash.cmd_log.delete(); flash.addr_log.delete();

    // read ID
    run_op(OP_READID, 24'h0, 16'h0, 16'h0);
    wait_done();
    check(id_bytes == 32'h9590_DA2C, $sformatf("ID bytes %08h", id_bytes));
    expect_log('{8'h90}, '{8'h00}, "read ID");

    // reset command
    run_op(OP_RESET, 24'h0, 16'h0, 16'h0);
    wait_done();
    expect_log('{8'hFF}, '{}, "reset");

    // status again after another command: 70h must be sent first
    run_op(OP_STATUS_RD, 24'h0, 16'h0, 16'h0);
    wait_done();
    check(status_byte == 8'hE0 && !status_err, $sformatf("status after reset %02h", status_byte));
    expect_log('{8'h70}, '{}, "status re-read after reset");

    check(flash.violations == 0, $sformatf("flash protocol violations: %0d", flash.violations));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule

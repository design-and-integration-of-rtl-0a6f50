// tb_nfc_regs: self-checking testbench of the register block.
//
// Checks reset values (LEN = page size), byte-strobed writes and their masks,
// read-back of every register, the STATUS and ID fields, the start decisions
// (program / read requests from the data window, command writes, priority,
// refusal while busy or for an unknown code, with wr_err) and the sticky done bit.
module tb_nfc_regs;
  import nfc_pkg::*;

  logic clk = 0, rst_n = 1;
  initial #2 rst_n = 0;
  always #5 clk = ~clk;

  logic        wr_en = 0, wr_err, prog_req = 0, read_req = 0, start;
  logic [4:0]  wr_addr = '0, rd_addr = '0;
  logic [31:0] wr_data = '0, rd_data;
  logic [3:0]  wr_strb = '0;
  nfc_op_e     op, cur_op = OP_NONE;
  logic [23:0] row;
  logic [15:0] col;
  logic [15:0] len;
  logic        busy = 0, op_done = 0, status_err = 0, rb = 1;
  logic [7:0]  status_byte = 8'h00;
  logic [31:0] id_bytes = 32'h0;

  nfc_regs #(.LEN_W(16), .PAGE_BYTES(2048)) dut (
    .clk, .rst_n, .wr_en, .wr_addr, .wr_data, .wr_strb, .wr_err, .rd_addr, .rd_data,
    .prog_req, .read_req, .start, .op, .row, .col, .len, .busy, .cur_op, .op_done,
    .status_byte, .status_err, .id_bytes, .rb);

  int checks = 0, failures = 0;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic wr(logic [4:0] a, logic [31:0] d, logic [3:0] s = 4'hF);
    #1 wr_en = 1; wr_addr = a; wr_data = d; wr_strb = s;
    @(posedge clk);
    #1 wr_en = 0;
  endtask

  logic [31:0] v;

  initial begin
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    @(posedge clk);

    rd_addr = REG_LEN; #1;
    check(rd_data == 32'd2048, $sformatf("LEN resets to 2048, got %0d", rd_data));
    check(len == 16'd2048, "len output after reset");
    rd_addr = REG_ROW; #1;
    check(rd_data == 0, "ROW resets to 0");

    wr(REG_ROW, 32'hAB12_3456);
    rd_addr = REG_ROW; #1;
    check(rd_data == 32'h0012_3456 && row == 24'h123456, "ROW keeps 24 bits");
    wr(REG_ROW, 32'h0000_7700, 4'b0010);
    rd_addr = REG_ROW; #1;
    check(rd_data == 32'h0012_7756, $sformatf("ROW byte strobe: %08h", rd_data));
    wr(REG_COL, 32'hFFFF_0123);
    rd_addr = REG_COL; #1;
    check(rd_data == 32'h0000_0123 && col == 16'h0123, "COL keeps 16 bits");
    wr(REG_LEN, 32'd100);
    check(len == 16'd100, "LEN written");

    // command write starts an operation (start is combinational)
    #1 wr_en = 1; wr_addr = REG_CMD; wr_data = 32'(OP_ERASE); wr_strb = 4'hF;
    #1 check(start && op == OP_ERASE && !wr_err, "CMD write starts erase");
    @(posedge clk);
    #1 wr_en = 0;
    rd_addr = REG_CMD; #1;
    check(rd_data == 32'(OP_ERASE), "CMD reads last operation");

    // refused while busy
    busy = 1;
    #1 wr_en = 1; wr_addr = REG_CMD; wr_data = 32'(OP_STATUS);
    #1 check(!start && wr_err, "CMD write refused while busy");
    @(posedge clk);
    #1 wr_en = 0;
    // invalid codes refused
    busy = 0;
    #1 wr_en = 1; wr_addr = REG_CMD; wr_data = 32'd7;
    #1 check(start && op == OP_STATUS_RD && !wr_err, "code 7 starts a status re-read");
    wr_data = 32'd8;
    #1 check(!start && wr_err, "code above 7 refused");
    wr_data = 32'd0;
    #1 check(!start && wr_err, "code 0 refused");
    @(posedge clk);
    #1 wr_en = 0;

    // data-window requests and priority
    prog_req = 1; read_req = 1;
    #1 check(start && op == OP_PROG, "program request has priority");
    prog_req = 0;
    #1 check(start && op == OP_READ, "read request starts a page read");
    busy = 1;
    #1 check(!start, "no start while busy");
    read_req = 0; busy = 0;

    // status fields and done bit
    @(posedge clk);
    #1 op_done = 1;
    @(posedge clk);
    #1 op_done = 0;
    busy = 1; rb = 0; status_err = 1; status_byte = 8'hE1; cur_op = OP_PROG;
    rd_addr = REG_STATUS; #1;
    v = {13'd0, 3'(OP_PROG), 8'hE1, 4'd0, 1'b1, 1'b1, 1'b0, 1'b1};
    check(rd_data == v, $sformatf("STATUS %08h expected %08h", rd_data, v));
    busy = 0;
    #1 wr_en = 1; wr_addr = REG_CMD; wr_data = 32'(OP_STATUS);
    @(posedge clk);
    #1 wr_en = 0;
    rd_addr = REG_STATUS; #1;
    check(rd_data[3] == 1'b0, "done cleared by a start");

    id_bytes = 32'h9590_DA2C;
    rd_addr = REG_ID; #1;
    check(rd_data == 32'h9590_DA2C, "ID register");
    rd_addr = 5'h1C; #1;
    check(rd_data == 0, "unmapped reads 0");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule

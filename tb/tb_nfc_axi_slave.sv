// tb_nfc_axi_slave: self-checking testbench of the AXI4 slave interface.
//
// The register block and the main FSM are replaced by small testbench models:
// a register array, and an operation model that takes N_PAGE bytes with gaps
// on the program stream or returns N_PAGE bytes with random delays on the read
// stream. Checks: register write / read bursts with IDs, rlast and SLVERR on a
// refused command; a page program split over two bursts, with the first write
// response given while the program still waits for data and the last one only
// after it ended; an injected program failure and an over-long burst giving
// SLVERR; a page read over two bursts; reading past the page giving SLVERR;
// and a data-window write held off while a page read runs.
module tb_nfc_axi_slave;
  import nfc_pkg::*;

  localparam int N_PAGE = 6;

  logic clk = 0, rst_n = 1;
  initial #2 rst_n = 0;
  always #5 clk = ~clk;

  // AXI master side
  logic [3:0]  awid = 0, arid = 0, bid, rid;
  logic [31:0] awaddr = 0, araddr = 0, wdata = 0, rdata;
  logic [7:0]  awlen = 0, arlen = 0;
  logic [3:0]  wstrb = 4'hF;
  logic        awvalid = 0, awready, wlast = 0, wvalid = 0, wready, bvalid, bready = 0;
  logic        arvalid = 0, arready, rlast, rvalid, rready = 0;
  logic [1:0]  bresp, rresp;

  // inner side
  logic        reg_wr_en, reg_wr_err, prog_req, read_req;
  logic [4:0]  reg_wr_addr, reg_rd_addr;
  logic [31:0] reg_wr_data, reg_rd_data;
  logic [3:0]  reg_wr_strb;
  logic        busy = 0, prog_need_data = 0, status_err = 0;
  nfc_op_e     cur_op = OP_NONE;
  logic        st_wr_valid, st_wr_ready, st_rd_valid = 0, st_rd_ready;
  logic [7:0]  st_wr_data, st_rd_data = 0;

  nfc_axi_slave #(.ID_W(4), .ADDR_W(32), .DATA_W(32)) dut (
    .clk, .rst_n,
    .s_axi_awid(awid), .s_axi_awaddr(awaddr), .s_axi_awlen(awlen), .s_axi_awsize(3'd2),
    .s_axi_awburst(2'b01), .s_axi_awvalid(awvalid), .s_axi_awready(awready),
    .s_axi_wdata(wdata), .s_axi_wstrb(wstrb), .s_axi_wlast(wlast), .s_axi_wvalid(wvalid),
    .s_axi_wready(wready), .s_axi_bid(bid), .s_axi_bresp(bresp), .s_axi_bvalid(bvalid),
    .s_axi_bready(bready),
    .s_axi_arid(arid), .s_axi_araddr(araddr), .s_axi_arlen(arlen), .s_axi_arsize(3'd2),
    .s_axi_arburst(2'b01), .s_axi_arvalid(arvalid), .s_axi_arready(arready),
    .s_axi_rid(rid), .s_axi_rdata(rdata), .s_axi_rresp(rresp), .s_axi_rlast(rlast),
    .s_axi_rvalid(rvalid), .s_axi_rready(rready),
    .reg_wr_en, .reg_wr_addr, .reg_wr_data, .reg_wr_strb, .reg_wr_err,
    .reg_rd_addr, .reg_rd_data, .prog_req, .read_req,
    .busy, .cur_op, .prog_need_data, .status_err,
    .st_wr_valid, .st_wr_data, .st_wr_ready, .st_rd_valid, .st_rd_data, .st_rd_ready);

  int checks = 0, failures = 0;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // ---- register model ----
  logic [31:0] regs [8];
  initial foreach (regs[i]) regs[i] = 32'h1000_0000 + i;
  assign reg_rd_data = regs[reg_rd_addr[4:2]];
  assign reg_wr_err  = reg_wr_en && reg_wr_addr == REG_CMD && reg_wr_data == 32'd7;
  always @(posedge clk) if (reg_wr_en) regs[reg_wr_addr[4:2]] <= reg_wr_data;

  // ---- operation model ----
  logic [7:0] got [$];
  bit         fail_next = 0;
  int         starts = 0;
  assign st_wr_ready = prog_need_data;

  bit is_prog;
  initial begin
    forever begin
      @(negedge clk);
      if (prog_req || read_req) begin
        is_prog = prog_req;
        starts++;
        @(posedge clk);
        #1 busy = 1; cur_op = is_prog ? OP_PROG : OP_READ;
        for (int i = 0; i < N_PAGE; i++) begin
          if (is_prog) begin
            repeat (3) @(posedge clk);
            #1 prog_need_data = 1;
            do @(negedge clk); while (!st_wr_valid);
            got.push_back(st_wr_data);
            @(posedge clk);
            #1 prog_need_data = 0;
          end else begin
            repeat ($urandom_range(1, 4)) @(posedge clk);
            #1 st_rd_valid = 1; st_rd_data = 8'h50 + 8'(i);
            do @(negedge clk); while (!st_rd_ready);
            @(posedge clk);
            #1 st_rd_valid = 0;
          end
        end
        repeat (10) @(posedge clk);
        #1 busy = 0; status_err = is_prog && fail_next; fail_next = 0;
      end
    end
  end

  // ---- AXI master tasks ----
  task automatic axi_write(logic [31:0] a, logic [3:0] id, logic [7:0] first, int n,
                           output logic [1:0] resp, output logic [3:0] rsp_id,
                           output bit busy_at_resp);
    #1 awvalid = 1; awaddr = a; awid = id; awlen = 8'(n - 1);
    do @(negedge clk); while (!awready);
    @(posedge clk);
    #1 awvalid = 0;
    for (int i = 0; i < n; i++) begin
      wvalid = 1; wdata = {24'h000012, first + 8'(i)}; wlast = (i == n - 1);
      do @(negedge clk); while (!wready);
      @(posedge clk);
      #1 wvalid = 0; wlast = 0;
    end
    bready = 1;
    do @(negedge clk); while (!bvalid);
    resp = bresp; rsp_id = bid; busy_at_resp = busy;
    @(posedge clk);
    #1 bready = 0;
  endtask

  task automatic axi_read(logic [31:0] a, logic [3:0] id, int n, output logic [31:0] d[$],
                          output logic [1:0] r[$], output int lastpos, output bit id_ok);
    d.delete(); r.delete(); lastpos = -1; id_ok = 1;
    #1 arvalid = 1; araddr = a; arid = id; arlen = 8'(n - 1);
    do @(negedge clk); while (!arready);
    @(posedge clk);
    #1 arvalid = 0;
    for (int i = 0; i < n; i++) begin
      rready = 1;
      do @(negedge clk); while (!rvalid);
      d.push_back(rdata); r.push_back(rresp);
      if (rlast && lastpos < 0) lastpos = i;
      if (rid != id) id_ok = 0;
      @(posedge clk);
      #1 rready = 0;
    end
  endtask

  logic [1:0]  resp;
  logic [3:0]  rspid;
  bit          b_busy, idok;
  logic [31:0] dq[$];
  logic [1:0]  rq[$];
  int          lp;

  initial begin
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    repeat (2) @(posedge clk);

    // register write then read back with a 3-beat burst
    axi_write({27'd0, REG_ROW}, 4'h3, 8'h77, 1, resp, rspid, b_busy);
    check(resp == AXI_OKAY && rspid == 4'h3, "register write response");
    check(regs[REG_ROW >> 2] == 32'h0000_1277, $sformatf("ROW written %08h", regs[2]));
    axi_read({27'd0, REG_ROW}, 4'h5, 3, dq, rq, lp, idok);
    check(dq.size() == 3 && dq[0] == 32'h1277 && dq[2] == 32'h1277, "register read burst");
    check(lp == 2 && idok, "rlast on the third beat, RID echoed");
    check(rq[0] == AXI_OKAY, "register read OKAY");
    // refused command
    #1 awvalid = 1; awaddr = {27'd0, REG_CMD}; awid = 1; awlen = 0;
    do @(negedge clk); while (!awready);
    @(posedge clk);
    #1 awvalid = 0; wvalid = 1; wdata = 32'd7; wlast = 1;
    do @(negedge clk); while (!wready);
    @(posedge clk);
    #1 wvalid = 0; wlast = 0; bready = 1;
    do @(negedge clk); while (!bvalid);
    check(bresp == AXI_SLVERR, "refused command answered SLVERR");
    @(posedge clk);
    #1 bready = 0;

    // page program in two bursts: 4 + 2 bytes
    axi_write({27'd0, REG_DATA}, 4'h2, 8'hC0, 4, resp, rspid, b_busy);
    check(starts == 1, "data-window write started a program");
    check(resp == AXI_OKAY && b_busy, "first burst answered while the program waits for data");
    axi_write({27'd0, REG_DATA}, 4'h2, 8'hC4, 2, resp, rspid, b_busy);
    check(resp == AXI_OKAY && !b_busy && rspid == 4'h2, "last burst answered after the program ended");
    check(starts == 1, "second burst continued the same program");
    check(got.size() == 6 && got[0] == 8'hC0 && got[5] == 8'hC5, "program bytes in order");
    got.delete();

    // program failure
    fail_next = 1;
    axi_write({27'd0, REG_DATA}, 4'h4, 8'h00, 6, resp, rspid, b_busy);
    check(resp == AXI_SLVERR && !b_busy, "program failure answered SLVERR");
    got.delete();

    // over-long burst: 8 beats for a 6-byte page
    axi_write({27'd0, REG_DATA}, 4'h4, 8'h20, 8, resp, rspid, b_busy);
    check(resp == AXI_SLVERR, "beats past the page answered SLVERR");
    check(got.size() == 6 && got[5] == 8'h25, "only the page bytes went to the flash");
    got.delete();

    // page read in two bursts
    axi_read({27'd0, REG_DATA}, 4'h6, 4, dq, rq, lp, idok);
    check(dq.size() == 4 && dq[0] == 32'h50 && dq[3] == 32'h53, $sformatf("page read first burst %p %p starts=%0d busy=%0d op=%0d", dq, rq, starts, busy, cur_op));
    check(lp == 3 && idok && rq[0] == AXI_OKAY, "first read burst rlast / RID");
    // a program burst must wait while the read runs
    fork
      axi_write({27'd0, REG_DATA}, 4'h1, 8'h90, 6, resp, rspid, b_busy);
      begin
        repeat (3) @(posedge clk);
        check(cur_op == OP_READ && !awready, "data-window write held off during a read");
        axi_read({27'd0, REG_DATA}, 4'h6, 2, dq, rq, lp, idok);
        check(dq.size() == 2 && dq[0] == 32'h54 && dq[1] == 32'h55, "page read second burst");
      end
    join
    check(starts == 5 && got.size() == 6 && got[0] == 8'h90, "held write ran after the read");
    check(resp == AXI_OKAY, "held write completed");

    // read past the page end
    axi_read({27'd0, REG_DATA}, 4'h7, 8, dq, rq, lp, idok);
    check(dq[5] == 32'h55 && rq[5] == AXI_OKAY, "last page byte");
    check(rq[6] == AXI_SLVERR && rq[7] == AXI_SLVERR && lp == 7, "beats past the page SLVERR");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule

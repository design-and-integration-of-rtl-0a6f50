// tb_nand_flash_ctrl: end-to-end testbench of the AXI4 NAND flash controller
// at its default parameters (2048-byte page, 4 ns pin timing), driving a
// behavioural 2048+64-byte-page flash that checks the WE_n / RE_n pulse
// widths against asynchronous timing mode 0 (13 clocks of 4 ns).
//
// Sequence, all through the AXI4 port: power-up reset; Read ID; a full
// 2048-byte page program sent as eight 256-beat bursts; a full page read back
// as eight bursts and compared; block erase and a read showing the page
// erased; read status and a status re-read without 70h; a failing program and a failing erase; a command
// refused while busy; a reset command. It counts each mechanism (every
// operation, R/B busy waits, program-data back-pressure, read-data waits,
// multi-burst pages, the two error paths, the refused command, the status
// re-read) and fails any
// that never happened. It also checks the flash-side data rate of a page
// program: one byte every T_SETUP+T_WP+T_WH+2 clocks.
module tb_nand_flash_ctrl;
  import nfc_pkg::*;

  localparam int PAGE  = 2048;
  localparam int BURST = 256;
  localparam int BYTE_PERIOD = 13 + 13 + 8 + 2;   // T_SETUP + T_WP + T_WH + 2

  logic aclk = 0, aresetn = 1;
  initial #2 aresetn = 0;
  always #5 aclk = ~aclk;   // one period stands for one 4 ns clock of the real design

  logic [3:0]  awid = 0, arid = 0, bid, rid;
  logic [31:0] awaddr = 0, araddr = 0, wdata = 0, rdata;
  logic [7:0]  awlen = 0, arlen = 0;
  logic        awvalid = 0, awready, wlast = 0, wvalid = 0, wready, bvalid, bready = 0;
  logic        arvalid = 0, arready, rlast, rvalid, rready = 0;
  logic [1:0]  bresp, rresp;
  logic        nf_ce_n, nf_cle, nf_ale, nf_we_n, nf_re_n, nf_io_oe, nf_rb;
  logic [7:0]  nf_io_o, nf_io_i;

  nand_flash_ctrl dut (
    .aclk, .aresetn,
    .s_axi_awid(awid), .s_axi_awaddr(awaddr), .s_axi_awlen(awlen), .s_axi_awsize(3'd2),
    .s_axi_awburst(2'b01), .s_axi_awvalid(awvalid), .s_axi_awready(awready),
    .s_axi_wdata(wdata), .s_axi_wstrb(4'hF), .s_axi_wlast(wlast), .s_axi_wvalid(wvalid),
    .s_axi_wready(wready), .s_axi_bid(bid), .s_axi_bresp(bresp), .s_axi_bvalid(bvalid),
    .s_axi_bready(bready),
    .s_axi_arid(arid), .s_axi_araddr(araddr), .s_axi_arlen(arlen), .s_axi_arsize(3'd2),
    .s_axi_arburst(2'b01), .s_axi_arvalid(arvalid), .s_axi_arready(arready),
    .s_axi_rid(rid), .s_axi_rdata(rdata), .s_axi_rresp(rresp), .s_axi_rlast(rlast),
    .s_axi_rvalid(rvalid), .s_axi_rready(rready),
    .nf_ce_n, .nf_cle, .nf_ale, .nf_we_n, .nf_re_n, .nf_io_o, .nf_io_oe, .nf_io_i, .nf_rb);

  nand_flash_model #(.PAGE_BYTES(PAGE), .PAGES_PER_BLOCK(64), .BUSY_CYCLES(3000),
                     .PWRUP_CYCLES(500), .MIN_WP(13), .MIN_RP(13)) flash (
    .clk(aclk), .ce_n(nf_ce_n), .cle(nf_cle), .ale(nf_ale), .we_n(nf_we_n), .re_n(nf_re_n),
    .io_i(nf_io_o), .io_o(nf_io_i), .rb(nf_rb));

  int checks = 0, failures = 0;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // ---- mechanism counters ----
  int n_rb_wait = 0, n_w_stall = 0, n_r_wait = 0, n_multi_burst = 0;
  int n_prog_err = 0, n_erase_err = 0, n_refused = 0, n_stat_again = 0;
  always @(negedge aclk) begin
    if (!nf_rb && !nf_ce_n) n_rb_wait++;
    if (wvalid && !wready) n_w_stall++;
    if (rready && !rvalid) n_r_wait++;
  end

  // data-side WE_n rising edges during a page program, for the byte rate
  int  we_rise_t [$];
  bit  track_rate = 0;
  logic we_q = 1;
  int  cyc = 0;
  always @(negedge aclk) begin
    cyc++;
    if (track_rate && nf_we_n && !we_q && !nf_cle && !nf_ale) we_rise_t.push_back(cyc);
    we_q = nf_we_n;
  end

  // ---- AXI master ----
  task automatic axi_write(logic [4:0] a, logic [31:0] first, int n, int step,
                           output logic [1:0] resp);
    #1 awvalid = 1; awaddr = {27'd0, a}; awid = awid + 1; awlen = 8'(n - 1);
    do @(negedge aclk); while (!awready);
    @(posedge aclk);
    #1 awvalid = 0;
    for (int i = 0; i < n; i++) begin
      wvalid = 1; wdata = first + 32'(i * step); wlast = (i == n - 1);
      do @(negedge aclk); while (!wready);
      @(posedge aclk);
      #1 wvalid = 0; wlast = 0;
    end
    bready = 1;
    do @(negedge aclk); while (!bvalid);
    resp = bresp;
    check(bid == awid, "BID echoes AWID");
    @(posedge aclk);
    #1 bready = 0;
  endtask

  task automatic axi_read(logic [4:0] a, int n, output logic [31:0] d[$], output logic [1:0] r[$]);
    d.delete(); r.delete();
    #1 arvalid = 1; araddr = {27'd0, a}; arid = arid + 1; arlen = 8'(n - 1);
    do @(negedge aclk); while (!arready);
    @(posedge aclk);
    #1 arvalid = 0;
    for (int i = 0; i < n; i++) begin
      rready = 1;
      do @(negedge aclk); while (!rvalid);
      d.push_back(rdata); r.push_back(rresp);
      if (rlast != (i == n - 1)) begin checks++; failures++; $display("FAIL: rlast at beat %0d", i); end
      @(posedge aclk);
      #1 rready = 0;
    end
  endtask

  task automatic reg_write(logic [4:0] a, logic [31:0] v, output logic [1:0] resp);
    axi_write(a, v, 1, 0, resp);
  endtask

  task automatic reg_read(logic [4:0] a, output logic [31:0] v);
    logic [31:0] d[$];
    logic [1:0]  r[$];
    axi_read(a, 1, d, r);
    v = d[0];
  endtask

  task automatic wait_done(output logic [31:0] st);
    do begin
      repeat (50) @(posedge aclk);
      reg_read(REG_STATUS, st);
    end while (st[0] || !st[3]);
  endtask

  function automatic logic [7:0] pattern(int i, int seed);
    return 8'((i * 13 + seed) ^ (i >> 8));
  endfunction

  logic [1:0]  resp;
  logic [31:0] v, st;
  logic [31:0] dq[$];
  logic [1:0]  rq[$];
  int          bad;

  initial begin
    repeat (3) @(posedge aclk);
    #1 aresetn = 1;

    // power-up reset runs by itself
    wait_done(st);
    check(flash.n_reset == 1, "power-up reset sent FFh");
    check(st[1] == 1'b1, "R/B ready after reset");

    // Read ID
    reg_write(REG_CMD, 32'(OP_READID), resp);
    check(resp == AXI_OKAY, "read ID command accepted");
    wait_done(st);
    reg_read(REG_ID, v);
    check(v == 32'h9590_DA2C, $sformatf("ID register %08h", v));

    // full page program: block 1, page 1, in eight bursts
    reg_write(REG_ROW, 32'h0000_0041, resp);
    reg_read(REG_LEN, v);
    check(v == PAGE, $sformatf("LEN defaults to the page size (%0d)", v));
    track_rate = 1;
    for (int b = 0; b < PAGE / BURST; b++) begin
      #1 awvalid = 1; awaddr = {27'd0, REG_DATA}; awid = 4'(b); awlen = 8'(BURST - 1);
      do @(negedge aclk); while (!awready);
      @(posedge aclk);
      #1 awvalid = 0;
      for (int i = 0; i < BURST; i++) begin
        wvalid = 1; wdata = {24'h0, pattern(b * BURST + i, 5)}; wlast = (i == BURST - 1);
        do @(negedge aclk); while (!wready);
        @(posedge aclk);
        #1 wvalid = 0; wlast = 0;
        wvalid = (i != BURST - 1);   // next beat offered at once
      end
      bready = 1;
      do @(negedge aclk); while (!bvalid);
      check(bresp == AXI_OKAY, $sformatf("program burst %0d OKAY", b));
      if (b != PAGE / BURST - 1) check(dut.busy, "intermediate burst answered during the program");
      else check(!dut.busy, "final burst answered after the program");
      @(posedge aclk);
      #1 bready = 0;
    end
    track_rate = 0;
    n_multi_burst++;
    check(flash.data_in == PAGE, $sformatf("flash got %0d data bytes", flash.data_in));
    reg_read(REG_STATUS, st);
    check(st[3] && !st[2] && st[15:8] == 8'hE0, $sformatf("program status %08h", st));
    // flash-side byte rate inside bursts
    bad = 0;
    for (int i = 1; i < we_rise_t.size(); i++)
      if (i % BURST != 0 && we_rise_t[i] - we_rise_t[i-1] != BYTE_PERIOD) bad++;
    check(we_rise_t.size() >= PAGE && bad == 0,
          $sformatf("one data byte per %0d clocks (%0d off)", BYTE_PERIOD, bad));

    // full page read in eight bursts
    bad = 0;
    for (int b = 0; b < PAGE / BURST; b++) begin
      axi_read(REG_DATA, BURST, dq, rq);
      foreach (dq[i]) if (dq[i] != {24'h0, pattern(b * BURST + i, 5)} || rq[i] != AXI_OKAY) bad++;
    end
    n_multi_burst++;
    check(bad == 0, $sformatf("page read back (%0d bad beats)", bad));
    reg_read(REG_STATUS, st);
    check(!st[0], "idle after the page read");

    // block erase of block 1 (row 0x40..0x7F) and a short read of the page
    reg_write(REG_ROW, 32'h0000_0040, resp);
    reg_write(REG_CMD, 32'(OP_ERASE), resp);
    check(resp == AXI_OKAY, "erase command accepted");
    // a command while busy is refused
    reg_write(REG_CMD, 32'(OP_STATUS), resp);
    if (resp == AXI_SLVERR) n_refused++;
    wait_done(st);
    check(!st[2], "erase passed");
    check(flash.addr_log.size() >= 3 && flash.addr_log[flash.addr_log.size() - 3] == 8'h40 &&
          flash.addr_log[flash.addr_log.size() - 2] == 8'h00 &&
          flash.addr_log[flash.addr_log.size() - 1] == 8'h00, "erase row cycles");
    reg_write(REG_ROW, 32'h0000_0041, resp);
    reg_write(REG_LEN, 32'd16, resp);
    axi_read(REG_DATA, 16, dq, rq);
    bad = 0;
    foreach (dq[i]) if (dq[i] != 32'hFF) bad++;
    check(bad == 0, "erased page reads FFh");

    // read status command
    reg_write(REG_CMD, 32'(OP_STATUS), resp);
    wait_done(st);
    check(st[15:8] == 8'hE0 && !st[2], $sformatf("read status %02h", st[15:8]));
    // status again: read without a new 70h
    v = 32'(flash.n_status);
    reg_write(REG_CMD, 32'(OP_STATUS_RD), resp);
    wait_done(st);
    if (flash.n_status == int'(v) && st[15:8] == 8'hE0) n_stat_again++;

    // failing program: final response SLVERR
    flash.fail_next = 1;
    reg_write(REG_ROW, 32'h0000_0100, resp);
    axi_write(REG_DATA, 32'h0000_00A5, 16, 1, resp);
    if (resp == AXI_SLVERR) n_prog_err++;
    reg_read(REG_STATUS, st);
    check(st[2] && st[15:8] == 8'hE1, "program failure in STATUS");

    // failing erase
    flash.fail_next = 1;
    reg_write(REG_CMD, 32'(OP_ERASE), resp);
    wait_done(st);
    if (st[2]) n_erase_err++;

    // reset command
    reg_write(REG_CMD, 32'(OP_RESET), resp);
    wait_done(st);
    check(flash.n_reset == 2, "reset command sent FFh");

    // every mechanism happened
    check(flash.n_prog == 2 && flash.n_read == 2 && flash.n_erase == 2 && flash.n_id == 1,
          $sformatf("operations prog=%0d read=%0d erase=%0d id=%0d",
                    flash.n_prog, flash.n_read, flash.n_erase, flash.n_id));
    check(flash.n_status >= 5, $sformatf("status reads %0d", flash.n_status));
    check(n_rb_wait > 0, "R/B busy waits");
    check(n_w_stall > 0, "program data back-pressure");
    check(n_r_wait > 0, "read data waits");
    check(n_multi_burst == 2, "pages over several bursts");
    check(n_prog_err == 1, "program error path");
    check(n_erase_err == 1, "erase error path");
    check(n_refused == 1, "command refused while busy");
    check(n_stat_again == 1, "status re-read without 70h");
    check(flash.violations == 0, $sformatf("flash protocol violations: %0d", flash.violations));
    $display("mechanisms: rb_wait=%0d w_stall=%0d r_wait=%0d multi_burst=%0d prog_err=%0d erase_err=%0d refused=%0d stat_again=%0d",
             n_rb_wait, n_w_stall, n_r_wait, n_multi_burst, n_prog_err, n_erase_err, n_refused, n_stat_again);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (1_000_000) @(posedge aclk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
